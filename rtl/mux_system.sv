// mux_system: the multiplexer unit between the DSP boards and the host PC:
// one FPGA holding the address decoder, the channel ON/OFF control unit and
// the buffer control unit, plus the 16 Kword FIFO that collects the
// multiplexed frame records of all channels.
//
// Host bus: pc_addr / pc_wdata with one-clock pc_wr / pc_rd strobes.
// pc_rdata is valid the clock after pc_rd (a popped FIFO word comes from the
// FIFO output, every other register from a copy taken at the strobe).
// irq is the buffer control unit's full interrupt.
// Board side: chan_on are the ON/OFF control lines, ch_ready the buffer
// state signals, ch_rd the buffer control signals (one-hot), board_data the
// buffer data bus of each board, valid the clock after its ch_rd bit.
//
// The partition into these four parts follows the source design; the bus
// timing is this design's choice.
module mux_system
  import surv_pkg::*;
#(
  parameter int unsigned N_BOARDS             = MAX_BOARDS,
  parameter int unsigned FIFO_DEPTH           = MUX_FIFO_DEPTH,
  parameter int unsigned FRAME_W              = FRAME_WORDS,
  parameter logic [HOST_ADDR_W-1:0] BASE_ADDR = 10'h300,
  localparam int unsigned N_CH                = N_BOARDS * CH_PER_BOARD
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // host PC
  input  logic [HOST_ADDR_W-1:0] pc_addr,
  input  logic                   pc_wr,
  input  logic                   pc_rd,
  input  logic [DATA_W-1:0]      pc_wdata,
  output logic [DATA_W-1:0]      pc_rdata,
  output logic                   irq,
  // DSP boards
  output logic [N_CH-1:0]        chan_on,
  input  logic [N_CH-1:0]        ch_ready,
  output logic [N_CH-1:0]        ch_rd,
  input  logic [DATA_W-1:0]      board_data [N_BOARDS]
);

  localparam int unsigned CHW = (N_CH > 1) ? $clog2(N_CH) : 1;
  localparam int unsigned BW  = (N_BOARDS > 1) ? $clog2(N_BOARDS) : 1;
  localparam int unsigned CW  = $clog2(FIFO_DEPTH + 1);

  logic              buf_wr, buf_rd, onoff_wr, onoff_rd;
  logic [2:0]        reg_idx;
  logic [DATA_W-1:0] onoff_rdata, buf_rdata, rreg_q;
  logic              pop_q;
  logic [CHW-1:0]    cur_ch;
  logic [BW-1:0]     board_q;
  logic [DATA_W-1:0] ch_data;
  logic              fifo_wr, fifo_rd, fifo_full, fifo_empty, fifo_ovf, fifo_unf;
  logic [DATA_W-1:0] fifo_wdata, fifo_rdata;
  logic [CW-1:0]     fifo_count;

  mux_addr_decoder #(.BASE_ADDR(BASE_ADDR)) u_dec (
    .pc_addr, .pc_wr, .pc_rd,
    .buf_wr, .buf_rd, .onoff_wr, .onoff_rd, .reg_idx
  );

  channel_onoff_ctrl #(.N_BOARDS(N_BOARDS)) u_onoff (
    .clk, .rst_n,
    .we      (onoff_wr),
    .reg_idx (reg_idx),
    .wdata   (pc_wdata),
    .rdata   (onoff_rdata),
    .chan_on (chan_on)
  );

  buffer_ctrl #(.N_CH(N_CH), .FRAME_W(FRAME_W), .FIFO_DEPTH(FIFO_DEPTH)) u_bufctl (
    .clk, .rst_n,
    .we         (buf_wr),
    .re         (buf_rd),
    .reg_idx    (reg_idx),
    .wdata      (pc_wdata),
    .rdata      (buf_rdata),
    .irq        (irq),
    .ch_ready   (ch_ready),
    .ch_on      (chan_on),
    .ch_rd      (ch_rd),
    .cur_ch     (cur_ch),
    .ch_data    (ch_data),
    .fifo_wr    (fifo_wr),
    .fifo_wdata (fifo_wdata),
    .fifo_rd    (fifo_rd),
    .fifo_count (fifo_count),
    .fifo_empty (fifo_empty),
    .fifo_full  (fifo_full)
  );

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n,
    .wr_en     (fifo_wr),
    .wr_data   (fifo_wdata),
    .rd_en     (fifo_rd),
    .rd_data   (fifo_rdata),
    .count     (fifo_count),
    .full      (fifo_full),
    .empty     (fifo_empty),
    .overflow  (fifo_ovf),
    .underflow (fifo_unf)
  );

  // Buffer data bus: the board that was read in the previous clock.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) board_q <= '0;
    else if (|ch_rd) board_q <= BW'(cur_ch / CHW'(CH_PER_BOARD));
  end
  assign ch_data = board_data[board_q];

  // Host read data, valid the clock after pc_rd.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pop_q  <= 1'b0;
      rreg_q <= '0;
    end else begin
      pop_q <= fifo_rd;
      if (onoff_rd)    rreg_q <= onoff_rdata;
      else if (buf_rd) rreg_q <= buf_rdata;
      else if (pc_rd)  rreg_q <= '1;   // outside the window: floating bus
    end
  end
  assign pc_rdata = pop_q ? fifo_rdata : rreg_q;

endmodule
