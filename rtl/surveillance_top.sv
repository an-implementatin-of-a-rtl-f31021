// surveillance_top: the digital logic of a 64-channel telephone-line speech
// recorder. Up to eight 8-channel DSP boards each sample eight lines and
// hand one compressed frame record per channel every 20 ms to the
// multiplexer, which merges the records of all channels into one FIFO that
// the host PC drains, sorts by channel and stores.
//
// Instantiated here: N_BOARDS dsp_board blocks and one mux_system. Not
// implemented and therefore brought out as ports, indexed by channel number
// (board * 8 + channel on the board):
//   - the line interface and converter of each channel (line_offhook,
//     adc_convert, adc_valid, adc_data);
//   - the DSP of each channel, which runs the VSELP encoder (dsp_*): its
//     interrupt, converter enable, input-buffer read and output-buffer write;
//   - the host PC's I/O bus (pc_*, irq).
// Bus and buffer timings are those of dsp_board and mux_system. The board
// count, buffer sizes and rates follow the source design.
module surveillance_top
  import surv_pkg::*;
#(
  parameter int unsigned N_BOARDS             = MAX_BOARDS,
  parameter int unsigned CLK_HZ               = 50_000_000,
  parameter int unsigned DEBOUNCE_MS          = 10,
  parameter int unsigned CH_DEPTH             = CH_FIFO_DEPTH,
  parameter int unsigned MUX_DEPTH            = MUX_FIFO_DEPTH,
  parameter logic [HOST_ADDR_W-1:0] BASE_ADDR = 10'h300,
  localparam int unsigned N_CH                = N_BOARDS * CH_PER_BOARD
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // telephone lines and converters
  input  logic [N_CH-1:0]        line_offhook,
  output logic [N_CH-1:0]        adc_convert,
  input  logic [N_CH-1:0]        adc_valid,
  input  logic [DATA_W-1:0]      adc_data [N_CH],
  // per-channel DSPs
  output logic [N_CH-1:0]        dsp_int,
  output logic [N_CH-1:0]        dsp_offhook,
  output logic [N_CH-1:0]        dsp_chan_on,
  input  logic [N_CH-1:0]        dsp_adc_en,
  output logic [N_CH-1:0]        dsp_frame_tick,
  input  logic [N_CH-1:0]        dsp_in_rd,
  output logic [DATA_W-1:0]      dsp_in_data [N_CH],
  output logic [N_CH-1:0]        dsp_in_empty,
  output logic [N_CH-1:0]        dsp_in_overflow,
  input  logic [N_CH-1:0]        dsp_out_wr,
  input  logic [DATA_W-1:0]      dsp_out_data [N_CH],
  output logic [N_CH-1:0]        dsp_out_full,
  // host PC
  input  logic [HOST_ADDR_W-1:0] pc_addr,
  input  logic                   pc_wr,
  input  logic                   pc_rd,
  input  logic [DATA_W-1:0]      pc_wdata,
  output logic [DATA_W-1:0]      pc_rdata,
  output logic                   irq
);

  localparam int unsigned C = CH_PER_BOARD;

  logic [N_CH-1:0]   chan_on, ch_ready, ch_rd;
  logic [DATA_W-1:0] board_data [N_BOARDS];

  assign dsp_chan_on = chan_on;

  for (genvar b = 0; b < N_BOARDS; b++) begin : g_board
    logic [DATA_W-1:0] adc_data_b [C];
    logic [DATA_W-1:0] in_data_b  [C];
    logic [DATA_W-1:0] out_data_b [C];

    for (genvar i = 0; i < C; i++) begin : g_map
      assign adc_data_b[i]         = adc_data[b*C + i];
      assign out_data_b[i]         = dsp_out_data[b*C + i];
      assign dsp_in_data[b*C + i]  = in_data_b[i];
    end

    dsp_board #(
      .CLK_HZ(CLK_HZ), .DEBOUNCE_MS(DEBOUNCE_MS),
      .IN_DEPTH(CH_DEPTH), .OUT_DEPTH(CH_DEPTH), .FRAME_W(FRAME_WORDS)
    ) u_board (
      .clk, .rst_n,
      .chan_on         (chan_on[b*C +: C]),
      .line_offhook    (line_offhook[b*C +: C]),
      .adc_convert     (adc_convert[b*C +: C]),
      .adc_valid       (adc_valid[b*C +: C]),
      .adc_data        (adc_data_b),
      .dsp_int         (dsp_int[b*C +: C]),
      .dsp_offhook     (dsp_offhook[b*C +: C]),
      .dsp_adc_en      (dsp_adc_en[b*C +: C]),
      .dsp_frame_tick  (dsp_frame_tick[b*C +: C]),
      .dsp_in_rd       (dsp_in_rd[b*C +: C]),
      .dsp_in_data     (in_data_b),
      .dsp_in_empty    (dsp_in_empty[b*C +: C]),
      .dsp_in_overflow (dsp_in_overflow[b*C +: C]),
      .dsp_out_wr      (dsp_out_wr[b*C +: C]),
      .dsp_out_data    (out_data_b),
      .dsp_out_full    (dsp_out_full[b*C +: C]),
      .buf_frame_ready (ch_ready[b*C +: C]),
      .buf_rd          (ch_rd[b*C +: C]),
      .buf_data        (board_data[b])
    );
  end

  mux_system #(
    .N_BOARDS(N_BOARDS), .FIFO_DEPTH(MUX_DEPTH), .FRAME_W(FRAME_WORDS), .BASE_ADDR(BASE_ADDR)
  ) u_mux (
    .clk, .rst_n,
    .pc_addr, .pc_wr, .pc_rd, .pc_wdata, .pc_rdata, .irq,
    .chan_on    (chan_on),
    .ch_ready   (ch_ready),
    .ch_rd      (ch_rd),
    .board_data (board_data)
  );

endmodule
