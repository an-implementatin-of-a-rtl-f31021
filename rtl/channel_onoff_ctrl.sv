// channel_onoff_ctrl: channel ON/OFF control unit of the multiplexer FPGA.
// The operator switches each of the up to 64 channels on or off from the
// host; the unit keeps one 8-bit mask register per installed DSP board and
// drives the per-channel control lines (chan_on) to the boards.
//
// Register reg_idx (0..N_BOARDS-1) holds board reg_idx's mask, bit i for the
// board's channel i. A write (we) loads wdata[7:0] in that clock; rdata shows
// the addressed mask combinationally (upper bits zero). Registers of boards
// that are not installed read as zero and ignore writes. All channels are off
// after reset.
//
// That the unit switches channels of the installed boards follows the source
// design; the register layout and the reset value are this design's choices.
module channel_onoff_ctrl
  import surv_pkg::*;
#(
  parameter int unsigned N_BOARDS = MAX_BOARDS,
  localparam int unsigned N_CH    = N_BOARDS * CH_PER_BOARD
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              we,
  input  logic [2:0]        reg_idx,
  input  logic [DATA_W-1:0] wdata,
  output logic [DATA_W-1:0] rdata,
  output logic [N_CH-1:0]   chan_on
);

  logic [CH_PER_BOARD-1:0] mask_q [N_BOARDS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int b = 0; b < N_BOARDS; b++) mask_q[b] <= '0;
    end else if (we && (int'(reg_idx) < N_BOARDS)) begin
      mask_q[reg_idx] <= wdata[CH_PER_BOARD-1:0];
    end
  end

  always_comb begin
    rdata = '0;
    if (int'(reg_idx) < N_BOARDS) rdata[CH_PER_BOARD-1:0] = mask_q[reg_idx];
    for (int b = 0; b < N_BOARDS; b++)
      chan_on[b*CH_PER_BOARD +: CH_PER_BOARD] = mask_q[b];
  end

endmodule
