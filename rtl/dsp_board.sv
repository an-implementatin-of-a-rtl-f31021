// dsp_board: one 8-channel DSP board, eight 1-channel modules side by side.
// Each channel has its own line, converter and DSP ports (arrays indexed by
// the channel's position on the board). Towards the multiplexer the board
// offers one frame-ready flag per channel and one shared 16-bit data bus:
// buf_rd[i] pops a word from channel i's output buffer and the word appears
// on buf_data one clock later, selected by a register that remembers which
// channel was read. At most one buf_rd bit may be set in a clock.
//
// Eight channels per board follows the source design; the shared bus with a
// registered select stands in for the board's tri-state buffer bus.
module dsp_board
  import surv_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned DEBOUNCE_MS = 10,
  parameter int unsigned IN_DEPTH    = CH_FIFO_DEPTH,
  parameter int unsigned OUT_DEPTH   = CH_FIFO_DEPTH,
  parameter int unsigned FRAME_W     = FRAME_WORDS,
  localparam int unsigned N          = CH_PER_BOARD
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      chan_on,
  input  logic [N-1:0]      line_offhook,
  output logic [N-1:0]      adc_convert,
  input  logic [N-1:0]      adc_valid,
  input  logic [DATA_W-1:0] adc_data [N],
  output logic [N-1:0]      dsp_int,
  output logic [N-1:0]      dsp_offhook,
  input  logic [N-1:0]      dsp_adc_en,
  output logic [N-1:0]      dsp_frame_tick,
  input  logic [N-1:0]      dsp_in_rd,
  output logic [DATA_W-1:0] dsp_in_data [N],
  output logic [N-1:0]      dsp_in_empty,
  output logic [N-1:0]      dsp_in_overflow,
  input  logic [N-1:0]      dsp_out_wr,
  input  logic [DATA_W-1:0] dsp_out_data [N],
  output logic [N-1:0]      dsp_out_full,
  output logic [N-1:0]      buf_frame_ready,
  input  logic [N-1:0]      buf_rd,
  output logic [DATA_W-1:0] buf_data
);

  logic [DATA_W-1:0]    ch_data [N];
  logic [$clog2(N)-1:0] sel_q;

  for (genvar i = 0; i < N; i++) begin : g_ch
    channel_module #(
      .CLK_HZ(CLK_HZ), .DEBOUNCE_MS(DEBOUNCE_MS),
      .IN_DEPTH(IN_DEPTH), .OUT_DEPTH(OUT_DEPTH), .FRAME_W(FRAME_W)
    ) u_ch (
      .clk, .rst_n,
      .chan_on         (chan_on[i]),
      .line_offhook    (line_offhook[i]),
      .adc_convert     (adc_convert[i]),
      .adc_valid       (adc_valid[i]),
      .adc_data        (adc_data[i]),
      .dsp_int         (dsp_int[i]),
      .dsp_offhook     (dsp_offhook[i]),
      .dsp_adc_en      (dsp_adc_en[i]),
      .dsp_frame_tick  (dsp_frame_tick[i]),
      .dsp_in_rd       (dsp_in_rd[i]),
      .dsp_in_data     (dsp_in_data[i]),
      .dsp_in_empty    (dsp_in_empty[i]),
      .dsp_in_overflow (dsp_in_overflow[i]),
      .dsp_out_wr      (dsp_out_wr[i]),
      .dsp_out_data    (dsp_out_data[i]),
      .dsp_out_full    (dsp_out_full[i]),
      .buf_frame_ready (buf_frame_ready[i]),
      .buf_rd          (buf_rd[i]),
      .buf_data        (ch_data[i])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sel_q <= '0;
    end else begin
      for (int i = 0; i < N; i++)
        if (buf_rd[i]) sel_q <= i[$clog2(N)-1:0];
    end
  end

  assign buf_data = ch_data[sel_q];

  a_one_reader: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(buf_rd));

endmodule
