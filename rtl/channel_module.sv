// channel_module: the digital part of one 1-channel DSP module, the unit that
// records one telephone line. It holds the hook-off detector, the A/D
// converter control, the 4 Kword input buffer (converter -> DSP) and the
// 4 Kword output buffer (DSP -> multiplexer). The DSP that runs the VSELP
// encoder, its program EPROM and data SRAM, and the analog front end (gain
// control, anti-alias filter, converter) are outside; their signals are ports.
//
// Flow: an off-hook line raises dsp_int; the DSP sets dsp_adc_en, the sampler
// fills the input buffer at 8 kHz and pulses dsp_frame_tick every 160
// samples; the DSP reads the frame (dsp_in_rd / dsp_in_data, one clock
// latency), encodes it and writes a FRAME_WORDS-word record, header first,
// into the output buffer (dsp_out_wr / dsp_out_data). buf_frame_ready tells
// the multiplexer that at least one whole record is waiting; buf_rd pops a
// word, which appears on buf_data one clock later.
//
// chan_on is the multiplexer's ON/OFF control for this channel: while it is
// low the converter is held off and no hook-off interrupt is raised. That
// gating is this design's reading of the ON/OFF control; the block structure
// and buffer sizes follow the source design.
module channel_module
  import surv_pkg::*;
#(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned DEBOUNCE_MS = 10,
  parameter int unsigned IN_DEPTH    = CH_FIFO_DEPTH,
  parameter int unsigned OUT_DEPTH   = CH_FIFO_DEPTH,
  parameter int unsigned FRAME_W     = FRAME_WORDS
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              chan_on,
  // telephone line interface and converter
  input  logic              line_offhook,
  output logic              adc_convert,
  input  logic              adc_valid,
  input  logic [DATA_W-1:0] adc_data,
  // DSP side
  output logic              dsp_int,
  output logic              dsp_offhook,
  input  logic              dsp_adc_en,
  output logic              dsp_frame_tick,
  input  logic              dsp_in_rd,
  output logic [DATA_W-1:0] dsp_in_data,
  output logic              dsp_in_empty,
  output logic              dsp_in_overflow,
  input  logic              dsp_out_wr,
  input  logic [DATA_W-1:0] dsp_out_data,
  output logic              dsp_out_full,
  // multiplexer side
  output logic              buf_frame_ready,
  input  logic              buf_rd,
  output logic [DATA_W-1:0] buf_data
);

  localparam int unsigned OCW = $clog2(OUT_DEPTH + 1);

  logic              smp_wr;
  logic [DATA_W-1:0] smp_data;
  logic [OCW-1:0]    out_count;
  logic              in_full_unused;
  logic              out_empty, out_ovf, out_unf, in_unf;
  logic [$clog2(IN_DEPTH + 1)-1:0] in_count;

  hookoff_detector #(.CLK_HZ(CLK_HZ), .DEBOUNCE_MS(DEBOUNCE_MS)) u_hook (
    .clk, .rst_n,
    .enable       (chan_on),
    .line_offhook (line_offhook),
    .offhook      (dsp_offhook),
    .dsp_int      (dsp_int)
  );

  adc_sampler #(.CLK_HZ(CLK_HZ), .SAMPLE_HZ(SAMPLE_HZ), .FRAME_SAMPLES(FRAME_SAMPLES)) u_adc (
    .clk, .rst_n,
    .enable      (dsp_adc_en && chan_on),
    .adc_convert (adc_convert),
    .adc_valid   (adc_valid),
    .adc_data    (adc_data),
    .fifo_wr     (smp_wr),
    .fifo_wdata  (smp_data),
    .frame_tick  (dsp_frame_tick)
  );

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(IN_DEPTH)) u_in_buf (
    .clk, .rst_n,
    .wr_en     (smp_wr),
    .wr_data   (smp_data),
    .rd_en     (dsp_in_rd),
    .rd_data   (dsp_in_data),
    .count     (in_count),
    .full      (in_full_unused),
    .empty     (dsp_in_empty),
    .overflow  (dsp_in_overflow),
    .underflow (in_unf)
  );

  sync_fifo #(.WIDTH(DATA_W), .DEPTH(OUT_DEPTH)) u_out_buf (
    .clk, .rst_n,
    .wr_en     (dsp_out_wr),
    .wr_data   (dsp_out_data),
    .rd_en     (buf_rd),
    .rd_data   (buf_data),
    .count     (out_count),
    .full      (dsp_out_full),
    .empty     (out_empty),
    .overflow  (out_ovf),
    .underflow (out_unf)
  );

  assign buf_frame_ready = (out_count >= OCW'(FRAME_W));

endmodule
