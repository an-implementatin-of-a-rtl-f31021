// adc_sampler: control side of the channel's 16-bit A/D converter. While the
// DSP enables conversion it starts one conversion every CLK_HZ/SAMPLE_HZ
// clocks (8 kHz by default), writes each converted sample into the input
// buffer and tells the DSP each time a full 20 ms frame of 160 samples has
// gone in.
//
// adc_convert is a one-clock start strobe to the converter; the converter
// answers with adc_valid and the sample on adc_data some clocks later, and
// the sample is written to the input buffer in the same clock (fifo_wr).
// frame_tick pulses for one clock together with the write of every 160th
// sample. Dropping enable stops conversions and restarts the sample count.
//
// The 8 kHz rate and the 160-sample frame follow the source design; the
// strobe/valid handshake with the converter is this design's choice.
module adc_sampler #(
  parameter int unsigned CLK_HZ        = 50_000_000,
  parameter int unsigned SAMPLE_HZ     = 8000,
  parameter int unsigned FRAME_SAMPLES = 160,
  localparam int unsigned PERIOD       = CLK_HZ / SAMPLE_HZ,
  localparam int unsigned PW           = $clog2(PERIOD),
  localparam int unsigned SW           = $clog2(FRAME_SAMPLES)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,      // from the DSP: converter enabled
  output logic        adc_convert, // start-of-conversion strobe
  input  logic        adc_valid,   // converter: sample ready
  input  logic [15:0] adc_data,
  output logic        fifo_wr,
  output logic [15:0] fifo_wdata,
  output logic        frame_tick   // 160th sample of a frame written
);

  logic [PW-1:0] div_cnt;
  logic [SW-1:0] smp_cnt;

  assign fifo_wr    = enable && adc_valid;
  assign fifo_wdata = adc_data;
  assign frame_tick = fifo_wr && (smp_cnt == SW'(FRAME_SAMPLES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt     <= '0;
      smp_cnt     <= '0;
      adc_convert <= 1'b0;
    end else if (!enable) begin
      div_cnt     <= '0;
      smp_cnt     <= '0;
      adc_convert <= 1'b0;
    end else begin
      adc_convert <= (div_cnt == '0);
      div_cnt     <= (div_cnt == PW'(PERIOD - 1)) ? '0 : div_cnt + 1'b1;
      if (fifo_wr)
        smp_cnt <= (smp_cnt == SW'(FRAME_SAMPLES - 1)) ? '0 : smp_cnt + 1'b1;
    end
  end

endmodule
