// dsp_model: behavioural stand-in for the DSP of one channel, for
// testbenches only. It follows the DSP's side of the channel module's
// protocol: on a hook-off interrupt it enables the converter; on every frame
// tick it reads the 160 samples of the frame from the input buffer (checking
// that they are consecutive samples of its own channel, as the converter
// model produces them), "encodes" them and writes one 16-word record, header
// first, to the output buffer; when the line goes back on hook it disables
// the converter and discards any partial frame left in the input buffer.
//
// The encoding is not VSELP: payload word k is the 16-bit sum of samples
// 16k..16k+15. The header follows surv_pkg::frame_header_t with a fixed date
// and time and a sequence number that counts this channel's records.
module dsp_model
  import surv_pkg::*;
#(
  parameter int CH = 0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        dsp_int,
  input  logic        dsp_offhook,
  input  logic        dsp_frame_tick,
  input  logic [15:0] dsp_in_data,
  input  logic        dsp_in_empty,
  input  logic        dsp_out_full,
  output logic        dsp_adc_en,
  output logic        dsp_in_rd,
  output logic        dsp_out_wr,
  output logic [15:0] dsp_out_data,
  output int          calls,
  output int          frames_done,
  output int          bad_samples
);

  int ticks_seen = 0, ints_seen = 0, ints_done = 0;
  logic [15:0] seq = '0;

  always @(posedge clk) begin
    if (rst_n && dsp_frame_tick) ticks_seen++;
    if (rst_n && dsp_int) ints_seen++;
  end

  task automatic write_word(input logic [15:0] w);
    dsp_out_wr = 1; dsp_out_data = w;
    @(negedge clk);
    dsp_out_wr = 0;
  endtask

  task automatic encode_frame();
    logic [15:0] s [FRAME_SAMPLES];
    logic [15:0] pay [PAYLOAD_WORDS];
    frame_header_t h;
    logic [HDR_WORDS*16-1:0] hbits;
    for (int i = 0; i < int'(FRAME_SAMPLES); i++) begin
      dsp_in_rd = 1; @(negedge clk); dsp_in_rd = 0;
      s[i] = dsp_in_data;
      if (s[i][15:10] != 6'(CH) || (i > 0 && s[i][9:0] != s[i-1][9:0] + 10'd1)) bad_samples++;
    end
    for (int k = 0; k < int'(PAYLOAD_WORDS); k++) begin
      pay[k] = '0;
      for (int j = 0; j < 16; j++) pay[k] += s[16*k + j];
    end
    h = '{sync: FRAME_SYNC, rsvd: 2'b00, channel: 6'(CH), seq: seq, year: 16'd1999,
          month: 8'd5, day: 8'd20, hour: 8'd14, minute: 8'd30, second: 8'd0, hundredths: 8'd0};
    hbits = h;
    while (dsp_out_full) @(negedge clk);
    for (int w = HDR_WORDS - 1; w >= 0; w--) write_word(hbits[w*16 +: 16]);
    for (int k = 0; k < int'(PAYLOAD_WORDS); k++) write_word(pay[k]);
    seq++;
    frames_done++;
  endtask

  initial begin
    dsp_adc_en = 0; dsp_in_rd = 0; dsp_out_wr = 0; dsp_out_data = '0;
    calls = 0; frames_done = 0; bad_samples = 0;
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (ints_seen > ints_done) begin
        ints_done = ints_seen;
        if (!dsp_adc_en) calls++;
        dsp_adc_en = 1;
      end
      if (ticks_seen > frames_done) begin
        encode_frame();
      end else if (dsp_adc_en && !dsp_offhook) begin
        dsp_adc_en = 0;
        repeat (4) @(negedge clk);
        while (!dsp_in_empty) begin dsp_in_rd = 1; @(negedge clk); dsp_in_rd = 0; end
      end
    end
  end

endmodule
