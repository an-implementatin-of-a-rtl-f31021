// tb_channel_module: one channel at 80 kHz clock (10 clocks per sample),
// 1 ms debounce. Plays the DSP and the converter: a switched-off channel
// gives no interrupt; once on, a call raises the interrupt, the DSP enables
// the converter, the frame tick arrives after 160 samples (1600 clocks),
// the 160 samples are read back in order from the input buffer, and a
// 16-word record written to the output buffer is announced only when
// complete and read out by the multiplexer side one clock after each pop.
module tb_channel_module;
  import surv_pkg::*;
  logic clk = 0, rst_n = 0, chan_on = 0, line_offhook = 0;
  logic adc_convert, adc_valid = 0;
  logic [15:0] adc_data = 16'h0100;
  logic dsp_int, dsp_offhook, dsp_adc_en = 0, dsp_frame_tick, dsp_in_rd = 0;
  logic [15:0] dsp_in_data, dsp_out_data = '0, buf_data;
  logic dsp_in_empty, dsp_in_overflow, dsp_out_wr = 0, dsp_out_full;
  logic buf_frame_ready, buf_rd = 0;
  int checks = 0, failures = 0, ints = 0, cyc = 0, tick_cyc = -1;

  channel_module #(.CLK_HZ(80_000), .DEBOUNCE_MS(1), .IN_DEPTH(512), .OUT_DEPTH(64), .FRAME_W(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // converter model: answers 2 clocks after the strobe with a counting sample
  logic [1:0] pipe = '0;
  logic [15:0] next_s = 16'h0100;
  always @(posedge clk) begin
    cyc++;
    pipe <= {pipe[0], rst_n && adc_convert};
    adc_valid <= pipe[1];
    if (pipe[1]) begin adc_data <= next_s; next_s <= next_s + 16'd3; end
    if (rst_n && dsp_int) ints++;
    if (rst_n && dsp_frame_tick && tick_cyc < 0) tick_cyc = cyc;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0;
    logic [15:0] exp;
    repeat (3) @(posedge clk); rst_n = 1;
    // channel off: no interrupt, no conversions
    line_offhook = 1;
    repeat (200) @(negedge clk);
    check(ints == 0 && dsp_offhook, "off channel: no interrupt");
    dsp_adc_en = 1;
    repeat (50) @(negedge clk);
    check(dsp_in_empty, "off channel: converter held off");
    dsp_adc_en = 0;
    line_offhook = 0;
    repeat (200) @(negedge clk);
    // channel on, call arrives
    chan_on = 1;
    line_offhook = 1;
    repeat (200) @(negedge clk);
    check(ints == 1, $sformatf("hook-off interrupt, got %0d", ints));
    dsp_adc_en = 1; t0 = cyc;
    while (tick_cyc < 0 && cyc - t0 < 3000) @(negedge clk);
    check(tick_cyc - t0 >= 1590 && tick_cyc - t0 <= 1605, $sformatf("frame tick after %0d clocks", tick_cyc - t0));
    dsp_adc_en = 0;
    // read the 160 samples
    exp = 16'h0100;
    for (int i = 0; i < 160; i++) begin
      dsp_in_rd = 1; @(negedge clk); dsp_in_rd = 0;
      check(dsp_in_data == exp, $sformatf("sample %0d = %h exp %h", i, dsp_in_data, exp));
      exp += 16'd3;
    end
    repeat (40) @(negedge clk);
    check(!dsp_in_overflow, "no overflow");
    // output record
    for (int i = 0; i < 16; i++) begin
      check(!buf_frame_ready, "record not ready before complete");
      dsp_out_wr = 1; dsp_out_data = 16'hC000 + 16'(i); @(negedge clk);
    end
    dsp_out_wr = 0; @(negedge clk);
    check(buf_frame_ready, "record ready after 16 words");
    for (int i = 0; i < 16; i++) begin
      buf_rd = 1; @(negedge clk); buf_rd = 0;
      check(buf_data == 16'hC000 + 16'(i), $sformatf("record word %0d", i));
    end
    @(negedge clk);
    check(!buf_frame_ready, "ready drops after record read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
