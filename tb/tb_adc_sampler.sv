// tb_adc_sampler: 80 kHz clock, 8 kHz sampling, i.e. a conversion every 10
// clocks. A converter model answers each strobe 3 clocks later with a
// counting sample. Checked: strobe spacing, every sample written to the
// buffer in order, a frame tick on every 160th sample, nothing while disabled.
module tb_adc_sampler;
  logic clk = 0, rst_n = 0, enable = 0;
  logic adc_convert, adc_valid = 0, fifo_wr, frame_tick;
  logic [15:0] adc_data = '0, fifo_wdata;
  int checks = 0, failures = 0;
  int conv_n = 0, wr_n = 0, ticks = 0, last_conv = -1, cyc = 0;
  logic [15:0] next_sample = 16'h1000;

  adc_sampler #(.CLK_HZ(80_000), .SAMPLE_HZ(8000), .FRAME_SAMPLES(160)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // converter model: data valid 3 clocks after the strobe
  logic [2:0] pipe = '0;
  always @(posedge clk) begin
    cyc++;
    pipe <= {pipe[1:0], adc_convert};
    adc_valid <= pipe[1];
    if (pipe[1]) adc_data <= adc_data + 1'b1;
    if (rst_n && adc_convert) begin
      if (last_conv >= 0) check(cyc - last_conv == 10, $sformatf("strobe spacing %0d", cyc - last_conv));
      last_conv = cyc;
      conv_n++;
    end
    if (rst_n && fifo_wr) begin
      check(fifo_wdata == adc_data, "sample passed to buffer");
      wr_n++;
      if (frame_tick) begin
        ticks++;
        check(wr_n % 160 == 0, $sformatf("tick at sample %0d", wr_n));
      end
    end
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (50) @(posedge clk);
    check(conv_n == 0, "no conversion while disabled");
    enable = 1;
    begin
      int t0;
      t0 = cyc;
      while (ticks < 2 && cyc - t0 < 5000) @(posedge clk);
      #1;
      check(ticks == 2, $sformatf("two frame ticks, got %0d", ticks));
      check(wr_n == 320, $sformatf("second tick at sample 320, got %0d", wr_n));
      // 320 samples at 10 clocks each, first answer 4 clocks after enable
      check(cyc - t0 >= 3190 && cyc - t0 <= 3200, $sformatf("frame time %0d clocks", cyc - t0));
    end
    enable = 0;
    repeat (40) @(posedge clk);
    check(wr_n <= 321, "stops when disabled");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
