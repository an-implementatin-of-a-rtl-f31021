// tb_hookoff_detector: 10 clocks per ms, 2 ms debounce (20 clocks). Bounces
// shorter than the debounce time must not change the hook state; a steady
// change is accepted exactly 2 + 20 clocks after it; the interrupt pulses
// once per hook-off while enabled and never on hang-up or while disabled.
module tb_hookoff_detector;
  logic clk = 0, rst_n = 0, enable = 1, line_offhook = 0;
  logic offhook, dsp_int;
  int checks = 0, failures = 0, ints = 0;

  hookoff_detector #(.CLK_HZ(10_000), .DEBOUNCE_MS(2)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && dsp_int) ints++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Drive a level and return the number of clocks until offhook follows.
  task automatic settle(input logic lvl, output int lat);
    @(negedge clk); line_offhook = lvl; lat = 0;
    while (offhook != lvl && lat < 100) begin @(negedge clk); lat++; end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lat;
    repeat (3) @(posedge clk); rst_n = 1;
    // bounces of 5..15 clocks
    for (int b = 0; b < 10; b++) begin
      @(negedge clk); line_offhook = 1;
      repeat (5 + b) @(negedge clk);
      line_offhook = 0;
      repeat (30) @(negedge clk);
      check(!offhook && ints == 0, "bounce ignored");
    end
    settle(1, lat);
    check(offhook, "off hook accepted");
    check(lat == 22, $sformatf("debounce latency %0d exp 22", lat));
    repeat (3) @(negedge clk);
    check(ints == 1, $sformatf("one interrupt on hook-off, got %0d", ints));
    settle(0, lat);
    check(!offhook && lat == 22, "on hook accepted");
    repeat (3) @(negedge clk);
    check(ints == 1, "no interrupt on hang-up");
    enable = 0;
    settle(1, lat);
    check(offhook, "state tracked while disabled");
    repeat (3) @(negedge clk);
    check(ints == 1, "no interrupt while disabled");
    settle(0, lat);
    enable = 1;
    settle(1, lat);
    repeat (3) @(negedge clk);
    check(ints == 2, "second call interrupts");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
