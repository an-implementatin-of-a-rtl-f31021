// tb_channel_onoff_ctrl: eight boards. After reset every channel is off;
// random masks written to random boards must appear on the right eight
// control lines and read back; with four boards installed the upper
// registers read zero and ignore writes.
module tb_channel_onoff_ctrl;
  import surv_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  logic [2:0] reg_idx = '0;
  logic [15:0] wdata = '0, rdata, rdata4;
  logic [63:0] chan_on;
  logic [31:0] chan_on4;
  logic [63:0] model = '0;
  int checks = 0, failures = 0;

  channel_onoff_ctrl #(.N_BOARDS(8)) dut (.*);
  channel_onoff_ctrl #(.N_BOARDS(4)) dut4 (.clk, .rst_n, .we, .reg_idx, .wdata,
                                           .rdata(rdata4), .chan_on(chan_on4));

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    check(chan_on == '0 && chan_on4 == '0, "all off after reset");
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      we = 1; reg_idx = 3'($urandom_range(0, 7)); wdata = 16'($urandom);
      @(negedge clk);
      model[reg_idx*8 +: 8] = wdata[7:0];
      we = 0;
      check(chan_on == model, $sformatf("mask after write to board %0d", reg_idx));
      check(chan_on4 == model[31:0], "four-board instance");
      for (int b = 0; b < 8; b++) begin
        reg_idx = 3'(b); #1;
        check(rdata == {8'h00, model[b*8 +: 8]}, $sformatf("readback board %0d", b));
        check(rdata4 == ((b < 4) ? {8'h00, model[b*8 +: 8]} : 16'h0000), "readback 4-board");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
