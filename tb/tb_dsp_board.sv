// tb_dsp_board: one board with small buffers. Checks that ON/OFF lines gate
// each channel's hook-off interrupt, that every channel's output buffer
// announces a complete 16-word record, and that the shared buffer data bus
// returns, one clock after each pop, the word of the channel that was read,
// with channels read in a shuffled order.
module tb_dsp_board;
  import surv_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] chan_on = '0, line_offhook = '0, adc_convert, adc_valid = '0;
  logic [15:0] adc_data [N];
  logic [N-1:0] dsp_int, dsp_offhook, dsp_adc_en = '0, dsp_frame_tick, dsp_in_rd = '0;
  logic [15:0] dsp_in_data [N];
  logic [N-1:0] dsp_in_empty, dsp_in_overflow, dsp_out_wr = '0, dsp_out_full;
  logic [15:0] dsp_out_data [N];
  logic [N-1:0] buf_frame_ready, buf_rd = '0;
  logic [15:0] buf_data;
  logic [N-1:0] int_seen = '0;
  int checks = 0, failures = 0;

  dsp_board #(.CLK_HZ(80_000), .DEBOUNCE_MS(1), .IN_DEPTH(256), .OUT_DEPTH(64), .FRAME_W(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n) int_seen <= int_seen | dsp_int;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int order[N];
    for (int i = 0; i < N; i++) begin adc_data[i] = '0; dsp_out_data[i] = '0; order[i] = i; end
    repeat (3) @(posedge clk); rst_n = 1;
    chan_on = 8'hA5;
    line_offhook = 8'hFF;
    repeat (200) @(negedge clk);
    check(int_seen == 8'hA5, $sformatf("interrupts %h exp a5", int_seen));
    check(dsp_offhook == 8'hFF, "hook state on every channel");
    // a record per channel, channel c word w = {c, w}
    for (int w = 0; w < 16; w++) begin
      check(buf_frame_ready == '0, "no record ready early");
      dsp_out_wr = '1;
      for (int c = 0; c < N; c++) dsp_out_data[c] = 16'(c * 256 + w);
      @(negedge clk);
    end
    dsp_out_wr = '0;
    @(negedge clk);
    check(buf_frame_ready == '1, "all records ready");
    order.shuffle();
    for (int k = 0; k < N; k++) begin
      int c;
      c = order[k];
      for (int w = 0; w < 16; w++) begin
        buf_rd = '0; buf_rd[c] = 1'b1; @(negedge clk); buf_rd = '0;
        check(buf_data == 16'(c * 256 + w), $sformatf("ch %0d word %0d got %h", c, w, buf_data));
      end
      @(negedge clk);
      check(!buf_frame_ready[c], "ready drops after read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
