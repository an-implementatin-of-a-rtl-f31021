// tb_surveillance_full: one complete recording with the top at its default
// configuration: eight boards (64 channels), 50 MHz clock, 8 kHz sampling,
// 10 ms hook debounce, 4 Kword channel buffers, 16 Kword MUX FIFO.
//
// All channels are switched on and all 64 lines go off hook at once; after
// two 20 ms frames plus the debounce time the lines hang up. The host polls
// the FIFO level and reads whole records, checking each against the records
// the DSP models wrote. Every channel must deliver every record it encoded
// (at least two), samples must arrive in order, and no buffer may overflow.
module tb_surveillance_full;
  import surv_pkg::*;
  localparam int N = MAX_BOARDS * CH_PER_BOARD;
  localparam logic [9:0] B = 10'h300;

  logic clk = 0, rst_n = 0;
  logic [N-1:0] line_offhook = '0, adc_convert, adc_valid;
  logic [15:0] adc_data [N];
  logic [N-1:0] dsp_int, dsp_offhook, dsp_chan_on, dsp_adc_en, dsp_frame_tick, dsp_in_rd;
  logic [15:0] dsp_in_data [N];
  logic [N-1:0] dsp_in_empty, dsp_in_overflow, dsp_out_wr, dsp_out_full;
  logic [15:0] dsp_out_data [N];
  logic [9:0] pc_addr = '0;
  logic pc_wr = 0, pc_rd = 0;
  logic [15:0] pc_wdata = '0, pc_rdata;
  logic irq;

  int calls [N], frames [N], bad [N], rx_records [N];
  logic [15:0] sent [N][$];
  int checks = 0, failures = 0;
  longint cyc = 0;

  surveillance_top dut (.*);

  for (genvar c = 0; c < N; c++) begin : g_ch
    adc_model #(.CH(c)) u_adc (.clk, .rst_n, .adc_convert(adc_convert[c]),
                               .adc_valid(adc_valid[c]), .adc_data(adc_data[c]));
    dsp_model #(.CH(c)) u_dsp (
      .clk, .rst_n,
      .dsp_int(dsp_int[c]), .dsp_offhook(dsp_offhook[c]), .dsp_frame_tick(dsp_frame_tick[c]),
      .dsp_in_data(dsp_in_data[c]), .dsp_in_empty(dsp_in_empty[c]), .dsp_out_full(dsp_out_full[c]),
      .dsp_adc_en(dsp_adc_en[c]), .dsp_in_rd(dsp_in_rd[c]), .dsp_out_wr(dsp_out_wr[c]),
      .dsp_out_data(dsp_out_data[c]), .calls(calls[c]), .frames_done(frames[c]), .bad_samples(bad[c]));
  end

  always #10 clk = ~clk;   // 20 ns: 50 MHz

  always @(posedge clk) begin
    cyc++;
    if (rst_n) for (int c = 0; c < N; c++) if (dsp_out_wr[c]) sent[c].push_back(dsp_out_data[c]);
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic pc_write(input logic [9:0] a, input logic [15:0] d);
    @(negedge clk); pc_addr = a; pc_wdata = d; pc_wr = 1; @(negedge clk); pc_wr = 0;
  endtask

  task automatic pc_read(input logic [9:0] a, output logic [15:0] d);
    @(negedge clk); pc_addr = a; pc_rd = 1; @(negedge clk); pc_rd = 0; d = pc_rdata;
  endtask

  task automatic drain();
    logic [15:0] cnt, w;
    int c;
    pc_read(B + 10'h04, cnt);
    for (int r = 0; r < int'(cnt) / int'(FRAME_WORDS); r++) begin
      for (int i = 0; i < int'(FRAME_WORDS); i++) begin
        pc_read(B, w);
        if (i == 0) begin
          c = int'(w[5:0]);
          rx_records[c]++;
          check(w[15:8] == FRAME_SYNC, "sync byte");
        end
        if (sent[c].size() == 0) check(0, $sformatf("ch %0d: word with nothing sent", c));
        else check(w == sent[c].pop_front(), $sformatf("ch %0d word %0d", c, i));
      end
    end
  endtask

  initial begin
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    for (int c = 0; c < N; c++) rx_records[c] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int b = 0; b < int'(MAX_BOARDS); b++) pc_write(B + 10'h10 + 10'(2 * b), 16'h00FF);
    pc_write(B + 10'h06, 16'h0003);
    line_offhook = '1;
    // debounce (10 ms) + two frames (40 ms) + margin, draining as we go
    while (cyc < 2_600_000) begin
      repeat (5000) @(negedge clk);
      drain();
    end
    line_offhook = '0;
    repeat (600_000) @(negedge clk);
    pc_read(B + 10'h04, d);
    while (d != 0) begin drain(); pc_read(B + 10'h04, d); end
    for (int c = 0; c < N; c++) begin
      check(calls[c] == 1, $sformatf("ch %0d calls %0d", c, calls[c]));
      check(bad[c] == 0, $sformatf("ch %0d samples out of order", c));
      check(frames[c] >= 2 && rx_records[c] == frames[c] && sent[c].size() == 0,
            $sformatf("ch %0d records %0d of %0d", c, rx_records[c], frames[c]));
    end
    check(dsp_in_overflow == '0, "no input buffer overflow");
    $display("records per channel: %0d, simulated %0d clocks", rx_records[0], cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
