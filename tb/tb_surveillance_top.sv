// tb_surveillance_top: end-to-end run of the whole recorder with eight
// boards (64 channels) at a reduced clock (400 kHz, 50 clocks per sample,
// 8000 clocks per 20 ms frame), 1 ms debounce, 1 Kword channel buffers and a
// 512-word MUX FIFO, so that the FIFO fills many times.
//
// Every channel has a converter model and a DSP model. The host model sets
// the ON/OFF masks (channel 9 off), enables transfers and the interrupt,
// takes calls on all lines at staggered times, and drains the FIFO only when
// the interrupt is raised. Mid-run it switches channel 20 off and hangs up
// channels 0..7; at the end all lines hang up and the FIFO is drained.
// Every received record is parsed and compared with the records the DSP
// models wrote (observed on the DSP ports), per channel, in order.
//
// Mechanisms counted (each must happen): hook-off interrupts, records
// through the input buffers, channel switches in the multiplexed stream,
// full interrupts, stalls seen in the status register, an OFF channel
// suppressed, a channel switched off mid-call, calls ending.
module tb_surveillance_top;
  import surv_pkg::*;
  localparam int NB = 8, N = NB * 8;
  localparam logic [9:0] B = 10'h300;
  localparam int MUXD = 512;

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

  int calls [N], frames [N], bad [N];
  logic [15:0] sent [N][$];
  int rx_records [N];
  int checks = 0, failures = 0;
  int n_ints = 0, n_irq = 0, n_stall = 0, n_switch = 0, n_ticks = 0;
  int last_ch = -1;
  bit done = 0;

  surveillance_top #(
    .N_BOARDS(NB), .CLK_HZ(400_000), .DEBOUNCE_MS(1), .CH_DEPTH(1024), .MUX_DEPTH(MUXD), .BASE_ADDR(B)
  ) dut (.*);

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

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < N; c++) begin
      if (dsp_out_wr[c]) sent[c].push_back(dsp_out_data[c]);
      if (dsp_int[c]) n_ints++;
      if (dsp_frame_tick[c]) n_ticks++;
    end
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

  // Read one record from the data port and match it against what was sent.
  task automatic host_record();
    logic [15:0] w [FRAME_WORDS];
    int c;
    for (int i = 0; i < int'(FRAME_WORDS); i++) pc_read(B, w[i]);
    c = int'(w[0][5:0]);
    check(w[0][15:8] == FRAME_SYNC, $sformatf("sync byte %h", w[0]));
    if (c != last_ch) n_switch++;
    last_ch = c;
    rx_records[c]++;
    for (int i = 0; i < int'(FRAME_WORDS); i++) begin
      if (sent[c].size() == 0) begin
        check(0, $sformatf("ch %0d: record word with nothing sent", c));
        break;
      end
      check(w[i] == sent[c].pop_front(), $sformatf("ch %0d record word %0d", c, i));
    end
  endtask

  task automatic drain();
    logic [15:0] st, cnt;
    pc_read(B + 10'h02, st);
    if (st[2]) n_stall++;
    pc_read(B + 10'h04, cnt);
    check(cnt % FRAME_WORDS == 0 || st[0] == 0, "FIFO level");
    for (int r = 0; r < int'(cnt) / int'(FRAME_WORDS); r++) host_record();
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host: drain on interrupt
  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (irq) begin n_irq++; drain(); end
      if (done) break;
    end
  end

  initial begin
    logic [15:0] d;
    for (int c = 0; c < N; c++) rx_records[c] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int b = 0; b < NB; b++) pc_write(B + 10'h10 + 10'(2 * b), (b == 1) ? 16'h00FD : 16'h00FF);
    pc_write(B + 10'h06, 16'h0003);
    // calls on all lines, staggered
    for (int c = 0; c < N; c++) begin
      repeat ($urandom_range(0, 60)) @(negedge clk);
      line_offhook[c] = 1'b1;
    end
    repeat (30000) @(negedge clk);
    // channel 20 off mid-call, channels 0..7 hang up
    pc_write(B + 10'h14, 16'h00EF);
    line_offhook[7:0] = '0;
    repeat (40000) @(negedge clk);
    line_offhook = '0;
    repeat (10000) @(negedge clk);
    done = 1;
    repeat (10) @(negedge clk);
    // final drain without waiting for the interrupt
    pc_read(B + 10'h04, d);
    while (d != 0) begin
      drain();
      repeat (200) @(negedge clk);
      pc_read(B + 10'h04, d);
    end
    for (int c = 0; c < N; c++) begin
      check(bad[c] == 0, $sformatf("ch %0d: %0d samples out of order", c, bad[c]));
      if (c == 9) begin
        check(calls[c] == 0 && rx_records[c] == 0, "ch 9 is off: no call, no record");
      end else if (c == 20) begin
        check(calls[c] == 1 && rx_records[c] >= 2, "ch 20 recorded before switch-off");
      end else begin
        check(calls[c] == 1, $sformatf("ch %0d calls %0d", c, calls[c]));
        check(sent[c].size() == 0, $sformatf("ch %0d: %0d words never arrived", c, sent[c].size()));
        check(rx_records[c] == frames[c] && frames[c] >= ((c < 8) ? 3 : 8),
              $sformatf("ch %0d records %0d of %0d", c, rx_records[c], frames[c]));
      end
    end
    check(rx_records[20] < rx_records[21] - 2, "ch 20 stopped after switch-off");
    check(rx_records[0] < rx_records[8] - 2, "ch 0 stopped after hang-up");
    check(dsp_in_overflow == '0, "no input buffer overflow");
    $display("mechanisms: hook-off interrupts %0d, frame ticks %0d, channel switches %0d, full irqs %0d, stalls %0d",
             n_ints, n_ticks, n_switch, n_irq, n_stall);
    check(n_ints == N - 1, "hook-off interrupts on every ON channel");
    check(n_ticks > 0, "frames through input buffers");
    check(n_switch > 100, "records of many channels interleaved");
    check(n_irq > 0, "full interrupt");
    check(n_stall > 0, "stall while full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
