// tb_buffer_ctrl: 8 channels, 4-word records, 16-word MUX FIFO (a real
// sync_fifo). The channels are queue models that return a popped word one
// clock later. Checked: nothing moves until transfers are enabled; records
// arrive whole and in order; all-ready channels are served round robin;
// a switched-off channel is skipped; with the FIFO full the unit stalls,
// raises the interrupt and the status bits, and resumes once the host pops;
// the frame counter; no FIFO overflow. Record word = {ch, seq, idx}.
module tb_buffer_ctrl;
  import surv_pkg::*;
  localparam int N = 8, FW = 4, D = 16;
  logic clk = 0, rst_n = 0;
  logic we = 0, re = 0;
  logic [2:0] reg_idx = '0;
  logic [15:0] wdata = '0, rdata;
  logic irq;
  logic [N-1:0] ch_ready, ch_on = '1, ch_rd;
  logic [2:0] cur_ch;
  logic [15:0] ch_data = '0;
  logic fifo_wr, fifo_rd, fifo_empty, fifo_full, fifo_ovf, fifo_unf;
  logic [15:0] fifo_wdata, fifo_rdata;
  logic [4:0] fifo_count;
  logic [15:0] chq [N][$];
  int checks = 0, failures = 0, stalls = 0, irqs = 0;
  int seq [N];

  buffer_ctrl #(.N_CH(N), .FRAME_W(FW), .FIFO_DEPTH(D)) dut (.*);
  sync_fifo #(.WIDTH(16), .DEPTH(D)) u_fifo (
    .clk, .rst_n, .wr_en(fifo_wr), .wr_data(fifo_wdata), .rd_en(fifo_rd),
    .rd_data(fifo_rdata), .count(fifo_count), .full(fifo_full), .empty(fifo_empty),
    .overflow(fifo_ovf), .underflow(fifo_unf));

  always #5 clk = ~clk;

  always_comb for (int c = 0; c < N; c++) ch_ready[c] = (chq[c].size() >= FW);
  always @(posedge clk) begin
    for (int c = 0; c < N; c++) if (ch_rd[c]) ch_data <= chq[c].pop_front();
    if (rst_n && irq) irqs++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic put_record(input int c);
    for (int i = 0; i < FW; i++) chq[c].push_back(16'(c * 4096 + (seq[c] % 256) * 16 + i));
    seq[c]++;
  endtask

  task automatic host_write(input logic [2:0] r, input logic [15:0] d);
    @(negedge clk); we = 1; reg_idx = r; wdata = d; @(negedge clk); we = 0;
  endtask

  task automatic host_reg(input logic [2:0] r, output logic [15:0] d);
    @(negedge clk); reg_idx = r; #1; d = rdata;
  endtask

  // pop one record from the MUX FIFO and return its channel
  task automatic host_record(output int c, output int s);
    logic [15:0] w;
    for (int i = 0; i < FW; i++) begin
      @(negedge clk); re = 1; reg_idx = REG_DATA[2:0]; @(negedge clk); re = 0;
      w = fifo_rdata;
      if (i == 0) begin c = w[15:12]; s = w[11:4]; end
      check(w == 16'(c * 4096 + s * 16 + i), $sformatf("record word %0d = %h", i, w));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] st;
    int c, s, exp_seq[N];
    for (int i = 0; i < N; i++) begin seq[i] = 0; exp_seq[i] = 0; end
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < N; i++) put_record(i);
    repeat (20) @(negedge clk);
    check(fifo_empty, "no transfer while disabled");
    host_write(REG_CONTROL[2:0], 16'h0003);
    // 8 records of 4 words = 32 words > 16: FIFO fills after 4 records
    repeat (120) @(negedge clk);
    check(fifo_full && fifo_count == D, "FIFO filled");
    check(irq, "interrupt when full");
    host_reg(REG_STATUS[2:0], st);
    check(st[3:0] == 4'b1110, $sformatf("status %b exp irq,stalled,full", st[3:0]));
    if (st[2]) stalls++;
    host_reg(REG_FRAMES[2:0], st);
    check(st == 4, $sformatf("frames %0d exp 4", st));
    // drain: round robin order 0..7
    for (int k = 0; k < N; k++) begin
      host_record(c, s);
      check(c == k && s == 0, $sformatf("record %0d from ch %0d", k, c));
      repeat (12) @(negedge clk);
    end
    check(fifo_empty && !irq, "drained, interrupt gone");
    // channel 3 off, random traffic
    ch_on[3] = 1'b0;
    for (int i = 0; i < N; i++) exp_seq[i] = 1;
    for (int n = 0; n < 60; n++) begin
      int cc;
      cc = $urandom_range(0, N - 1);
      put_record(cc);
      repeat (6) @(negedge clk);
      if (!fifo_empty) begin
        host_record(c, s);
        check(c != 3, "off channel skipped");
        check(s == exp_seq[c] % 256, $sformatf("ch %0d seq %0d exp %0d", c, s, exp_seq[c]));
        exp_seq[c]++;
      end
    end
    while (!fifo_empty) begin
      host_record(c, s);
      check(c != 3 && s == exp_seq[c] % 256, "tail record");
      exp_seq[c]++;
      repeat (6) @(negedge clk);
    end
    check(chq[3].size() == FW * (seq[3] - 1), "off channel kept its data");
    check(!fifo_ovf, "no FIFO overflow");
    check(stalls > 0 && irqs > 0, "stall and interrupt seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
