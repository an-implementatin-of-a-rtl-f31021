// tb_mux_system: two boards (16 channels), 16-word records, 64-word FIFO,
// exercised only through the host I/O bus. Board buffers are queue models
// behind a per-board data bus with one clock of latency. Checked: ON/OFF
// registers reach the control lines and read back; reads outside the window
// float high; transfer enable; whole records with their channel; the full
// interrupt and its status bits; draining clears it; the frame counter.
module tb_mux_system;
  import surv_pkg::*;
  localparam int NB = 2, N = NB * 8, FW = 16, D = 64;
  localparam logic [9:0] B = 10'h300;
  logic clk = 0, rst_n = 0;
  logic [9:0] pc_addr = '0;
  logic pc_wr = 0, pc_rd = 0;
  logic [15:0] pc_wdata = '0, pc_rdata;
  logic irq;
  logic [N-1:0] chan_on, ch_ready, ch_rd;
  logic [15:0] board_data [NB];
  logic [15:0] chq [N][$];
  int checks = 0, failures = 0, seq [N];

  mux_system #(.N_BOARDS(NB), .FIFO_DEPTH(D), .FRAME_W(FW), .BASE_ADDR(B)) dut (.*);

  always #5 clk = ~clk;
  always_comb for (int c = 0; c < N; c++) ch_ready[c] = (chq[c].size() >= FW);
  always @(posedge clk)
    for (int c = 0; c < N; c++) if (ch_rd[c]) board_data[c / 8] <= chq[c].pop_front();

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

  task automatic put_record(input int c);
    for (int i = 0; i < FW; i++) chq[c].push_back(16'(c * 4096 + (seq[c] % 16) * 256 + i));
    seq[c]++;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    int exp_order[5] = '{0, 1, 4, 5, 15};
    board_data[0] = '0; board_data[1] = '0;
    for (int c = 0; c < N; c++) seq[c] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    check(chan_on == '0, "all channels off after reset");
    pc_write(B + 10'h10, 16'h00F3);
    pc_write(B + 10'h12, 16'h0081);
    check(chan_on == 16'h81F3, $sformatf("control lines %h", chan_on));
    pc_read(B + 10'h12, d); check(d == 16'h0081, "board 1 mask reads back");
    pc_read(B + 10'h10, d); check(d == 16'h00F3, "board 0 mask reads back");
    pc_read(10'h200, d);   check(d == 16'hFFFF, "outside window floats");
    pc_write(10'h216, 16'h0003);
    pc_read(B + 10'h06, d); check(d == 16'h0000, "write outside window ignored");
    // records from channels 0, 2 (off), 15, 4, 1, 5
    put_record(0); put_record(2); put_record(15); put_record(4); put_record(1); put_record(5);
    repeat (30) @(negedge clk);
    pc_read(B + 10'h04, d); check(d == 0, "nothing moved before enable");
    pc_write(B + 10'h06, 16'h0003);
    repeat (120) @(negedge clk);
    pc_read(B + 10'h04, d); check(d == 64, $sformatf("FIFO count %0d exp 64", d));
    check(irq, "interrupt at full");
    pc_read(B + 10'h02, d); check(d[3:0] == 4'b1110, $sformatf("status %b", d[3:0]));
    pc_read(B + 10'h08, d); check(d == 4, $sformatf("frames %0d", d));
    // round robin from channel 0: 0, 1, 4, 5 fill the FIFO, 15 waits, 2 is off
    for (int k = 0; k < 5; k++) begin
      int exp_c;
      exp_c = exp_order[k];
      for (int i = 0; i < FW; i++) begin
        pc_read(B, d);
        check(d == 16'(exp_c * 4096 + i), $sformatf("record %0d word %0d = %h", k, i, d));
      end
      if (k == 0) begin
        check(!irq, "interrupt clears when a record's room is free");
      end
    end
    pc_read(B + 10'h02, d); check(d[0] == 1'b1, "empty after drain");
    check(chq[2].size() == FW, "off channel untouched");
    pc_write(B + 10'h10, 16'h00F7);
    repeat (40) @(negedge clk);
    for (int i = 0; i < FW; i++) begin
      pc_read(B, d); check(d == 16'(2 * 4096 + i), "channel 2 served once on");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
