// tb_sync_fifo: random pushes and pops on a 16-deep FIFO, compared with a
// queue model: data order, count, full/empty, one-clock read latency, and
// the sticky overflow/underflow flags when writing full / reading empty.
module tb_sync_fifo;
  localparam int W = 16, D = 16;
  logic clk = 0, rst_n = 0;
  logic wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count;
  logic full, empty, overflow, underflow;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  logic exp_valid;
  logic [W-1:0] exp_word;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp_valid = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && count == 0 && !overflow && !underflow, "reset state");
    // read while empty
    rd_en = 1; @(negedge clk); rd_en = 0;
    check(underflow, "underflow flag");
    // fill completely, then one more
    for (int i = 0; i < D; i++) begin
      wr_en = 1; wr_data = W'(i * 7 + 1); model.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 0;
    check(full && count == D, "full after D writes");
    wr_en = 1; wr_data = 16'hDEAD; @(negedge clk); wr_en = 0;
    check(overflow && count == D, "overflow flag, count unchanged");
    // random traffic
    for (int n = 0; n < 4000; n++) begin
      wr_en   = ($urandom_range(0, 99) < 50);
      rd_en   = ($urandom_range(0, 99) < 50);
      wr_data = W'($urandom);
      @(posedge clk);
      // model update at the edge
      if (exp_valid) ;
      begin
        bit do_rd, do_wr;
        do_rd = rd_en && model.size() > 0;
        do_wr = wr_en && model.size() < D;
        if (do_rd) begin exp_word = model.pop_front(); end
        if (do_wr) model.push_back(wr_data);
        #1;
        if (do_rd) check(rd_data == exp_word, $sformatf("data %h exp %h", rd_data, exp_word));
        check(count == model.size(), $sformatf("count %0d exp %0d", count, model.size()));
        check(full == (model.size() == D) && empty == (model.size() == 0), "flags");
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
