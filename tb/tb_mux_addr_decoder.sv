// tb_mux_addr_decoder: every I/O address with read and write strobes; the
// expected unit enables and register index are computed from the 32-byte
// window at 0x300 (0x300..0x30F buffer control, 0x310..0x31F ON/OFF).
module tb_mux_addr_decoder;
  import surv_pkg::*;
  logic [9:0] pc_addr = '0;
  logic pc_wr = 0, pc_rd = 0;
  logic buf_wr, buf_rd, onoff_wr, onoff_rd;
  logic [2:0] reg_idx;
  int checks = 0, failures = 0;

  mux_addr_decoder #(.BASE_ADDR(10'h300)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) begin
      for (int m = 0; m < 4; m++) begin
        bit in_buf, in_onoff;
        pc_addr = 10'(a); pc_wr = m[0]; pc_rd = m[1];
        #1;
        in_buf   = (a >= 'h300 && a < 'h310);
        in_onoff = (a >= 'h310 && a < 'h320);
        checks++;
        if (buf_wr != (in_buf && pc_wr) || buf_rd != (in_buf && pc_rd) ||
            onoff_wr != (in_onoff && pc_wr) || onoff_rd != (in_onoff && pc_rd) ||
            ((in_buf || in_onoff) && reg_idx != 3'((a % 16) / 2))) begin
          failures++;
          $display("FAIL addr %h mode %0d", a, m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
