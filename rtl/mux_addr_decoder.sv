// mux_addr_decoder: address decoder of the multiplexer FPGA. It watches the
// host PC's I/O address bus and, when an access falls inside the board's
// 32-byte window at BASE_ADDR, enables either the buffer control unit
// (offsets 0x00..0x0E) or the channel ON/OFF control unit (offsets
// 0x10..0x1E), and hands both the register index (address bits 3:1).
//
// Purely combinational: the enables are valid in the same clock as pc_wr /
// pc_rd, which are one-clock strobes. That the decoder selects between these
// two units follows the source design; the window, its base and the 16-bit
// word addressing are this design's choices.
module mux_addr_decoder
  import surv_pkg::*;
#(
  parameter logic [HOST_ADDR_W-1:0] BASE_ADDR = 10'h300
) (
  input  logic [HOST_ADDR_W-1:0] pc_addr,
  input  logic                   pc_wr,
  input  logic                   pc_rd,
  output logic                   buf_wr,
  output logic                   buf_rd,
  output logic                   onoff_wr,
  output logic                   onoff_rd,
  output logic [2:0]             reg_idx
);

  logic hit, unit_onoff;

  assign hit        = (pc_addr[HOST_ADDR_W-1:5] == BASE_ADDR[HOST_ADDR_W-1:5]);
  assign unit_onoff = pc_addr[4];
  assign reg_idx    = pc_addr[3:1];

  always_comb begin
    buf_wr   = hit && !unit_onoff && pc_wr;
    buf_rd   = hit && !unit_onoff && pc_rd;
    onoff_wr = hit &&  unit_onoff && pc_wr;
    onoff_rd = hit &&  unit_onoff && pc_rd;
  end

endmodule
