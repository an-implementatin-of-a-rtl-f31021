// sync_fifo: single-clock word FIFO, the buffer type used three times in the
// recorder: the 4 Kword input buffer between the ADC and the channel's DSP,
// the 4 Kword output buffer between the DSP and the multiplexer, and the
// 16 Kword multiplexer buffer the host PC drains.
//
// Storage is one DEPTH x WIDTH memory array with a write pointer, a read
// pointer and an occupancy counter. A write while full and a read while empty
// are ignored and set the sticky overflow / underflow flags.
//
// Timing: a word written in cycle t can be read from cycle t+1. rd_en in
// cycle t (while not empty) puts the word on rd_data at cycle t+1; rd_data
// holds it until the next accepted read. count, full and empty are registered.
//
// The depths come from the source design; width, flag behaviour and read
// latency are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4096,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic [CW-1:0]    count,
  output logic             full,
  output logic             empty,
  output logic             overflow,
  output logic             underflow
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_wr, do_rd;

  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wp] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (do_rd) rd_data <= mem[rp];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp        <= '0;
      rp        <= '0;
      count     <= '0;
      overflow  <= 1'b0;
      underflow <= 1'b0;
    end else begin
      if (do_wr) wp <= next_ptr(wp);
      if (do_rd) rp <= next_ptr(rp);
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: ;
      endcase
      if (wr_en && full)  overflow  <= 1'b1;
      if (rd_en && empty) underflow <= 1'b1;
    end
  end

  a_count_range: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH));

endmodule
