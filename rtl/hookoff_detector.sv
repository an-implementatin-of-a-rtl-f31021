// hookoff_detector: digital half of the hook-off detector of one telephone
// line. When the handset on the line goes off hook it interrupts the
// channel's DSP, which then starts sampling and encoding the call.
//
// The line interface delivers a raw loop-current indication (line_offhook,
// asynchronous, may bounce). It is synchronised by two flip-flops and
// debounced: the hook state changes only after the synchronised input has
// held its new value for DEBOUNCE_MS milliseconds. On an accepted change to
// off hook, while the channel is switched on, dsp_int pulses for one clock.
//
// Ports: offhook is the debounced hook state; dsp_int is the interrupt pulse.
// Timing: a change is accepted 2 + DEBOUNCE_MS*CLK_HZ/1000 clocks after the
// input settles. That the detector interrupts the DSP follows the source
// design; the synchroniser, the debounce time and the pulse form are this
// design's choices.
module hookoff_detector #(
  parameter int unsigned CLK_HZ      = 50_000_000,
  parameter int unsigned DEBOUNCE_MS = 10,
  localparam int unsigned DEB_CYCLES = (CLK_HZ / 1000) * DEBOUNCE_MS,
  localparam int unsigned DW         = $clog2(DEB_CYCLES + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic enable,       // channel switched on
  input  logic line_offhook, // raw loop-current indication, asynchronous
  output logic offhook,      // debounced hook state
  output logic dsp_int       // one-clock interrupt on hook-off
);

  logic [1:0]    sync_q;
  logic [DW-1:0] deb_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sync_q  <= '0;
      deb_cnt <= '0;
      offhook <= 1'b0;
      dsp_int <= 1'b0;
    end else begin
      sync_q  <= {sync_q[0], line_offhook};
      dsp_int <= 1'b0;
      if (sync_q[1] == offhook) begin
        deb_cnt <= '0;
      end else if (deb_cnt >= DW'(DEB_CYCLES - 1)) begin
        deb_cnt <= '0;
        offhook <= sync_q[1];
        dsp_int <= sync_q[1] && enable;
      end else begin
        deb_cnt <= deb_cnt + 1'b1;
      end
    end
  end

endmodule
