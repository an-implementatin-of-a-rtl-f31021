// adc_model: behavioural stand-in for one channel's A/D converter, for
// testbenches only. Each start strobe is answered LATENCY clocks later by
// adc_valid and a sample {channel number (6 bits), conversion count
// (10 bits)}, so that a reader can check that samples arrive in order and on
// the right channel.
module adc_model #(
  parameter int CH      = 0,
  parameter int LATENCY = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        adc_convert,
  output logic        adc_valid,
  output logic [15:0] adc_data
);
  logic [LATENCY-1:0] pipe;
  logic [9:0]         n;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pipe <= '0; n <= '0; adc_valid <= 1'b0; adc_data <= '0;
    end else begin
      pipe      <= {pipe[LATENCY-2:0], adc_convert};
      adc_valid <= pipe[LATENCY-1];
      if (pipe[LATENCY-1]) begin
        adc_data <= {6'(CH), n};
        n        <= n + 1'b1;
      end
    end
  end
endmodule
