// Gain control stage.
//
// Multiplies each sample by a signed 16-bit gain with 12 fractional bits
// (4096 = 1.0, range about -8 to +8) and saturates the result to a sample.
// One cycle of latency.  The gain stages feed the output adder of the DAC
// path; the number format is this design's choice.
module gain
  import lmbf_pkg::*;
(
  input  logic               clk,
  input  logic               rst,
  input  sample_t            din,
  input  logic signed [15:0] g,
  output sample_t            dout
);
  logic signed [31:0] prod;
  always_comb prod = din * g;

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else     dout <= sat16(48'(prod >>> GAIN_FRAC));
  end
endmodule
