// Programmable FIR filter on the sample stream (I/O compensation filter).
//
// A direct-form filter: the last TAPS input samples are held in a shift
// register, multiplied by the coefficients and summed.  Coefficients are signed
// 16-bit with 14 fractional bits (16384 = 1.0) and can be changed at any time.
// The sum is rounded down, shifted back to sample scale and saturated.
// Timing: dout(t) = sat(sum_k coeffs[k] * din(t-2-k) >> 14), i.e. the latency
// of tap 0 is two cycles.  The filter's place in the chain (after the ADC and
// before the DAC) follows the processor's block diagram; tap count and number
// format are this design's choice.
module fir_filter
  import lmbf_pkg::*;
#(
  parameter int TAPS = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  sample_t             din,
  input  logic signed [15:0]  coeffs [TAPS],
  output sample_t             dout
);
  sample_t hist [TAPS];
  logic signed [47:0] acc;

  always_comb begin
    acc = '0;
    for (int k = 0; k < TAPS; k++)
      acc += 48'(hist[k]) * 48'(coeffs[k]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) hist[k] <= '0;
      dout <= '0;
    end else begin
      hist[0] <= din;
      for (int k = 1; k < TAPS; k++) hist[k] <= hist[k-1];
      dout <= sat16(acc >>> COEF_FRAC);
    end
  end
endmodule
