// Numerically controlled oscillator.
//
// A 32-bit phase accumulator advances by `freq` every cycle (frequency =
// freq / 2**32 of the clock rate, i.e. in units of the bunch rate).  A
// pipelined CORDIC rotates a fixed vector by the phase and delivers the cosine
// and sine, 90 degrees apart, with an amplitude of about 32000.  The phase is
// first folded into -90..+90 degrees and the result negated for the other half
// circle; then 16 shift-and-add stages follow, one per cycle.  `phase_reset`
// restarts the phase at zero.  Latency from phase to output: 18 cycles.  The
// oscillators and their 90-degree outputs follow the processor's description;
// the CORDIC method is this design's choice.
module nco
  import lmbf_pkg::*;
#(
  parameter int ITER = 16
) (
  input  logic        clk,
  input  logic        rst,
  input  logic [31:0] freq,
  input  logic        phase_reset,
  output sample_t     cos_out,
  output sample_t     sin_out
);
  // ATAN[i] = round(atan(2**-i) / (2*pi) * 2**32), phase units of the accumulator
  localparam logic [31:0] ATAN [16] = '{
    32'd536870912, 32'd316933406, 32'd167458907, 32'd85004756,
    32'd42667331,  32'd21354465,  32'd10679838,  32'd5340245,
    32'd2670163,   32'd1335087,   32'd667544,    32'd333772,
    32'd166886,    32'd83443,     32'd41722,     32'd20861};
  // CORDIC gain compensation: 32000 * prod(1/sqrt(1+2**-2i)) = 19432
  localparam logic signed [18:0] X0 = 19'sd19432;

  logic [31:0] phase;
  always_ff @(posedge clk) begin
    if (rst || phase_reset) phase <= '0;
    else                    phase <= phase + freq;
  end

  logic signed [18:0] x [ITER+1];
  logic signed [18:0] y [ITER+1];
  logic signed [31:0] z [ITER+1];
  logic               neg [ITER+1];

  // Stage 0: fold the phase into the right half plane.
  always_ff @(posedge clk) begin
    x[0]   <= X0;
    y[0]   <= '0;
    neg[0] <= phase[31] ^ phase[30];
    z[0]   <= (phase[31] ^ phase[30]) ? $signed(phase + 32'h8000_0000) : $signed(phase);
  end

  for (genvar i = 0; i < ITER; i++) begin : g_stage
    always_ff @(posedge clk) begin
      neg[i+1] <= neg[i];
      if (z[i] >= 0) begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - $signed(ATAN[i]);
      end else begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + $signed(ATAN[i]);
      end
    end
  end

  always_ff @(posedge clk) begin
    cos_out <= neg[ITER] ? sat16(48'(-x[ITER])) : sat16(48'(x[ITER]));
    sin_out <= neg[ITER] ? sat16(48'(-y[ITER])) : sat16(48'(y[ITER]));
  end
endmodule
