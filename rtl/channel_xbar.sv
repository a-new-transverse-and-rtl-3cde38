// Inter-channel cross-bar.
//
// Two channels pass through; each output can instead take an alternative
// source, normally a signal of the other channel.  In transverse operation
// both selects are low and the channels run independently.  In longitudinal
// operation the selects route one channel's signal to both: the Q input onto
// both bunch FIRs, the quadrature copy of one set of NCOs onto the second
// output, and one sequencer's controls onto both channels.  The type of the
// signals is a parameter so one module serves all three cross-bars.
// Purely combinational.
module channel_xbar #(
  parameter type T = logic [15:0]
) (
  input  T     in0,
  input  T     in1,
  input  T     alt0,
  input  T     alt1,
  input  logic sel0,
  input  logic sel1,
  output T     out0,
  output T     out1
);
  always_comb begin
    out0 = sel0 ? alt0 : in0;
    out1 = sel1 ? alt1 : in1;
  end
endmodule
