// Programmable output alignment delay.
//
// Delays the sample stream by `delay` cycles, 0 to MAX_DELAY-1, so that the
// DAC output of every bunch can be lined up with the beam.  A shift register
// holds the recent samples and the output taps it at the selected depth; with
// delay = 0 the input goes straight through.  The delay range is this design's
// choice.
module delay_line
  import lmbf_pkg::*;
#(
  parameter int MAX_DELAY = 128,
  localparam int DW = $clog2(MAX_DELAY)
) (
  input  logic          clk,
  input  logic          rst,
  input  sample_t       din,
  input  logic [DW-1:0] delay,
  output sample_t       dout
);
  sample_t sr [MAX_DELAY];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < MAX_DELAY; k++) sr[k] <= '0;
    end else begin
      sr[0] <= din;
      for (int k = 1; k < MAX_DELAY; k++) sr[k] <= sr[k-1];
    end
  end

  always_comb dout = (delay == '0) ? din : sr[delay - DW'(1)];
endmodule
