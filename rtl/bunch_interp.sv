// Bunch-by-bunch interpolation (times N).
//
// Holds each bunch's latest filter output until the next one arrives, N turns
// later, which turns the decimated stream back into one value per bunch per
// turn.  A valid input is written into the bunch's hold register and passed
// straight on; in the other turns the held value is output.  Latency one
// cycle.  With decimation off every sample is valid and the block is a
// one-cycle delay.  The hold behaviour follows the processor's description.
module bunch_interp
  import lmbf_pkg::*;
#(
  parameter int BUNCHES = 936,
  localparam int BW = $clog2(BUNCHES)
) (
  input  logic          clk,
  input  logic          rst,
  input  sample_t       din,
  input  logic          din_valid,
  input  logic [BW-1:0] bunch,
  output sample_t       dout
);
  sample_t hold [BUNCHES];

  always_ff @(posedge clk) if (din_valid) hold[bunch] <= din;

  always_ff @(posedge clk) begin
    if (rst) dout <= '0;
    else     dout <= din_valid ? din : hold[bunch];
  end
endmodule
