// Bunch FIR stage: decimate, filter, interpolate.
//
// The three steps of the bunch-by-bunch feedback filter in sequence.  Each
// bunch is averaged over N turns (bunch_decimate), filtered with the
// coefficient set chosen for it (bb_fir), and the result is held for N turns
// (bunch_interp).  This shifts the filter's frequency scale down by N, which
// is what lets a short filter act at a synchrotron tune of a few thousandths.
// With N = 1 the stage is a plain per-bunch filter, as used for transverse
// feedback.  Every sub-block takes the bunch index as it arrives, so the
// stage adds a fixed skew of 3 cycles between input and output bunches.
// `fir_sel` is the filter set of the bunch entering the filter (one cycle
// after it enters the stage).
module bunch_fir_stage
  import lmbf_pkg::*;
#(
  parameter int BUNCHES = 936,
  parameter int TAPS    = 16,
  parameter int NMAX_W  = 7,
  localparam int BW     = $clog2(BUNCHES),
  localparam int TW     = $clog2(TAPS),
  localparam int FW     = $clog2(FILTERS)
) (
  input  logic               clk,
  input  logic               rst,
  input  sample_t            din,
  input  logic [BW-1:0]      bunch,
  input  logic               turn_start,
  input  logic [NMAX_W-1:0]  decim_m1,
  input  logic [2:0]         decim_shift,
  input  logic [FW-1:0]      fir_sel,
  input  logic               coef_we,
  input  logic [FW+TW-1:0]   coef_addr,
  input  logic signed [15:0] coef_data,
  output sample_t            dout
);
  sample_t dec_out, fir_out;
  logic    dec_valid, fir_valid;

  bunch_decimate #(.BUNCHES(BUNCHES), .NMAX_W(NMAX_W)) u_dec (
    .clk, .rst, .din, .bunch, .turn_start, .decim_m1, .shift(decim_shift),
    .dout(dec_out), .dout_valid(dec_valid));

  bb_fir #(.BUNCHES(BUNCHES), .TAPS(TAPS)) u_fir (
    .clk, .rst, .din(dec_out), .din_valid(dec_valid), .bunch, .fir_sel,
    .coef_we, .coef_addr, .coef_data, .dout(fir_out), .dout_valid(fir_valid));

  bunch_interp #(.BUNCHES(BUNCHES)) u_interp (
    .clk, .rst, .din(fir_out), .din_valid(fir_valid), .bunch, .dout);
endmodule
