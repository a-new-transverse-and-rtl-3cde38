// Bunch-by-bunch FIR filter.
//
// Each bunch is filtered on its own: the filter input is the sequence of
// (possibly decimated) samples of one bunch, turn after turn, so the block
// keeps a history of the last TAPS values of every bunch in a memory.  When a
// valid sample arrives for a bunch, its history shifts by one, the new history
// is multiplied by the coefficient set `fir_sel` chosen for that bunch, and the
// saturated sum is output one cycle later with `dout_valid`.  FILTERS sets of
// TAPS coefficients (signed, 16384 = 1.0) are written through `coef_*`, with
// coef_addr = {set, tap}.  Programming two channels' filters 90 degrees apart
// at the synchrotron tune gives the single-sideband drive.  Per-bunch filter
// selection follows the processor's description; the tap and set counts are
// this design's choice.
module bb_fir
  import lmbf_pkg::*;
#(
  parameter int BUNCHES = 936,
  parameter int TAPS    = 16,
  parameter int NFILT   = FILTERS,
  localparam int BW     = $clog2(BUNCHES),
  localparam int TW     = $clog2(TAPS),
  localparam int FW     = $clog2(NFILT)
) (
  input  logic               clk,
  input  logic               rst,
  input  sample_t            din,
  input  logic               din_valid,
  input  logic [BW-1:0]      bunch,
  input  logic [FW-1:0]      fir_sel,
  input  logic               coef_we,
  input  logic [FW+TW-1:0]   coef_addr,
  input  logic signed [15:0] coef_data,
  output sample_t            dout,
  output logic               dout_valid
);
  logic [TAPS*SAMPLE_W-1:0] hist [BUNCHES];
  logic signed [15:0]       coef [NFILT*TAPS];
  logic [TAPS*SAMPLE_W-1:0] new_hist;
  logic signed [47:0]       acc;

  always_comb begin
    new_hist = {hist[bunch][(TAPS-1)*SAMPLE_W-1:0], din};
    acc = '0;
    for (int k = 0; k < TAPS; k++)
      acc += 48'($signed(new_hist[k*SAMPLE_W +: SAMPLE_W])) *
             48'(coef[{fir_sel, TW'(k)}]);
  end

  always_ff @(posedge clk) begin
    if (din_valid) hist[bunch] <= new_hist;
    if (coef_we)   coef[coef_addr] <= coef_data;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dout       <= sat16(acc >>> COEF_FRAC);
      dout_valid <= din_valid;
    end
  end
endmodule
