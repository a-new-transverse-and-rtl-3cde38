// Bunch-by-bunch decimation (divide by N).
//
// Longitudinal oscillations are slow (the synchrotron tune is a few
// thousandths of the revolution frequency), so each bunch is averaged over N
// turns before the bunch-by-bunch filter.  A per-bunch accumulator sums the
// bunch's samples over a group of N turns; during the last turn of the group
// each bunch's total, shifted right by `shift`, is output with `dout_valid`.
// With shift = log2(N) the output is the exact mean.  N = decim_m1 + 1; with
// N = 1 every sample passes (decimation disabled).  A turn counter advances at
// every bunch-0 cycle.  Latency one cycle.  Averaging over a programmable
// number of turns follows the processor's description; the power-of-two
// scaling is this design's choice.
module bunch_decimate
  import lmbf_pkg::*;
#(
  parameter int BUNCHES = 936,
  parameter int NMAX_W  = 7,
  localparam int BW     = $clog2(BUNCHES),
  localparam int ACC_W  = SAMPLE_W + NMAX_W + 1
) (
  input  logic              clk,
  input  logic              rst,
  input  sample_t           din,
  input  logic [BW-1:0]     bunch,
  input  logic              turn_start,
  input  logic [NMAX_W-1:0] decim_m1,
  input  logic [2:0]        shift,
  output sample_t           dout,
  output logic              dout_valid
);
  logic signed [ACC_W-1:0] acc [BUNCHES];
  logic [NMAX_W-1:0]       tc, cur_tc;
  logic signed [ACC_W-1:0] acc_new;

  always_comb begin
    if (turn_start) cur_tc = (tc >= decim_m1) ? '0 : tc + NMAX_W'(1);
    else            cur_tc = tc;
    acc_new = (cur_tc == '0) ? ACC_W'(din) : acc[bunch] + ACC_W'(din);
  end

  always_ff @(posedge clk) acc[bunch] <= acc_new;

  always_ff @(posedge clk) begin
    if (rst) begin
      tc         <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      tc         <= cur_tc;
      dout       <= sat16(48'(acc_new >>> shift));
      dout_valid <= (cur_tc == decim_m1);
    end
  end
endmodule
