// IQ detector.
//
// Measures the beam response at the excitation frequency: the selected input
// is multiplied by the cosine and sine of the sequencer's oscillator and the
// products are summed over the dwell, for the bunches enabled for this
// detector only.  At `dwell_end` the two sums, shifted right by `shift` and
// truncated to 32 bits, are output with `out_valid` and the sums restart from
// zero.  The sums only run while `enable` is high.  Mixing with the NCO,
// per-bunch enables and writing results to the detector memory follow the
// processor's description; the result scaling is this design's choice.
module detector
  import lmbf_pkg::*;
#(
  parameter int ACC_W = 48
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              enable,
  input  sample_t           din,
  input  nco_pair_t         nco,
  input  logic              bunch_en,
  input  logic              dwell_end,
  input  logic [4:0]        shift,
  output logic signed [31:0] i_out,
  output logic signed [31:0] q_out,
  output logic              out_valid
);
  logic signed [ACC_W-1:0] acc_i, acc_q, sum_i, sum_q;
  logic signed [31:0]      m_i, m_q, p_i, p_q;

  always_comb begin
    m_i   = din * nco.c;
    m_q   = din * nco.s;
    p_i   = (enable && bunch_en) ? m_i : 32'sd0;
    p_q   = (enable && bunch_en) ? m_q : 32'sd0;
    sum_i = acc_i + ACC_W'(p_i);
    sum_q = acc_q + ACC_W'(p_q);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      acc_i     <= '0;
      acc_q     <= '0;
      i_out     <= '0;
      q_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= enable && dwell_end;
      if (dwell_end || !enable) begin
        acc_i <= '0;
        acc_q <= '0;
      end else begin
        acc_i <= sum_i;
        acc_q <= sum_q;
      end
      if (enable && dwell_end) begin
        i_out <= 32'(sum_i >>> shift);
        q_out <= 32'(sum_q >>> shift);
      end
    end
  end
endmodule
