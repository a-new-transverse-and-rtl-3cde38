// ADC input overflow detection.
//
// Each cycle the incoming sample's magnitude is compared with a programmable
// threshold.  `ovf` pulses for one cycle for every sample whose magnitude
// reaches the threshold; `ovf_sticky` stays set until software pulses `clear`,
// so short overloads between register reads are not missed.  The sample itself
// is passed on with the same one-cycle latency.  The block's role is the one
// the processing chain gives it; the magnitude test and the sticky flag are
// this design's choice.
module adc_overflow #(
  parameter int W = 16
) (
  input  logic                clk,
  input  logic                rst,
  input  logic signed [W-1:0] din,
  input  logic [W-1:0]        threshold,
  input  logic                clear,
  output logic signed [W-1:0] dout,
  output logic                ovf,
  output logic                ovf_sticky
);
  logic [W:0] mag;
  always_comb mag = din[W-1] ? (W+1)'(-$signed({din[W-1], din})) : {1'b0, din};

  always_ff @(posedge clk) begin
    if (rst) begin
      ovf        <= 1'b0;
      ovf_sticky <= 1'b0;
      dout       <= '0;
    end else begin
      dout       <= din;
      ovf        <= mag >= {1'b0, threshold};
      ovf_sticky <= (ovf_sticky && !clear) || (mag >= {1'b0, threshold});
    end
  end
endmodule
