// Output stage: source mixing, per-bunch gain, compensation filter, delay.
//
// Three sources make up the drive of each bunch: the feedback from the bunch
// FIR, the fixed-frequency oscillator NCO0 and the sequencer's oscillator
// NCO1.  Each is enabled per bunch by the bunch-select settings and scaled by
// its gain; the three are added and the sum multiplied by the bunch's own
// output gain.  The product (`mult_out`, also captured and measured) then
// passes the DAC compensation FIR and the alignment delay to the DAC.
// Timing: gains 1 cycle, adder 1, multiplier 1, FIR 2, then `delay` cycles:
// dac_out is 5 + delay cycles behind the inputs; mult_out is 3 behind.  The
// chain follows the processor's block diagram; the number formats are this
// design's choice.
module dac_stage
  import lmbf_pkg::*;
#(
  parameter int MAX_DELAY = 128,
  localparam int DW = $clog2(MAX_DELAY)
) (
  input  logic               clk,
  input  logic               rst,
  input  sample_t            fir_in,
  input  sample_t            nco0_in,
  input  sample_t            nco1_in,
  input  bunch_cfg_t         bcfg,
  input  logic signed [15:0] fir_gain,
  input  logic signed [15:0] nco0_gain,
  input  logic signed [15:0] nco1_gain,
  input  logic signed [15:0] coeffs [IO_TAPS],
  input  logic [DW-1:0]      delay,
  output sample_t            mult_out,
  output sample_t            dac_out
);
  sample_t            g_fir, g_n0, g_n1, sum, fir_out;
  logic signed [15:0] og1, og2;
  logic signed [31:0] prod;

  gain u_g_fir (.clk, .rst, .din(bcfg.fir_en  ? fir_in  : '0), .g(fir_gain),  .dout(g_fir));
  gain u_g_n0  (.clk, .rst, .din(bcfg.nco0_en ? nco0_in : '0), .g(nco0_gain), .dout(g_n0));
  gain u_g_n1  (.clk, .rst, .din(bcfg.nco1_en ? nco1_in : '0), .g(nco1_gain), .dout(g_n1));

  always_comb prod = sum * og2;

  always_ff @(posedge clk) begin
    if (rst) begin
      og1      <= '0;
      og2      <= '0;
      sum      <= '0;
      mult_out <= '0;
    end else begin
      og1      <= bcfg.out_gain;
      og2      <= og1;
      sum      <= sat16(48'(g_fir) + 48'(g_n0) + 48'(g_n1));
      mult_out <= sat16(48'(prod >>> GAIN_FRAC));
    end
  end

  fir_filter #(.TAPS(IO_TAPS)) u_fir (.clk, .rst, .din(mult_out), .coeffs, .dout(fir_out));

  delay_line #(.MAX_DELAY(MAX_DELAY)) u_dly (.clk, .rst, .din(fir_out), .delay, .dout(dac_out));
endmodule
