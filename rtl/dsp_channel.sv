// One channel of bunch-by-bunch feedback processing.
//
// ADC stage: the 14-bit ADC sample is widened to 16 bits, checked for
// overflow and passed through the ADC compensation FIR (`adc_out`).  The
// cross-bar outside the channel then chooses the bunch FIR input (`fir_in`:
// this channel's ADC signal in transverse mode, the Q channel in longitudinal
// mode).  Bunch FIR stage: decimate by N, per-bunch filter, hold for N turns
// (`fir_out`).  DAC stage: the filter output and two oscillators, gated and
// scaled per bunch, are added, multiplied by the bunch's output gain
// (`mult_out`), filtered and delayed to the DAC.
//
// Around the chain: bunch_select reads the current bunch's settings from the
// bank chosen by the sequencer; NCO0 runs at a register frequency, NCO1 at
// the sequencer's; DETECTORS detectors mix the ADC or FIR signal with NCO1
// and write results through `det_*`; two MMS blocks measure every bunch after
// the ADC filter and after the output multiplier.  The oscillators and the
// sequencer leave the channel (`nco_own`, `seq_own`) and come back through
// the cross-bars (`nco_in`, `seq_in`), so in longitudinal mode one set drives
// both channels.
//
// Tables are written with tbl_we, tbl_sel (TBL_BUNCH, TBL_BBFIR, TBL_SEQ),
// tbl_addr and tbl_data.  Pipeline skews between stages are fixed and are
// compensated in software, as is the choice of which bunch is "bunch 0".
module dsp_channel
  import lmbf_pkg::*;
#(
  parameter int BUNCHES    = 936,
  parameter int BB_TAPS    = 16,
  parameter int SEQ_STATES = 8,
  parameter int MAX_DELAY  = 128,
  parameter int TURN_W     = 17,
  localparam int BW        = $clog2(BUNCHES),
  localparam int SUM_W     = SAMPLE_W + TURN_W,
  localparam int SUM2_W    = 2 * SAMPLE_W + TURN_W
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [ADC_W-1:0] adc_raw,
  input  logic [BW-1:0]          bunch,
  input  logic                   turn_start,
  input  dsp_cfg_t               cfg,
  input  logic                   ovf_clear,
  input  logic                   mms_swap,
  input  logic                   seq_trigger,
  // table writes
  input  logic                   tbl_we,
  input  logic [1:0]             tbl_sel,
  input  logic [15:0]            tbl_addr,
  input  logic [31:0]            tbl_data,
  // cross-bar connections
  output sample_t                adc_out,
  input  sample_t                fir_in,
  output nco_pair_t              nco_own [2],
  input  nco_pair_t              nco_in [2],
  output seq_ctrl_t              seq_own,
  input  seq_ctrl_t              seq_in,
  // capture taps
  output sample_t                fir_out,
  output sample_t                mult_out,
  output logic signed [DAC_W-1:0] dac_out,
  // detector results
  output logic                   det_valid,
  output logic signed [31:0]     det_i [DETECTORS],
  output logic signed [31:0]     det_q [DETECTORS],
  // status
  output logic                   ovf,
  output logic                   ovf_sticky,
  output logic                   seq_done,
  output logic [2:0]             seq_state,
  output sample_t                mms_min [2],
  output sample_t                mms_max [2],
  output logic signed [SUM_W-1:0] mms_sum [2],
  output logic [SUM2_W-1:0]      mms_sum2 [2],
  output logic [TURN_W-1:0]      mms_turns [2]
);
  localparam int SW = $clog2(SEQ_STATES);
  localparam int TW = $clog2(BB_TAPS);

  // ---------------- ADC stage
  sample_t            adc_wide, ovf_out;
  logic signed [15:0] adc_coef [IO_TAPS];
  logic signed [15:0] dac_coef [IO_TAPS];

  always_comb begin
    adc_wide = SAMPLE_W'(adc_raw);
    for (int k = 0; k < IO_TAPS; k++) begin
      adc_coef[k] = cfg.adc_coef[k];
      dac_coef[k] = cfg.dac_coef[k];
    end
  end

  adc_overflow #(.W(SAMPLE_W)) u_ovf (
    .clk, .rst, .din(adc_wide), .threshold(cfg.ovf_threshold), .clear(ovf_clear),
    .dout(ovf_out), .ovf, .ovf_sticky);

  fir_filter #(.TAPS(IO_TAPS)) u_adc_fir (
    .clk, .rst, .din(ovf_out), .coeffs(adc_coef), .dout(adc_out));

  // ---------------- per-bunch control
  bunch_cfg_t bcfg;

  bunch_select #(.BUNCHES(BUNCHES)) u_bsel (
    .clk, .rst, .bunch, .bank(seq_in.bank),
    .wr_en(tbl_we && tbl_sel == TBL_BUNCH),
    .wr_addr(tbl_addr[$clog2(BANKS)+BW-1:0]),
    .wr_data(tbl_data[$bits(bunch_cfg_t)-1:0]),
    .cfg(bcfg));

  // ---------------- bunch FIR stage
  bunch_fir_stage #(.BUNCHES(BUNCHES), .TAPS(BB_TAPS)) u_bfir (
    .clk, .rst, .din(fir_in), .bunch, .turn_start,
    .decim_m1(cfg.decim_m1), .decim_shift(cfg.decim_shift), .fir_sel(bcfg.fir_sel),
    .coef_we(tbl_we && tbl_sel == TBL_BBFIR),
    .coef_addr(tbl_addr[$clog2(FILTERS)+TW-1:0]), .coef_data(tbl_data[15:0]),
    .dout(fir_out));

  // ---------------- oscillators and sequencer
  logic [SW-1:0] state_w;

  sequencer #(.STATES(SEQ_STATES)) u_seq (
    .clk, .rst, .turn_start, .trigger(seq_trigger), .last_state(SW'(cfg.seq_last)),
    .wr_en(tbl_we && tbl_sel == TBL_SEQ), .wr_addr(tbl_addr[SW+1:0]), .wr_data(tbl_data),
    .ctrl(seq_own), .state(state_w), .done(seq_done));

  always_comb seq_state = 3'(state_w);

  nco u_nco0 (.clk, .rst, .freq(cfg.nco0_freq), .phase_reset(1'b0),
              .cos_out(nco_own[0].c), .sin_out(nco_own[0].s));
  nco u_nco1 (.clk, .rst, .freq(seq_own.freq), .phase_reset(seq_own.start),
              .cos_out(nco_own[1].c), .sin_out(nco_own[1].s));

  // ---------------- DAC stage
  dac_stage #(.MAX_DELAY(MAX_DELAY)) u_dac (
    .clk, .rst, .fir_in(fir_out), .nco0_in(nco_in[0].c), .nco1_in(nco_in[1].c), .bcfg,
    .fir_gain(cfg.fir_gain), .nco0_gain(cfg.nco0_gain), .nco1_gain(seq_in.gain),
    .coeffs(dac_coef), .delay(cfg.dac_delay[$clog2(MAX_DELAY)-1:0]),
    .mult_out, .dac_out);

  // ---------------- detectors
  logic [DETECTORS-1:0] dv;
  for (genvar d = 0; d < DETECTORS; d++) begin : g_det
    detector u_det (
      .clk, .rst, .enable(seq_in.busy),
      .din(cfg.det_src[d] ? fir_out : adc_out), .nco(nco_in[1]),
      .bunch_en(bcfg.det_en[d]), .dwell_end(seq_in.dwell_end), .shift(cfg.det_shift),
      .i_out(det_i[d]), .q_out(det_q[d]), .out_valid(dv[d]));
  end
  always_comb det_valid = dv[0];

  // ---------------- bunch motion measurement
  sample_t mms_in [2];
  always_comb begin
    mms_in[0] = adc_out;
    mms_in[1] = mult_out;
  end
  for (genvar m = 0; m < 2; m++) begin : g_mms
    mms #(.BUNCHES(BUNCHES), .TURN_W(TURN_W)) u_mms (
      .clk, .rst, .din(mms_in[m]), .bunch, .turn_start, .swap(mms_swap),
      .rd_addr(cfg.mms_rd_addr[BW-1:0]),
      .rd_min(mms_min[m]), .rd_max(mms_max[m]), .rd_sum(mms_sum[m]),
      .rd_sum2(mms_sum2[m]), .turns(mms_turns[m]));
  end
endmodule
