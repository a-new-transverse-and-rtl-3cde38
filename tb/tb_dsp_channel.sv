// Self-checking test of dsp_channel with 8 bunches, cross-bars closed
// straight through.  Each bunch gets a constant ADC value.  Checks: the
// feedback output (filter -1, all bunches enabled) is the negated input plus
// the NCO0 excitation, 11 cycles after the ADC sample; the ADC MMS holds each
// bunch's value; a sequencer dwell makes all detectors deliver I = sum of
// samples times the NCO1 cosine; an over-range sample sets the overflow flag.
module tb_dsp_channel;
  import lmbf_pkg::*;
  logic clk = 1'b0;
  logic rst = 1'b1;
  always #1 clk = ~clk;
  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL at %0t: %s", $time, what);
    end
  endtask

  task automatic finish_tb();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  endtask

  // watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
  localparam int B = 8;
  localparam int LAT = 11;   // ADC in to DAC out: 1 + 2 + 3 + 5
  logic signed [13:0] adc_raw;
  logic [2:0] bunch;
  logic turn_start, ovf_clear, mms_swap, seq_trigger, tbl_we;
  dsp_cfg_t cfg;
  logic [1:0] tbl_sel;
  logic [15:0] tbl_addr;
  logic [31:0] tbl_data;
  sample_t adc_out, fir_out, mult_out;
  nco_pair_t nco_own [2];
  seq_ctrl_t seq_own;
  logic signed [15:0] dac_out;
  logic det_valid, ovf, ovf_sticky, seq_done;
  logic signed [31:0] det_i [DETECTORS], det_q [DETECTORS];
  logic [2:0] seq_state;
  sample_t mms_min [2], mms_max [2];
  logic signed [32:0] mms_sum [2];
  logic [48:0] mms_sum2 [2];
  logic [16:0] mms_turns [2];

  dsp_channel #(.BUNCHES(B)) dut (
    .clk, .rst, .adc_raw, .bunch, .turn_start, .cfg, .ovf_clear, .mms_swap, .seq_trigger,
    .tbl_we, .tbl_sel, .tbl_addr, .tbl_data,
    .adc_out, .fir_in(adc_out), .nco_own, .nco_in(nco_own), .seq_own, .seq_in(seq_own),
    .fir_out, .mult_out, .dac_out, .det_valid, .det_i, .det_q, .ovf, .ovf_sticky, .seq_done,
    .seq_state, .mms_min, .mms_max, .mms_sum, .mms_sum2, .mms_turns);

  int cyc = 0;
  always @(posedge clk) if (!rst) cyc <= cyc + 1;
  always_comb begin
    bunch = 3'(cyc % B);
    turn_start = (cyc % B == 0);
  end

  int v [B];
  logic signed [13:0] spike;
  always_comb adc_raw = (spike != 0) ? spike : 14'(v[cyc % B]);

  task automatic twr(input logic [1:0] s, input int a, input logic [31:0] d);
    tbl_we = 1; tbl_sel = s; tbl_addr = 16'(a); tbl_data = d; @(negedge clk); tbl_we = 0;
  endtask

  initial begin
    bunch_cfg_t bc;
    int hist [$];
    int nout, ndet;
    for (int b = 0; b < B; b++) v[b] = $urandom_range(0, 6000) - 3000;
    spike = 0;
    cfg = '0; ovf_clear = 0; mms_swap = 0; seq_trigger = 0;
    tbl_we = 0; tbl_sel = '0; tbl_addr = '0; tbl_data = '0;
    cfg.adc_coef[0] = 16'sd16384;
    cfg.dac_coef[0] = 16'sd16384;
    cfg.fir_gain = 16'sd4096;
    cfg.nco0_gain = 16'sd256;      // NCO0 at zero frequency adds 32000/16 = 2000
    cfg.ovf_threshold = 16'd7000;
    cfg.det_mask = '1;
    cfg.det_shift = 5'd8;
    cfg.seq_last = 3'd1;
    repeat (3) @(negedge clk);
    rst = 0;
    // bunch select: bank 0 and bank 1 all bunches feedback + NCO0, unity output gain
    bc = '0; bc.fir_en = 1; bc.nco0_en = 1; bc.out_gain = 16'sd4096; bc.det_en = '1;
    for (int k = 0; k < 2; k++) for (int b = 0; b < B; b++) twr(TBL_BUNCH, k * 8 + b, 32'(bc));
    // bunch FIR set 0: -1.0 on the newest sample
    for (int t = 0; t < 16; t++) twr(TBL_BBFIR, t, (t == 0) ? 32'hC000 : 32'd0);
    // sequencer: state 0 idle bank 0; state 1: f = 0, 1 dwell of 3 turns, bank 1
    twr(TBL_SEQ, 3, 32'd0);
    twr(TBL_SEQ, 4, 32'd0); twr(TBL_SEQ, 5, 32'd0); twr(TBL_SEQ, 6, {16'd1, 16'd3});
    twr(TBL_SEQ, 7, {16'd0, 16'd1});
    // settle: FIR histories fill
    repeat (40 * B) @(negedge clk);
    nout = 0;
    for (int n = 0; n < 20 * B; n++) begin
      int e, d;
      e = -v[(cyc - LAT + 8 * B) % B] + 2000;
      d = int'(dac_out) - e;
      check(d >= -2 && d <= 2, $sformatf("feedback output %0d expected %0d", dac_out, e));
      nout++;
      @(negedge clk);
    end
    // MMS: swap twice (one full interval of constant data)
    mms_swap = 1; @(negedge clk); mms_swap = 0;
    repeat (5 * B) @(negedge clk);
    mms_swap = 1; @(negedge clk); mms_swap = 0;
    repeat (2 * B) @(negedge clk);
    for (int b = 0; b < B; b++) begin
      // data of bunch b reaches the MMS 3 cycles later, under index b+3
      cfg.mms_rd_addr = 16'((b + 3) % B);
      @(negedge clk); @(negedge clk);
      check(int'(mms_min[0]) == v[b] && int'(mms_max[0]) == v[b], $sformatf("MMS bunch %0d", b));
      check(int'(mms_sum[0]) == v[b] * int'(mms_turns[0]), "MMS sum");
    end
    // detectors: one dwell of 3 turns with NCO1 at zero frequency
    ndet = 0;
    seq_trigger = 1; @(negedge clk); seq_trigger = 0;
    for (int n = 0; n < 8 * B; n++) begin
      if (det_valid) begin
        longint s, e;
        s = 0;
        for (int b = 0; b < B; b++) s += longint'(v[b]);
        e = (3 * s * 32000) >>> 8;
        ndet++;
        for (int d = 0; d < DETECTORS; d++) begin
          longint diff;
          diff = longint'(det_i[d]) - e;
          check(diff > -400 && diff < 400, $sformatf("detector %0d I %0d vs %0d", d, det_i[d], e));
        end
      end
      @(negedge clk);
    end
    check(ndet == 1, "one detector result");
    // overflow
    check(!ovf_sticky, "no overflow yet");
    spike = 14'sd8000; @(negedge clk); spike = 0;
    repeat (3) @(negedge clk);
    check(ovf_sticky, "overflow flagged");
    ovf_clear = 1; @(negedge clk); ovf_clear = 0; @(negedge clk);
    check(!ovf_sticky, "overflow cleared");
    finish_tb();
  end
endmodule
