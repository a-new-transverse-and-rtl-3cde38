// End-to-end test of lmbf_top at its default size (936 bunches), driven only
// through the register bus, the ADC inputs and the trigger.  It runs the
// processor through each of its mechanisms and counts how often each was
// seen; a mechanism never seen counts as a failure:
//   feedback   transverse feedback, each DAC the negated own ADC signal
//   lmbf_xbar  longitudinal mode: the Q input drives both channels' feedback
//   quadrature longitudinal mode: channel 1's NCO is channel 0's shifted 90 deg
//   decimate   decimation by 4: the output changes once every 4 turns
//   sequence   a triggered sequencer run with a bank switch and excitation
//   detector   detector results written to MEM1 by both channels
//   capture    a triggered MEM0 capture stopping after the post-trigger count
//   overflow   an ADC overflow raising the interrupt
//   mms        min/max/sum read back through the status registers
//   spi        a converter-card SPI transfer to the ADC, with its interrupt
module tb_lmbf_top;
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
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    finish_tb();
  end
  localparam int B = 936;
  localparam int LAT = 10;   // ADC input to DAC output, cycles
  logic signed [13:0] adc0, adc1;
  logic turn_sync, ext_trig, reg_wr, reg_rd, mem0_valid, irq;
  logic signed [15:0] dac0, dac1;
  logic [15:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [31:0][31:0] sys_regs;
  logic [28:0] mem0_addr;
  logic [31:0] mem0_data;
  logic [1:0] mem1_valid;
  logic [1:0][22:0] mem1_addr;
  logic [1:0][63:0] mem1_data;
  logic spi_sclk, spi_sdo, spi_sdi;
  logic [2:0] spi_cs_n;

  // SPI slave model for device 1: records what it receives, answers with
  // `spi_resp` most significant bit first (24-bit frames)
  logic [31:0] spi_got = '0, spi_resp = 32'h00C3_5A96, spi_sh = '0;
  always_comb spi_sdi = spi_sh[23];
  always @(negedge spi_cs_n[1]) spi_sh = spi_resp;
  always @(posedge spi_sclk) if (!spi_cs_n[1]) spi_got = {spi_got[30:0], spi_sdo};
  always @(negedge spi_sclk) if (!spi_cs_n[1]) spi_sh = spi_sh << 1;

  lmbf_top dut (.*);

  // ---------------- stimulus bookkeeping
  int cyc = 0;                 // edges since reset release = bunch index mod B
  int ramp = 0;                // per-turn input ramp (decimation test)
  int v0 [B], v1 [B];
  logic signed [13:0] spike = 0;
  int h0 [$], h1 [$];          // ADC samples, one per cycle
  int n_mem0 = 0, n_mem1 [2] = '{0, 0};

  always @(posedge clk) if (!rst) begin
    cyc <= cyc + 1;
    if (mem0_valid) n_mem0 <= n_mem0 + 1;
    for (int c = 0; c < 2; c++) if (mem1_valid[c]) n_mem1[c] <= n_mem1[c] + 1;
  end

  always_comb begin
    adc0 = (spike != 0) ? spike : 14'(v0[cyc % B] + ramp);
    adc1 = 14'(v1[cyc % B] + ramp);
  end

  // one cycle of the test: record the inputs of this cycle, pass the edge
  task automatic step();
    h0.push_back(int'(adc0));
    h1.push_back(int'(adc1));
    @(negedge clk);
  endtask

  task automatic steps(input int n);
    repeat (n) step();
  endtask

  // ---------------- register access
  task automatic wreg(input int bank, input int r, input logic [31:0] d);
    reg_wr = 1; reg_addr = {2'(bank), 8'd0, 6'(r)}; reg_wdata = d; step(); reg_wr = 0;
  endtask

  task automatic rreg(input int bank, input int r, output logic [31:0] d);
    reg_rd = 1; reg_addr = {2'(bank), 8'd0, 6'(r)}; step(); reg_rd = 0;
    d = reg_rdata;
  endtask

  dsp_cfg_t  dc [2];
  ctrl_cfg_t cc;

  task automatic write_dsp(input int c);
    logic [DSP_CFG_REGS*32-1:0] bits;
    bits = '0;
    bits[$bits(dsp_cfg_t)-1:0] = dc[c];
    for (int r = 0; r < DSP_CFG_REGS; r++) wreg(2 + c, r, bits[r*32 +: 32]);
  endtask

  task automatic write_ctrl();
    logic [CTRL_CFG_REGS*32-1:0] bits;
    bits = '0;
    bits[$bits(ctrl_cfg_t)-1:0] = cc;
    for (int r = 0; r < CTRL_CFG_REGS; r++) wreg(1, r, bits[r*32 +: 32]);
  endtask

  task automatic table_wr(input int c, input logic [1:0] sel, input int a, input logic [31:0] d);
    wreg(2 + c, DSP_REG_TBL_ADDR, {14'd0, sel, 16'(a)});
    wreg(2 + c, DSP_REG_TBL_DATA, d);
  endtask

  // ---------------- mechanism counters
  int n_feedback = 0, n_lmbf = 0, n_quad = 0, n_decim = 0, n_seq = 0, n_exc = 0;
  int n_det = 0, n_cap = 0, n_ovf = 0, n_mms = 0, n_spi = 0;

  // compare both DACs with the negated inputs LAT cycles back, over `n` cycles
  task automatic check_feedback(input int n, input bit lmbf, input int offset);
    int ok = 0;
    for (int k = 0; k < n; k++) begin
      int i, e0, e1;
      step();
      i = h0.size() - 1 - LAT;
      e0 = -(lmbf ? h1[i] : h0[i]) + offset;
      e1 = -h1[i] + offset;
      check(int'(dac0) == e0, $sformatf("dac0 %0d expected %0d (lmbf %0d)", dac0, e0, lmbf));
      check(int'(dac1) == e1, $sformatf("dac1 %0d expected %0d", dac1, e1));
      if (int'(dac0) == e0 && int'(dac1) == e1) ok++;
    end
    if (ok == n) begin
      if (lmbf) n_lmbf++; else n_feedback++;
    end
  endtask

  initial begin
    bunch_cfg_t bc;
    logic [31:0] rd;
    for (int b = 0; b < B; b++) begin
      v0[b] = $urandom_range(0, 4000) - 2000;
      v1[b] = $urandom_range(0, 4000) - 2000;
    end
    turn_sync = 0; ext_trig = 0; reg_wr = 0; reg_rd = 0; reg_addr = '0; reg_wdata = '0;
    repeat (3) @(negedge clk);
    rst = 0;

    rreg(0, 32, rd);
    check(rd == 32'h4c4d_4246, "design identifier");
    rreg(0, 33, rd);
    check(rd == B, "bunch count register");

    // ---- configuration: unity filters, feedback -1 on every bunch
    for (int c = 0; c < 2; c++) begin
      dc[c] = '0;
      dc[c].adc_coef[0] = 16'sd16384;
      dc[c].dac_coef[0] = 16'sd16384;
      dc[c].fir_gain = 16'sd4096;
      dc[c].ovf_threshold = 16'd7000;
      dc[c].det_mask = 4'b0011;
      dc[c].det_shift = 5'd16;
      dc[c].seq_last = 3'd1;
      write_dsp(c);
      bc = '0; bc.fir_en = 1; bc.nco0_en = 1; bc.out_gain = 16'sd4096; bc.det_en = '1;
      for (int b = 0; b < B; b++) table_wr(c, TBL_BUNCH, b, 32'(bc));        // bank 0
      bc.nco1_en = 1;
      for (int b = 0; b < B; b++) table_wr(c, TBL_BUNCH, 1024 + b, 32'(bc)); // bank 1
      for (int t = 0; t < 16; t++) table_wr(c, TBL_BBFIR, t, (t == 0) ? 32'hC000 : 32'd0);
      // sequencer: state 0 idle in bank 0; state 1: 3 dwells of 2 turns in bank 1
      table_wr(c, TBL_SEQ, 3, 32'd0);
      table_wr(c, TBL_SEQ, 4, 32'h0100_0000);
      table_wr(c, TBL_SEQ, 5, 32'h0010_0000);
      table_wr(c, TBL_SEQ, 6, {16'd3, 16'd2});
      table_wr(c, TBL_SEQ, 7, {16'sd1024, 16'd1});
    end
    cc = '0;
    cc.irq_mask = 8'hFF;
    cc.cap_post = 32'd100;
    cc.trig_delay = 16'd10;
    write_ctrl();

    // ---- transverse feedback
    steps(20 * B);
    check_feedback(2 * B, 0, 0);

    // ---- bunch motion measurement through the status registers
    wreg(2, DSP_REG_PULSE, 32'd2);
    steps(3 * B);
    wreg(2, DSP_REG_PULSE, 32'd2);
    steps(2 * B);
    for (int k = 0; k < 5; k++) begin
      int b;
      logic [31:0] mm, sm, tn;
      b = k * 97;
      dc[0].mms_rd_addr = 16'((b + 3) % B);
      write_dsp(0);
      steps(3);
      rreg(2, 33, mm);
      rreg(2, 34, sm);
      rreg(2, 43, tn);
      check(mm == {16'(v0[b]), 16'(v0[b])}, $sformatf("MMS min/max bunch %0d", b));
      check($signed(sm) == v0[b] * int'(tn) && tn >= 3, "MMS sum");
      if (mm == {16'(v0[b]), 16'(v0[b])}) n_mms++;
    end
    // ---- longitudinal mode
    cc.lmbf_mode = 1;
    write_ctrl();
    steps(20 * B);
    check_feedback(2 * B, 1, 0);

    // ---- decimation by 4 on channel 0
    dc[0].decim_m1 = 7'd3; dc[0].decim_shift = 3'd2;
    write_dsp(0);
    steps(80 * B);
    begin
      automatic int changes = 0, last;
      last = 0;
      for (int t = 0; t < 16; t++) begin
        ramp = ramp + 8;
        steps(B);
        if (t > 0 && int'(dac0) != last) changes++;
        last = int'(dac0);
      end
      ramp = 0;
      check(changes == 4, $sformatf("decimated output changes %0d in 16 turns", changes));
      if (changes == 4) n_decim++;
    end
    dc[0].decim_m1 = 7'd0; dc[0].decim_shift = 3'd0;
    write_dsp(0);
    steps(20 * B);
    check_feedback(B, 1, 0);

    // ---- NCO quadrature: feedback off, NCO0 on in both channels
    for (int c = 0; c < 2; c++) begin
      dc[c].fir_gain = 16'sd0;
      dc[c].nco0_gain = 16'sd2048;
      dc[c].nco0_freq = 32'h0123_4567;
    end
    write_dsp(0); write_dsp(1);
    steps(100);
    begin
      automatic int good = 0;
      for (int k = 0; k < 500; k++) begin
        longint r2;
        step();
        r2 = longint'(dac0) * dac0 + longint'(dac1) * dac1;
        if (r2 > 15900 * 15900 && r2 < 16100 * 16100) good++;
      end
      check(good == 500, $sformatf("quadrature amplitude %0d of 500", good));
      if (good == 500) n_quad++;
    end
    for (int c = 0; c < 2; c++) begin
      dc[c].fir_gain = 16'sd4096;
      dc[c].nco0_gain = 16'sd0;
    end
    write_dsp(0); write_dsp(1);
    steps(20 * B);

    // ---- sequencer, detectors and MEM0 capture on one trigger
    begin
      int m1 [2], m0;
      m1 = n_mem1; m0 = n_mem0;
      wreg(1, CTRL_REG_PULSE, 32'h08);   // arm capture
      wreg(1, CTRL_REG_PULSE, 32'h01);   // arm trigger
      wreg(1, CTRL_REG_PULSE, 32'h02);   // software trigger
      for (int k = 0; k < 10 * B; k++) begin
        int i;
        step();
        i = h0.size() - 1 - LAT;
        if (int'(dac0) != -h1[i]) n_exc++;
      end
      rreg(1, 32, rd);
      check(rd[0] && rd[2], "sequencer done and capture done pending");
      if (rd[0]) n_seq++;
      check(n_exc > 5 * B && n_exc <= 6 * B, $sformatf("excitation during the 6-turn sequence: %0d cycles", n_exc));
      check(n_mem1[0] - m1[0] == 6 && n_mem1[1] - m1[1] == 6,
            $sformatf("detector words %0d %0d", n_mem1[0] - m1[0], n_mem1[1] - m1[1]));
      if (n_mem1[0] - m1[0] == 6 && n_mem1[1] - m1[1] == 6) n_det++;
      rreg(1, 33, rd);
      check(!rd[3] && rd[4], "capture stopped after trigger");
      check(n_mem0 - m0 > 101, "capture words");
      if (!rd[3] && rd[4]) n_cap++;
      wreg(1, CTRL_REG_IRQ_CLR, 32'hFF);
      steps(3);
      check(!irq, "interrupt cleared");
    end
    check_feedback(B, 1, 0);

    // ---- ADC overflow raises the interrupt
    spike = 14'sd8000; step(); spike = 0;
    steps(5);
    check(irq, "overflow interrupt");
    rreg(1, 32, rd);
    check(rd[6], "overflow pending bit");
    if (irq && rd[6]) n_ovf++;

    // ---- SPI transfer to the converter card's ADC: 24 bits, 25-cycle half period
    wreg(0, 30, 32'h0081_2345);
    wreg(0, 31, {22'd0, 2'd1, 2'd0, 6'd24});
    steps(2);
    rreg(0, 35, rd);
    check(rd[0], "SPI busy");
    steps((2 * 24 + 1) * 25);
    rreg(0, 35, rd);
    check(!rd[0], "SPI finished");
    check(spi_got[23:0] == 24'h81_2345, $sformatf("SPI slave received %h", spi_got[23:0]));
    check(spi_cs_n == 3'b111, "SPI deselected");
    rreg(0, 34, rd);
    check(rd == 32'h00C3_5A96, $sformatf("SPI read back %h", rd));
    if (rd == 32'h00C3_5A96 && spi_got[23:0] == 24'h81_2345) n_spi++;
    rreg(1, 32, rd);
    check(rd[4], "SPI done interrupt");

    // ---- every mechanism seen
    check(n_feedback > 0, "feedback seen");
    check(n_lmbf > 0, "longitudinal cross-bar seen");
    check(n_quad > 0, "NCO quadrature seen");
    check(n_decim > 0, "decimation seen");
    check(n_seq > 0 && n_exc > 0, "sequencer run seen");
    check(n_det > 0, "detector capture seen");
    check(n_cap > 0, "MEM0 capture seen");
    check(n_ovf > 0, "overflow seen");
    check(n_mms > 0, "MMS readout seen");
    check(n_spi > 0, "SPI transfer seen");
    $display("mechanisms: feedback %0d lmbf %0d quadrature %0d decimate %0d sequence %0d excitation %0d detector %0d capture %0d overflow %0d mms %0d spi %0d",
             n_feedback, n_lmbf, n_quad, n_decim, n_seq, n_exc, n_det, n_cap, n_ovf, n_mms, n_spi);
    finish_tb();
  end
endmodule
