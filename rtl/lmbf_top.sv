// Two-channel bunch-by-bunch feedback processor, transverse or longitudinal.
//
// Two processing channels share one bunch counter, one trigger unit, the fast
// capture (MEM0), an interrupt controller and a register interface of four
// banks: 0 system (clock and converter card setup, brought out on `sys_regs`),
// 1 shared control, 2 channel 0, 3 channel 1.  Three cross-bars join the
// channels.  With `lmbf_mode` = 0 (transverse) each channel processes its own
// plane (X, Y) on its own.  With `lmbf_mode` = 1 (longitudinal) the second
// ADC input (Q, the beam phase) feeds both channels' bunch FIRs; channel 1
// takes channel 0's oscillators shifted by 90 degrees, so the two DAC outputs
// form an I/Q pair for a single-sideband mixer; and channel 0's sequencer runs
// both channels.
//
// Register bus: reg_addr[15:14] selects the bank, reg_addr[5:0] the register
// (0-31 read/write, 32-47 read-only status).  Writes take effect on the next
// cycle; reads return data on the cycle after reg_rd.  Memory writes leave on
// two streams: MEM0 (32-bit words of two 16-bit channels into a circular
// buffer) and MEM1 (64-bit detector results, one linear block per channel).
// The PCIe core, the AXI cross-bars, the DMA engine and the DRAM sit outside
// this module.
//
// The converter card's three devices (PLL, ADC, DAC) are set up over SPI.  In
// bank 0, register 30 holds the word to send and register 31 holds the
// transfer's {device in bits 9:8, length in bits 5:0}.  A write to register 31
// starts the transfer.  Status word 2 of bank 0 returns the bits received, and
// status word 3 bit 0 shows that a transfer is in progress.  The other bank-0
// registers are brought out on `sys_regs` for the clock setup logic.
module lmbf_top
  import lmbf_pkg::*;
#(
  parameter int BUNCHES    = 936,
  parameter int MEM0_AW    = 29,
  parameter int MEM1_AW    = 23,
  localparam int BW        = $clog2(BUNCHES)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W-1:0] adc0,
  input  logic signed [ADC_W-1:0] adc1,
  input  logic                    turn_sync,
  input  logic                    ext_trig,
  output logic signed [DAC_W-1:0] dac0,
  output logic signed [DAC_W-1:0] dac1,
  // register bus
  input  logic                    reg_wr,
  input  logic                    reg_rd,
  input  logic [15:0]             reg_addr,
  input  logic [31:0]             reg_wdata,
  output logic [31:0]             reg_rdata,
  output logic [31:0][31:0]       sys_regs,
  // converter card SPI (0 PLL, 1 ADC, 2 DAC)
  output logic                    spi_sclk,
  output logic                    spi_sdo,
  output logic [2:0]              spi_cs_n,
  input  logic                    spi_sdi,
  // MEM0 write stream
  output logic                    mem0_valid,
  output logic [MEM0_AW-1:0]      mem0_addr,
  output logic [31:0]             mem0_data,
  // MEM1 write streams, one per channel
  output logic [1:0]              mem1_valid,
  output logic [1:0][MEM1_AW-1:0] mem1_addr,
  output logic [1:0][63:0]        mem1_data,
  output logic                    irq
);
  localparam int NREGS = 32;
  localparam int NSTAT = 16;

  // ---------------- bunch counter
  logic [BW-1:0] bunch;
  logic          turn_start;
  bunch_counter #(.BUNCHES(BUNCHES)) u_bc (.clk, .rst, .turn_sync, .bunch, .turn_start);

  // ---------------- registers
  logic [3:0]                   bank_wr, bank_rd;
  logic [3:0][31:0]             bank_rdata;
  logic [3:0][NSTAT-1:0][31:0]  bank_status;
  logic [3:0][NREGS-1:0][31:0]  bank_regs;
  logic [3:0][NREGS-1:0]        bank_strobe;
  logic [1:0]                   rd_bank;

  for (genvar b = 0; b < 4; b++) begin : g_bank
    always_comb begin
      bank_wr[b] = reg_wr && reg_addr[15:14] == 2'(b);
      bank_rd[b] = reg_rd && reg_addr[15:14] == 2'(b);
    end
    reg_bank #(.NREGS(NREGS), .NSTAT(NSTAT)) u_regs (
      .clk, .rst, .wr_en(bank_wr[b]), .rd_en(bank_rd[b]), .addr(reg_addr[5:0]),
      .wdata(reg_wdata), .status(bank_status[b]), .rdata(bank_rdata[b]),
      .regs(bank_regs[b]), .wr_strobe(bank_strobe[b]));
  end

  always_ff @(posedge clk) begin
    if (rst)         rd_bank <= '0;
    else if (reg_rd) rd_bank <= reg_addr[15:14];
  end
  always_comb reg_rdata = bank_rdata[rd_bank];
  always_comb sys_regs  = bank_regs[0];

  // ---------------- converter card SPI
  localparam int SYS_REG_SPI_DATA = 30;
  localparam int SYS_REG_SPI_CTRL = 31;
  logic        spi_busy, spi_done;
  logic [31:0] spi_rdata, spi_ctrl;
  always_comb spi_ctrl = bank_regs[0][SYS_REG_SPI_CTRL];
  spi_master #(.NDEV(3)) u_spi (
    .clk, .rst, .start(bank_strobe[0][SYS_REG_SPI_CTRL]), .dev(spi_ctrl[9:8]),
    .len(spi_ctrl[5:0]), .wdata(bank_regs[0][SYS_REG_SPI_DATA]), .sdi(spi_sdi),
    .sclk(spi_sclk), .sdo(spi_sdo), .cs_n(spi_cs_n), .busy(spi_busy),
    .done(spi_done), .rdata(spi_rdata));

  ctrl_cfg_t ctrl;
  dsp_cfg_t  dcfg [2];
  logic [CTRL_CFG_REGS*32-1:0] ctrl_bits;
  logic [DSP_CFG_REGS*32-1:0]  dsp_bits [2];

  always_comb begin
    ctrl_bits = bank_regs[1][CTRL_CFG_REGS-1:0];
    ctrl      = ctrl_bits[$bits(ctrl_cfg_t)-1:0];
    for (int c = 0; c < 2; c++) begin
      dsp_bits[c] = bank_regs[2+c][DSP_CFG_REGS-1:0];
      dcfg[c]     = dsp_bits[c][$bits(dsp_cfg_t)-1:0];
    end
  end

  // Pulses from the action registers
  logic [31:0] ctrl_pulse, irq_clear;
  always_comb begin
    ctrl_pulse = bank_strobe[1][CTRL_REG_PULSE]   ? bank_regs[1][CTRL_REG_PULSE]   : '0;
    irq_clear  = bank_strobe[1][CTRL_REG_IRQ_CLR] ? bank_regs[1][CTRL_REG_IRQ_CLR] : '0;
  end

  // ---------------- trigger
  logic trig_fire, trig_armed, trig_waiting;
  trigger_unit u_trig (
    .clk, .rst, .ext_trig, .ext_en(ctrl.trig_ext_en), .soft_trig(ctrl_pulse[1]),
    .arm(ctrl_pulse[0]), .disarm(ctrl_pulse[2]), .delay(ctrl.trig_delay),
    .fire(trig_fire), .armed(trig_armed), .waiting(trig_waiting));

  // ---------------- channels and cross-bars
  sample_t   adc_out [2], fir_in [2], fir_out [2], mult_out [2];
  nco_pair_t nco_own [2][2], nco_in [2][2];
  nco_pair_t nco_rot [2];
  seq_ctrl_t seq_own [2], seq_in [2];
  logic signed [DAC_W-1:0] dac [2];
  logic        det_valid [2];
  logic signed [31:0] det_i [2][DETECTORS];
  logic signed [31:0] det_q [2][DETECTORS];
  logic        ovf [2], ovf_sticky [2], seq_done [2];
  logic [2:0]  seq_state [2];
  sample_t     mms_min [2][2], mms_max [2][2];
  logic signed [32:0] mms_sum [2][2];
  logic [48:0] mms_sum2 [2][2];
  logic [16:0] mms_turns [2][2];
  logic signed [ADC_W-1:0] adc_raw [2];

  always_comb begin
    adc_raw[0] = adc0;
    adc_raw[1] = adc1;
    dac0 = dac[0];
    dac1 = dac[1];
  end

  // ADC cross-bar: Q (channel 1) onto both bunch FIRs in longitudinal mode.
  channel_xbar #(.T(sample_t)) u_xbar_adc (
    .in0(adc_out[0]), .in1(adc_out[1]), .alt0(adc_out[1]), .alt1(adc_out[1]),
    .sel0(ctrl.lmbf_mode), .sel1(1'b0), .out0(fir_in[0]), .out1(fir_in[1]));

  // NCO cross-bars: channel 1 gets channel 0's tones delayed by 90 degrees,
  // cos(p - 90) = sin(p), sin(p - 90) = -cos(p).
  for (genvar n = 0; n < 2; n++) begin : g_nco_xbar
    always_comb begin
      nco_rot[n].c = nco_own[0][n].s;
      nco_rot[n].s = (nco_own[0][n].c == 16'sh8000) ? 16'sh7fff : -nco_own[0][n].c;
    end
    channel_xbar #(.T(nco_pair_t)) u_xbar_nco (
      .in0(nco_own[0][n]), .in1(nco_own[1][n]), .alt0(nco_own[0][n]), .alt1(nco_rot[n]),
      .sel0(1'b0), .sel1(ctrl.lmbf_mode), .out0(nco_in[0][n]), .out1(nco_in[1][n]));
  end

  // Sequencer cross-bar: channel 0's sequencer drives both channels.
  channel_xbar #(.T(seq_ctrl_t)) u_xbar_seq (
    .in0(seq_own[0]), .in1(seq_own[1]), .alt0(seq_own[0]), .alt1(seq_own[0]),
    .sel0(1'b0), .sel1(ctrl.lmbf_mode), .out0(seq_in[0]), .out1(seq_in[1]));

  for (genvar c = 0; c < 2; c++) begin : g_ch
    logic [31:0] tbl_ctl, pulse;
    always_comb begin
      tbl_ctl = bank_regs[2+c][DSP_REG_TBL_ADDR];
      pulse   = bank_strobe[2+c][DSP_REG_PULSE] ? bank_regs[2+c][DSP_REG_PULSE] : '0;
    end

    dsp_channel #(.BUNCHES(BUNCHES)) u_ch (
      .clk, .rst, .adc_raw(adc_raw[c]), .bunch, .turn_start, .cfg(dcfg[c]),
      .ovf_clear(pulse[0]), .mms_swap(pulse[1]), .seq_trigger(trig_fire),
      .tbl_we(bank_strobe[2+c][DSP_REG_TBL_DATA]), .tbl_sel(tbl_ctl[17:16]),
      .tbl_addr(tbl_ctl[15:0]), .tbl_data(bank_regs[2+c][DSP_REG_TBL_DATA]),
      .adc_out(adc_out[c]), .fir_in(fir_in[c]), .nco_own(nco_own[c]), .nco_in(nco_in[c]),
      .seq_own(seq_own[c]), .seq_in(seq_in[c]),
      .fir_out(fir_out[c]), .mult_out(mult_out[c]), .dac_out(dac[c]),
      .det_valid(det_valid[c]), .det_i(det_i[c]), .det_q(det_q[c]),
      .ovf(ovf[c]), .ovf_sticky(ovf_sticky[c]), .seq_done(seq_done[c]),
      .seq_state(seq_state[c]), .mms_min(mms_min[c]), .mms_max(mms_max[c]),
      .mms_sum(mms_sum[c]), .mms_sum2(mms_sum2[c]), .mms_turns(mms_turns[c]));

    logic m1_full, m1_overrun;
    logic signed [31:0] m1_i [DETECTORS];
    logic signed [31:0] m1_q [DETECTORS];
    always_comb begin
      for (int d = 0; d < DETECTORS; d++) begin
        m1_i[d] = det_i[c][d];
        m1_q[d] = det_q[c][d];
      end
    end
    mem1_capture #(.ADDR_W(MEM1_AW)) u_mem1 (
      .clk, .rst, .start(seq_in[c].start), .det_mask(dcfg[c].det_mask),
      .in_valid(det_valid[c]), .i_in(m1_i), .q_in(m1_q),
      .wr_valid(mem1_valid[c]), .wr_addr(mem1_addr[c]), .wr_data(mem1_data[c]),
      .full(m1_full), .overrun(m1_overrun));

    // Channel status words
    always_comb begin
      bank_status[2+c] = '0;
      bank_status[2+c][0]  = {25'd0, m1_overrun, m1_full, ovf_sticky[c], seq_in[c].busy, seq_state[c]};
      for (int m = 0; m < 2; m++) begin
        bank_status[2+c][1+5*m] = {mms_max[c][m], mms_min[c][m]};
        bank_status[2+c][2+5*m] = mms_sum[c][m][31:0];
        bank_status[2+c][3+5*m] = {{31{mms_sum[c][m][32]}}, mms_sum[c][m][32]};
        bank_status[2+c][4+5*m] = mms_sum2[c][m][31:0];
        bank_status[2+c][5+5*m] = 32'(mms_sum2[c][m][48:32]);
      end
      bank_status[2+c][11] = 32'(mms_turns[c][0]);
      bank_status[2+c][12] = 32'(mem1_addr[c]);
    end
  end

  // ---------------- fast capture
  sample_t cap_src [2][3];
  logic    cap_running, cap_triggered, cap_done;
  logic [MEM0_AW-1:0] cap_trig_addr;
  always_comb begin
    for (int c = 0; c < 2; c++) begin
      cap_src[c][0] = adc_out[c];
      cap_src[c][1] = fir_out[c];
      cap_src[c][2] = mult_out[c];
    end
  end
  mem0_capture #(.ADDR_W(MEM0_AW)) u_mem0 (
    .clk, .rst, .src0(cap_src[0]), .src1(cap_src[1]),
    .sel0(cap_src_e'(ctrl.cap_sel0)), .sel1(cap_src_e'(ctrl.cap_sel1)),
    .arm(ctrl_pulse[3]), .stop(ctrl_pulse[4]), .trigger(trig_fire),
    .post_count(MEM0_AW'(ctrl.cap_post)),
    .wr_valid(mem0_valid), .wr_addr(mem0_addr), .wr_data(mem0_data),
    .running(cap_running), .triggered(cap_triggered), .trig_addr(cap_trig_addr),
    .done(cap_done));

  // ---------------- interrupts
  logic [7:0] irq_pending;
  interrupt_ctrl #(.N(8)) u_irq (
    .clk, .rst,
    .events({ovf[1], ovf[0], 1'b0, spi_done, trig_fire, cap_done, seq_done[1], seq_done[0]}),
    .mask(ctrl.irq_mask), .clear(irq_clear[7:0]), .pending(irq_pending), .irq);

  always_comb begin
    bank_status[0] = '0;
    bank_status[0][0] = 32'h4c4d_4246;     // design identifier
    bank_status[0][1] = 32'(BUNCHES);
    bank_status[0][2] = spi_rdata;
    bank_status[0][3] = {31'd0, spi_busy};
    bank_status[1] = '0;
    bank_status[1][0] = {24'd0, irq_pending};
    bank_status[1][1] = {27'd0, cap_triggered, cap_running, trig_waiting, trig_armed, irq};
    bank_status[1][2] = 32'(cap_trig_addr);
    bank_status[1][3] = 32'(mem0_addr);
  end
endmodule
