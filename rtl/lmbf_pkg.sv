// Shared types and constants of the bunch-by-bunch feedback processor.
//
// The processor runs one bunch per clock cycle at the RF rate: every cycle
// carries one signed sample of one bunch, and the bunch index counts round the
// ring.  Samples inside the processing chain are 16-bit signed; the 14-bit ADC
// word is sign-extended into this width and the DAC takes the 16-bit result.
// Coefficient and gain formats, table sizes and field layouts are this design's
// choices where noted below.
package lmbf_pkg;

  localparam int ADC_W     = 14;  // ADC resolution
  localparam int DAC_W     = 16;  // DAC resolution
  localparam int SAMPLE_W  = 16;  // internal sample width
  localparam int COEF_FRAC = 14;  // FIR coefficients: 1.0 = 2**14
  localparam int GAIN_FRAC = 12;  // gain stages: 1.0 = 2**12
  localparam int DETECTORS = 4;   // detectors per channel
  localparam int FILTERS   = 4;   // selectable bunch-by-bunch filters
  localparam int BANKS     = 4;   // bunch-select banks
  localparam int IO_TAPS   = 8;   // taps of the ADC and DAC compensation filters

  // Table selected by a channel's table write port
  localparam logic [1:0] TBL_BUNCH = 2'd0;  // bunch-select entries {bank, bunch}
  localparam logic [1:0] TBL_BBFIR = 2'd1;  // bunch FIR coefficients {set, tap}
  localparam logic [1:0] TBL_SEQ   = 2'd2;  // sequencer states {state, word}

  typedef logic signed [SAMPLE_W-1:0] sample_t;

  // Settings applied to one bunch, read from the bunch-select table every cycle.
  typedef struct packed {
    logic [DETECTORS-1:0] det_en;    // detector enables for this bunch
    logic signed [15:0]   out_gain;  // per-bunch multiplier before the DAC FIR
    logic                 nco1_en;   // sequencer excitation enabled
    logic                 nco0_en;   // fixed NCO excitation enabled
    logic                 fir_en;    // feedback enabled
    logic [1:0]           fir_sel;   // bunch-by-bunch filter set
  } bunch_cfg_t;                     // 25 bits

  // Sequencer controls, shared by both channels in longitudinal mode.
  typedef struct packed {
    logic [31:0]        freq;       // NCO1 frequency
    logic signed [15:0] gain;       // NCO1 excitation gain
    logic [1:0]         bank;       // bunch-select bank
    logic               busy;       // a sequence is running
    logic               start;      // first cycle of a sequence
    logic               dwell_end;  // last cycle of a dwell: detectors emit
  } seq_ctrl_t;

  // One oscillator output: the two phases of the same tone.
  typedef struct packed {
    sample_t c;  // cosine
    sample_t s;  // sine
  } nco_pair_t;

  // Fast capture source selection (MEM0)
  typedef enum logic [1:0] {
    CAP_ADC = 2'd0,  // after the ADC compensation FIR
    CAP_FIR = 2'd1,  // bunch FIR output
    CAP_DAC = 2'd2   // after the output multiplier
  } cap_src_e;

  // Registers of one processing channel.  The struct is laid over the
  // channel's register bank, least significant bit in bit 0 of register 0.
  typedef struct packed {
    logic [15:0]               mms_rd_addr;    // bunch read out of both MMS
    logic [2:0]                seq_last;       // last sequencer state to run
    logic [4:0]                det_shift;      // detector result scaling
    logic [DETECTORS-1:0]      det_mask;       // detectors written to memory
    logic [DETECTORS-1:0]      det_src;        // 0: ADC filter output, 1: bunch FIR output
    logic [6:0]                dac_delay;      // output alignment delay
    logic [2:0]                decim_shift;    // decimation scaling
    logic [6:0]                decim_m1;       // decimation count N-1
    logic [15:0]               ovf_threshold;  // ADC overflow level
    logic signed [15:0]        nco0_gain;
    logic signed [15:0]        fir_gain;
    logic [31:0]               nco0_freq;
    logic [IO_TAPS-1:0][15:0]  adc_coef;       // ADC compensation filter
    logic [IO_TAPS-1:0][15:0]  dac_coef;       // DAC compensation filter
  } dsp_cfg_t;

  localparam int DSP_CFG_REGS = ($bits(dsp_cfg_t) + 31) / 32;
  // Registers following the configuration in a channel bank
  localparam int DSP_REG_TBL_ADDR = DSP_CFG_REGS;      // {sel[17:16], addr[15:0]}
  localparam int DSP_REG_TBL_DATA = DSP_CFG_REGS + 1;  // write: store into the table
  localparam int DSP_REG_PULSE    = DSP_CFG_REGS + 2;  // bit0 clear overflow, bit1 MMS swap

  // Shared control registers (bank 1), laid over registers 0 and up.
  typedef struct packed {
    logic [31:0]  cap_post;     // words captured after the trigger
    logic [7:0]   irq_mask;
    logic [15:0]  trig_delay;   // trigger delay, cycles
    logic         trig_ext_en;  // external trigger enabled
    logic         lmbf_mode;    // 1: longitudinal cross-bar settings
    logic [1:0]   cap_sel1;     // capture source, channel 1 (cap_src_e)
    logic [1:0]   cap_sel0;     // capture source, channel 0 (cap_src_e)
  } ctrl_cfg_t;

  localparam int CTRL_CFG_REGS = ($bits(ctrl_cfg_t) + 31) / 32;
  // Action register: bit0 arm trigger, bit1 software trigger, bit2 disarm,
  // bit3 arm capture, bit4 stop capture; clear-interrupt register: pending bits.
  localparam int CTRL_REG_PULSE   = CTRL_CFG_REGS;
  localparam int CTRL_REG_IRQ_CLR = CTRL_CFG_REGS + 1;

  // Saturate a wide signed value into a SAMPLE_W sample.
  function automatic sample_t sat16(input logic signed [47:0] v);
    if (v > 48'sd32767)       return 16'sh7fff;
    else if (v < -48'sd32768) return 16'sh8000;
    else                      return v[15:0];
  endfunction

endpackage
