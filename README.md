# Bunch-by-bunch feedback processor (transverse and longitudinal)

In a storage ring the electron bunches can start oscillating together: each
bunch moves a little and disturbs the next ones through the wakefields they
share. The cure is to measure every bunch on every turn, filter each bunch's
own history, and kick it back about 180 degrees out of phase. This RTL does
that for every bunch of a 936-bunch ring at the RF rate, one bunch per clock
cycle at 500 MHz. It also carries the diagnostics that come with such a system:

- oscillators to excite the beam;
- detectors that measure the beam's response;
- a sequencer that sweeps the excitation;
- per-bunch motion statistics;
- full-rate capture to memory.

The same logic serves two kinds of feedback. In **transverse** operation the
two channels are independent: X and Y, each with its own ADC and DAC. In
**longitudinal** operation the beam signal comes in as two inputs 90 degrees
apart, I and Q. Only Q, the bunch phase, is fed back. Both channels then
filter Q, each with a filter shifted 90 degrees at the synchrotron tune, and
their two DAC outputs drive an I/Q mixer as a single-sideband signal. Because
the synchrotron tune is tiny (about 0.004 of the revolution frequency), each
bunch is averaged over N turns before its filter and the result is held for
N turns after it. This decimation and interpolation lets a short filter reach
such low frequencies.

## Signal chain of one channel

```
 ADC --> OVF --> FIR --+--------------> [ADC cross-bar] --> /N --> BB FIR --> xN --+
                       |  MMS, MEM0, detectors                       ^            |
                       |                                    bunch select (filter) |
                       |                                                          v
        NCO0 --> G --+                                                 MEM0, detectors
 feedback ---> G ----+--> (+) --> (x per-bunch gain) --+--> FIR --> DLY --> DAC
        NCO1 --> G --+                                 |
   (sequencer freq/gain)                               +--> MMS, MEM0
```

| Stage | Module | What it does | Latency |
|---|---|---|---|
| overflow | `adc_overflow` | flags \|x\| >= threshold; sticky flag cleared by a register pulse | 1 |
| ADC filter | `fir_filter` | 8-tap compensation FIR | 2 |
| decimation | `bunch_decimate` | sums each bunch over N turns; outputs sum >> shift in the last turn of the group | 1 |
| bunch filter | `bb_fir` | 16-tap FIR over one bunch's successive samples; 4 coefficient sets, chosen per bunch | 1 |
| interpolation | `bunch_interp` | holds each bunch's filter output until its next update | 1 |
| gains | `gain` x3 | feedback, NCO0 and NCO1 scaled, each gated per bunch | 1 |
| adder, multiplier | `dac_stage` | sums the three; multiplies by the bunch's output gain | 2 |
| DAC filter | `fir_filter` | 8-tap compensation FIR | 2 |
| alignment | `delay_line` | 0..127 cycles of delay | `delay` |

From ADC pin to DAC pin a sample takes 10 cycles plus the alignment delay.
`dsp_channel` wires one such chain together with these blocks:

- `bunch_select`: the per-bunch settings table;
- two `nco`s: NCO0 at a register frequency, NCO1 at the sequencer's;
- the `sequencer`;
- four `detector`s;
- two `mms` blocks: one after the ADC filter, one after the output multiplier.

## Bunch numbering and pipeline skew

Every per-bunch memory is indexed by one shared count, from `bunch_counter`.
It runs 0..BUNCHES-1, and a `turn_sync` pulse resets it to 0 on the next
cycle. Each stage uses the index of the cycle in which the data reaches it.
Data that has passed k pipeline stages is therefore filed under a bunch index
k higher than the bunch it came from. Some examples:

- The ADC MMS sees bunch b under index b+3.
- The bunch filter sees it under b+4.
- The bunch-select settings applied in the DAC stage belong to a different
  index than the feedback sample they gate.

This is on purpose. The skews are constant for a given configuration, so
software measures them once and relabels its waveforms and tables. Every
table stays self-consistent: a bunch's filter history is always read and
written under the same index. The testbenches state the skews they rely on.

## Decimation, filtering and hold

`bunch_decimate` keeps a turn counter that advances at every bunch-0 cycle and
wraps after N = `decim_m1`+1 turns.

- In the first turn of a group, each bunch's accumulator is loaded with its
  sample.
- In the following turns, the sample is added.
- In the last turn, `sum >>> decim_shift` goes out with a valid flag.

With `decim_shift` = log2 N the output is the exact mean. Other N work, but
the scaling is then a power of two. `bb_fir` updates a bunch's history, and
produces a new output, only on valid samples. `bunch_interp` passes valid
outputs through and repeats the held value in the other turns. Each bunch
therefore gets a new drive value once every N turns and keeps it for N turns.
With N = 1 every sample is valid and the stage is an ordinary per-bunch FIR,
as used in transverse operation.

## Longitudinal mode: the three cross-bars

`lmbf_top` has one mode bit, `lmbf_mode`, which sets all three cross-bars
(`channel_xbar`):

| Cross-bar | transverse (0) | longitudinal (1) |
|---|---|---|
| ADC, before the bunch FIR | each channel filters its own ADC | both channels filter ADC 1 (Q). Channel 0's ADC (I) is still measured and can be captured |
| NCO | each channel uses its own NCO0 and NCO1 | channel 1 gets channel 0's oscillators delayed 90 degrees (cos -> sin, sin -> -cos) |
| sequencer | each channel has its own sequencer | channel 0's sequencer drives both channels, including the bunch-select bank and the detector timing |

For single-sideband feedback, program the two channels' bunch filters 90
degrees apart at the synchrotron tune. The two DAC outputs are then the I and
Q drive of the mixer.

## Excitation and detection experiments

The **sequencer** table has up to 8 states of four 32-bit words each:

- word 0: start frequency;
- word 1: frequency step;
- word 2: `{dwells, dwell_turns}`;
- word 3: `{gain, bank}`.

A trigger arms it, and it starts at the next bunch-0 cycle. It then runs
states 1..`seq_last`. Each state holds NCO1 at one frequency for
`dwell_turns` whole turns, then steps the frequency, for `dwells` dwells.
A dwell covers every bunch exactly once per turn. While a state runs, its
bank selects the bunch-select table and its gain scales NCO1. State 0's bank
applies while idle. `done` pulses after the last dwell.

**Detectors** multiply their input by NCO1's cosine and sine and sum the
products. The input is the ADC filter output or the bunch FIR output,
chosen per detector. Only bunches whose `det_en` bit is set are summed. At
each dwell end every detector outputs `sum >>> det_shift` as 32-bit I and Q.
`mem1_capture` then writes the results of the detectors enabled in
`det_mask`, lowest first, as 64-bit `{Q, I}` words. It writes to that
channel's linear buffer of 2^23 words (64 MB), which is rewound at each
sequence start.

**Bunch select** (`bunch_cfg_t`, 25 bits per bunch, 4 banks) chooses, per bunch:

- the filter set;
- the enables of the feedback, NCO0 and NCO1 drives;
- a signed output gain;
- four detector enables.

## Memory capture

`mem0_capture` packs two 16-bit channels into one 32-bit word per cycle. Each
channel takes one of three taps: after the ADC filter, after the bunch FIR, or
after the output multiplier. The words go to a circular buffer of 2^29 words
(2 GB). An arm pulse starts writing. The first trigger after that records
`trig_addr`, and the capture stops `cap_post` words later with a `done` pulse.
A stop pulse ends it at once. The DRAM, AXI interconnect and DMA to the host
are outside this RTL. Both capture blocks present plain
`valid/addr/data` write streams.

## Motion statistics (MMS)

For every bunch, `mms` keeps the minimum, maximum, sum and sum of squares of
its samples. Software computes from these:

- the motion range (max - min);
- the mean position (sum / turns);
- the standard deviation.

There are two banks. One accumulates while the other is read. A swap request
takes effect at the next bunch-0 cycle: the banks exchange, the new bank
restarts from each bunch's first sample, and `turns` gives the number of turns
in the bank just closed. Sums are sized for 2^17 turns, which covers 200 ms at
about 534 kHz revolution frequency.

## Converter card set-up (SPI)

The card's PLL, dual ADC and dual DAC are each set up over their own SPI
chip select, and `spi_master` runs those transfers. The three devices share
one serial clock and data line. A transfer sends the low 1..32 bits of a
word, most significant bit first, in mode 0. At the same time it reads back
the same number of bits. The serial clock is 10 MHz (`DIV` = 25 half-period
cycles), and a 24-bit frame takes about 2.5 us. Which bits to send is left
to software.

## Register interface

The bus is a simple one: `reg_wr`/`reg_rd`, a 16-bit address, 32-bit data,
and read data on the cycle after `reg_rd`. `reg_addr[15:14]` selects the bank
and `reg_addr[5:0]` the register. In every bank, registers 0-31 are
read/write and 32-47 are read-only status.

| Bank | Contents |
|---|---|
| 0 system | registers brought out on `sys_regs` for clock setup logic. Register 30 is the SPI data word and register 31 the SPI control `{device[9:8], length[5:0]}`; a write to 31 starts a transfer. Status 32 = `0x4C4D4246`, 33 = BUNCHES, 34 = SPI bits received, 35 bit 0 = SPI busy |
| 1 shared | `ctrl_cfg_t` in registers 0-1. Register 2 is an action register: bit0 arm trigger, bit1 software trigger, bit2 disarm, bit3 arm capture, bit4 stop capture. Register 3 clears interrupt bits. Status 32 pending interrupts, 33 trigger/capture state, 34 trigger address, 35 capture address |
| 2, 3 channel | `dsp_cfg_t` in registers 0-12. Register 13 = `{sel[17:16], addr[15:0]}` table pointer, and a write to register 14 stores its data in that table (sel 0 bunch select `{bank, bunch}`, 1 filter coefficients `{set, tap}`, 2 sequencer `{state, word}`). Register 15 is an action register: bit0 clear overflow, bit1 MMS swap. Status 32-44: flags, both MMS readouts, the turn count and the MEM1 address |

The configuration structs in `lmbf_pkg` are laid over the registers with the
struct's last field in bit 0 of the first register. To change a field, pack
the struct in software the same way.

Interrupt bits:

- 0, 1: sequencer done, channels 0 and 1;
- 2: capture done;
- 3: trigger fired;
- 4: SPI transfer done;
- 6, 7: ADC overflow, channels 0 and 1.

The trigger unit synchronises an external TTL input. It fires once per arm,
after a programmable delay, and drives both sequencers and the capture.

## Number formats

| Quantity | Format |
|---|---|
| samples | 16-bit signed; the 14-bit ADC value is sign-extended, not shifted |
| filter coefficients | signed, 16384 = 1.0 |
| gains | signed, 4096 = 1.0 |
| NCO frequency | 32-bit fraction of the clock rate |
| NCO amplitude | about 32000 |

Every stage saturates to 16 bits.

## Parameters

| Parameter | Default | Where | Basis |
|---|---|---|---|
| `BUNCHES` | 936 | all per-bunch blocks | Diamond's harmonic number |
| ADC / DAC width | 14 / 16 | `lmbf_pkg` | converter card |
| compensation FIR taps | 8 | `IO_TAPS` | own choice |
| bunch FIR taps, sets | 16, 4 | `bb_fir` | own choice |
| decimation | 1..128 | `NMAX_W` = 7 | own choice |
| detectors per channel | 4 | `DETECTORS` | own choice |
| bunch-select banks | 4 | `BANKS` | own choice |
| sequencer states | 8 | `SEQ_STATES` | own choice |
| alignment delay | 0..127 | `MAX_DELAY` | own choice |
| MEM0 / MEM1 address | 29 / 23 bits | `lmbf_top` | 2 GB / 64 MB |

## What follows the described system and what is this design's own

Taken from the described system:

- the stage order of the chain above (OVF, FIR, MMS, averaging,
  bunch filter, hold, three gains, adder, per-bunch multiplier, FIR, delay);
- three MEM0 taps and a 2 GB circular MEM0 buffer;
- two 64 MB MEM1 detector buffers;
- min/max/sum/sum-of-squares per bunch;
- averaging over a programmable number of turns followed by a hold for the
  same number, with N = 1 disabling it;
- Q duplicated onto both channels before the bunch filter;
- one sequencer driving both channels in longitudinal mode;
- several detectors, each with its own bunch enables;
- per-bunch choice of filter and excitation;
- four register banks (system, shared control, one per channel);
- one SPI link to each of the converter card's PLL, ADC and DAC;
- skews left to software.

This design's own choices:

- **The NCO cross-bar setting.** The described system says only that the
  cross-bars support I/Q excitation. Here channel 1 takes channel 0's oscillators shifted 90
  degrees, so the two DACs excite as one single-sideband pair.
- **The sizes.** This includes the 936 bunches, which is the Diamond ring's
  harmonic number.
- **The number formats.**
- **The layouts of the register map, the tables and the sequencer states.**
- **How the trigger, the capture and the interrupts behave.**
- **The detector output scaling.**
- **The MMS swap mechanism.**
- **The SPI frame.** It is mode 0, 1 to 32 bits long, with a 10 MHz clock.

Software skew measurement is not part of this RTL. Each module's opening
comment gives its latency, and the skews follow from those latencies.

## How far to trust it

Every module has a self-checking testbench that compares its outputs with
values computed independently in the testbench. Each testbench was also shown
to fail on a deliberately broken copy of its module. `tb_lmbf_top` runs the
full-size design (936 bunches, default parameters) through the register bus
alone. In one run it exercises, and counts:

- transverse feedback on both channels;
- the longitudinal cross-bar (Q feeding both channels);
- NCO quadrature between the two DACs (constant I^2+Q^2);
- decimation by 4 (the output changes once per 4 turns);
- a triggered sequence with a bank switch and excitation;
- detector words written to MEM1 by both channels;
- a triggered MEM0 capture;
- an ADC overflow raising the interrupt;
- an SPI frame to the ADC, checked against a model device;
- MMS readout through the status registers.

Limits a user should know:

- **Timing at 500 MHz is not addressed.** The design is single-lane, one
  bunch per cycle. Several blocks do a read-modify-write of a per-bunch memory
  in one cycle: `mms`, `bunch_decimate`, `bb_fir`. The FIRs sum all taps in
  one cycle. A real 500 MHz build needs extra pipelining in these paths, or
  a design that processes several bunches per cycle at a lower clock. The
  NCO's CORDIC is already pipelined, one stage per cycle.
- **Not included:**
  - the PCIe core, AXI cross-bars, DMA engine and DRAM controllers;
  - the converter card's ADC, DAC and PLL themselves (only their SPI link
    is here) and the register contents software sends them;
  - the host software that compensates skews and reads the memories.

## Files and simulation

`rtl/` has one module or package per file. `lmbf_pkg.sv` holds the shared
types and must be compiled first. `tb/tb_<module>.sv` tests `<module>`.
To simulate one, with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/lmbf_pkg.sv tb/tb_lmbf_top.sv \
    --top-module tb_lmbf_top -Mdir obj && obj/Vtb_lmbf_top
```

Each testbench ends with a line `TB_RESULT checks=N failures=M` and has a
cycle watchdog. Only the top-level test uses the default sizes. The unit
tests override `BUNCHES` (5 to 10 bunches) and address widths to keep them
short.

## Changing it

- **Sizes.** Ring size, tap counts, bank and state counts and the delay range
  are parameters. Their defaults are in the table above. Per-bunch memories
  scale with `BUNCHES`.
- **Registers.** The register layout comes from the structs `dsp_cfg_t` and
  `ctrl_cfg_t` in `lmbf_pkg`. The number of configuration registers, and the
  positions of the table and action registers after them, are computed from
  the struct sizes. Adding a field therefore moves those registers
  automatically, and the host's packing must follow.
- **Latencies.** If you add a pipeline stage, update `LAT` in `tb_lmbf_top`,
  the ADC-to-DAC latency. The unit testbenches state the latency they expect
  near their checks.
