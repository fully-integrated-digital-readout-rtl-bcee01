# FIT digital readout and trigger

The Fast Interaction Trigger (FIT) of ALICE registers the particles of each
LHC bunch crossing in Cherenkov modules on both sides of the interaction
point. Within about 200 ns it must give the collision time and the
multiplicity, and trigger decisions. Every channel needs:

* a time measurement with 13 ps resolution that is ready about 125 ns after
  the pulse;
* a 12-bit charge measurement for every 25 ns crossing, without dead time;
* a trigger path that combines all channels of a crossing into five
  decisions: ORA, ORC, TVX (vertex), Central and Semi-Central.

This repository holds synthesizable SystemVerilog for the digital part of
the system: the logic of the Processing Modules (PMs) and the trigger logic
of the Trigger and Clock Module (TCM). It also holds self-checking
testbenches. The analog front end, the external TDC and ADC chips, the FPGA
clocking primitives and the optical, HDMI and Ethernet links are not
included. Their digital signals are ports of the top level.

## System at a glance

```
 A side: 8 PMs x 12 ch ─┐   pre-trigger word per PM and crossing
                        ├──────────────────────────────────────►  TCM ──► ORA ORC TVX
 C side: 10 PMs x 12 ch ┘   {charge sum, in-window time sum, N active}     Central SemiCentral
                                                                          + event counters
 each channel:  CFD samples ─► coarse TDC ─► FIFO ─┐
                external TDC ─► shift register ────┴► merge ─► time shift ─► window ─► time, active
                ADC1/ADC2 ─► even/odd mux + latch ────────────────────────────► charge
```

`fit_top` instantiates `N_PM_A_P` = 8 A-side and `N_PM_C_P` = 10 C-side
`processing_module`s and one `tcm_trigger`. PM index `p < 8` is on side A.
This covers the 96 A-side and 112 C-side Cherenkov channels: the C side
has 120 inputs, so 8 of them are spare.

## Time measurement: two TDCs joined through overlapping bits

This is the least obvious part of the design.

An external TDC (THS788) has 13 ps resolution. In its 16-bit mode it is too
slow for the trigger, so it runs in 8-bit mode. Its result then wraps every
256 × 13 ps = 3.33 ns. The FPGA supplies the coarse part of the time.

**Coarse TDC (`event_capture`, `coarse_tdc`).**
* The FPGA samples the CFD output and the 40 MHz reference clock at 2.4 GS/s
  (a four-phase 600 MHz clock, both edges). One bin is 416.7 ps, and one
  25 ns crossing is exactly 60 bins.
* A deserialiser hands over 8 samples per 300 MHz cycle (bit 0 is the
  earliest). This RTL starts at that 8-bit word.
* Each capture unit stamps the first 0→1 step in a word as
  `{4-bit cycle counter, 3-bit position}`, a 7-bit stamp.
* The subtractor computes the CFD stamp minus the stamp of the latest
  reference edge, modulo 128. The result is the coarse time `C`, 0 to 59,
  in 6 bits.
* `C` goes out at once as the fast timing output. It is also pushed into a
  FIFO.
* Tie rule: when the CFD edge and a reference edge fall in the same word,
  the CFD edge belongs to the new crossing only if it is not earlier than
  the reference edge.

**Fine TDC port (`tdc_shift_reg`).** The 8-bit result arrives serially,
most significant bit first. The receiver passes it through a 7-bit shift
register, so the top bit falls out. What remains is `F[6:0]`, which covers
1.67 ns. Keeping 7 bits is not a loss: 25 ns is 7.5 × 3.33 ns but exactly
15 × 1.67 ns. The 7 kept bits therefore have the same phase to the
reference clock in every crossing, even though the full 8-bit value does
not.

**Merge (`tdc_merge`).** One coarse bin is exactly 32 fine LSBs.
* The bit pairs `C[1:0]` and `F[6:5]` measure the same quantity: bins of
  833 ps and 417 ps.
* The two TDCs differ by less than 200 ps, which is under half a bin. So
  the two pairs differ by at most one, modulo 4.
* Correction: `d = F[6:5] − C[1:0]` (mod 4). If `d = 1`, `C` is raised by
  one. If `d = 3`, `C` is lowered by one. If `d = 2`, the difference cannot
  be resolved and `mismatch` is raised.
* The merged time is `C_adj·32 + F[4:0]`, in 13 ps LSBs, as a 12-bit
  signed value.

**Alignment (`time_window`).** A per-channel `time_shift` (12 bits) is
subtracted from the merged time. The channel is *active* in a crossing when
the result lies within ±`window` (7 bits) of zero.

**Pairing coarse and fine (`pm_tdc_channel`).**
* The FIFO (`sync_fifo`, 6 bits × 8 entries) holds the coarse times while
  the fine results are still on their way.
* Each completed fine word pops the oldest coarse time.
* Both TDCs see every hit, so the order matches.
* A fine word that finds the FIFO empty is dropped and flagged `orphan`.
* `fifo_full` and the error flags are outputs.

## Charge: two integrators per channel (`charge_mux_latch`)

Each channel has two integrators, and each integrator has its own 12-bit
ADC. One integrator integrates even crossings while the other resets, so
that every crossing is covered.

On the gate strobe, the selector latches the ADC of the integrator for the
current crossing. The strobe comes from the front-end gate circuit and
means the pulse came at the right time. The output is a 13-bit word:
`{adc_id, code}`, where `adc_id` is 1 for ADC2 (odd crossings).

A baseline strobe latches the same way without a pulse, for pedestal
runs. Such a word is marked `is_baseline` and is kept out of the trigger
sums.

Inside the PM, the even/odd flag toggles on every reference edge. Crossing 0
after reset has the flag set.

## Trigger path: two adder levels

**In each PM (`pm_trigger_sum`).**
* The results that arrive between two reference ticks form one frame.
* On each tick the PM registers three numbers:
  * the sum of the charge words;
  * the sum of the times of the active channels;
  * the number of active channels.
* These form the `pretrig_t` word, which is valid one cycle after the tick.
* Results of one crossing land in the same frame, because every channel
  has the same pipeline delay.
* The charge path is faster than the time path, so the charge sum and the
  time sum of one frame belong to different crossings. Each trigger uses
  only one of the two sums, so each decision refers to a single crossing.

**In the TCM (`tcm_trigger`).**
* One register stage adds the PM words of each side.
* ORA and ORC: the side has at least one active channel.
* Central and Semi-Central: the A+C charge total is above `thr_central`
  or above `thr_semicentral`.
* TVX: each side's time sum is divided by its active count
  (`pipe_divider`). TVX fires when both sides are active and
  `avgA − avgC` lies in `[vtx_low, vtx_high]`.
* The divider computes only 8 quotient bits. This is enough because every
  active time satisfies |t| ≤ window < 128, and so does their mean. An
  assertion checks this bound.
* 32-bit counters count each trigger and every crossing.
* Latency: 12 cycles from the PM words to `trig_valid` (1 adder stage,
  10 divider stages, 1 output register).

## Timing summary (cycles of `clk`)

| path | cycles |
|---|---|
| CFD word → fast timing output | 2 |
| last fine bit pair → merged channel result | 3 |
| CFD word → merged result, with a TDC whose last bit leaves 31 cycles after the hit | ≤ 36 (≤ 120 ns at 300 MHz) |
| reference tick → pre-trigger word | 1 |
| pre-trigger words → trigger outputs | 12 |

At the TCM clock of 320 MHz, the TCM part takes 37.5 ns. The budget is
about 125 ns from the analog input to the merged time, plus up to about
30 ns for frame alignment and the PM adder, plus 37.5 ns in the TCM. That gives roughly 190 ns,
inside the 225 ns allowed for the fastest (LM) trigger. This estimate leaves
out the HDMI link and cable delays.

## Interfaces the RTL assumes

The sources do not fix these points. They are the choices made in this RTL:

* **Sample words.** Each input carries 8 samples per cycle, bit 0 the
  earliest. The reference clock is sampled like a CFD signal.
* **External TDC port.**
  * `tdc_frame` is high while a word is sent.
  * `tdc_sdata[1:0]` carries two bits per cycle (double data rate, `[1]`
    first), most significant bit first.
  * A word takes 4 cycles. This is shorter than the 7.5 cycles of a
    crossing, so a channel can take a hit in every crossing.
* **One clock.** The hardware runs the PM at 300 MHz and the TCM at
  320 MHz, with an HDMI link between them. Here all logic is synchronous
  to one `clk`, and the pre-trigger words pass straight from the PMs to
  the TCM. A multi-clock version needs a clock-domain crossing at the
  `pretrig` boundary.
* **Slow control.** The settings are plain input ports: `time_shift` per
  channel, a `window` shared by all PMs, and `tcm_cfg`, which holds the
  vertex range and the two thresholds.
* **Bunch crossing.** The tick is taken from channel 0's reference capture
  unit. Every channel has its own reference capture unit, and an
  assertion checks that they agree.

## Differences from the system as specified

* The V0+ scintillator part (48 channels with its own TCM) is not
  instantiated. The top level models the T0+ Cherenkov system.
* The gate circuit, the amplifier, the CFD, the integrators, the ADCs, the
  PLL, the THS788, the MMCM/ISERDES and all links are outside the RTL.
* The event capture units use 416.7 ps bins (2.4 GS/s). The 200 ps
  variant, which needs two ISERDES and an IDELAY per input, is not built.
* The TVX and multiplicity rules above are this design's reading of the
  specification, including the strict "greater than" threshold compare and
  the use of the A+C total. The divider structure and all FIFO and counter
  sizes are this design's own choices.

## Files

`rtl/` (one module or package per file):

| file | role |
|---|---|
| `fit_pkg.sv` | widths, `pretrig_t`, `trig_t`, `tcm_cfg_t` |
| `event_capture.sv` | first-edge time stamp of a sample word |
| `coarse_tdc.sv` | counter, two capture units, subtractor |
| `tdc_shift_reg.sv` | external TDC receiver, 7-bit shift register |
| `sync_fifo.sv` | coarse-time FIFO |
| `tdc_merge.sv` | overlap-bit correction logic |
| `time_window.sv` | time shift and window comparator |
| `pm_tdc_channel.sv` | one channel's time path |
| `charge_mux_latch.sv` | even/odd ADC selector and latch |
| `pm_trigger_sum.sv` | first-level trigger adder |
| `processing_module.sv` | one PM |
| `pipe_divider.sv` | pipelined divider for the average times |
| `tcm_trigger.sv` | TCM trigger logic and counters |
| `fit_top.sv` | all PMs and the TCM |

`tb/`:
* There is one `tb_<module>.sv` per module.
* `ths788_model.sv` is a behavioural model of the external TDC's output
  port.
* `fit_stim_pkg.sv` generates a reproducible hit scenario. It is built from
  hash functions of (seed, crossing, channel): which channels are hit,
  where inside the crossing, the sub-bin position and the fine-TDC error.
  Stimulus and expected values both come from these same functions.

## Verification

Every testbench prints `TB_RESULT checks=N failures=M`, has a watchdog and
ends with `$finish`.
* Unit testbenches compare against independent models: random words for
  the capture unit, a queue model for the FIFO, and arithmetic models for
  the merge, window and divider.
* `tb_pm_tdc_channel` runs one channel with a hit in about 80 % of the
  crossings, back to back. It checks every fast and merged time against
  the scenario, and the latency against the 125 ns budget.
* `tb_fit_top` runs the full system at its default size: 18 PMs, 216
  channels, 160 crossings. It takes about one minute. It checks:
  * every channel time and charge word;
  * every PM word, against a sum model fed with the channel outputs;
  * every trigger word, against a TCM model fed with the PM words;
  * the counters.

  It also requires that each mechanism happens at least once:
  * coarse corrections up and down;
  * hits inside and outside the window;
  * both integrators;
  * baseline words;
  * each of the five triggers both firing and not firing.

For each module, a broken variant was also simulated, for example the
coarse correction in the wrong direction or the ADCs swapped. Its
testbench reports failures in every case.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fit_pkg.sv tb/tb_fit_top.sv --top-module tb_fit_top -Mdir obj
./obj/Vtb_fit_top
```

Parameters you are likely to change:
* `N_PM_A_P`, `N_PM_C_P` and `N_CH` on `fit_top`;
* `FIFO_DEPTH`;
* the widths in `fit_pkg`.

`QUO_W` of the divider must stay above `WINDOW_W`.
