# Dynamic frequency scaling clock generator and power efficiency unit for a solar power manager

This design has two halves that serve a low-voltage, solar-powered system.

1. **A dual-output clock generator.** A six-phase delay-locked loop (DLL) locks to a reference clock REFCLK (270–500 MHz) in a fixed ten cycles. Phase blenders double its six phases to twelve. Two edge combiners each build an output clock from any evenly spaced subset of those twelve phases. That gives six multiplication factors (0.5X, 1X, 1.5X, 2X, 3X, 6X) and twelve phase positions per output. Both can be changed on the fly without relocking.
2. **A power efficiency optimization unit (PEOU) and a supply control unit.** The PEOU watches the 1 V rail made by a charge pump. It raises or lowers the pump clock (33–300 MHz) so that the pump runs no faster than the load needs. The control unit decides whether the PV cell or the battery feeds the regulator, and enables the battery charger.

The two halves share no signals. The top module `dfs_solar_top` places them side by side.

Most parts are analog in silicon: delay cells, charge-detecting lines, phase blenders, oscillators and voltage detectors. They are written here as timed behavioural models, with delays in picoseconds and voltages as integers in millivolts. They run in an event-driven simulator and are meant to be read and simulated, not synthesised. The control logic is plain synthesizable RTL: the lock sequencer, the stage decoder, the phase detector, the toggle latch and the up/down counter.

## Clock generator

```
REFCLK ──► digital_delay_line (6 × lp_delay_cell) ──► O1..O6 ──► freq_phase_synth ──► clkout1, clkout2
               ▲ stage, fsel                       │ O6          (6 × scpb, 2 × edge_combiner)
               └──────── dcd_controller ◄──────────┘
                         (2 coarse CDLs, type4_pd, 8 fine CDLs, dcd_sequencer)
```

### Delay line

Each `lp_delay_cell` has two parts:
- A coarse part: a three-stage chain of transmission gates. The stage decides how many gates the signal passes: 2, 3 or 4 for stages 1, 2 and 3.
- A fine part: eight switched MOS capacitors. Enabling capacitor *i* adds `FINE_W[i]` steps of 5 ps. The weights are 40, 30, 20, 10, 5, 3, 2 and 1 steps.

The source design states the fine range as 43 steps, but those eight weights add to 111. The model keeps the weights and caps a cell at 43 steps (215 ps).

`coarse_ctrl_decoder` turns the stage into the ten gate controls `t2 t2n t3 t3n d1 d1n d2 d2n d3 d3n`. These are the values of the source design's control table.

The model's cell delay is `D_FIX_PS + gates × D_TG_PS + 5 ps × steps`, which is 200 + 60·gates + 5·steps by default. So six cells span:

| stage | six-cell delay | REFCLK it can lock |
|---|---|---|
| 1 | 1.92 – 3.21 ns | 311 – 520 MHz |
| 2 | 2.28 – 3.57 ns | 280 – 438 MHz |
| 3 | 2.64 – 3.93 ns | 254 – 379 MHz |

The 200 ps and 60 ps figures are this design's own. They were chosen so that the three overlapping ranges cover 270–500 MHz.

### Locking in ten cycles: the charge-detecting controller

This is the least conventional part. There is no loop filter and no counter that walks toward lock. Each decision is made once, by a *charge-detecting line* (`cdl`), a one-shot time-to-digital comparator.

- **What a CDL does.** While enabled, a CDL lets a pulse charge a capacitor. It latches at the pulse's falling edge whether the pulse was long enough to reach the threshold. In the model, `q = 0` means the pulse lasted at least `TH_PS`, and `q = 1` means it was shorter.

`dcd_sequencer` runs a fixed schedule on REFCLK rising edges:

| edge | action |
|---|---|
| 1 | Both coarse CDLs measure the REFCLK high time. C1 has the smaller threshold (1163 ps, about 430 MHz) and C2 the larger (1380 ps, 362 MHz). |
| 2 | The coarse stage is chosen from C1C2: 11 → stage 1, 01 → stage 2, 00 → stage 3. The phase blender tap is also chosen: T2 only for 00. The type-IV phase detector is enabled. |
| 2–9 | One fine CDL per cycle, largest weight first, measures the detector's `lead` pulse, i.e. how early O6 arrives relative to REFCLK. The threshold of the CDL for weight *w* is 6 × 5 ps × *w*: the delay that weight adds over the whole line. If the pulse is that long, the weight is switched in (`fsel = ~q`) before the next, smaller CDL measures. |
| 10 | `locked` goes high. |

Because each weight is decided once, from largest to smallest, this is a one-way binary-like search. It cannot overshoot and come back. The residual error is at most one step per cell, and lock time does not depend on REFCLK.

An assertion in the sequencer checks that at most one CDL is enabled in any cycle. That is the point of the hierarchical order: it keeps the peak power down.

**The C1/C2 polarity.** The source design's prose calls C1C2 = 11 the *lowest* REFCLK range. Its phase-blender description and its range figure put 11 in the highest range (above 360 MHz). This design follows the latter. The CDL reports 1 when the REFCLK high time is short, i.e. when REFCLK is fast.

### Twelve phases: the smooth charge phase blender

`scpb` takes two neighbouring delay-line phases A and B:
- It outputs A after a buffer delay `D_BUF_PS`.
- It outputs a blended edge midway between A and B after the same delay.

`freq_phase_synth` uses six blenders: (O1,O2), …, (O5,O6) and (O6, next period's O1). They give phases `p[0..11]`, spaced one twelfth of a REFCLK period apart.

The silicon blender has two trigger taps, and the coarse result picks one: T1 for phase gaps under 460 ps, T2 otherwise. The model's blend is exact when the tap is correct. If the tap is wrong for the measured gap, it adds `WRONG_TAP_ERR_PS` (40 ps) of error. That is this design's stand-in for the accuracy loss the tap choice avoids.

Six gaps of 460 ps make a 2760 ps period, i.e. 362 MHz, though the source design rounds this to 360 MHz. The C2 threshold is therefore set to a 1380 ps high time. Stage 3, and with it tap T2, then begins exactly where the gap reaches 460 ps. With 1389 ps, a REFCLK between 360 and 362 MHz would blend with the wrong tap.

### Frequency and phase: edge combiners

Each `edge_combiner` has twelve pulse generators, one per phase, each enabled by one bit of the select vector `S[11:0]`:
1. An enabled generator fires a short low pulse (`PULSE_PS`, 40 ps) on its phase's rising edge.
2. An AND tree merges the pulses.
3. A `toggle_pulsed_latch` flips the output on each merged pulse.

With *n* evenly spaced phases enabled, the output toggles *n* times per REFCLK period, so its frequency is *n*/2 × REFCLK:

| factor | enabled phases *n* | example `S` (phase 0) | at 500 MHz |
|---|---|---|---|
| 0.5X | 1 | `0000_0000_0001` | 250 MHz |
| 1X | 2 | `0000_0100_0001` | 500 MHz |
| 1.5X | 3 | `0001_0001_0001` | 750 MHz |
| 2X | 4 | `0010_0100_1001` | 1 GHz |
| 3X | 6 | `0101_0101_0101` | 1.5 GHz |
| 6X | 12 | `1111_1111_1111` | 3 GHz |

Rotating the pattern by *k* bits delays the output by *k*/12 of a REFCLK period. `dfs_pkg::si_pattern(factor, k)` builds these vectors and `dfs_pkg::mult_edges` gives *n*.

The two combiners share the twelve phases but have separate select vectors, so the outputs are independent. A new `S` takes effect on the next enabled phase edge. The DLL stays locked throughout.

## Power efficiency optimization unit

```
1V rail ──► osc_voltage_detector ─┐
        └─► bias_voltage_detector ┴► flag ─► peou_counter (5 bit) ─► net_bias ─► vp, vn ─► type2_lv_osc ─► clk_pump ─► (charge pump)
                     det_sel ──────┘          ctrl_clk
```

The loop is a bang-bang regulator:
- Below the detecting point (900 mV) the flag is 0. The counter counts up, `net_bias` lowers vp and raises vn, and the type II oscillator speeds up, so the pump delivers more charge.
- Above the point, everything runs the other way.

Under a light load the word sinks toward 0 (33 MHz). Under a heavy load it rises toward 31 (300 MHz). The counter saturates at both ends. Saturation and the reset value 0 are this design's own choices.

The two detectors can be swapped with `det_sel`:
- **Oscillating detector:** a ring oscillator supplied from the rail drives a CDL. A low rail means a slow oscillator and long pulses. The CDL threshold sets the detecting point (`DETECT_MV`).
- **Bias detector:** a node `v_d` that rises as the rail falls is compared with `v_ref`. Here `v_d = 1000 − vpump/2` mV, so `v_ref` = 550 mV gives 900 mV. The source design's transistor-level detector has no numeric law; this linear one is this design's choice.

`net_bias` maps the word linearly onto 490 → 54 mV. The source design describes its bias ladder with six control bits, but its optimization unit uses a 5-bit counter. This design uses 5 bits, i.e. 31 steps of about 14 mV.

`type2_lv_osc` maps the gate drive `vn − vp` linearly onto 33–300 MHz. The supply dependence of the real oscillator is left out.

## Supply control unit

`control_unit` compares node 1 (PV side of the switch) with node 2 (regulator side):
- **Node 1 higher:** the PV cell is supplying. The comparator outputs 1, the inverter drives the PMOS switch gate low (switch on), and the battery charger is enabled.
- **Node 2 higher (or equal):** the battery is supplying. The switch opens so no current flows back into the PV cell, and the charger is disabled.

## Not built

These parts of the power manager are analog and have no logic function:
- PV cell, battery and battery charger
- voltage regulator
- 1 V and −0.5 V charge pumps
- reference voltage generator

Their nodes appear as millivolt ports on the top: `vpump_mv`, `vref_mv`, `v_pv_mv`, `v_regin_mv`, and `charger_en` as an output. The testbenches close the PEOU loop with a small pump-and-load model, `tb/pump_1v_model.sv`. Each rising pump clock moves a fixed fraction of the gap to 1.2 V onto the rail, and a constant load drains it every nanosecond.

## Files

| file | role |
|---|---|
| `rtl/dfs_pkg.sv` | shared constants, stage and factor enums, gate-control struct, select-vector functions |
| `rtl/coarse_ctrl_decoder.sv`, `lp_delay_cell.sv`, `digital_delay_line.sv` | delay line |
| `rtl/cdl.sv`, `type4_pd.sv`, `dcd_sequencer.sv`, `dcd_controller.sv` | lock controller |
| `rtl/scpb.sv`, `toggle_pulsed_latch.sv`, `edge_combiner.sv`, `freq_phase_synth.sv` | phase and frequency synthesis |
| `rtl/dual_clkgen.sv` | the whole clock generator |
| `rtl/net_bias.sv`, `type2_lv_osc.sv`, `osc_voltage_detector.sv`, `bias_voltage_detector.sv`, `peou_counter.sv`, `peou.sv` | power efficiency unit |
| `rtl/control_unit.sv` | PV/battery switch control |
| `rtl/dfs_solar_top.sv` | top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/pump_1v_model.sv` | 1 V pump and load model for the loop tests |

All modules use `timeunit 1ps`. Every testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

## Simulating

Example, for the end-to-end test (default parameters, about 90 µs of simulated time, about a second of run time):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb --top-module tb_dfs_solar_top \
  rtl/dfs_pkg.sv tb/tb_dfs_solar_top.sv -o sim
obj_dir/sim
```

For another block, replace the testbench name. The behavioural models need `--timing`.

The end-to-end test covers the following, and prints how often each mechanism occurred:
- It locks at 500, 400 and 333 MHz, one for each coarse stage, in ten edges each.
- It runs all six factors on both outputs, changes factors while locked, and shifts one output by 2/12 of a period.
- It regulates the 1 V rail to 900 ± 40 mV with each detector, starting both below and above the point.
- It sweeps the PV node across 177–840 mV through both supply modes.

`tb_lock_range` sweeps REFCLK from 270 to 500 MHz in 10 MHz steps. At each step it checks:
- lock on the tenth edge
- the coarse stage
- that every one of the twelve phase steps is within 20 ps of T/12, with clkout1 at 6X

It then steps clkout2 through phase shifts 1–11 at 500 MHz and checks each shift within 25 ps.

Asynchronous resets should see a falling edge: the testbenches start with `rst_n = 1; #1; rst_n = 0;`.

## How far to trust it

- **Exact (follows the source design):**
  - the ten-cycle lock schedule and its order of decisions
  - the coarse stage table and the fine weights
  - the twelve-phase construction, the select-vector rule and the six factors
  - the counter width, the 900 mV detecting point, the 490–54 mV bias range, the 33–300 MHz clock range
  - the control unit's decision
- **Chosen here (timing and voltage models):**
  - cell delays other than the 5 ps step
  - CDL thresholds for the coarse ranges
  - the blender's buffer delay and wrong-tap error
  - pulse width
  - the oscillator and detector laws

  Change the parameters to fit a real process. The coarse thresholds (`TH_C1_PS`, `TH_C2_PS`) must stay consistent with the cell delays, or a REFCLK near a range boundary may fall outside the chosen stage's fine range.
- **Synthesis:** only `coarse_ctrl_decoder`, `type4_pd`, `dcd_sequencer`, `toggle_pulsed_latch` and `peou_counter` are meant for it. `control_unit` also synthesises, but it stands for an analog comparator working on millivolt numbers. The rest model analog timing with `#` delays and `$time`.
