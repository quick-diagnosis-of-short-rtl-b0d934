# Fast short-circuit diagnosis for a cascaded H-bridge inverter phase

A cascaded H-bridge (CHB) inverter phase is a series string of n H-bridge
cells, each on its own DC link. When one switch of a cell fails short, the
cell's fuse opens and the cell output stays at 0 V. The phase keeps running
with one level missing, and the controller has to find out which cell failed.

This RTL does that on the inverter's control FPGA. It needs no extra sensors,
only signals the controller already has: the switching pulses it generates,
the measured DC-link voltages and the measured phase voltage. The idea:

* From the switching pulses the controller knows what the phase *should*
  output: V_ref = Σ (S1 − S2)·Vdc over the cells.
* While a shorted cell's reference is non-zero, V_ref and the measured V_out
  differ by one cell voltage. A filtered **Fault** signal goes high.
* With the cell stuck at 0 V, that difference can vanish only when the failed
  cell's *own* reference returns to zero. So Fault always falls just after a
  switching edge of the faulty cell.
* Each cell's "return to zero" edges are marked with a short **active-cell**
  pulse. The cell whose pulse is high when Fault falls is the faulty cell.

The worst-case detection time is about half a carrier period (1 ms for the
500 Hz carrier used here). That is far below the one or more fundamental
periods that spectrum- or classifier-based methods need.

This is an RTL implementation of the method published as "Quick Diagnosis of
Short Circuit Faults in Cascaded H-Bridge Multilevel Inverters using FPGA".
It is configured as that paper's 11-level (n = 5) laboratory prototype, which
ran from a 150 MHz FPGA clock. The modulator (sine reference, phase-shifted
PWM, dead time) is included, so the top level is a complete single-phase
controller.

## Signal chain

```
 m_a ─► sine_ref_gen ─v_r─► ps_pwm ─vg1,vg2─┬─► dead_time_gen ─► g_hi, g_lo (gates)
                                            │
         vdc[k] ────────────────────────────┤   chb_fault_detector
         v_out  ─────────────────┐          ├─► ref_calc ─V_ref─┐
                                 └──────────┼──────────────────►error_comparator ─Error─► fault_signal_gen ─Fault─┐
                                            └─► active_cell_composer ─active[k]──────────► fault_detection_block ◄─┘
                                                                                              └─► faulty_cell, faulty_idx, detected
```

| module | role |
|---|---|
| `chb_fd_pkg` | shared constants (cell count, clock, carrier, thresholds, voltage format) and the `err_t` type |
| `tick_gen` | clock-enable divider (1 µs detector tick, 3 MHz carrier step) |
| `sine_ref_gen` | m_a·sin(2π·50 Hz·t) by phase accumulator and iterative CORDIC, one sample per µs |
| `ps_pwm` | 2n phase-shifted triangular carriers compared with v_r |
| `dead_time_gen` | complementary gate pairs with 1 µs dead time |
| `ref_calc` | V_ref = Σ (vg1 − vg2)·vdc |
| `error_comparator` | Error = sign of (V_ref − V_out) with dead band ±TH |
| `fault_signal_gen` | CNT1/CNT2 filter that turns Error into Fault |
| `active_cell_composer` | one-hot active-cell pulses on "return to zero" edges |
| `fault_detection_block` | samples the active cell on the falling edge of Fault |
| `chb_fault_detector` | the five detector blocks above plus the 1 µs tick, for one phase |
| `chb_fd_top` | modulator plus detector for one phase |

## Number formats and defaults

* Voltages are signed 16-bit samples at 0.1 V per LSB. A 50 V DC link reads
  500, and the ±250 V of an 11-level phase fits easily. The design samples
  `vdc[k]` and `v_out` every clock; how they are digitised is up to the board.
* `m_a` is unsigned Q1.15 (32768 = 1.0). The carriers and `v_r` use ±1500 for
  the unitary ±1.
* Defaults (`chb_fd_pkg`): 5 cells, 150 MHz clock, 500 Hz carriers, 50 Hz
  reference, TH = 250 (25 V = Vdc/2), TC1 = TC2 = 10 ticks of 1 µs, active
  pulse 50 µs, dead time 150 clocks.

## Modulation: phase-shifted PWM

Cell k has two opposite triangular carriers, c1 and c2 = −c1. The carriers of
neighbouring cells are shifted by 180/n degrees, i.e. 600 carrier steps of the
6000-step period. S1 of a cell is on while c1 ≤ v_r, and S2 while c2 > v_r.
Each cell then outputs 0/+Vdc in the positive half-wave and 0/−Vdc in the
negative one. The phase has 2n + 1 = 11 levels, and its effective switching
frequency is 2·5·500 Hz = 5 kHz.

The S2 rule is a deliberate departure from the published comparison law. That
law applies "pulse = 1 when carrier ≤ reference" to both carriers. With
c2 = −c1 this gives the two legs equal duty, so the mean cell voltage is zero,
which contradicts the method's own fundamental-voltage formula and waveforms.
The complement used here is the standard unipolar scheme.

The comparison is evaluated once per carrier step (every 50 clocks), with v_r
sampled at that clock. Carrier and reference then change at the same
instants. The carrier moves one LSB per step and the reference at most a
fraction of that, so their difference is monotonic between carrier peaks and
every crossing gives exactly one switching edge. Comparing on every clock
lets the staircase reference cross a carrier moving in the same direction
back and forth. That gives one-clock pulses, and each one is an extra
conditional edge for the diagnosis (see below).

## The fault filter (CNT1 / CNT2)

The measured voltage lags the reference by sensor, driver and switch delays
(T_D, a few µs). So every switching edge gives a short Error pulse even in a
healthy inverter. Two saturating counters, stepped by the 1 µs tick, remove
these pulses:

* Error ≠ 0: CNT1 counts and CNT2 holds. When CNT1 exceeds TC1, Fault is set
  and CNT2 is cleared.
* Error = 0: CNT2 counts and CNT1 holds. When CNT2 exceeds TC2, Fault is
  cleared and CNT1 is cleared.

After reset CNT1 = 0, CNT2 is at its maximum (255) and Fault = 0. In normal
operation CNT2 is far above TC2, so the first Error-free tick clears CNT1. A
delay pulse thus has to last more than TC1 ticks to count as a fault. Fault
rises on the 11th consecutive tick with Error ≠ 0 and falls on the 11th tick
with Error = 0.

**Delay tolerance.** A single delay pulse is rejected if T_D is below about
10 µs. Two pulses can merge, though. When the reference sits just past a level
boundary, one cell steps and another steps back shortly afterwards. If that
gap is close to T_D, the two Error pulses have opposite signs and less than one
tick between them, and CNT1 counts for about 2·T_D. A healthy phase is
therefore guaranteed free of false Faults only for 2·T_D + 1 µs ≤ TC1, i.e.
T_D up to about 4.5 µs with TC1 = 10. In simulation, delays of 3–5 µs were
always clean, while 6–9 µs occasionally gave a false Fault and a wrong
diagnosis. The design keeps the published TC1 = 10; the test models use 3 µs.
For a slower measurement chain, raise TC1 and TC2 (see Changing the design).

Taking "each counter clears the other" as a rule that acts *while* the
clearing counter is counting and above its threshold is this design's reading.
With a purely level-sensitive rule CNT2 could never start counting while CNT1
stays above TC1. The chosen reading reproduces the published counter
waveforms, including the small CNT1 bump on each delay pulse.

## Which edges mark the faulty cell

With a cell stuck at 0 V, Error = (S1 − S2)·Vdc of that cell. Error can
return to zero only at an edge where the cell's state goes from ±1 to 0:

* condition I: S1 (or S2) turns on while the other switch is on;
* condition II: S1 (or S2) turns off while the other switch is off.

These are half of all switching edges. `active_cell_composer` detects them per
cell from the switching commands. It raises that cell's `active` bit for PW =
50 ticks and keeps the vector one-hot: a newer edge of another cell takes over
at once, and on simultaneous edges the lowest index wins.

PW has two bounds. It must exceed the time from the edge to the fall of Fault
(T_D + TC2 ticks + three clocks, about 15 µs here). It should stay below the
spacing of consecutive conditional edges of different cells, which is at least
173 µs for 11 levels and 96 µs for 19 levels. The 50 µs value is this design's
choice.

Measured with the modulator (50 Hz reference, m_a = 0.95, 500 Hz carriers):
the closest conditional edges of different cells are 173 µs apart within a
half-wave and 205 µs across a zero crossing for 11 levels, and 96 µs and
114 µs for 19 levels. These match the published minimum distances.

## Top-level interface (`chb_fd_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | 150 MHz clock, asynchronous active-low reset |
| `m_a` | in | 16 | modulation index, Q1.15 |
| `vdc[N]` | in | N × 16 | measured DC-link voltages |
| `v_out` | in | 16 | measured phase voltage |
| `v_r` | out | 16 | reference sample (±1500 = ±1) |
| `vg1`, `vg2` | out | N | switching commands of S1 / S2 per cell |
| `g_hi`, `g_lo` | out | 2N | gates of upper / lower switch of each leg, `{S2 legs, S1 legs}` |
| `v_ref` | out | 16 | reconstructed phase voltage |
| `err` | out | 2 | Error, −1/0/+1 |
| `fault`, `cnt1`, `cnt2` | out | 1, 8, 8 | Fault signal and filter counters |
| `active` | out | N | active-cell pulses |
| `faulty_cell`, `faulty_idx` | out | N, 3 | latest diagnosis, one-hot and index (cell 1 = index 0) |
| `detected`, `detect_pulse` | out | 1, 1 | sticky "a cell was diagnosed"; one-clock strobe per diagnosis |

Latencies: `v_ref` is one clock after the pulses and `err` two clocks.
`active` rises one clock after a conditional edge. The diagnosis is one clock
after Fault falls. The detector uses the switching *commands* `vg1`/`vg2`, not
the dead-time gates. The sine sample is valid 17 clocks after each 1 µs
update strobe.

The unit covers one phase. For a three-phase inverter, instantiate
`chb_fault_detector` once per phase. The diagnosis is kept until the next one
or until reset; after a fault Fault keeps toggling and every later fall
re-confirms the same cell.

## Verification

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The power stage is represented by
`tb/chb_inverter_model.sv`, a behavioural model. Each cell outputs
(S1 − S2)·Vdc. An injected short in S1 (S2) opens the cell's fuse as soon as
the complementary switch is commanded on, i.e. when vg1 (vg2) goes low, and
the cell then outputs 0 V. The model adds ±2 V noise, a ±4 % DC-link spread
and a 3 µs delay.

* `tb_chb_fd_top` is the end-to-end run at the default parameters, with no
  parameter overrides, taking about 15 s with Verilator:
  * m_a steps from 0.95 to 0.5 at two instants: no Fault.
  * A short in S1 of cell 1 at t = 40 ms, at m_a = 0.95 and at m_a = 0.5:
    cell 1 is diagnosed. The longest Fault intervals are 930 µs and 493 µs,
    within the Ts/2 = 1 ms bound. The published prototype measured 670 µs and
    350 µs for one fault instant.
  * It also checks V_ref against an independent sum and that no leg ever has
    both gates on.
  * It counts rejected delay pulses, Fault sets and resets, active pulses,
    diagnoses, dead-time gaps and m_a steps, and requires each to occur.
* `tb_chb_fault_detector` runs the detector with the modulator at a 3 MHz
  clock (same µs timing). It injects a short in every cell and both switches
  at random instants: all 10 cases are diagnosed correctly, and a healthy
  fundamental period gives no Fault.
* `tb_chb_detect_time` runs the 11-level detector with 500 Hz and 1 kHz
  carriers side by side at a 9 MHz clock. Random shorts are each watched for a
  full fundamental period. The longest Fault interval (the detection time) is
  939 µs for Ts = 2 ms and 474 µs for Ts = 1 ms, inside the Ts/2 bound the
  method gives for m_a → 1. Every diagnosis is correct.
* `tb_chb_19level` runs a 19-level phase (N = 9) at a 9 MHz clock with the
  same µs timing. It checks the 96 µs minimum conditional-edge distance, a
  Fault-free healthy period, and correct diagnosis of shorts in S1 and S2 of
  cells 1, 5 and 9.
* The unit testbenches check, among other things:
  * the sine against floating point (≤ 3 LSB; 1 LSB seen);
  * PWM duty cycles, the 180/n phase shift and the unipolar output, and one
    clean edge per crossing under a ramping reference;
  * exact dead-time behaviour;
  * the dead-band edges of the comparator, including 16-bit overflow;
  * every counter rule and its exact tick count;
  * all eight state transitions of the composer;
  * the edge detector of the diagnosis block.

Simulating with plain Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb \
  --top-module tb_chb_fd_top rtl/chb_fd_pkg.sv tb/tb_chb_fd_top.sv
./obj_dir/Vtb_chb_fd_top
```

Replace `tb_chb_fd_top` with any other testbench name. The modules are
SystemVerilog-2017. Apart from the assertions they are synthesizable, and the
CORDIC angle table is atan(2^−i)/(2π)·2^32.

## Changing the design

* **Levels.** Set `N` on `chb_fd_top` / `chb_fault_detector` (2N + 1 levels).
  Check that PW still fits the minimum conditional-edge spacing for that level
  count.
* **Carrier frequency.** `F_CAR_P` on `ps_pwm`. CLK_HZ / (4·F_CAR·CAR_AMP)
  must be an integer; 1 kHz gives 25.
* **Delay tolerance.** TC1/TC2 in ticks. Keep TC1 ≥ 2·T_D + 1 µs (see The
  fault filter), and keep PW above T_D + TC2 and below the minimum
  conditional-edge spacing.
* **Threshold.** TH should stay near half a cell voltage in LSB.

## Departures from the published method and open points

* S2 uses the complement of the published comparison law (see Modulation).
* Not specified in the publication; chosen here:
  * the 50 Hz fundamental (read from its waveforms);
  * the CORDIC sine generator;
  * the voltage number format;
  * the 1 µs dead time;
  * the 50 µs active-cell pulse;
  * the takeover rule;
  * holding the diagnosis.
* One phase is built; the prototype's phase count is not stated.
* The published rule TC1 = T_D / tick does not cover two delay pulses merging;
  with TC1 = 10 the healthy delay limit is about 4.5 µs (see The fault filter).
* The PWM compares once per carrier step (regular sampling); the publication
  does not say how the comparison is clocked.
* The power stage, sensors, gate drivers and fuses are not part of the RTL.
