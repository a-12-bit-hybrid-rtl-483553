# 12-bit hybrid DPWM with process/temperature calibration

A digitally controlled DC-DC converter needs a pulse-width modulator whose
resolution is finer than that of its feedback ADC. This design has 12 bits.
Counting 4096 steps per switching period would need a clock 4096 times the
switching frequency. A delay line alone would need 4096 taps. The hybrid
scheme splits the duty word instead:

| bits     | resolved by                                  | step    |
|----------|----------------------------------------------|---------|
| d[2:0]   | 8 fine taps L0..L7 of a ring oscillator      | Td/64   |
| d[5:3]   | 8 coarse taps M0..M7 of the same ring        | Td/8    |
| d[11:6]  | 6-bit counter clocked by the ring            | Td      |

Td is the ring's period. The switching period is 64·Td, and the pulse is
d·Td/64 wide. The ring's own period is the fastest clock in the design.

The cells' delay depends on process and temperature. A calibration path
therefore sets their control voltage Vc:

```
 process monitor ──► 2-bit flash ADC ──P1P0──┐
                                             ├─► pt_lut ─► vc_ladder ─► Vc
 temperature monitor ► 2-bit flash ADC ─T1T0─┘     (one of 9 taps, buffered)
                                                                        │
                      ┌─────────────────────────────────────────────────┘
                      ▼
             ring_osc (8 × 1X cell + 3 × 4X cell, differential)
                      │ L0..L7, M0..M7
                      ▼
 d[11:0] ──► dpwm_logic (two 8:1 tap muxes, counter, comparator) ──► DPWM
```

Only `dpwm_logic` and `pt_lut` are synthesizable logic. The delay cells,
monitors, flash ADCs and resistor ladder are analog circuits. They appear
here as behavioural SystemVerilog models, with voltages as integers in mV
and delays in ps. Use them for simulation, not for synthesis.

## The ring and its sixteen phases

The ring is made of eight 1X cells followed by three 4X cells. Every cell is
differential and non-inverting, and the loop closes with the pair crossed.
A transition therefore goes round the ring twice per period. Write t1 for
the 1X delay. The 4X delay is 8·t1, because that is the only value that
spaces the coarse taps evenly. Td is then 2·(8·t1 + 3·8·t1) = 64·t1.

Name the true outputs of the eleven stages p1..p11. The ring input is
p0 = ~p11. Rising edges within one period, in units of t1 after p0 rises:

| tap        | node      | rises at |
|------------|-----------|----------|
| L7 .. L0   | p1 .. p8  | 1 .. 8   |
| M0 .. M3   | p8 .. p11 | 8, 16, 24, 32 |
| M4 .. M7   | ~p8 .. ~p11 | 40, 48, 56, 64 |

L7 rises first and L0 last, then M0 to M7. M0 is the same node as L0, and
M7 is the ring input. Each tap is high for 32·t1.

## How one pulse is built (`dpwm_logic`)

* **Start.** Multiplexer 1 selects L[d[2:0]], which rises at (8 − d[2:0])·t1.
  That edge clocks the 6-bit counter. On the edge where the counter wraps
  from 63 to 0, a start flip-flop toggles, and the pulse begins.
* **Whole periods.** The counter advances once per Td. The comparator waits
  until the counter equals d[11:6].
* **End.** Multiplexer 2 selects M[d[5:3]], which rises at (8 + 8·d[5:3])·t1.
  On that edge, in counter period d[11:6], an end flip-flop toggles and the
  pulse ends.
* **Output.** DPWM is start XOR end. Only one of the two flops changes at a
  time, so the output cannot glitch.

The width is d[11:6]·64·t1 + (8 + 8·d[5:3]) − (8 − d[2:0]) = d·t1 = d·Td/64.
The period is 4096·t1 = 64·Td.

Three details matter:

1. **End edge on the counter's own clock edge.** When d[5:0] = 0, the end
   tap M0 and the counter clock L0 are the same node. The end flop then sees
   the counter value from before that edge, so it compares with d[11:6] − 1.
   The edge counts as simultaneous in hardware too: the counter's
   clock-to-output delay covers the hold time.
2. **Changing d without stray clocks.** Switching a multiplexer while its
   inputs differ creates an edge. The working copy of d therefore loads on
   the M7 edge that closes counter period 63. At that moment every L tap is
   low (they rise again one t1 later), so the counter clock cannot glitch.
   The previous pulse has also ended by then: the longest pulse ends exactly
   on that edge. The end flop toggles only while the output is high, so a
   stray edge from the M multiplexer after the pulse does nothing. A new d
   takes effect from the next switching period.
3. **The extremes.** d = 0 makes no pulse: the start is suppressed. d = 4095
   leaves the output low for one t1 per period.

Reset is asynchronous and active low. It sets the counter to 63, so the
first L edge starts a period. It sets the working duty to 0, so the first
period has no pulse.

## Calibration path

| part | what it does |
|------|--------------|
| `temp_monitor` | Built from a PTAT current source: Vout = Vref − (R2/R1)·VT·ln n. Vout falls with temperature and barely moves with process. It gives about 775 / 700 / 585 mV at −40 / 25 / 125 °C, within ±10 mV over the corners. |
| `process_monitor` | Vout = VGS(M5) + (R2/R1)·VT·ln n, with M5 matched to the delay-line devices. It is flat over temperature at 25 °C. It gives about 800 / 700 / 620 mV at SS / tt / ff. |
| `flash_adc2` | Three comparators and a thermometer-to-binary encoder. The temperature thresholds are 530 / 640 / 740 mV and the process thresholds 560 / 660 / 750 mV. Higher voltage gives a higher code, so SS or −40 °C reads 11, tt or 25 °C reads 10, and ff or 125 °C reads 01. |
| `pt_lut` | Decodes the two codes into a one-hot select of nine ladder taps: tap = 3·row(P) + col(T), where code 11 maps to 0, 10 to 1, and 01 or 00 to 2. |
| `vc_ladder` | Ladder taps and unity-gain buffer. It settles in 1 ns. |

Vc (mV) for each process code and temperature code:

| P \ T      | −40 °C (11) | 25 °C (10) | 125 °C (01) |
|------------|-------------|------------|-------------|
| SS (11)    | 620         | 610        | 602         |
| tt (10)    | 510         | 500        | 480         |
| ff (01)    | 400         | 385        | 370         |

The monitor models reproduce their characterised output voltages exactly at −40,
25 and 125 °C. Between those points they interpolate linearly in
temperature.

## Delay model and how far to trust it

Each delay element (`vc_delay_element`) is a voltage-controlled inverter,
with an extra pull-down NMOS gated by Vc, followed by a gain-boost inverter.
Its delay follows the inverter's delay law:

t1 = A + S·B / Vc²

* A = 20 ps and B = 20 ps·V² give t1 = 100 ps at tt, 25 °C and 500 mV.
  That makes Td = 6.4 ns and the switching period 409.6 ns (about 2.44 MHz).
* S is the corner's pull-down weakness. It is set to 4·Vc_cal², where Vc_cal
  is the calibration voltage above. Between the characterised temperatures
  it is linear.
* So by construction, the calibrated Vc gives 100 ps at all nine points.
* Without calibration the delay drifts. For example, SS at 500 mV gives
  139 ps.

The end-to-end test therefore shows that the calibration loop is wired and
decoded correctly. It does not predict silicon accuracy. A, B, the 4X delay
ratio, the ADC thresholds, the buffer settling time, the enable input and
the reset behaviour are all choices of this design. Process corner and
temperature are inputs of `hdpwm_top` only so that the analog models can
see them.

## Files

* `rtl/hdpwm_pkg.sv`: widths, code types and the process-corner enum.
* `rtl/dpwm_logic.sv`, `rtl/pt_lut.sv`: synthesizable.
* `rtl/ring_osc.sv`, `rtl/diff_delay_cell.sv`, `rtl/vc_delay_element.sv`,
  `rtl/temp_monitor.sv`, `rtl/process_monitor.sv`, `rtl/flash_adc2.sv`,
  `rtl/vc_ladder.sv`: behavioural models. The ring is built from eleven
  `diff_delay_cell` instances. Each cell holds two `vc_delay_element`s, one
  for the true side and one for the complement, and asserts that its
  outputs stay complementary.
* `rtl/hdpwm_top.sv`: the complete modulator.
* `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

What the testbenches cover:

* `tb_dpwm_logic` drives ideal taps with t1 = 10 ps. It checks width and
  period for 42 duty words, including 0, 1, 63, 64, 4032, 4095 and every
  d[5:0] = 0 case it meets. It also checks that a duty change waits for the
  next period.
* `tb_ring_osc` checks tap order, spacing, Td = 64·t1 and the delay law.
* `tb_diff_delay_cell` and `tb_vc_delay_element` check each cell's delay,
  its polarity and the 8:1 ratio between the 4X and 1X cells.
* `tb_hdpwm_top` runs the whole design at its default parameters. At all
  nine process/temperature points it checks the codes, Vc, Td within 1 %,
  and pulse width and period against the measured Td. It also covers a
  temperature step while running, d = 0, d = 4095, the coincident end edge
  and a duty change. It finishes in a few seconds.

## Simulating

With Verilator 5 (timing support is needed for the behavioural models):

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/hdpwm_pkg.sv tb/tb_hdpwm_top.sv --top-module tb_hdpwm_top -o sim
./obj_dir/sim
```

Replace `tb_hdpwm_top` with any other testbench name.

* Lint reports ZERODLY for the delay element's data-dependent delays. These
  delays are never zero at run time.
* It reports unused package constants in modules that use only part of
  `hdpwm_pkg`.
* It reports SYNCASYNCNET in `ring_osc`. Each cell output wakes the next
  cell's model and is also an edge-triggered clock there. Both uses are
  intended in a behavioural model.
* These are warnings, not errors. `-Wno-fatal` keeps them from stopping the
  build.

## Not included

* The transistor-level circuits. The delay cells are modelled by their delay
  law. The start-up circuits and PTAT cores appear only through the monitor
  voltages.
* The converter around the modulator: power stage, feedback ADC and
  compensator. The compensator's duty output is the `d` input.
