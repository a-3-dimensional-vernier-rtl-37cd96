# 3-D Vernier ring time-to-digital converter

A time-to-digital converter (TDC) measures the time between two edges. This
design is built for the phase detector of an all-digital PLL. It resolves
R = 16.5 ps and still has a range of many nanoseconds, using only 22 delay
stages and 62 comparators.

It works like a Vernier caliper in time:

- The edge that arrives first (the *lead*) is sent around a **slow ring**.
  The ring has 12 stages of ts = 10R each.
- The later edge (the *lag*) is sent around a **fast ring**. The ring has
  10 stages of tf = 9R each.
- Each fast stage closes 1R of the gap. A matrix of phase comparators between
  the two rings records where the lag overtakes the lead.
- Both rings are closed loops. A long interval is therefore first counted in
  whole slow-ring periods (coarse counting) while the lag has not yet
  entered. The remainder is then resolved in R steps as the lag catches up
  (fine interpolation).

A 2-D Vernier TDC lays its comparators out on a plane of fast-stage × slow-stage
pairs. Reusing that plane on every lap adds a third axis, the lap number z,
and this is where the "3-D" comes from. One comparator plane covers
tz = 30R. The race alternates between an odd-lap plane and an even-lap plane.

```
 ref_sig ─┐   ┌────────────┐ slow ┌──────────┐     ┌───────────────────────────────┐
          ├──►│ prelogic   ├─────►│ splitter ├────►│ vr_tdc_core                   │
 fb_sig ──┘   │ (who leads)├─────►│ splitter ├────►│  input DFFs, 2 rings, matrix, │
              └─────┬──────┘ fast └──────────┘     │  switch control, lap counters │
                    │ sign                         └──┬──────────┬─────────┬───────┘
                    │                          therm[61:1]     ns,nf     dff0
                    │                       ┌─────────▼────────┐   │
                    │                       │ bubble_encoder   │   │
                    │                       └─────────┬────────┘   │
                    │                                 │ th         │
                    │                       ┌─────────▼────────────▼─┐
                    └──────────────────────►│ evaluation_logic       ├──► code (signed, units of R)
                                            └────────────────────────┘
```

## Timing numbers

| Quantity | Value | Meaning |
|---|---|---|
| R | 16.5 ps | resolution, ts − tf |
| ts | 10R = 165 ps | slow stage delay (`T_SLOW`) |
| tf | 9R = 148.5 ps | fast stage delay (`T_FAST`) |
| tSW | 3R = 49.5 ps | ring multiplexer delay (`T_SW`), this design's value |
| slow period | 24·ts + 2·tSW = 246R | one full period, two laps |
| fast period | 20·tf + 2·tSW = 186R | |
| gain per period | 60R | how much the lag gains on the lead per period |

All time values are `realtime` parameters. Every file uses `timescale 1ps/100fs`.

## The rings and lap parity

Each ring is made of three parts:

- a 2:1 differential multiplexer, `ring_mux`;
- N pseudo-differential stages, `delay_stage`;
- a feedback path from the last stage back to the multiplexer.

The feedback path swaps the rails: the last stage's m rail goes to the p input
and its p rail goes to the m input. Each stage is a non-inverting buffer on the
rail pair, so the crossed feedback makes the closed ring oscillate.

After the input edge enters, the p rails rise on odd laps (1, 3, …). The m rails
rise on even laps (2, 4, …). One full period of the oscillation is therefore two
laps, and every comparator is used twice per period: once on p rails and once
on m rails. That is why there are two planes of 30 comparators.

The ring is idle at p = 0 and m = 1.

Each ring starts **open**: its multiplexer passes the input DFF, a flop whose
D input is tied to 1 and which is clocked by the incoming edge. When the edge
reaches stage 3, the ring switch control closes the ring (`SW` = 1). At the
same moment it clears the input DFF through `Rst_S`/`Rst_F`. The closed ring
is thus cut off from its input, and the input DFF is ready for the next
conversion.

## The comparator matrix (hardest part)

A comparator at (fast stage i, slow stage j) sees a difference of

    D(i, j) = j·ts − i·tf = (10j − 9i)R   (plus 30R per earlier lap plane)

Using three diagonals j = i, i+1 and i+2 with i = 1…10 gives exactly
R, 2R, …, 30R. Comparator *k* sits on:

| DFF | fast stage i | slow stage j | rails | detects |
|---|---|---|---|---|
| 1…30 | (k−1) mod 10 + 1 | i + ⌊(k−1)/10⌋ | p (odd laps) | kR |
| 31…60 | same as k−30 | same as k−30 | m (even laps) | kR |
| 61 | 1 | 4 | m (even laps) | 61R: catch-up |
| 0 | 10 | 9 | p (first lap) | 0: calibration |

Each comparator (`diff_dff`) is clocked by the slow stage and samples the fast
stage. It stores 1 when the lag edge had **already passed** F_i by the time the
lead edge reached S_j.

In the final period the lag is behind the lead by a residual r, in 0 < r ≤ 60R.
In that period DFF k reads 1 for every k ≥ r and 0 below. DFF1…DFF60 therefore
form a thermometer code over one full period. Its 0→1 edge is the fine result.

Clock and data roles are this design's choice; the published design fixes
only which stages each comparator connects.

### Catch-up detection (DFF61)

DFF61 compares F1 against S4 on the even lap. Since 4·ts − tf + 30R = 61R, it
fires one comparator step after DFF60, during the same even lap in which the
race is won. Its 0→1 edge clears the ring switch control. Both rings then open
and stop within a few stages, which saves power and freezes the lap counters.

On its own, a level sample of F1 cannot tell two cases apart:

- a lag edge that has just caught up;
- a lag edge that is more than half a period behind (F1 is then also high on
  the m rail, left over from the previous even lap).

That ambiguity would stop the race early for a long interval. DFF61 therefore
samples **F1_m AND F8_p** instead. This is true only while the lag's even-lap
edge lies between F1 and F8. The window is seven fast stages, 63R, just over
the 60R the lag gains per period, so every race sets DFF61 exactly once. This
gate is this design's own addition.

Known limit: if the interval lies less than about 2R below a whole number of
slow periods, the window can fire one period early. The result is then up to
2 codes too high, with TH = 0. The end-to-end testbench counts these cases
separately (`period_edge`) and checks that they stay within the bound.

### Bubble correction and encoder

Metastable comparators can leave isolated wrong bits ("bubbles") in the
thermometer. `bubble_encoder` extends the code with DFF(−1) = DFF(0) = 0 and
DFF(62) = 1. For i = 0…60 it then marks position i when

    (DFF(i−1) xor DFF(i+2)) and (DFF(i) xor DFF(i+1))

so a clean code marks the last 0 before the 0→1 step.

This pattern accepts one bubble next to the transition. An OR-type
one-hot-to-binary encoder turns the mark into the 6-bit fine code TH (0…60).
`found` shows that some position was marked.

## Switch control and lap counters

`ring_switch_control` holds two flops, clocked by F3 and S3. Both load
¬calibration:

- Normal mode: the first edge at stage 3 closes the ring.
- Calibration mode: the rings stay open.

Both flops are cleared by `Rst | DFF61`. Their inverted outputs are
`Rst_F`/`Rst_S`, which clear the input DFFs.

`lap_counter` counts rising edges on the m rail of a ring's last stage while
that ring is closed, giving one count per full period. N_S counts the slow
ring and N_F the fast ring. The counters are 8 bits wide and wrap around.
Counting only while closed means the final, interrupted period is not
counted. N_F is then the number of whole fast periods before the lag was
caught, and N_S − N_F is the number of slow periods that passed before the lag
entered at all.

## Evaluation: from counts to time

    t = ±[ (N_S − N_F)(240R + 2·tSW) + 60R·N_F + TH·R ]

- The first term is coarse counting: whole slow periods run before the lag
  arrived.
- The second term is the 60R gained per period during fine interpolation.
- TH is the thermometer position.

`evaluation_logic` computes this in units of R. `tsw_r` is tSW in units of R.
It is a port because the multiplexer delay is a property of the silicon. The
result is registered on `load` into the signed 18-bit `code`.

The sign comes from the pre-logic: positive when `ref_sig` leads.

## Pre-logic and splitters

`prelogic` decides which input came first. It then sends that edge to the slow
ring and the other edge to the fast ring, through buffer chains long enough
for the decision to settle. The decision is a first-edge-wins latch. It re-arms
once both outputs have fired (or on `rst`), and `sign` holds the last decision
for readout.

`splitter` turns each single-ended signal into a differential pair with equal
delay on both rails.

## Calibration

With `calibration` = 1 the rings stay open, and each edge makes one pass
through the stages. DFF0 compares F10 with S9, which is a zero-difference
pair when 9·ts = 10·tf. `dff0_cal` = 1 means the fast line is too fast.

Stage delays are analog quantities (control voltages on the chip). The loop
that would adjust them from DFF0 is not part of this RTL, so `dff0_cal` is
brought out as a port and the delays are parameters.

## Using the top (`vr_tdc_top`)

1. Hold `rst` high, then release it. In simulation the clears are
   edge-sensitive, so drive a 0→1→0 pulse before each conversion.
2. Apply the two rising edges on `ref_sig` and `fb_sig`.
3. Wait until `rings_closed` has fallen and the rings have drained. This takes
   about two slow periods (8 ns) after the catch-up.
4. Pulse `load` for one `clk` cycle. `code` and `code_valid` are registered on the
   rising `clk` edge during that pulse.

The conversion time grows with the interval. Until the lag enters, the lead
simply runs around the slow ring (4.06 ns per period). Afterwards the lag needs
one fast period (3.07 ns) for every 60R of the remaining gap. For intervals up
to 5 ns, a conversion from the first edge until the rings are empty takes at
most 27.4 ns, which allows 15 MS/s. Intervals longer than about 40 ns do not
fit that rate. An 8-bit counter gives a range of 255 slow periods (about 1 µs).

An interval that is an exact multiple of R puts the two edges level at one
comparator. The ideal comparator model then decides by event order, so such a
point can read one code low (or 1 instead of 0 at zero).

## Which parts are models

| Part | Kind | Notes |
|---|---|---|
| `delay_stage`, `ring_mux`, `delay_ring` | behavioural | transport delays; the ring is a deliberate combinational loop |
| `diff_dff` | behavioural | ideal sampler with clock-to-Q delay; no metastability |
| `prelogic`, `splitter` | behavioural | edge arbiter and buffer delays |
| `input_dff`, `ring_switch_control`, `lap_counter`, `comparator_matrix`, `bubble_encoder`, `evaluation_logic` | synthesizable | |

These simplifications apply throughout the models:

- There is no jitter or noise.
- The model has no fixed offset.
- Stage delays are exact.

A real chip shows a spread of codes for a fixed input, caused by noise and
jitter. These models do not reproduce it.

## Departures from the published design

- DFF61 data is gated with F8 (see above).
- All comparators and the input DFFs also have a clear from the global reset.
  This way each conversion starts from a known state.
- tSW = 3R is an assumed value. The counter width (8 bits), TH encoder
  style, readout timing and sign convention are this design's choices.
- Metastability is not modelled, so the bubble corrector is exercised only by
  injected bubbles in its own testbench.

## Simulating

Each testbench prints `TB_RESULT checks=… failures=…` and stops itself. For
example, the end-to-end test at the default parameters:

    verilator --binary --timing -Wno-fatal --top-module tb_vr_tdc_top \
        rtl/vr_tdc_pkg.sv rtl/*.sv tb/tb_vr_tdc_top.sv
    ./obj_dir/Vtb_vr_tdc_top

(The package is listed first; Verilator ignores the duplicate.)

`tb_vr_tdc_top` runs 300 conversions and compares each code with
⌊|t|/R⌋:

- mostly 0…760R;
- every tenth conversion up to 62000R;
- every third conversion negative.

It also runs a calibration case. It counts each mechanism (coarse periods,
fine interpolation, odd and even final lap, both signs, calibration, long
intervals) and fails if any of them never occurred. Results in the
period-edge window are counted separately and accepted only within the
2-code bound.

Testbench per block:

| Testbench | Covers |
|---|---|
| `tb_delay_stage`, `tb_ring_mux`, `tb_splitter` | delays and rail polarity |
| `tb_delay_ring` | open-ring pass timing; lap time N·T + tSW and lap parity when closed; rest when reopened |
| `tb_diff_dff` | sampling and clear |
| `tb_input_dff`, `tb_ring_switch_control`, `tb_lap_counter` | control flops |
| `tb_comparator_matrix` | thermometer against driven ring phases |
| `tb_bubble_encoder` | every position with and without bubbles |
| `tb_evaluation_logic` | random counts against the formula |
| `tb_prelogic` | routing and sign for both orders |
| `tb_vr_tdc_core` | counts and thermometer for a sweep of intervals, DFF0 in both states |
| `tb_vr_tdc_top` | end to end |
| `tb_vr_tdc_workloads` | 0–5000 ps ramp in 2 ps steps; 8096 repeated conversions at codes 209 and 210; conversion time against a 15 MS/s sample period |

## Files

| File | Contents |
|---|---|
| `rtl/vr_tdc_pkg.sv` | shared constants (stage counts, widths, delays) |
| `rtl/vr_tdc_top.sv` | top level |
| `rtl/vr_tdc_core.sv` | rings, input DFFs, matrix, switch control, counters |
| `rtl/delay_ring.sv`, `rtl/delay_stage.sv`, `rtl/ring_mux.sv` | rings |
| `rtl/comparator_matrix.sv`, `rtl/diff_dff.sv` | comparators |
| `rtl/input_dff.sv`, `rtl/ring_switch_control.sv`, `rtl/lap_counter.sv` | control |
| `rtl/bubble_encoder.sv`, `rtl/evaluation_logic.sv` | readout |
| `rtl/prelogic.sv`, `rtl/splitter.sv` | input side |
| `tb/tb_*.sv` | one self-checking testbench per module |
