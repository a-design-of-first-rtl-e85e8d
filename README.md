# First-order delay-line DPLL

This is a digital phase-locked loop that regenerates a clock from a stream of
data bits. It has no analog loop filter and no oscillator of its own. A
16-stage delay line splits a reference clock into 16 evenly spaced phases.
Each output cycle, the loop picks the phase whose rising edge is nearest to
the input's rising edges. If the data rate is a few per cent off the
reference, the loop walks one tap further every few cycles. The output then
runs at the data rate and not at the reference rate.

The architecture follows a published 1.2 µm CMOS design for 60 MHz clock
regeneration. That design rests on two ideas, and both are built here:

* **A parallel phase comparator.** Sixteen flip-flops, one on each delay-line
  tap, sample the input. Interleaved latch banks then hold the samples of a
  whole cycle long enough for the slow edge-detection and subtraction logic
  to finish. No flip-flop in the comparator has to run faster than the
  reference clock.
* **A DCO that switches taps without glitches.** The output clock comes out of a
  multiplexer of delay-line taps. The multiplexer's select input is updated by
  a second clock that leads the output by a quarter period. The select
  therefore changes only while both the old and the new tap are low.

The loop is first order. The loop filter is a pure gain, a power of two made
by a shift, and the DCO integrates it. A first-order loop locks quickly and is
simple. The price is a steady phase error proportional to the frequency
offset, and no memory of frequency while the data has no edges.

## Signal flow and number formats

```
ref_clk ─► delay_line ─► phi[15:0] ──────────────┬──────────────────────┐
                              │                  │                      │
din ──► phase_comparator ◄────┘                  ▼                      │
        (pos: 4-bit slot of the input's rise)   dco ◄── step ◄── loop_filter
        dphi = pos - tap  (4-bit signed) ──────────────────────► (×K)
                 ▲                               │
                 └──────── tap = q1[7:4] ◄────────┤
                                                 └──► clk_out
```

| quantity | width | format |
|---|---|---|
| tap number, edge position | 4 bits | unsigned, 0..15, in units of one delay cell (2π/16) |
| phase error `dphi` | 4 bits | two's complement, −8..+7 taps. Wrap-around is wanted: it is the shorter way round the circle. |
| loop-filter output `step` | 8 bits | two's complement, in 1/16 tap: `{dphi, 4'b0} >>> K_SHIFT` |
| integrator `q1` (`dco_select`) | 8 bits | unsigned modulo 256: bits 7..4 are the tap, bits 3..0 a fraction of a tap |

The fraction bits let gains below one accumulate: with K = 1/4, an error of
one tap moves the DCO by a quarter tap. The integrator wraps modulo 16 taps,
as a phase should. Once per output cycle, at the output's falling edge, the
loop computes

```
q1 <= q1 + ((pos - q1[7:4]) << 4) >>> K_SHIFT      (only if a rising edge was found)
```

## The parallel phase comparator

Take reference cycle *k*. Tap *i* rises at (i+1) cell delays after the
reference edge, and the 16 taps span exactly one reference period. Sampler
flip-flop *i* (`multiphase_sampler`) captures `din` on tap *i*. If the input
rose between tap *i−1* and tap *i*, samples *i−1* and *i* read 0 and 1.

A sampler flip-flop is overwritten one period later. The next stage
(`interleaved_latches`) therefore copies its samples into four 8-bit banks.
Reference cycles are called odd and even in turn:

| bank | samples | clock | rises at | holds a complete cycle with |
|---|---|---|---|---|
| A | 0–7 of an odd cycle | `phi_a` | tap 8 of the odd cycle | B |
| B | 8–15 of an odd cycle | `phi_b` | tap 0 of the next (even) cycle | A |
| C | 0–7 of an even cycle | `phi_c` | tap 8 of the even cycle | D |
| D | 8–15 of an even cycle | `phi_d` | tap 0 of the next (odd) cycle | C |

Each bank clock pulses once every two reference cycles, is 8 taps wide, and
rises just after the last of its eight samples has been taken.
`four_phase_clock_gen` makes them by ANDing tap 8 (for A and C) or tap 0 (for B
and D) with a cycle-parity bit. The parity flop toggles on tap 4, and a copy
of it is taken on tap 12. Each gate's enable therefore changes only while the
tap it gates is low. The same block makes `sel_odd`, a flop on tap 0 that
points at the pair of banks just completed.

An odd cycle's banks stay complete from tap 0 of the following even cycle
until bank A is overwritten at tap 8 of the next odd cycle. That window is a
period and a half. `odd_even_selector` hands the 16 samples of the latest
complete cycle to the encoder. It also passes on sample 15 of the cycle before
(from the other pair of banks), so an input that rose between tap 15 and the
next tap 0 is caught in slot 0. `edge_detector` XORs neighbouring samples and
keeps only rising transitions. `position_encoder` isolates the lowest marked
slot and encodes it with an OR matrix into 4 bits, plus a `valid` flag.
`phase_subtractor` subtracts the DCO's tap. If no rising edge was found, the
error is 0 and the DCO holds its phase.

The result for cycle *k* is on the comparator's output from tap 0 of cycle
*k+1* until tap 0 of cycle *k+2*.

## The hazard-free DCO

The output is `phi[q2]`, taken through SELECTOR 2. Changing `q2` while the
selected tap is high, or just as the new tap rises, would cut or add a pulse.
The DCO (`dco`) orders its events so that this cannot happen:

1. At the output's **falling** edge, D-FF 1 (`q1`) loads the integrator sum.
2. SELECTOR 1 outputs tap `q1[7:4] − 4`. That clock leads the coming output
   edge by π/2 (4 taps).
3. On the **rising** edge of that lead clock, D-FF 2 (`q2`) loads `q1[7:4]`.
   This happens a quarter period before the new output edge. At that moment
   the old tap has been low for 4 taps and the new tap is still low, so
   SELECTOR 2 switches between two low inputs.
4. SELECTOR 1 itself changes at step 1. At that moment both its old and new
   inputs are low too.

All of this holds while one update moves the tap by at most ±3. The default
gain K = 1/4 limits a step to ±2 taps, since |error| ≤ 8 and 8/4 = 2. With
K = 1/2 a step can reach 4 taps. The output's low phase then shrinks to 4 taps,
and a step of exactly −4 makes SELECTOR 1 switch at the instant its new input
rises.

Moving the tap by *d* stretches one output period by *d* cells. That is how
the output frequency departs from the reference: a steady step of +1/4 tap
per cycle makes the output 1/64 slower than the reference.

## Loop behaviour

These figures come from the testbenches at the default parameters: 60 MHz
reference (16 × 1042 ps) and K = 1/4.

* **Regular "10" data** (one rising edge every two bits) locks at every data-rate
  offset from −5 % to +5 %. At ±5 % the phase error at the edges settles
  around 6–7 taps. A first-order loop must carry an error of
  (drift between edges) / K = 1.6 / 0.25 = 6.4 taps.
* **2^13−1 PRBS data** locks reliably at ±1 % and in the runs so far also at
  ±2 %. At ±3 % and more it slips cycles. The original design reports
  ±5 % for PRBS input, and this implementation does not reach that. A PRBS
  has runs of up to 13 equal bits. Over such a run a 5 % offset drifts the
  phase by about 10 taps, more than the ±8 taps the comparator can resolve.
  This loop keeps no frequency estimate through the gap, and neither did the
  original, which was also first order.
* **Pull-in** from a half-period phase error with a 1 % offset takes
  0.07–0.16 µs. The original reports "a few microseconds".
* Because the phase is resolved to one of 16 taps, a residual error and jitter
  of a tap or more remain. This is inherent in a 16-tap first-order design.

## Files

| module | role |
|---|---|
| `dpll_pkg` | sizes (16 taps, 4-bit taps, 8-bit loop word) and the shared types |
| `dpll_top` | the whole loop |
| `delay_line` | **behavioural model** of the 16-cell delay line (`assign #delay`). It is not synthesizable and stands for an analog/custom block. |
| `phase_comparator` | wraps the six comparator stages below |
| `multiphase_sampler` | 16 D-FFs, one per tap |
| `four_phase_clock_gen` | `phi_a..phi_d` and `sel_odd` |
| `interleaved_latches` | banks A–D |
| `odd_even_selector` | latest complete cycle plus the boundary sample |
| `edge_detector` | rising-edge slot marks |
| `position_encoder` | 16-to-4 encoder with `valid` |
| `phase_subtractor` | `pos − tap`, or 0 when there is no edge |
| `loop_filter` | gain K = 2^−K_SHIFT by shifting |
| `dco` | integrator, code change, SELECTOR 1, D-FF 2, SELECTOR 2 |
| `ripple_adder` | carry-ripple adder of the integrator |
| `tap_selector` | 16-to-1 tap multiplexer, used twice |

`dpll_top` ports: `ref_clk`, `rst_n` (asynchronous, active low) and `din` in;
`clk_out`, `dco_select` (the integrator), `out_tap` (the tap now on
`clk_out`), `phase_err`, `edge_pos` and `edge_valid` out.

Each block has a self-checking testbench `tb/tb_<module>.sv`. Two more
testbenches cover the whole loop:

* `tb_dpll_top` runs the loop at its defaults with "10" and PRBS data at
  several offsets. It checks every phase measurement against slots it computes
  from its own stimulus times, every integrator update, pulse widths (no
  glitch) and frequency following. It also fails if some mechanism never
  happens: edge and no-edge cycles, both bank pairs, tap steps and wrap-around
  in both directions.
* `tb_lock_in` measures the lock-in range and lock-in time given above.

## Simulating

All testbenches are plain SystemVerilog with `timeunit 1ps`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl +libext+.sv \
    rtl/dpll_pkg.sv tb/tb_dpll_top.sv --top-module tb_dpll_top -o sim
./obj_dir/sim
```

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. The
whole-loop tests take well under a second of CPU time.

## Parameters and what can be changed

* `K_SHIFT` (in `dpll_top` and `loop_filter`, default 2, range 0..4): the loop
  gain K = 2^−K_SHIFT. A smaller K lowers jitter, pulls in more slowly and
  narrows the lock range. A larger K breaks the ±3-tap step limit of the DCO
  (see above).
* `TAP_DELAY_PS` (default 1042): the cell delay of the delay-line model. The
  loop assumes the reference period equals 16 cell delays. The delay line is
  not locked to the reference, so whoever drives `ref_clk` must keep that
  true.
* The number of taps (16) and the word widths (4 and 8 bits) are fixed in
  `dpll_pkg`. The four-phase clock generator and the DCO's π/2 code change are
  derived from them, but no other tap count has been tested.

## Choices made here, where the original is silent

* Every flip-flop has an asynchronous active-low reset. The DCO starts on
  tap 0.
* How `phi_a..phi_d` are generated: the parity-gated taps described above.
* Only rising input edges are measured. If several are marked in one cycle,
  the lowest slot wins.
* The boundary sample from the previous cycle, so that slot 0 can be detected.
* A cycle without a rising edge gives error 0, so the DCO holds its phase.
* The loop gain K = 1/4.
* D-FF 2 loads the tap bits held in D-FF 1, the value the DCO has already
  committed to, and not the adder output.
* Each latch bank is clocked every second reference cycle. Two interleaved
  pairs of banks need no more, although the original text speaks of a quarter
  of the reference rate.

Not modelled: the transistor-level circuit style (true single-phase-clock
logic), the layout, gate delays, and the reference oscillator, which the
testbenches generate. The comparator's result changes at tap 0 and the
integrator samples it at the output's falling edge. The two can coincide
(with tap 8 selected). In simulation the integrator then gets either the old
or the new measurement, depending on event order; both are whole values. In
silicon this is an asynchronous crossing, and the original design does not
resolve it either.
