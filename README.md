# All-digital clock multiplier with a sub-gate-delay ring oscillator

This core turns a slow reference clock (32 kHz in the target system) into a
processor clock N times faster (about 20 to 72 MHz). It uses only ordinary
logic gates, so no analog loop filter or charge pump is needed. Three ideas
carry the design:

* **Oscillator.** The oscillator is a ring of standard cells. Its period is set
  by an 11-bit control word. The finest delay step is *not* a gate delay. It is
  the small difference between the delay of a 2-input and a 3-input NAND, about
  a tenth of a gate delay. This makes the period resolution, and so the jitter,
  far finer than one gate.
* **Frequency measurement.** The loop counts how many output cycles fit into
  one reference period. The difference from N goes through a look-up gain and
  is added straight to the control word. A large frequency error is therefore
  corrected in a few large steps, with no slow linear loop to settle.
* **Bang-bang tracking.** Once the error is within a few cycles, the loop only
  steps the control word by -1, 0 or +1. The output then sits within one fine
  step of N × f_ref.

The core also has an idle mode. `halt` stops the ring cleanly and `halted`
reports that it has stopped. The control word is kept while halted, so on
wake-up the clock restarts at once at the right frequency.

Everything is SystemVerilog (IEEE 1800-2017). The control loop is
synthesizable RTL. The oscillator is a timing model, because its behaviour
exists only as delays of real cells.

## Interface (`dpll`)

| port | dir | width | meaning |
|---|---|---|---|
| `ref_clk` | in | 1 | reference clock |
| `reset` | in | 1 | power-on reset, active high, at least two `ref_clk` edges |
| `n_mult` | in | 12 | harmonic N; may change at any time |
| `halt` | in | 1 | request idle state |
| `out_clk` | out | 1 | generated clock |
| `lock` | out | 1 | the last valid measurement was within -8..+7 cycles of N |
| `halted` | out | 1 | the ring has stopped |
| `ctrl_word` | out | 11 | current control word (for observation) |

## The oscillator (`dco`)

The ring has four parts, in this order:

* One 2-input NAND. Its second input is the halt enable.
* A fixed line of 32 inverters. `out_clk` is taken at its output.
* A coarse line of inverter pairs with 128 taps and a 128-to-1 multiplexer,
  selected by `ctrl[10:4]`.
* A fine line of 16 NAND stages, controlled by `ctrl[3:0]`.

Each fine stage passes the edge through either a 2-input or a 3-input NAND. The
4-bit code is decoded into a thermometer code: `code` stages take the fast
path and the other `16 − code` stages take the slow one.

The NAND is the only inversion in the ring, so the period is twice the loop
delay:

```
L(ctrl) = T_NAND + 32·T_INV + T_MUX + (127 − coarse)·2·T_INV + 16·T_NAND + (16 − fine)·δ
T_out   = 2·L
```

The model uses these delays: T_NAND = 90 ps, T_INV = 72 ps, δ = 9 ps and
T_MUX = 3101 ps. T_MUX stands for the multiplexer tree plus all other fixed
overhead. One coarse step (an inverter pair, 144 ps) is exactly 16 fine steps.
So the whole 11-bit word is one linear scale of 9 ps of loop delay (18 ps of
period) per count:

```
L(ctrl) = 25367 ps − 9 ps · ctrl        (ctrl = 0 … 2047)
f_out   = 19.71 MHz (ctrl = 0) … 72.0 MHz (ctrl = 2047)
```

A larger control word means a higher frequency. In a real implementation these
numbers come from the cell library, and the loop does not depend on them. It
only needs the period to fall steadily as the word rises.

**Halt.** A flip-flop samples `halt` on each rising edge of the NAND output,
and its inverted output disables the NAND. The ring therefore always stops just
after the NAND output has gone high. There are no runt pulses, `out_clk` stays
high, and `halted` is 1. When `halt` falls, the flip-flop is cleared at once,
and the ring restarts with a full-length low phase.

The four files `dco.sv`, `dco_fixed_delay.sv`, `dco_coarse_delay.sv` and
`dco_fine_delay.sv` use `#` delays on transport-delay processes. Verilator
needs `--timing` for them. A synthesis tool ignores the delays and sees the
ring as a combinational loop through the NAND, which is expected.

## One loop iteration: two reference periods

`ref_timing` divides `ref_clk` by two. The result, `win`, is the counting
window, and one correction takes two reference periods:

```
ref_clk   _|‾|_|‾|_|‾|_|‾|_|‾|_
win       _|‾‾‾|___|‾‾‾|___|‾‾
           count  ^   ^
                  |   +-- rising ref_clk, win 0->1: control word += offset,
                  |       next window starts with the new word
                  +------ falling ref_clk inside win=0: CRR <= counter
```

**Counting (`freq_detector`).** The counter runs on `out_clk`. `win` reaches it
through two flip-flops. On the first `out_clk` edge of a window, the counter
loads N−1 (that edge already counts). It then counts down on every edge until
the window closes, and holds the result. The result is the *counter remainder*:

```
CRR = N − (out_clk cycles in one ref_clk period)      13-bit two's complement
```

CRR > 0 means the clock is too slow.

The remainder register (CRR) samples the counter on the falling `ref_clk` edge
in the middle of the low half of `win`. The counter has been still for about
half a reference period by then, so the multi-bit value crosses clock domains
safely. The combinational path from CRR through the shifter, multiplexers and
adder then has another half reference period before the update edge.

## Choosing the correction

```
              +--> range_detector --> EBB ------------------------+
CRR ----------+--> pdbb --> E, E/L --> [E/L: -1|+1] -> [E: step|0] --+--> [EBB] --> offset
              +--> offset_shifter (CRR · 2^shift) ------------------+
ctrl, N --> gain_lut --> shift
offset --> control_accumulator: ctrl <= clamp(ctrl + offset, 0, 2047)
```

**Window test (`range_detector`).** EBB ("enable bang-bang") is 1 when the ten
top bits of the 13-bit CRR are all equal, which means −8 ≤ CRR ≤ 7. No adder
or comparator is needed.

**Acquisition gain (`gain_lut`, `offset_shifter`).** This is the part that
needs the most care. Let the period be `T = 2·δ·D`, where
`D = LOOP_STEPS_MAX − ctrl` is the loop delay in fine steps. The count is then
`C = T_ref / T`. The change of control word that makes the count exactly N
works out to

```
Δctrl = CRR · D / N
```

So the ideal gain is D/N. It depends on both N and how many delay elements are
active now. The hardware uses the largest power of two not above it:

```
shift = floor( log2(D) − log2(N) )        offset = CRR · 2^shift
```

This keeps the gain between about ½ and 1 of the ideal. Each acquisition step
at least halves the error and never overshoots. Both logarithms use the
piecewise-linear form `log2(2^p·(1+f)) ≈ p + f` with three fraction bits:

* log2(D) comes from a 128-entry table indexed by the coarse bits of the
  control word. The table is filled at elaboration from `LOOP_STEPS_MAX`, using
  the middle of each coarse step.
* log2(N) comes from a leading-one detector.

The exponent is registered on every `ref_clk` edge. `offset_shifter` shifts
arithmetically, left or right, and saturates to a 12-bit signed offset.

**Matching the oscillator.** `LOOP_STEPS_MAX` (default 2819) must match the
oscillator: it is L(0)/δ. With a different oscillator, recompute it. A value
that is too small only slows acquisition. A value that is too large raises the
gain above the ideal. Below twice the ideal the loop still converges, with
overshoot; at twice the ideal or more it oscillates.

**Tracking (`pdbb`).** Inside the window, E = (CRR ≠ 0) and E/L = sign of CRR
("early", more than N cycles counted). The offset is −1 when early, +1 when
late, and 0 when exact. Each step of the least significant bit is one 9 ps
fine step of the loop delay. In steady state the word dithers by one step
whenever N·T_out falls between two codes.

**Loop filter (`control_accumulator`).** The adder and the 11-bit register form
an integrator. The sum is clamped to 0 … 2047, so an N outside the
oscillator's range parks the word at an end instead of wrapping it. Reset loads
1024.

**Lock.** At each update, `lock` takes EBB AND "measurement valid". It is
cleared while the oscillator is idle.

## Halt and wake-up in the loop

The loop must not learn from a window in which the ring was stopped, because
such a count would be near zero and would push the word to its limit.
`ref_timing` brings `halt | halted` into the `ref_clk` domain through two
flip-flops. Any iteration in which either flip-flop saw it is marked invalid,
and its update is skipped. Since the control word is untouched, after `halt`
falls:

* the ring restarts within one loop delay;
* the first full reference period already counts N within a few cycles;
* `lock` returns after 3 to 6 reference periods, when the next valid
  measurement comes in.

A halt shorter than one reference period that falls between two samples of
the flip-flops could go unnoticed and cost one bad correction.

## Measured behaviour (simulation, 32 kHz reference)

| N | f_out | lock after reset (ref periods) | final control word |
|---|---|---|---|
| 616 | 19.7 MHz | 9 | 1 |
| 700 | 22.4 MHz | 11 | 338 |
| 1000 | 32 MHz | 9 | 1082 |
| 1250 | 40 MHz | 11 | 1430 |
| 1500 | 48 MHz | 15 | 1662 |
| 2000 | 64 MHz | 19 | 1951 |
| 2250 | 72 MHz | 13 | 2047 |

In every case the average count over 16 reference periods is N ± 1.

A harmonic change from 1000 to 2000 re-locks in about 14 reference periods.

After a halt, all of the first 50 `out_clk` periods are within 0.5 % of the
target period, because the control word survives the halt. `lock` comes back
3 to 6 reference periods later.

The dco model has an internal variable, `drift_ps`, that testbenches can
disturb. It is not a port and is 0 by default. Measured at N = 1000:

* **Slow drift.** A sinusoidal drift of 80 ps in the loop delay, over 200
  reference periods, keeps the count within 2 cycles of N with `lock` held
  high. The bang-bang loop tracks at 9 ps per update.
* **Noise.** White noise of ±20 ps per reference period keeps the count
  within 3 cycles of N.
* **Steps.** A step of +1500 ps, about 10 % of the loop delay (as a slow
  process corner would give), re-locks in 8 reference periods. The step back
  re-locks in 6.
Harmonics below 616 (19.7 MHz) or above 2250 (72 MHz) are outside what the
modelled oscillator can do. There the word rests at 0 or 2047.

The time to lock is counted in reference periods, since the control word
changes only every second one. Most of it is spent in bang-bang tracking after
one to four coarse steps. At the low end of the range one fine step moves the
count by only about 0.2 cycles, so closing the last few cycles one step at a
time takes longest.

## Where this departs from the source design

The structure is taken from the source design: the ring with fixed, 128-tap
coarse and 16-stage fine lines, the 2-input/3-input NAND fine step and the
halt flip-flop. So are these parts of the loop: the 11-bit control word, the
13-bit counter loaded with N, the ten-MSB window test, the power-of-two gain
from a LUT that depends on N and the active delay, the three-multiplexer offset
network with 0 and ±1, the accumulating adder, and the update every two
reference periods. The following are this implementation's own choices:

* **Gate delays.** All gate delays are chosen so that the range is
  19.7–72 MHz. The source quotes 19.5 (or 19) to 72 MHz for its 0.45 µm
  implementation, so the bottom 1% of that range is not reached.
* **Sign conventions.** The counter counts down from N, and a larger control
  word means a higher frequency. Decoding the fine code into a thermometer code
  is also a choice. With 4 bits, one of the 16 fine stages is always slow, so
  the shortest period is one fine step longer than "all stages fast".
* **PDBB decision.** The bang-bang decision is the sign of the same remainder.
  There is no separate edge-sampling phase detector, so the loop locks
  frequency to within one fine step. It does not align the phase of `out_clk`
  to `ref_clk`.
* **Gain rule.** The gain formula (floor of log2(D/N) with piecewise-linear
  logarithms) and its table contents are this design's.
* **Counter clock.** The counter uses a synchronised window enable instead of
  an AND-gated clock.
* **CRR capture.** The remainder register is sampled on the falling reference
  edge.
* **Halt handling.** The loop is frozen while halted and measurements that
  overlap a halt are discarded.
* **Lock.** The lock register, the clamp of the adder, the reset value of the
  control word (1024) and the 12-bit width of N are this design's.

## Files

| file | content |
|---|---|
| `rtl/dpll_pkg.sv` | widths and shared types |
| `rtl/dpll.sv` | top level |
| `rtl/dco.sv` | ring oscillator model with halt flip-flop |
| `rtl/dco_fixed_delay.sv`, `rtl/dco_coarse_delay.sv`, `rtl/dco_fine_delay.sv` | delay line models |
| `rtl/freq_detector.sv` | out_clk counter and remainder register |
| `rtl/ref_timing.sv` | ref_clk/2, capture and update enables, halt bookkeeping |
| `rtl/range_detector.sv`, `rtl/pdbb.sv` | window test, bang-bang decision |
| `rtl/gain_lut.sv`, `rtl/offset_shifter.sv` | power-of-two acquisition gain |
| `rtl/offset_mux.sv`, `rtl/control_accumulator.sv` | offset selection, loop filter |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_dpll.sv` | end-to-end test: reset, two harmonic changes, halt/wake-up, clamp |
| `tb/tb_dpll_range.sv` | lock and accuracy across the frequency range |
| `tb/tb_dpll_drift.sv` | tracking under delay drift, noise and steps |

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and stops itself
with a watchdog. `tb_dpll` also counts every loop mechanism (coarse step,
+1, −1, 0, skipped measurement, clamp, lock, halt, harmonic change) and fails
if any never happened.

## Simulating

```
verilator --binary --timing -Irtl -Itb rtl/dpll_pkg.sv tb/tb_dpll.sv --top-module tb_dpll
./obj_dir/Vtb_dpll
```

Any other testbench is run the same way: swap the file name and the
`--top-module`. All files use `` `timescale 1ps/1ps ``. The end-to-end tests
simulate about 10 to 40 ms of circuit time in a few seconds.

## Changing it

* **Different oscillator.** Change the delay parameters of `dco`, then set
  `LOOP_STEPS_MAX` of `gain_lut` to the new L(0)/δ.
* **Different word widths.** These live in `dpll_pkg`. The window test takes
  its MSB count as a parameter (`MSBS`).
* **Synthesis.** Only the `dco` family needs replacing with real cells. Keep
  the fine line's stages identical and floor-plan them together, because the
  2-input/3-input delay difference is the whole point of that line.
