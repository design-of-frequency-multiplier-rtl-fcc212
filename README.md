# Double-edge-counter frequency multiplier

This design multiplies the frequency of an input signal by an integer ratio `m`.
It has no oscillator, no loop filter and no phase detector. It measures the input
period against a free-running reference clock and then divides that period into
`m` equal slices by counting the same reference clock. Two ideas make it better
than a plain counting multiplier:

* **Both edges of the reference clock are counted.** The time unit is half a
  reference period, so the quantisation error is half as large as with a counter
  that sees only rising edges.
* **The division remainder is spread out.** The input period is `N` half periods
  and `N = m*Y + Z`. The first `Z` of every `m` output periods are one half period
  longer than the rest. Any `m` consecutive output periods therefore add up to
  exactly `N` half periods. No single period absorbs the whole remainder.

A measurement finishes one input period after the input appears, so output
starts in the second input period. The circuit re-measures every two input
periods, so it follows a step in input frequency or in `m` within two input
periods.

## Signal flow

```
            sig_in ──► 1/2 divider ──window──┬──────────────────────────────┐
                                              │                              │ falling edge
 clk_ref ──► D-counter1 (counts both edges    │                              ▼
             while window=1, wraps at m: DC1) ├─ x ──────────────────► latch2 ── Z ─┐
                    │ wrap                    │                              │      │
                    ▼                         │                              │      ▼
             counter1 (counts the wraps) ─── y ──────────────────────► latch1 ── Y ─► DC2 / "+1" ─► Y' ─┐
                                                                                     ▲                   │
                                          counter2 (P = 1..m, DC4 wraps at m) ───────┘                   │
                                                ▲ one count per output pulse                             ▼
 clk_ref ──► D-counter2 (counts both edges) ── R ──► DC3: R reaches Y' ──► output pulse, R restarts ──► out
```

| Part | Module | What it does |
|---|---|---|
| 1/2 divider | `half_divider` | Toggles on each input rising edge. Its output, `window`, is high for one input period out of every two. |
| D-counter1, DC1, counter1 | `ratio_counter` | While `window` is high, counts reference edges modulo `m`. counter1 counts the wraps. At the end of the window, counter1 holds `Y = N div m` and D-counter1 holds `Z = N mod m`. |
| latch1, latch2 | `fall_latch` (two instances) | Take `Y` and `Z` on the falling edge of `window` and hold them for two input periods. |
| counter2, DC4, DC2, "+1" | `remainder_disperser` | Keeps the position `P` (1..m) of the current output period. Offers a period length `Y' = Y + 1` while `Z >= P`, and `Y' = Y` otherwise. |
| D-counter2, DC3 | `pulse_generator` | Counts half periods. When the count reaches `Y'`, it emits an output pulse and restarts. |
| double-edge counter | `dedge_counter` | The counter that all of the above is built from. |
| top | `freq_multiplier` | Wires the parts together. |

Shared types and default widths are in the package `fm_pkg`.

## The double-edge counter

The basic cell has two registers and one incrementer. `reg1` loads on the rising
edge of the reference clock and `reg2` on the falling edge. A selector driven
by the clock level shows `reg1` while the clock is high and `reg2` while it is
low. The "+1" circuit adds one to the selector output and feeds both registers.
At a rising edge the selector still shows `reg2`, so `reg1` becomes `reg2 + 1`.
At the following falling edge, `reg2` becomes `reg1 + 1`. The selector output
therefore advances once per half period.

`dedge_counter` adds an enable and a synchronous clear for each edge, and an
asynchronous reset. Its control inputs come as two `edge_ctl_t` structs:
`at_rise` and `at_fall`.

### Two views of every counter (read this before changing the RTL)

The selector output `q` changes at the clock edge itself. A flip-flop that read
`q`, or logic computed from `q`, at that same edge would race with the
selector. In silicon this is a hold-time hazard. In simulation it gives an
ordering-dependent result.
Each counter therefore exports the two registers as separate views:

* `q_rise` (= `reg2`) is what the selector shows just before a **rising** edge.
* `q_fall` (= `reg1`) is what it shows just before a **falling** edge.

Every comparator is evaluated twice: once on the `*_rise` values to produce the
controls for the rising edge, and once on the `*_fall` values for the falling
edge. For example, `pulse_rise` and `pulse_fall` are DC3 evaluated in the two
views. This is the same logic the single selector-based circuit has. It is
simply evaluated at the point where each edge samples it. The visible count
`q` is kept for observation. Nothing in the design clocks on `q`, so its brief
stale value after an edge (the selector switching before the register updates)
does no harm.

For the same reason, the output pulse does not use a selector. It comes from an
XOR-type double-edge flip-flop: `out = out1 ^ out2`, where each register loads
the wanted value XOR the other register. `out` changes only when a register
changes, so the clock output is free of glitches.

## Measuring: Y and Z

While `window` is high, D-counter1 counts every reference edge. DC1 acts at the
edge where the count would reach `m`: that edge stores 0 and increments
counter1. D-counter1 therefore runs through `0..m-1`. After `N` edges it holds
`N mod m`, and counter1 holds `N div m`. While `window` is low, both counters
are held at zero, ready for the next window. counter1 stops at its maximum
rather than wrapping.

`window` and `sig_in` are not synchronised to the reference clock. `window` is
sampled as a count enable at both clock edges. The latches are clocked by its
falling edge. An input edge that lands exactly on a reference edge is
therefore undefined (in silicon, metastable). The measured `N` can be off by one
in either direction. With 50 µs input periods and a 480 kHz reference
(1041.7 ns half period), `N` is 48.

## Generating: spreading the remainder

`P` (counter2) is the position of the current output period in its group of `m`.
It counts `1, 2, ..., m` and then returns to 1 (DC4). It advances on each output
pulse. DC2 compares `Z >= P`. The first `Z` periods of each group are `Y + 1`
half periods long and the remaining `m - Z` are `Y` long. For example, with
`m = 7` and `N = 48`: `Y = 6`, `Z = 6`, and the group is six periods of 7 half
periods and one of 6, which is 48 in total.

DC3 fires at the edge where D-counter2 would reach `Y'`. That edge restarts
D-counter2 and starts a one-half-period output pulse. The output period is
therefore exactly `Y'` half periods:

    T_out = Y * t_half   or   (Y + 1) * t_half,      Y = floor(N / m)

The period-to-period variation (jitter) is at most one reference half period,
`t_half`. Relative to the output period it is `m * f_in / (2 * f_ref)`. Choose
`f_ref` for the jitter that the application can accept. The input and the
reference are not locked, so the measured `N` carries an error of less than
one half period. This appears as a small static frequency error.

## Behaviour over time

* **Start-up.** After reset, latch1 holds 0. A zero period length stops
  D-counter2, so `out` stays low. The first input rising edge opens the first
  window. The window closes one input period later, and the first pulse follows
  `Y'` half periods after that.
* **Frequency or ratio step.** The first window that covers only the new
  condition gives the new `Y` and `Z`. If the step happens just before a window
  opens, the new period length is in use two input periods later. Because DC3
  tests `R + 1 >= Y'`, a period already longer than the new length ends at the
  next edge, so a higher input frequency needs no wait. A step of `m` in the
  middle of a window gives one mixed measurement, and the next window corrects
  it.
* **Stop.** Reset clears everything. Output resumes one input period after the
  input restarts.

## Parameters and interface

| Parameter | Default | Meaning |
|---|---|---|
| `M_W` | 8 | Width of `m`, of D-counter1, of `Z` and of counter2. `m` can range from 1 to 255. |
| `CNT_W` | 16 | Width of counter1 and `Y`. D-counter2 and `Y'` are `CNT_W + 1` bits. |

`freq_multiplier` has these ports:

* Inputs: `clk_ref` (reference clock), `rst_n` (asynchronous, active low),
  `sig_in`, and `m`.
* Outputs: `out` (the multiplied signal), `window` (the 1/2 divider output),
  `y` and `z` (the held quotient and remainder), and `p` (counter2).

`m` may change at any time. `m = 0` behaves like `m = 1`. A useful output
needs `Y >= 2`. In other words, the reference needs at least `m` cycles per
input period. With `Y = 1` the output stays high.

## What is this design's own choice

The block structure, the counting on both edges, the window of every other
input period, the latching on the window's falling edge and the rule `Z >= P`
for spreading the remainder come from the published double-edge-counter
multiplier. The following are choices made here:

* **Counter clocking.** counter1 and counter2 are built from the same
  double-edge register pair and count at the reference edge where their event
  happens. The original describes them as ordinary rising-edge counters,
  clocked by the DC1 match and by the output signal.
* **Comparators use `>=`.** DC1, DC3 and DC4 test `>=` instead of equality, so
  a lowered `m` or a shorter period cannot let a count run past its limit.
* **counter2 counts from 1.** This makes `Z >= P` lengthen exactly `Z`
  periods.
* **Output shape.** The output is a one-half-period pulse per output period. It
  does not have 50% duty.
* **Counter housekeeping.** The counters are cleared while the window is low,
  and counter1 saturates instead of wrapping.
* **Reset and start-up.** All registers have an asynchronous active-low reset,
  and the output is held off until the first measurement.
* **Widths.** `M_W = 8` and `CNT_W = 16`. The original gives no widths.

## Verification

Each module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=N failures=M`:

* **`tb_dedge_counter`:** the count must advance every half period, and random
  enables and clears are compared with a model.
* **`tb_half_divider`, `tb_fall_latch`:** edge and reset behaviour.
* **`tb_ratio_counter`:** 200 windows with random lengths and random `m`. The
  testbench counts the edges itself and checks `N div m` and `N mod m`.
* **`tb_remainder_disperser`:** the sequence of `P`, `Y'` against `Z >= P`,
  and the group sum `m*Y + Z`, over random `m`, `Y` and `Z`.
* **`tb_pulse_generator`:** period length, pulse width, no output while idle,
  and early end of a shortened period.
* **`tb_fm_accuracy`:** 24 random operating points (`m` from 2 to 12, input
  periods up to 120 µs). At each point, the measured `N` must be within one
  half period of the true input period. Every output period must be `Y` or
  `Y + 1`, and `m` consecutive periods must sum to `N`.
* **`tb_freq_multiplier`:** end to end, at the default parameters, with a
  480 kHz reference. It runs `m = 4` at 20 kHz (`Y = 12`), a step to 35 kHz
  (`N` = 27 or 28), `m` stepped to 7 at 20 kHz (`Y = 6`, `Z = 6`), and a
  stop/restart. It checks every latched `Y` and `Z`, every output period
  (`Y` or `Y + 1`), every sum of `m` consecutive periods (`= N`), the start-up
  and step latencies, and that each mechanism occurred.

Simulate with Verilator 5. The package goes first and `-y rtl` finds the
modules:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl rtl/fm_pkg.sv \
          tb/tb_freq_multiplier.sv --top-module tb_freq_multiplier
./obj_dir/Vtb_freq_multiplier
```

Replace the testbench name to run another one. Each testbench finishes within
a few seconds.

Limits of the verification: all of it is zero-delay RTL simulation. The
asynchronous crossing of `window` into the reference-clock counters is not
modelled for metastability, and the testbenches keep input edges away from
reference edges.
