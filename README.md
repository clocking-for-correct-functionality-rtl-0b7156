# Self-delay-checking clock for a wave-pipelined adder

A wave-pipelined circuit has no registers inside its logic. A new operand set
(a "wave") enters every clock cycle, while earlier waves are still on their way
to the output. This gives pipeline throughput without pipeline registers. The
price is a fragile clock. The output register must sample after the slowest path
of one wave has settled, and before the fastest path of the next wave arrives.
When process, voltage or temperature moves the delays, the window can close,
and the circuit then silently computes wrong results.

This RTL models a small clock circuit that guards against that. It keeps copies
of the logic's shortest (MIN) and longest (MAX) path next to the logic, launches
a transition into both on every logic clock, and checks whether they disagree at
the output register's sampling edge. If they ever do, the circuit switches the
logic into a safe mode and stays there until reset. In that mode the logic is
clocked only on every other system-clock cycle, and the output register samples
on a clock skewed by a delay taken from the MIN-path copy. The logic is a
balanced 8-bit ripple-carry adder. The model is event-driven and
picosecond-accurate, so the behaviour can be watched in simulation. It follows
the self-delay-checking scheme of *"Clocking for Correct Functionality on Wave
Pipelined Circuits"*. The sections on departures below say where it fills gaps
of its own.

## The clock window of a wave pipeline

A path's data is unstable from its minimum delay `TMIN` to its maximum delay
`TMAX` after each launch. With `N` waves in flight and clock period `T`, the
output register sampling `N` cycles after the launch sees stable data when

    TMAX < N*T < TMIN + T        i.e.   TMAX/N < T < TMIN/(N-1)

so the allowed periods form separate bands, not one range. The band depends on
the spread `TMAX - TMIN`. When the spread grows past about one period, the band
for this `N` is gone.

At the default delays the adder has `TMIN = 710 ps` and `TMAX = 850 ps`. With a
600 ps system clock, `N = 2` works: 850 < 1200 < 1310. The testbenches also use
a *slow corner*, where only the carry cells slow from 100 to 160 ps. There
`TMAX = 1270 ps`, which breaks the inequality: 1270 > 1200.

## The adder and its two determining paths (`wp_adder`, `mirror_path`)

`wp_adder` registers `a` and `b` on `wp_clock`, adds them in a ripple chain of
`fa_cell`s, and registers the sum on `outclk`. The sum is modulo 2^W, with no
carry-out. A bare ripple adder's delays are far too uneven to wave-pipeline, so
it is balanced with buffers (`buf_chain`, 80 ps each):

* Operand bit `i` passes `i` buffers before its full adder.
* Sum bit `i` passes `W-1-i` buffers after it.

Every direct operand-to-sum path then costs `T_CLKQ + (W-1)*T_BAL + T_SUM`.
That is `TMIN`. The full carry ripple from bit 0 into sum bit `W-1` costs
`T_CLKQ + (W-1)*T_CARRY + T_SUM`. That is `TMAX`.

`mirror_path` rebuilds one of those two paths from the same cells. The pins that
are not on the path are tied to non-controlling constants:

| copy | path | tie-offs |
|------|------|----------|
| MIN | `W-1` buffers, then the sum output of one cell | `b = cin = 0` |
| MAX | carry of cell 0, carry of cells 1..W-2, sum of cell W-1 | `b=1, cin=0`; then `a=1, b=0`; then `a=b=0` |

Each copy passes its input through unchanged, after exactly the original path's
delay. In silicon the copy sits next to its original, so both drift together.
In this model both take the same delay parameters, and a corner change moves
them together. `tap` is an earlier point of the same copy (after `TAP`
buffers). The skew generator uses it.

## The check (`self_check`)

Two toggle registers clocked by `wp_clock` launch a transition into the MAX copy
and the MIN copy on every launch of the logic. Both start equal after reset, so
`XOR = MAX ^ MIN` is 1 exactly while one copy has seen a launch that the other
has not yet. That is the time when the real logic's output is in transition.
`XOR` is sampled on the rising edge of `lclk`, the stand-in for the output
register's clock, into `WP_CHECK`. A 1 means "an output register clocked here
would have caught a wave in transition". The inverted register output
`!WP_CHECK` feeds the enable logic.

At 600 ps per launch, each XOR window lies `[730, 870)` ps after its launch at
the nominal corner. No sampling edge falls inside such a window, so `WP_CHECK`
stays 0. At the slow corner each window is `[730, 1290)` ps, which contains the
edge 1200 ps after the launch. `WP_CHECK` goes to 1 two cycles after the first
launch.

## What happens when the check fires (`skew_gen`, `wp_clock_gen`)

This is the part that needs the most care. Two things change, both sticky:

1. **Skewed clocks (`skew_gen`).** A register with D tied high, clocked by
   `WP_CHECK`, sets `skew_on`. Two clock multiplexers then stop passing `sclk`:
   * `lclk` becomes `tap ^ end` of a MIN copy that a toggle register on `sclk`
     drives.
   * `outclk` becomes the same construction driven from `wp_clock`.

   Each result is a pulse per input clock edge. It rises
   `T_CLKQ + TAP*T_BAL + 2*T_GATE = 330 ps` after the edge and falls when the
   MIN copy's transition arrives, 750 ps after it. The skewed rising edge lies
   between the launch and the arrival of the next wave. It moves with the MIN
   path across process, voltage and temperature, like the path it protects.
   `outclk` pulses only in cycles where the logic was clocked.

2. **Half rate (`wp_clock_gen`).** `WP_CLOCK = SCLK & L_ENABLE`. `L_ENABLE` is
   registered on the falling edge of `sclk` from
   `AND_EN = WP_ENABLE & !WP_CHECK & !(skew_on & L_ENABLE)`:
   * At full rate `L_ENABLE` stays 1.
   * The first `WP_CHECK` withholds the next pulse.
   * From then on the last term allows at most every other pulse.

In the safe mode a wave launched at `t` is captured at `t + 1200 + 330 ps`. That
works while `TMAX < 1530 ps`, and while `TMIN > 330 ps` so that the next wave
cannot overrun the capture. `WP_CHECK` then toggles on every `lclk` edge, set by
the wave in flight in the idle cycle and clear in the launch cycle. This is the
behaviour the scheme predicts. Its timing at the slow corner, with a 600 ps
clock:

    sclk      |‾‾|__|‾‾|__|‾‾|__|‾‾|__|‾‾|__|
    wp_clock  |‾‾|_____|‾‾|_____|‾‾|_____      every other cycle
    outclk       +330ps  ^        ^            one capture per launch
    WP_CHECK   0  1  0  1  0  1 ...            toggles each lclk edge

`wp_enable` (low = no logic clock at all) is the system's run control, and it
is applied in the same AND.

### Interface and latency of the top (`wp_clocking_top`)

| port | dir | meaning |
|------|-----|---------|
| `sclk` | in | system clock |
| `rst_n` | in | asynchronous reset, active low, clears every register and leaves the safe mode |
| `wp_enable` | in | allow the logic clock |
| `a`, `b` [W] | in | operands, taken at each rising edge of `wp_clock`; change them while `sclk` is low |
| `sum` [W] | out | output register |
| `wp_clock`, `lclk`, `outclk`, `xor_o`, `wp_check`, `l_enable`, `skew_on` | out | internal clocks and check signals, for observation |

At full rate, `sum` after the rising `sclk` edge `k` (plus clock-to-output)
belongs to the operands launched at edge `k-2`. In the safe mode, `sum`
is captured 330 ps after each launching edge and belongs to the previous
launch. A caller
can tell the two apart by `skew_on`. In both modes the rule "the latest launch
at least 1.5 periods before the capture edge" selects the right operands.

## The timing model (`tdelay`, `wp_timing_pkg`)

Every delay in the design goes through `tdelay`. It is a transport delay: each
input change is copied to the output exactly `T_PS` later, and it never
swallows a pulse. A wave pipeline needs that, because a new transition enters
a path while the previous one is still inside it. `tdelay` spawns one process
per input change (`fork ... join_none`), which Verilator runs with `--timing`.
Synthesis tools read it as a wire. The registers (`dff_d`, `toggle_ff`) are
ordinary `always_ff` registers followed by a clock-to-output `tdelay`. All
numbers are parameters with defaults in `wp_timing_pkg`:

| parameter | default | role |
|-----------|---------|------|
| `ADD_W` / `W` | 8 | adder width |
| `T_CLKQ_PS` | 50 | register clock-to-output |
| `T_SUM_PS` | 100 | full-adder sum |
| `T_CARRY_PS` | 100 | full-adder carry (160 at the slow corner) |
| `T_BAL_PS` | 80 | one balancing buffer |
| `T_GATE_PS` | 20 | XOR, AND, clock multiplexer |
| `SKEW_TAP` / `TAP` | 3 | buffers before the MIN-copy tap |

The system clock period is not a parameter of the RTL. The testbenches use 600
ps. None of these values comes from a published design. They were chosen so
that the nominal corner runs two waves and the slow corner needs the safe mode.
With other values, keep `T_CARRY_PS >= T_BAL_PS` (otherwise the mirrored paths
are no longer the adder's extremes) and re-derive the window above.

## Where this model goes beyond, or departs from, the scheme

Taken from the scheme:
* the MIN and MAX copies with non-controlling tie-offs;
* toggle registers launching into them from the logic clock;
* the XOR and the `WP_CHECK` register on `lclk`;
* the sticky select register clocked by `WP_CHECK`;
* the `tap ^ end` skewed clocks for `lclk` (from `sclk`) and `outclk` (from the
  logic clock);
* the `AND_EN` / `L_ENABLE` / `SCLK & L_ENABLE` gating;
* the result: half rate with a toggling `WP_CHECK`.

This model's own choices:
* **Adder width, ripple structure, balancing scheme, no carry-out.** Only "an
  adder" is given.
* **Where the "earlier version" of the MIN path is tapped.** Chosen as `TAP`
  buffers in, so that the skewed edge falls between the launch and the next
  wave.
* **The `L_ENABLE` register runs on the falling edge of `sclk`.** The scheme
  clocks it from `lclk`. Before the skew engages, the two are the same edge.
  After it, `lclk`'s falling edge can fall while `sclk` is high, and the AND
  gate would then cut a logic-clock pulse short.
* **The term `!(skew_on & L_ENABLE)` in `AND_EN`.** The check reports a wave
  one cycle late, so on its own it lets pairs of pulses through. This term makes
  the half rate exact.
* **Reset.** An asynchronous reset on every register. The scheme only needs the
  two toggle registers feeding one XOR to start equal.
* **All delays**, and transport (not inertial) delay.

## How far it can be trusted

The testbenches check every block against values worked out independently:
* arrival times to the picosecond;
* every captured sum against `a + b` from a reference queue;
* the clock-gating sequence against a reference model;
* pulse counts for the rates.

Each one also fails when its module is broken on purpose. The end-to-end test
runs a nominal and a slow adder side by side on one clock, and requires each
of the following at least once:
* the skew engaging;
* half-rate launches, each exactly 1200 ps apart;
* `WP_CHECK` toggling every cycle;
* cycles withheld by `wp_enable`.

At the slow corner, the adder test also shows that full-rate operation really
produces wrong sums, and that the skewed half-rate capture fixes them.

It is a timing model, not a netlist:
* The delays are numbers, not extracted parasitics.
* The safe mode never returns to full rate except through reset.
* The clock multiplexers switch without glitch protection. At the default delays the
  select changes while the old and new clocks have the same level. A real
  design would still need a glitch-free multiplexer.
* Synthesis of these modules keeps the logic but drops every delay. A silicon
  version would need hand-placed copies of the paths and a custom
  clock-multiplexer cell.

## Files and simulation

`rtl/`
* `wp_clocking_top`: `wp_adder`, `self_check`, `skew_gen`, `wp_clock_gen`.
* `self_check`, `skew_gen`: `toggle_ff`, `mirror_path`, `dff_d`, `tdelay`.
* `wp_adder`, `mirror_path`: `fa_cell`, `buf_chain`, `tdelay`.
* `wp_timing_pkg`: shared defaults and the `path_kind_e` type.

`tb/` holds one self-checking testbench per block (`<module>_tb`). Besides
those:
* `wp_clocking_top_tb` with its helper `wp_top_harness` is the two-corner
  end-to-end test.
* `wp_clocking_full_tb` runs the top at its default parameters for 300 cycles.

Each testbench prints `TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/wp_timing_pkg.sv tb/wp_clocking_top_tb.sv --top-module wp_clocking_top_tb
    ./obj_dir/Vwp_clocking_top_tb

Replace the testbench name to run another one. Every testbench finishes in
well under a second of run time. They also pass with random initial state
(`+verilator+rand+reset+2`), since the registers are reset with a falling edge
of `rst_n`.
