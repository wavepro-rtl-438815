# Wave-pipelined dot-product unit

A conventional pipeline cuts a long combinational path into stages with
registers between them. Each stage costs flip-flops, clock power and a
clock-to-q plus setup overhead. A **wave pipeline** cuts nothing. The
combinational circuit stays whole, but its paths are made so nearly equal
in delay that a result reaches the outputs in a narrow time window. A new
input can then be launched as soon as the previous window has passed, long
before the previous result has crossed the whole circuit. Several
operations are in flight at once, each one a "wave" moving through the same
gates. Throughput depends on the **skew** (longest minus shortest path),
not on the longest path.

This repository holds the RTL of such a unit: a dot-product engine that takes
two 64-bit vectors of eight 8-bit integers and returns
`sum(a[i] * b[i])`, one result per launch-clock period. It has no pipeline
registers: only launch registers at the inputs and capture registers at the
outputs. The published target for this design is a 0.67 ns wave period
(1.49 G dot products per second) in 65 nm CMOS. That is the throughput of
an 8-stage clocked pipeline, at about one third of its energy per
operation and without its roughly 900 flip-flops.

## Structure

```
                +------------+   +---------+   +-------------+   +-------------+
 in_valid,a,b ->| launch_reg |-->| dp_unit |-->| wave_window |-->| capture_reg |--> out_valid, dp_out
                +------------+   +---------+   | (path delay |   +-------------+
                      ^          (valid flag   |  model)     |          ^
                      |           alongside)   +-------------+          |
 launch_clk ----------+                                                 |
      |                                                                 |
      +--> strobe_carrier (balanced with the logic) --> strobe_fine_tune -+--> strobe_clk
                                                        (delay taps, invert)
```

| Module             | Role                                                        | Kind |
|--------------------|-------------------------------------------------------------|------|
| `wavepro_pkg`      | sizes, timing constants, `operands_t` / `result_t` structs  | package |
| `wavepro_dp_top`   | the unit                                                    | synthesizable wiring |
| `launch_reg`       | samples `{valid, a, b}` on every rising `launch_clk` edge   | synthesizable |
| `dp_unit`          | 8-lane signed dot product, 19-bit result                    | synthesizable |
| `wave_window`      | delay window of the balanced logic, applied to `dp_unit`'s result | timing model |
| `strobe_carrier`   | the launch clock delayed as if it ran through the logic     | timing model |
| `delay_cell`       | one 100 ps library delay buffer                             | timing model |
| `strobe_fine_tune` | delay line of `delay_cell`s, tap multiplexer, XOR inversion | synthesizable mux/XOR around modelled cells |
| `capture_reg`      | samples `{valid, dp}` on every rising `strobe_clk` edge     | synthesizable |

## The self-timed strobe

This is the part of the design that needs the most care.

A wave-pipelined result must be sampled inside its valid window. The
window runs from when the slowest path has settled to when the *next*
wave's fastest path starts to disturb the outputs. With launch period `T`,
fastest path `Dmin` and slowest path `Dmax`, a launch at time 0 can be
sampled at any `S` where

```
    Dmax (+ setup)  <  S  <  T + Dmin (- hold)
```

This window exists only if `T > Dmax - Dmin`: the period must exceed the
skew.

Counting out a fixed number of launch-clock cycles before sampling would
break as soon as voltage, temperature or local variation moved the logic
delay. This design does not count cycles. It sends the launch clock itself
down a **strobe carrier**, a path of buffers balanced together with the
logic, so that every clock edge arrives at the capture registers as the wave
it launched settles. When the logic slows down, the carrier slows down with
it. The carrier's edge then passes through a **fine-tune stage** before it
clocks the capture registers:

* `del_sel` adds `del_sel x 100 ps` through a chain of delay cells. This
  covers the capture registers' setup time and lets the sampling point be
  moved to the middle of the window after fabrication. A hold-time problem,
  which is fatal in an ordinary synchronous design, is repaired here by
  moving the strobe.
* `del_inv` inverts the strobe, so the capture registers sample on the
  carried *falling* edge, half a launch period later.

Because `strobe_clk` is a delayed copy of `launch_clk`, there is exactly one
rising strobe edge per launch, in launch order. Result `k` appears on
`dp_out` just after the `k`-th strobe edge following reset, at
`t_launch + 3.0 ns + del_sel x 0.1 ns (+ T/2 if del_inv)`. There is no
handshake. The consumer takes `dp_out`/`out_valid` in the `strobe_clk`
domain. No crossing back to `launch_clk` is provided.

`del_sel` and `del_inv` are static settings. Changing them while strobes
are running can create a spurious strobe edge. Stop `launch_clk`, wait for
the carrier to empty (more than 4.5 ns), and only then change them.

### Default timing and the resulting operating region

| Constant (`wavepro_pkg`) | Value | Meaning |
|---|---|---|
| `WAVE_DMIN_PS`  | 2350 | earliest output change after a launch |
| `WAVE_DMAX_PS`  | 2950 | outputs settled after a launch |
| `CARRIER_PS`    | 3000 | strobe carrier delay |
| `DEL_STEP_PS`, `DEL_TAPS` | 100, 16 | fine-tune step and number of settings (3.0-4.5 ns) |
| `WAVE_PERIOD_PS`| 670  | target launch period (1.49 GHz), used by the testbenches |

These numbers are fitted to the published pass/fail sweep of the real
circuit. In that sweep, strobe delays below 3.0 ns never pass, the
narrowest passing period is 0.7 ns, and the passing band rises along a
diagonal as the period grows. The fit follows the sweep's outline. It is
not a cell-for-cell reproduction, because the measured boundary is not an
exact straight line. With these defaults:

* at `del_sel = 0` the strobe lands at 3.00 ns, inside `(2.95, T + 2.35)` for
  any `T > 0.65 ns`, which includes the 0.67 ns target;
* each `del_sel` step of 0.1 ns needs 0.1 ns more period;
* `del_inv` needs `T/2 + 3.0 < T + 2.35`, i.e. `T > 1.3 ns`.

`tb_shmoo` prints the full period x strobe-delay pass map of the RTL.

## What is synthesizable and what is a model

An RTL simulator gives combinational logic zero delay, and wave pipelining
is entirely about delay. So the design is split in two:

* **Synthesizable:** `launch_reg`, `capture_reg`, `dp_unit`, the tap
  multiplexer and inversion in `strobe_fine_tune`, and the top-level wiring.
  These files describe real logic.
* **Timing models**, not for synthesis: `wave_window` (on `dp_unit`'s
  output), `strobe_carrier` and `delay_cell`. They exist so that the RTL can show
  waves in flight, the sampling window and what happens outside it.
  - `wave_window`: each launch, after `DMIN_PS`, drives the output to a
    visibly wrong value: the bit-inverted result and valid flag. After
    `DMAX_PS` the output holds the correct result. Both updates are transport delays, so several launches are
    pending at once. If a later wave arrives before an earlier one has
    settled, the two collide and the earlier wave never shows its result.
  - `strobe_carrier`, `delay_cell`: pure transport delays on one bit.

  A synthesis tool drops these models, so a synthesized top leaves
  `wave_window` and the carrier unconnected. For implementation, replace them
  with wires, so that `dp_unit` feeds `capture_reg` and `launch_clk` feeds
  `strobe_fine_tune`. The balancing flow described below then builds the
  delays into the netlist.

In silicon, the balanced logic and the carrier are produced by a
skew-balancing netlist flow, not by RTL. The flow works on the synthesized
gate netlist and a timing report. For every gate, it computes how much
earlier each input arrives than the latest one. It then inserts a fraction
(about 10 %) of that gap as delay on the early input. It repeats this with
fresh timing analysis until the output skew stops improving. It also splits
shared fanout nets with buffers, so that delaying one branch does not
disturb another. Clock skew at the capture registers counts as one more
delay on the path to the outputs. The delay comes from buffers, gate sizing,
extra wire or dummy load, or always-on pass gates. That flow and its
cells are outside this RTL. `delay_cell` stands for its buffers.

For static timing sign-off the launch period is chosen as an exact divisor
of the delay through the wave logic. The path from launch to capture
registers is declared a multi-cycle path for both setup and hold. Because
the strobe is self-timed, each corner is verified as a clock-to-data skew
check rather than as absolute minimum and maximum delays.

## Design choices beyond the original description

* Lanes are **signed** 8-bit integers (parameter `SIGNED` of `dp_unit`; 0
  gives unsigned). Lane `i` is `a[8i+7:8i]`.
* The result is 19 bits, enough for any sum of eight 8x8 products.
* A `valid` bit travels with every wave, so idle launch edges (bubbles) are
  marked at the output.
* One asynchronous active-low reset, `rst_n`, clears both register banks. It
  is not synchronised to the strobe, which is a delayed copy of the launch
  clock.
* The fine-tune delay is a tapped chain of 100 ps cells. Its step and range
  are chosen to match the published strobe-delay sweep.
* The optional launch-clock **pulse-width control** shown in the original
  drawing is not included. It is named but not specified. `launch_clk`
  enters unchanged.
* The clock source that drives `launch_clk` is external.

## Simulating

Every file begins with a comment on what it does and how its timing works.
Testbenches are self-checking. Each prints
`TB_RESULT checks=N failures=M` and stops, and has a watchdog. With
Verilator 5, run from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -y rtl -y tb +libext+.sv \
    rtl/wavepro_pkg.sv tb/tb_wavepro_dp_top.sv --top-module tb_wavepro_dp_top -o sim
./obj_dir/sim
```

`--timing` is required: the timing models use delays and `fork`/`join_none`.
Verilator simulates two-state logic, and everything that is read is reset or
initialised.

| Testbench | What it shows |
|---|---|
| `tb_wavepro_dp_top` | The whole unit at default parameters. 3000 operations at 0.67 ns with 15 % bubbles and up to 5 waves in flight. Then later sampling through `del_sel = 5` at 1.3 ns, and the inverted strobe at 1.4 ns. Every result is checked for value, valid flag, order and exact capture time. Each mechanism (overlapping waves, bubbles, delay taps, inversion) must occur. |
| `tb_shmoo` | Sweeps periods 0.4-1.9 ns against strobe delays 2.6-4.5 ns (carrier shortened to 2.6 ns, 20 taps). Checks every point against the window rule and prints the pass map. |
| `tb_corners` | Scales all logic delays by 0.90-1.13. With the carrier scaled alongside, the unit passes at every corner once the period exceeds the scaled skew (0.60-0.74 ns). A strobe fixed at 3.0 ns fails at every period from 1.05 up, and at 0.90 it needs 0.9 ns. Helper: `corner_harness`. |
| `tb_dp_unit` | Corner and 3000 random vectors, signed and unsigned, against an integer reference. |
| `tb_wave_window` | Output before, inside and after the window. Back-to-back launches. Collisions of launches 300 ps apart. |
| `tb_strobe_carrier`, `tb_delay_cell` | Every edge delayed by exactly 3000 ps / 100 ps, with many edges in flight. |
| `tb_strobe_fine_tune` | All 16 taps x both inversion settings: edge time and polarity. |
| `tb_launch_reg`, `tb_capture_reg` | Load on the rising edge, hold between edges, asynchronous reset. |

## Changing the design

* Vector shape: `LANES` and `ELEM_W` in `wavepro_pkg`. `RESULT_W` and the
  struct widths follow.
* Timing model: `WAVE_DMIN_PS` / `WAVE_DMAX_PS` set the window. A corner with
  more variation is approximated by widening it, which raises the minimum
  period. `CARRIER_PS` should stay just above `WAVE_DMAX_PS`.
* Fine-tune range: `DEL_TAPS` and `DEL_STEP_PS`. `del_sel` is
  `clog2(DEL_TAPS)` bits wide at the top.

## Limits

* The delay window is one pair of numbers for the whole circuit. Uniform
  corner scaling can be simulated (`tb_corners`). The published results also
  study random per-gate delay derating: at 10 % derating, the minimum period
  grows by about 25 %. That per-gate experiment cannot be reproduced with
  this model.
* Energy, area and the comparison against clocked pipelines (8 and 11
  stages) are properties of the placed 65 nm netlist and are not modelled.
