# IDDQ-testable dynamic PLA

A dynamic PLA (programmable logic array) computes a set of sum-of-products
functions with two precharged NOR planes. Its lines are long and packed
closely together, so bridging defects between neighbouring lines are the
defects most likely to occur. Measuring the quiescent supply current (IDDQ)
finds a bridge cheaply, but only if the two bridged wires can be held at
opposite levels in a steady state. In a conventional dynamic PLA that almost
never happens: every product and sum line precharges high, every evaluation
line evaluates low, and nothing holds a conflict in place.

This design changes the PLA so that one steady test state puts **every pair
of neighbouring lines at complementary levels**:

* a test control `CP_test` pulls every crosspoint gate line low, through
  two-input NOR gates on the primary inputs and on the product lines that
  enter the OR plane, so that no crosspoint transistor conducts;
* with both clock phases held high, every line is driven by its precharge
  device and every evaluation line by its evaluation device at the same time;
* the lines are arranged so that those driven levels alternate across the
  array.

A bridge between any two neighbours then draws a steady current, whatever
function the PLA implements. Two more measurements cover bridges between the
crosspoint gate lines of each plane.

There are two configurations, selected by the `CONFIG` parameter of the top
module `iddq_pla`:

| | `CONFIG = 1` (default) | `CONFIG = 2` |
|---|---|---|
| Odd product/sum lines | precharge high, evaluate low | precharge high, evaluate low |
| Even product/sum lines | precharge **low**, evaluate **high** | precharge high, evaluate low |
| Even lines restored by | non-inverting driver | inverter, as usual |
| Test controls | `CP_test` | `CP_test`, `Br_test`, `OR_test` |
| OR-plane gating signal | `CP_test` | `CP_test ^ (Br_test & OR_test)` |
| Test 3 (OR-plane gate lines) | depends on the function | independent of the function |

In the first configuration, the even lines pull up through NMOS crosspoints.
In silicon this loses a threshold voltage. The second configuration avoids
that loss: it keeps the conventional polarity in normal operation and makes
the alternating levels only in test mode, with `Br_test`.

## How the RTL represents a dynamic circuit

A dynamic PLA is a transistor circuit. Its behaviour depends on charge kept
on floating wires and on which devices are driving at a given moment. The
RTL turns this into synchronous logic as follows:

* Every product line, sum line and evaluation line is a **stored level**.
  The stored levels are re-resolved at every rising edge of a fast clock,
  `clk`, called the *settle clock* below. The two PLA phases `phi1`/`phi2`
  are slow signals derived from it (`pla_phase_gen`).
* At each edge, `pla_dyn_plane` decides per line which devices are on:
  * the precharge device of the output line;
  * the evaluation device of its evaluation line;
  * the `Br_test` drivers;
  * any crosspoint whose gate line is high ("conducting").
* The levels are then resolved as follows:
  * a node that nothing drives keeps its level (charge retention);
  * a driven node drives an undriven node across a conducting crosspoint;
  * two undriven nodes joined by a crosspoint take the output line's level,
    because the output line has the larger capacitance.
* If a conducting crosspoint joins an output line and its evaluation line,
  and both are driven to different levels, that is a supply-to-ground path.
  It is reported per line on `contention` and at the top on `static_path`.
  A fault-free PLA must never show it during an IDDQ measurement. This is
  why `CP_test` exists.
* Every hop (input line → product line → plane latch → OR-plane line →
  output latch) takes one settle edge. Each phase therefore lasts
  `PH_CYC >= 2` settle cycles.

So the model is cycle-accurate to the settle clock, not to the real delays.
It reproduces the logic levels of every line in every phase and test state.
It does **not** model currents, analog voltages or the threshold loss on
even lines in the first configuration.

## Line arrangement

Each output line `k` (numbered from 1) has its own evaluation line. The two
are laid out so that output lines face output lines and evaluation lines face
evaluation lines:

```
AND plane:  E1 P1 | P2 E2 | E3 P3 | P4 E4 ...
OR plane:   R1 S1 | S2 R2 | R3 S3 ...
```

`layout` / `obs_*_layout` give the levels in this order, from bit 0 upwards.
The neighbour pairs are of three kinds:

* line–line pairs, for example P1–P2 (bridge type 1);
* evaluation–evaluation pairs, for example E2–E3 (type 3);
* line–evaluation pairs, for example E1–P1 (type 4).

In test 1:

* the first configuration gives `E=0, P=1` on odd lines and `P=0, E=1` on
  even lines, so the layout reads `0 1 0 1 0 1 ...`;
* the second configuration gets the same pattern because `Br_test` turns off
  the precharge and evaluation devices of even lines, drives even lines low,
  and drives even evaluation lines high.

The AND-plane input lines lie as `x0, ~x0, x1, ~x1, ...`. In test 2, setting
all inputs equal makes neighbouring input lines complementary (bridge
type 2).

## Signal path and timing

```
x ─► pla_input_drv ─► pla_dyn_plane (AND) ─► pla_plane_link ─► pla_dyn_plane (OR) ─► pla_output_drv ─► y
      NOR with CP_test   precharge phi2          latch in phi1        precharge phi1       latch in phi2
                         evaluate  phi1          INV / BUF, NOR       evaluate  phi2       INV / BUF
```

* **`pla_input_drv`**: true line `= NOR(~x, CP_test)`, complement line
  `= NOR(x, CP_test)`.
* **AND plane**: with the NOR-NOR convention, a crosspoint on the complement
  line of input `i` puts literal `x_i` into the product term. A crosspoint on
  the true line puts `~x_i` into it. An odd product line carries the term;
  an even one in the first configuration carries its complement.
* **`pla_plane_link`**: a full transmission-gate latch is open in `phi1`.
  It is followed by an inverter (odd lines) or a non-inverting driver (even
  lines, first configuration), then by a NOR with the gating signal. The
  OR-plane gate line therefore carries the product term itself in normal
  mode and is forced low when gated.
* **OR plane** and **`pla_output_drv`**: an odd sum line is inverted, an even
  one (first configuration) is buffered. Either way the result is the OR of
  the line's product terms. An output latch, open in `phi2`, holds `y` while
  the OR plane precharges.

A PLA cycle is `2*(PH_CYC+GAP_CYC)` settle cycles (6 by default), in this
order: `phi1`, gap, `phi2`, gap. `cyc_start` marks the first settle cycle of
`phi1`. Inputs must be stable through `phi1`. The result is in `y` at the
start of the next PLA cycle and stays there for one whole cycle.

## Test control and the three IDDQ measurements

`pla_test_ctrl` is a two-input state machine, so the PLA needs only two test
pins:

* with `tm_en` low, the PLA runs normally: the phases pass through and all
  test controls are low;
* raising `tm_en` enters test 1;
* each rising edge of `tm_step` moves on: test 1 → 2 → 3 → 1.

The controls applied in each state are `phi1 phi2 CP_test Br_test OR_test`:

| Test | `CONFIG = 1` | `CONFIG = 2` | Bridges excited |
|---|---|---|---|
| 1 | `1 1 1 0 0` | `1 1 1 1 0` | types 1, 3, 4 in both planes, crosspoint leakage; input line to odd product line |
| 2 | `1 0 0 0 0`, inputs all equal | same | type 2 in the AND plane (between input lines) |
| 3 | `1 0 0 0 0`, chosen data | `1 1 1 1 1` | type 2 in the OR plane (between product lines entering it); in `CONFIG = 2` also type 1 between sum lines |

How test 3 works in each configuration:

* **`CONFIG = 1`**: the OR-plane gate lines carry the product terms of
  whatever data is applied. The tester has to find data that makes
  neighbouring terms differ. For the default function, `x = 3'b011` gives
  `P1..P4 = 1 0 1 0`.
* **`CONFIG = 2`**: `Br_test` holds the product lines at `1 0 1 0 ...`, so
  the test no longer depends on the function. `CP_test ^ (Br_test & OR_test)`
  lets them through to the OR plane even though `CP_test` is high.
  `OR_test` switches off every driver of the OR-plane evaluation lines, so
  crosspoints that conduct cannot form a current path. Those floating
  evaluation lines charge to their sum line's level, so in test 3 only
  sum-to-sum and gate-to-gate neighbours are guaranteed to differ.

Tests 2 and 3 hold `phi2` low, so the AND plane would keep whatever an
earlier evaluation left on it. The controller therefore applies `PRE_CYC`
settle cycles of `phi2` alone (an AND-plane precharge) each time it enters
test 2 or test 3; `pre_active` marks that interval. To apply a new data
vector in test 3, set `x` and then step round to test 3 again.

With `CP_FROM_PHASES = 1`, `CP_test` is decoded as `phi1 & phi2`. This works
because every state that needs `CP_test` high also has both phases high.

To use the observation outputs for fault analysis, take a bridge between two
neighbouring wires. It is excited, and an IDDQ measurement would see it, when
its two bits in `obs_and_gate`, `obs_and_layout`, `obs_or_gate` or
`obs_or_layout` differ and `static_path` is low. The wires in a pair are
adjacent positions in the same vector. An input line to product line pair
uses `obs_and_gate` together with `obs_and_layout`.

## Parameters of `iddq_pla`

| Parameter | Default | Meaning |
|---|---|---|
| `CONFIG` | 1 | 1 = first configuration, 2 = second configuration |
| `NI`, `NP`, `NO` | 3, 4, 3 | inputs, product terms, outputs |
| `AND_XP` | see below | `[NP][2*NI]` crosspoints: bit `2i+1` of term `j` = literal `x_i`, bit `2i` = `~x_i` |
| `OR_XP` | see below | `[NO][NP]` crosspoints: bit `j` of output `k` = term `j` is in output `k` |
| `CP_FROM_PHASES` | 0 | decode `CP_test` from the phases |
| `PH_CYC`, `GAP_CYC` | 2, 1 | settle cycles per phase and per gap |

The default function is an example:

* `P1 = x0&x1`, `P2 = ~x0&x2`, `P3 = x1&~x2`, `P4 = ~x1&~x2`;
* `y0 = P1|P2`, `y1 = P2|P3`, `y2 = P1|P4`.

If you change `NI`, `NP` or `NO`, give `AND_XP` and `OR_XP` new values too,
because their defaults are sized for 3×4×3.

## What is the design's own choice

These points follow the source description:

* the line polarities;
* the NOR gating;
* the transmission-gate latch with inverter or non-inverting driver;
* the `Br_test`/`OR_test` behaviour and the XOR gating;
* the phase assignment (phi1 evaluates the AND plane and precharges the OR
  plane; phi2 the reverse);
* the three test conditions.

The following were chosen here:

* the settle-clock node model and its resolution rules;
* the layout order `E1 P1 P2 E2 ...`;
* the order of inverter and NOR after the plane latch;
* the output latch;
* the test-control state machine's inputs and step order;
* the AND-plane precharge before tests 2 and 3;
* synchronous reset;
* the default function.

`Br_test` acts on the even lines and even evaluation lines of **both**
planes. Test 1 of the second configuration needs this to get complementary
neighbours in the AND plane.

The following are not modelled:

* supply currents and analog levels, including the threshold loss on even
  lines of the first configuration;
* bridges of type 5/6 beyond the line levels they imply;
* open and stuck-at defects, which are found by ordinary logic tests.

## Simulating

All modules are in `rtl/`, one per file; `rtl/pla_pkg.sv` must be read first.
The testbenches are in `tb/` (their width warnings are harmless, hence
`-Wno-fatal`). Each is self-checking and prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/pla_pkg.sv tb/iddq_pla_tb.sv \
          --top-module iddq_pla_tb -y rtl -y tb +libext+.sv -o sim
./obj_dir/sim
```

| Testbench | What it checks |
|---|---|
| `iddq_pla_tb` | both configurations side by side. Normal operation is checked against the equations, including the 6-settle-cycle PLA cycle. Tests 1–3 check complementary neighbours and no steady current. It also searches for the best test-3 vector, checks the return to normal mode, and counts every mechanism. |
| `iddq_pla_bridge_tb` | a 4-input, 6-term, 5-output PLA in both configurations. It checks every input vector in normal mode, then counts the neighbouring-wire bridges excited by tests 1–3: all of them in every class, except that test 3 of the first configuration reaches only the pairs the function allows. |
| `iddq_pla_full_tb` | the top with all defaults: every input vector, tests 1–3, back to normal. |
| `pla_dyn_plane_tb` | precharge, evaluation, hold, test-1 patterns, `Br_test`, released evaluation lines, and contention. Checked for both polarities with random crosspoint maps. |
| `pla_plane_link_tb`, `pla_output_drv_tb` | restoring drivers, latching, NOR gating. |
| `pla_input_drv_tb` | exhaustive input/`CP_test` table. |
| `pla_phase_gen_tb` | phase pattern, non-overlap, period. |
| `pla_test_ctrl_tb` | decode for both configurations and for `CP_FROM_PHASES`, stepping, and precharge before tests 2/3. |
