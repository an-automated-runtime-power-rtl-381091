# Runtime power gating driven by clock-gating enables

Clock gating already tells you, cycle by cycle, which logic has nothing to do:
if the flip-flops that feed a combinational cone receive no clock pulse, the
cone's inputs do not change and its result is not needed anew. This design
uses that information to also cut the *power* of such a cone, one clock cycle
at a time. It does not change the circuit's behaviour at the register-transfer
level and adds no wait cycles.

Three pieces make this work:

1. **MT-cells.** The gates of the cone are low-Vt gates with a high-Vt power
   switch and a pull-up pMOS on the output. While asleep their output is
   held at 1, so the next stage never sees a floating input.
2. **Activation.** The power switches are driven by the clock-gating enable,
   registered on the rising edge of the system clock. This signal changes only
   at the start of a cycle, so it never lies on a critical path. It is,
   however, one cycle late.
3. **A capture flip-flop with an additional latch function.** It makes up for
   that lateness. While the cone sleeps, the flip-flop keeps re-delivering the
   last valid result. The first edge after wake-up therefore needs no valid
   input, and the cone gets a whole cycle to power up.

The RTL here shows the scheme on a small example circuit (`pg_top`). A
self-checking testbench shows that the example matches, cycle for cycle, the
same circuit with clock gating only.

## A cycle-by-cycle walk through

The example has three launch flip-flops on the gated clock CLK1 and a cone
that computes node E. A capture flip-flop on the free-running clock CLK
registers E. With inputs 1,0,1 and the enable low for two edges (T2, T3):

| edge | EnCLK before edge | CLK1 pulse | Activation after edge | cone | capture flip-flop takes |
|------|------|------|------|------|------|
| T1 | 1 | yes | 1 | powered, computes E from the new inputs | E from the previous inputs |
| T2 | 0 | no  | 0 | asleep, C and E pulled to 1 | E from T1's inputs (the master latch closes at this edge) |
| T3 | 0 | no  | 0 | asleep | held value (E is ignored) |
| T4 | 1 (rises late) | yes | 1 | wakes in this cycle | held value. The cone is still asleep here; this is the cycle the extra latch buys |
| T5 | 1 | yes | 1 | powered | E from T4's inputs, valid again |

The capture flip-flop's output is the same as in the clock-gated-only circuit
at every edge.

The enable may toggle just before a rising edge. The design never reacts to it
combinationally. Only the conventional latch-based clock-gating cell sees it
in time, as it always did. The power switches follow one cycle later.

## The capture flip-flop (`pg_ff`)

The obvious way to build the capture stage is a latch in front of an ordinary
flip-flop (`latch_ff`). The latch is transparent while Activation is high and
holds while the cone sleeps. That adds a full latch to every capture
flip-flop, about half again its area.

`pg_ff` merges that latch into the flip-flop's master latch. It has two
latches:

| state | EN (Activation) | CLK | master latch | slave latch |
|---|---|---|---|---|
| 1 | H | H | hold    | through |
| 2 | H | L | through | hold    |
| 3 | L | H | hold    | through |
| 4 | L | L | hold    | hold    |

The master's enable is `~clk & en` instead of `~clk`. This is exact, not an
approximation, because Activation changes only just after a rising edge. At
that moment the master has just closed on the value it must keep, so a
separate front latch would have held the same value.

The one rule a user must respect: `en` may change only while `clk` is high.
Driving it from a rising-edge flip-flop, as `pg_cg_cell` does, meets this.

Both capture stages are in `rtl/`. `pg_top` picks one with the parameter
`MERGED_FF`: 1, the default, selects `pg_ff`; 0 selects `latch_ff`.

## Activation and the clock-gating cell (`pg_cg_cell`, `cg_cell`)

`cg_cell` is the usual clock gate. A latch, transparent while the clock is
low, passes the enable, and an AND gate combines the latched enable with the
clock. `pg_cg_cell` adds one rising-edge flip-flop that registers the latched
enable: its output is Activation. As a result, Activation is high exactly in
the cycles that began with a gated-clock pulse. Those are the cycles in which
the cone has new inputs to evaluate.

While reset is asserted, Activation is 1. The cone is then powered, and the
capture flip-flops load real values during reset.

## MT-cells (`mt_cell`)

`mt_cell` is the logic-level view of the cell: `y = f(a, b) | ~activation`.
The parameter `GATE` selects NAND2 (the default), INV or NOR2. The power
switch, the wake-up time and the leakage have no logic-level meaning and are
not modelled. The model is zero-delay. On silicon, the cell must reach a valid
output within the cycle in which Activation rises, and the cell and the switch
must be sized to make that true.

## The example circuit (`pg_top`)

```
in_1..in_3 --> [3 launch flip-flops @ CLK1] --q1,q2,q3-->
   A = ~q2           g1, high-Vt inverter, always powered
   C = ~(q1 & A)     g2, MT NAND2
   D = ~C            g3, MT inverter
   E = ~(D & q3)     g4, MT NAND2
E --> [pg_ff @ CLK, en = Activation] --> q
```

For inputs 1,0,1, both C and E are 0 while the cone is powered and 1 while it
sleeps. This is the disturbance the extra latch has to hide.

Ports of `pg_top`:

| port | dir | meaning |
|---|---|---|
| `clk` | in | system clock |
| `rst_n` | in | asynchronous reset, active low: clears the launch flip-flops and holds Activation at 1 |
| `en_clk` | in | clock-gating enable (EnCLK) for the launch flip-flops |
| `in_1..in_3` | in | data |
| `q` | out | registered E |
| `gclk`, `activation`, `node_c`, `node_e` | out | brought out for observation |

### Applying the scheme to other logic

A gate may become an MT-cell only if every path into it comes from flip-flops
on the gated clock whose enable produces that Activation. A gate whose fan-in
includes an ungated flip-flop must stay an always-on cell. So must anything
else whose output is used in a cycle when the cone is asleep. Only capture
flip-flops of the `pg_ff` kind may read a sleeping cone. High-Vt gates that
are already slow enough can stay as they are, like g1 here. These replacement
rules belong to the netlist flow. This RTL does not automate them.

## What this RTL follows and what it chooses

Taken from the scheme:
- Activation as the clock-gating enable registered on the system clock.
- Launch flip-flops on the gated clock.
- One high-Vt gate and three MT-cells in the example.
- MT-cell outputs pulled high while asleep.
- The latch states of both capture stages.
- The NAND2 MT-cell.

This design's own choices:
- The gate types and wiring of the example cone. The scheme fixes only its
  shape: g1 high-Vt, g2–g4 MT-cells, nodes C and E disturbed in sleep.
- The capture flip-flop runs on the free-running clock.
- The INV and NOR2 MT-cells.
- The latch polarity of the clock gate.
- The reset and its value for Activation.

Not modelled:
- The transistor-level flip-flop. Its extra function costs six transistors
  and adds nothing to the data path.
- Switch sizing, wake-up delay and leakage.
- Power and area numbers. These need a cell library and a real design. This
  repository contains neither.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. Each
has a watchdog. With plain Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/pg_pkg.sv tb/tb_pg_top.sv \
          --top-module tb_pg_top --Mdir obj_tb_pg_top -o sim
./obj_tb_pg_top/sim
```

Replace `tb_pg_top` with any of the testbenches below. `pg_pkg.sv` must come
first. `-Irtl` lets Verilator find the other modules by name.

| testbench | what it checks |
|---|---|
| `tb_pg_top` | **Full design, default parameters.** Compared with a clock-gated-only reference model for 9,000 cycles: first the walk-through above, then random inputs and random enable runs with late toggles. Every edge checks `q`, Activation and the gated clock. In every cycle it also checks E (the real value, or 1 when asleep). It counts and requires: suppressed clock pulses, sleep entries, wake-ups, C and E actually pulled up, edges served from the held value, edges where the enable has returned but the cone is still asleep, and late enable toggles. |
| `tb_pg_top_unmerged` | The same, with `MERGED_FF = 0`. |
| `tb_pg_ff` | `pg_ff` against an edge-level "latch + flip-flop" model and against "d at the last edge with en high". d changes freely, especially while en is low. All four states of the truth table must occur. |
| `tb_latch_ff` | `latch_ff` under the same checks. |
| `tb_pg_cg_cell` | Gated-clock pulses, Activation after each edge and through the cycle, and Activation = 1 in reset. |
| `tb_cg_cell` | Pulses follow the enable before the edge. Changes in the high phase neither chop nor create pulses. |
| `tb_mt_cell` | Exhaustive truth tables of the three gate types, powered and asleep. |

The testbenches draw their random stimulus with `$urandom`, so the traffic is
the same from run to run.

Gated clocks and latches are used on purpose. In a zero-delay simulator, the
design relies on two properties. First, Activation and the launch flip-flops
change only after the rising edge that closes the capture flip-flop's master
latch. Second, testbench inputs change away from the rising edge. Keep both if
you change the stimulus.
