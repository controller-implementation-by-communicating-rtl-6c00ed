# Communicating flow-table controllers: a two-pipeline FIFO and three elementary controllers

A controller can be specified only by the dialogue it must hold with its
environment: which output edge may follow which input edge, written as a
signal transition graph (an interpreted Petri net), with no reference to
time or to internal states. A systematic route from there to hardware is:

1. split the graph into overlapping component graphs, one per output signal
   (or group of outputs), each keeping only the signals that output needs;
2. turn each component graph into a primitive flow table, a state machine in
   which every input change causes a state change;
3. reduce each table and choose a state code by the classical methods.

The controller that results is an assemblage of small sequential circuits.
They run concurrently and talk to each other only through the global
signals. This repository holds synthesizable SystemVerilog for the circuits
built along this route: the controller and data path of a FIFO memory (the
main design), and three elementary controllers used to show the method.

Every circuit here is a **clocked** Moore machine that realises the flow
table. The original circuits are asynchronous. Read the section
"Clocked realisation" before using the RTL for anything timing-related.

## The FIFO

### Structure

```
            +-----+    +-----+    +-----+
 din ---+-->| VD1 |--->| VD2 |--->| VD3 |---> MUX input 1 \
        |   +-----+    +-----+    +-----+                  MUX ---> dout
        +-->| RD1 |--->| RD2 |--->| RD3 |---> MUX input 0 /  ^
            +-----+    +-----+    +-----+                    |
               ^R1        ^R2        ^R3                     RY
   delay:      A1         A2         A3                      AY
```

Items are spread alternately over two register pipelines. A rising edge of
request Ri loads VDi; a falling edge loads RDi. Stage 1 loads from `din` and
stage i from stage i-1 of the same pipeline. The multiplexer shows VD3 when
RY = 1 and RD3 when RY = 0. Toggling RY once per output item therefore gives
the items back in input order. A delay element turns each request (R1, R2,
R3, RY) into its completion signal (A1, A2, A3, AY), so the register is
stable before the completion appears. Each pipeline has `STAGES` registers
(3 by default). The FIFO holds up to `2*STAGES` items.

### Two-phase handshakes

Both channels use transition signalling with bundled data. Every edge of a
request, rising or falling, is one item:

* input: the sender sets `din`, toggles `rin`, and keeps `din` until `ain`
  toggles to match (`ain` means "input data stored");
* output: the FIFO sets `dout` and toggles `rout`; the receiver toggles
  `aout` to match once it has taken the item.

`fifo` asserts that the sender toggles `rin` only when `rin == ain`, and
that the receiver toggles `aout` only when `aout != rout`.

### The controller, circuit by circuit

The controller (`fifo_ctrl`) has one circuit per output signal. The key to
the FIFO is which signals each circuit needs, and why.

| circuit | module    | inputs          | output |
|---------|-----------|-----------------|--------|
| R1      | `r1_ctrl` | RIN, A2         | R1     |
| R2      | `r2_ctrl` | A1, A2, A3      | R2     |
| R3      | `r3_ctrl` | A2, AY          | R3     |
| RY      | `ry_ctrl` | A3, AOUT        | RY     |
| AIN     | wire      | A1              | AIN    |
| ROUT    | wire      | AY              | ROUT   |

**R1.** R1 follows RIN, one edge per item. The VD and RD pipelines are
separate, so a rising edge of R1 overwrites only VD1. It must wait until VD2
has copied the previous VD1 item, shown by a rising edge of A2. Likewise a
falling edge waits for a falling edge of A2. R1 does not need A1: the sender
cannot toggle RIN again before AIN (= A1) has answered. `r1_ctrl` is the
four-row reduced form of R1's eight-row primitive flow table. Inputs are
written RIN A2:

| state | R1 | 00 | 10 | 11 | 01 | meaning |
|-------|----|----|----|----|----|---------|
| P     | 0  | P  | S  | T  | P  | low, free to rise |
| Q     | 0  | Q  | Q  | T  | P  | low, waiting for A2 to rise |
| S     | 1  | Q  | S  | S  | P  | high, free to fall |
| T     | 1  | Q  | S  | T  | T  | high, waiting for A2 to fall |

The primitive rows merge as P = {1,5}, Q = {3,6}, S = {2,4}, T = {7,8}. Its
testbench replays the primitive table, not this one.

**R2 (every middle stage).** An edge of R2 needs three things:

* stage 1 has a new item for that register: an A1 edge of the same direction
  since R2's last edge of that direction;
* R2's own previous edge is complete: A2 = R2;
* stage 3 has taken the item about to be overwritten: an A3 edge of the
  same direction.

A level comparison is not enough here. A1 can make *two* edges, one per
pipeline, while R2 is still held by A3. That is the case the R1 circuit never
meets. `r2_ctrl` therefore keeps four flags: pending and free, for rising
and falling edges. Each is set by the matching input edge and cleared by the
R2 edge that uses it.

**R3 (last stage).** The last stage works strictly in order: R3, A3, RY, AY,
then R3 again. R3 therefore moves when AY = R3 and an A2 edge of the right
direction is pending. Without the A2 run-ahead this would be a Muller
C-element on A2 and not-AY.

**RY.** A Muller C-element on A3 and not-AOUT. RY rises when VD3 is loaded
and the previous (RD) item has been acknowledged. It falls when RD3 is
loaded and the VD item has been acknowledged.

**AIN and ROUT.** The specification gives them no condition beyond copying
A1 and AY, so they are wires.

With `STAGES` other than 3, the first stage uses `r1_ctrl` and the last
uses `r3_ctrl`. Every stage in between uses `r2_ctrl` with its neighbours'
completion signals.

### Timing (clocks, default `TAU = 2`, `STAGES = 3`)

| quantity | value | formula |
|----------|-------|---------|
| `ain` after the clock that samples an `rin` edge | 2 | `TAU` |
| empty FIFO, `rin` edge to `rout` edge | 11 | `(STAGES+1)*(TAU+1) - 1` |
| steady-state output rate (receiver answers at once) | 1 item / 6 clocks | `2*TAU + 2` |
| capacity | 6 items | `2*STAGES` |

Each circuit answers one clock after its inputs allow it. The rate is set
by the loop of the last stage (R3 → A3 → RY → AY → R3). These figures come
from this realisation; the source design gives none.

## The elementary controllers

**ASC_1, counter (`asc1_counter`).** y1 rises after `N` leading edges of x1
and falls after `M` more, then the cycle repeats. State: leading-edge count
modulo `N+M`, plus the last sampled x1. The source design leaves n and m
open; the defaults here are N = 3 and M = 2.

**ASC_2, clock-pulse gate (`asc2_clock_gate`).** y2 copies a pulse of x2 when
x3 = 1 at the rising edge of x2. Otherwise y2 stays 0 for that pulse. A
three-state table (IDLE, PASS, BLOCK) makes changes of x3 during a pulse
harmless.

**ASC_3, controller of a data path (`asc3_ctrl`).** This is a four-state
reduced automaton. Its eight-row primitive table merges as A = {1,5},
B = {2,6,8}, C = {3} and D = {4,7}. Inputs are written x4 x5:

| state | q3q2q1 | y3 | 00 | 10 | 11 | 01 |
|-------|--------|----|----|----|----|----|
| A     | 000    | 0  | A  | A  | B  | B  |
| B     | 001    | 0  | C  | B  | B  | B  |
| C     | 100    | 1  | C  | A  | B  | D  |
| D     | 101    | 1  | D  | B  | B  | D  |

The codes are the source design's, so y3 is the state bit q3. Reset goes to
A, the state of the initial marking. The data path that drives x4 and x5 is
not specified, so these signals are top-level ports.

## Clocked realisation: where this RTL departs from the asynchronous original

* **Each circuit samples its inputs on a clock.** It then takes one step of
  its flow table. An input must hold each level for at least one clock. This
  is the "circuit faster than the input changes" timing convention that the
  original also relies on for successive changes of the same signal. Inputs
  from a truly asynchronous source need synchronisers, which are not
  included.
* **Race-free state codes are not needed and not built.** The original gives
  ASC_3 extra codes (eight in all) so that an unclocked circuit survives two
  inputs changing close together. With a clock, a double change simply
  selects the diagonal table entry, and the four plain codes suffice.
* **Delay elements stand for completion detection.** A1..A3 and AY are the
  requests delayed by `TAU` clocks (`delay_elem`, a shift register). The
  original says a real implementation would detect completion instead. It
  does not give that detector.
* **R2, R3 and RY have no printed flow table in the source.** Their
  behaviour was derived here from the overall specification of the FIFO,
  using the input sets shown for each circuit. Only R1 and ASC_3 follow
  printed tables. All four FIFO circuits are checked against rules stated
  as edge counts, and the FIFO is checked end to end.
* **Reset** (synchronous, active low) puts every circuit in the state of its
  initial marking: all signals 0 and the FIFO empty. The source does not
  specify reset.
* **Widths and delays** (`DATA_W = 8`, `TAU = 2`, `N = 3`, `M = 2`) are
  choices made here. `STAGES = 3` is the source's configuration.
* The FIFO always has two pipelines. The source mentions more pipelines as a
  variation but gives no controller for them.

## Modules

| module | role | parameters |
|--------|------|------------|
| `petri_asc_top` | the four designs side by side, each with its own ports | `DATA_W`, `TAU`, `STAGES`, `N_CNT`, `M_CNT` |
| `fifo` | FIFO: controller, data path, delay elements | `DATA_W`, `TAU`, `STAGES` |
| `fifo_ctrl` | assemblage of the R1, R2, R3 and RY circuits | `STAGES` |
| `r1_ctrl`, `r2_ctrl`, `r3_ctrl`, `ry_ctrl` | the controller circuits | - |
| `fifo_datapath` | VD/RD registers and output MUX | `DATA_W`, `STAGES` |
| `delay_elem` | completion signal as a delayed request | `TAU` (at least 1) |
| `asc1_counter`, `asc2_clock_gate`, `asc3_ctrl` | elementary controllers | `N`, `M` (counter) |

All ports use `clk` and the synchronous active-low `rst_n`.

## Simulation

Each testbench in `tb/` checks its module against a reference written
independently of it. Each ends with a line
`TB_RESULT checks=<n> failures=<n>` and has a watchdog. For example:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv -Irtl \
    --top-module tb_fifo tb/tb_fifo.sv
./obj_dir/Vtb_fifo
```

* `tb_r1_ctrl` and `tb_asc3_ctrl` walk the eight-row primitive flow tables at
  random, double input changes included, and compare output (and for ASC_3
  the state code) every clock.
* `tb_r2_ctrl`, `tb_r3_ctrl` and `tb_ry_ctrl` model the rest of the FIFO
  around one circuit and check each edge against an edge-count rule.
* `tb_fifo_ctrl` checks the ordering and no-overwrite rules of the whole
  controller, using delay lines of unequal lengths.
* `tb_fifo` (with `fifo_check`) runs three configurations: (`STAGES`,
  `TAU`) = (3, 2), (2, 1) and (5, 3). It checks data order, latency,
  capacity and steady-state rate.
* `tb_petri_asc_top` runs all four designs at the default parameters at
  once. It counts that the FIFO fills, that the receiver stalls it, that
  both pipelines and both MUX settings are used, that y1 rises and falls,
  that pulses are passed and blocked, and that all ASC_3 states and double
  input changes occur.
