# Multi-context FPGA with reconfigurable context memory

A multi-context FPGA keeps several configurations ("contexts") on chip and
switches between them in one step by changing a small context ID. The usual
way to do this stores one memory bit per context for every configuration
bit: with four contexts, every routing switch has four memory bits and a
4-to-1 multiplexer driven by the two context-ID bits `{S1,S0}`. Most of
that memory is wasted. Real configurations rarely change between contexts,
and when a switch does depend on the context, its four-bit pattern is often
simply `S1`, `S0` or their inverse.

This design replaces the per-switch context memory with a **reconfigurable
context memory (RCM)**. The RCM is a mesh of small switch elements that does
two jobs:

* it routes signals, like an ordinary FPGA switch block;
* it *decodes* the globally distributed context ID locally, producing a
  context-dependent switch setting only where one is needed, and only as
  large as that pattern requires.

The logic blocks use the same idea. Each look-up table has a fixed amount of
memory (64 bits). Each block chooses for itself whether to spend that memory
on four contexts of a 4-input function, two contexts of a 5-input function,
or one 6-input function.

The RTL is a two-state, cycle-free functional model of this architecture,
written in SystemVerilog. It simulates with plain Verilator. It follows the
structure of the published architecture "Architecture of a Multi-Context
FPGA Using Reconfigurable Context Memory". Where that description leaves
details open, this implementation makes its own choices, listed in
[Departures and own choices](#departures-and-own-choices).

## Context ID and configuration patterns

There are four contexts. Context *n* is active when `{S1,S0} == n`. For one
switch, the setting over the four contexts is a 4-bit pattern
`(C3,C2,C1,C0)`, and all 16 patterns fall into three classes:

| class | patterns | cost in the RCM |
|---|---|---|
| independent of the context | `0000`, `1111` | one SE set to a constant |
| one ID bit | `1100` = S1, `0011` = ¬S1, `1010` = S0, `0101` = ¬S0 | one SE whose variable input follows S1 or S0 (inverted by the cell's input controller if needed) |
| both ID bits | the other 10 | several SEs forming a pass-gate multiplexer, e.g. `1000` = S1 ? S0 : 0 |

The third class is rare in practice, because few configuration bits change
between contexts. So most switches cost one SE instead of four memory bits
and a multiplexer.

## Switch element (`switch_element`, `fepg_se`)

A switch element (SE) is a pass-gate whose gate signal `G` comes from a
2-to-1 multiplexer controlled by two memory bits:

| D1 | D0 | G |
|---|---|---|
| 0 | 0 | 0 (always open) |
| 0 | 1 | 1 (always closed) |
| 1 | x | U (follows a track signal) |

`U` is the variable input. It is wired to a track that carries a
context-ID bit, a decoded pattern, or any routed signal.

`fepg_se` is a drop-in alternative built as a ferroelectric functional
pass-gate. One of its two bits lives in a non-volatile ferroelectric
device. It has the same three uses with a different encoding: `d1 == d0`
passes U, `01` gives 0 and `10` gives 1. Only its logic function is
modelled. The ferroelectric write path is not.

## The RCM mesh (`rcm`)

An RCM of `ROWS x COLS` cells has `ROWS+1` horizontal and `COLS+1` vertical
tracks. Crossing `(r,c)` has two nodes: `h(r,c)` on the horizontal track and
`v(r,c)` on the vertical track.

* **P**, the programmable switch at each crossing, joins `h(r,c)` and
  `v(r,c)`. It has one memory bit.
* **SE** on every track segment: `hse(r,c)` joins `h(r,c)`–`h(r,c+1)`, and
  `vse(r,c)` joins `v(r,c)`–`v(r+1,c)`.
* **C**, the input controller of cell `(r,c)`, reads `h(r,c)`. It passes
  the value, or its inverse if its memory bit is set, to the U input of the
  cell's bottom SE `hse(r+1,c)` and of its right SE `vse(r,c+1)`. SEs on
  the top row and the left column have no controller. Their U reads 0, so
  they can only be fixed on or off.

`rcm` itself is combinational. It turns the memory bits and the present
track values into the on/off state of every pass-gate. It does not join
the tracks: that is the job of the net model below.

Example from `tb/tb_rcm.sv`, the multiplexer `G = S1 ? A : B` in a 2 x 3
block. With S1 on `h(0,0)` and S0 on `h(1,0)`:
`C(0,0)` (no inversion) gates `vse(0,1)` with S1, which passes A.
`hse(0,0)` is fixed on, so S1 also reaches `h(0,1)`, where `C(0,1)`
(inverting) gates `vse(0,2)` with ¬S1, which passes B.
`vse(1,1)`, `vse(1,2)`, `P(2,1)`, `P(2,2)` and `hse(2,1)` join the two
branches at `v(2,1)`. With A and B set to 0, 1, S0 or ¬S0, this one
structure gives all 16 patterns.

## Modelling pass-gates in two states (`pass_net`)

Pass-gates conduct in both directions, and a two-state simulator has no
signal strengths. So the fabric is modelled as a graph. Nodes are track
segments. Edges are pass-gates, whose enable is the SE or P state, and
fixed wires. `pass_net` gives each node the value driven anywhere in its
connected component:

* `val` is 1 when a 1-driver reaches the node;
* `driven` is 1 when any driver reaches it;
* `conflict` is 1 when both a 0-driver and a 1-driver reach it.

A floating node reads 0. The component is found by `ITER` relaxation
sweeps over the edge list, alternating forward and backward order.
`converged` reports that the last sweep changed nothing. With `ITER = N`
the result is always exact.

Gate signals come from the same tracks the gates connect (the decoded
context bits), and logic-block outputs feed tracks again. So `mc_fpga`
evaluates the fabric in `LEVELS` rounds. Each round works from the node
values of the round before:

1. compute every SE, P and diamond-switch state, and every LB output;
2. resolve the network again with `SWEEPS` sweeps.

Round 0 starts from all-zero tracks. The output `settled` is 1 when the
last two rounds agree and the last resolution converged. It means the model
has reached the state the real network settles to. **Check `settled`**
whenever you write a new configuration. If it is 0, the configuration has
a longer chain than the model covers: raise `LEVELS` for more
decode-then-route or LB-to-LB stages, or `SWEEPS` for longer routes.
`LEVELS` and `SWEEPS` describe the model, not the hardware.

## Diamond switch and double-length lines (`diamond_switch`)

Signals that pass through many SEs in series are slow. Critical
connections therefore use double-length lines between diamond switches.
A diamond switch joins four line ends (N, E, S, W) through six SEs:

| SE | U1 | U2 | U3 | U4 | U5 | U6 |
|---|---|---|---|---|---|---|
| joins | N-W | N-E | E-S | S-W | W-E | N-S |

So any end can reach the other three. The U inputs come from the tile's
RCM, so a diamond connection can also depend on the context. A
double-length line runs from a diamond to the diamond two tiles away and
skips the one in between.

## Adaptive logic block (`mcmg_lut`, `size_controller`, `adaptive_lb`)

`mcmg_lut` holds 64 memory bits in 16 groups of 4. Two plane-select lines
pick one bit in each group. The 16 group outputs then feed a 16-to-1
multiplexer driven by the four computation inputs. The memory bit index is
`{data[3:0], sel1, sel0}`, and configuration plane *k* is bit *k* of every
group.

Each plane-select line has a `size_controller`: a memory bit chooses
between the context-ID bit and a computation input. In `adaptive_lb`:

| `sc` | `sel1`, `sel0` | shape |
|---|---|---|
| `11` | S1, S0 | 4-input LUT (`x[3:0]`), four planes |
| `01` | `x[5]`, S0 | 5-input LUT, two planes picked by S0 |
| `10` | S1, `x[4]` | 5-input LUT, two planes picked by S1 |
| `00` | `x[5]`, `x[4]` | 6-input LUT, one plane |

Because the choice is made per block, logic shared between contexts is
stored only once. For example, a function that is the same in two contexts
goes into a single-plane block. The testbench `tb_adaptive_lb` maps such a
two-context data-flow graph: the first block has two planes selected by S0,
and the second block has one plane shared by both contexts.

## The fabric (`mc_fpga`)

`mc_fpga` is a `TR x TC` array of tiles (default 2 x 3). Each tile has an
RCM of `ROWS x COLS` cells (default 2 x 3), an adaptive logic block and a
diamond switch. The parameter `FEPG` builds every SE from `fepg_se`
instead of `switch_element`. The SE configuration bits must then use the
FePG encoding.

Tile wiring:

* **Context ID.** S1 is driven onto `h(0,0)` and S0 onto `h(1,0)` of every
  RCM: they are global wires, decoded locally. Switching context changes
  only `ctx`; no memory bit is rewritten.
* **Logic block.** The LB inputs `x[k]` read the vertical nodes in
  row-major order from `v(0,0)`. With `COLS = 3` these are `v(0,0..3)`,
  `v(1,0)` and `v(1,1)`. The LB output drives `v(1,COLS)`.
* **Diamond switch.** End N is wired to `v(ROWS,COLS)` and end W to
  `h(ROWS,COLS)`. U1..U6 read `h(ROWS,COLS-1)`, `h(ROWS,COLS-2)` and so on
  backwards in row-major order.
* **Neighbouring tiles.** `h(r,COLS)` is wired to `h(r,0)` of the east
  neighbour for `r >= 2`; rows 0 and 1 carry the context ID.
  `v(ROWS,c)` is wired to `v(0,c)` of the south neighbour.
* **Double-length lines.** Diamond E of tile `(i,j)` connects to W of
  `(i,j+2)`, and S of `(i,j)` connects to N of `(i+2,j)`.

Pins are every track end at the array edge, plus the diamond ends that have
no partner. They are numbered in this order:

1. west `h(r,0)`, `r = 2..ROWS`, down the tile rows;
2. east `h(r,COLS)`, `r = 0..ROWS`;
3. north `v(0,c)`;
4. south `v(ROWS,c)`;
5. the unpaired diamond E ends;
6. the unpaired diamond S ends.

With the defaults there are 42 pins. A pin drives `pin_in` while `pin_oe`
is 1. `pin_out` and `pin_driven` read the resolved node.

All configuration memory appears as parallel input ports, as packed arrays
indexed `[tile row][tile column][...]`. The ports are `p_mem`, `hse_cfg`,
`vse_cfg`, `c_inv`, `dia_cfg`, `lut_bits` and `lut_sc`. Shared types
(`se_cfg_t`, `ctx_id_t`, the diamond end names) are in `rcm_pkg`.

## Simulating

Each testbench checks its own results and prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl \
    rtl/rcm_pkg.sv tb/tb_mc_fpga.sv --top-module tb_mc_fpga
./obj_dir/Vtb_mc_fpga
```

Replace `tb_mc_fpga` with any other testbench name to run it.

| testbench | what it shows |
|---|---|
| `tb_switch_element`, `tb_fepg_se`, `tb_input_controller`, `tb_size_controller` | exhaustive truth tables; one SE generating the constant and single-bit patterns |
| `tb_mcmg_lut` | a different function in each plane; bit addressing with random contents |
| `tb_adaptive_lb` | all three LUT shapes; two-context mapping with a shared node |
| `tb_pass_net` | random networks against a reference component search |
| `tb_diamond_switch` | each SE's three uses; end-to-end reachability |
| `tb_rcm` | pass-gate states against a reference; all 16 context patterns decoded in the mesh |
| `tb_mc_fpga` | the full default fabric: a four-plane LUT through a diamond switch and a double-length line; a chained LB read as 6-input and then as 5-input; a decoded multiplexer route; a 6-input LB whose plane select is S0 routed through one P switch (the RCM acting as size controller); all four contexts; conflict detection |
| `tb_mc_fpga_fepg` | the same scenario with `FEPG = 1` |

The whole default fabric simulates in well under a second.

## Departures and own choices

Taken from the architecture description:

* the four contexts and their ID encoding;
* the SE truth table and the FePG truth table;
* the roles of P, SE and C in the mesh;
* the six-SE diamond and its U1..U6 positions;
* the 64-bit LUT of 16 groups with a 16-to-1 output multiplexer;
* the size controller as a 2-to-1 multiplexer between S0 and a data input;
* the three LUT shapes.

This implementation's own choices:

* **Input controller.** Only its function ("can invert its input") is
  given, so it is a programmable inverter. Which SEs it feeds (the cell's
  bottom and right SEs) and which track it reads are readings of the
  drawings.
* **Context-ID inversion.** The SE is a plain multiplexer, as described.
  Any inversion of a context-ID bit comes from the input controller.
* **Tile wiring.** How LB pins, diamond ends and diamond U inputs attach
  to the RCM is not specified; the wiring above is one consistent choice.
  The same holds for the array and RCM sizes, which follow the drawings.
* **Size controller.** The architecture suggests forming it from RCM
  elements. Here each LB also has the dedicated multiplexer drawn for it.
  The RCM-formed version still works: set `sc = 00` and route S0 to
  `x[4]` through the RCM, as `tb_mc_fpga` does.
* **One LUT output.** The evaluation mentions 6-input *2-output* LUTs, but
  the second output is not described. These LUTs have one output.
* **Combinational logic block.** The LB has no flip-flop.
* **Configuration loading.** How the memory bits are written is not
  described, so they are plain input ports.
* **Not modelled.** Delay is not modelled: double-length lines are
  functionally plain wires. The area advantages claimed for the
  architecture (about 45% of a conventional multi-context FPGA with CMOS
  SEs, 37% with FePGs) are properties of a layout and are not reproduced
  here.
