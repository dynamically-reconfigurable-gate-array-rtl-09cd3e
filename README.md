# Multi-context FPGA with a Reconfigurable Context Memory switch block

A multi-context FPGA keeps several configurations ("contexts") on chip and
switches between them in one clock, so one piece of silicon can act as
different circuits in turn. The usual price is memory: every configuration
bit is stored once per context, and the switch blocks hold most of these bits.

This design cuts that memory by using a fact about real configurations:
across contexts, most crosspoint bits either never change, or change in step
with one bit of the context number. Such a bit does not need one memory cell
per context. A small decoder can compute it from the context ID. The switch
block here, the **Reconfigurable Context Memory (RCM)**, is built from
**switch elements (SEs)**. Each SE has only two memory bits and one
multiplexer, and it regenerates a crosspoint's per-context pattern from the
context ID.

The RTL is a complete, synthesizable 3x3 array with 8 contexts. Each cell has
a multi-context 4-input LUT and an RCM. The array has single- and
double-length routing and is loaded through a scan chain.

## How one switch element makes a per-context bit

The context ID is `S[CTX_BITS-1:0]` (3 bits, 8 contexts). An SE (`mc_se`)
holds two bits, D1 and D0, and has one variable input U:

```
G = D1 ? U : D0          G is the crosspoint's on/off bit in the current context
```

The table below shows which patterns over contexts 7..0 one SE can make, and
how. One SE therefore replaces 8 memory bits for every pattern except the
complex ones.

| pattern of G over contexts 7..0 | class | setting |
|---|---|---|
| `00000000` / `11111111` | constant | D1=0, D0=0/1 |
| `10101010` (= S0), `11001100` (= S1), `11110000` (= S2) | single bit | D1=1, U = S[b] |
| `01010101`, `00110011`, `00001111` | single bit, inverted | D1=1, U = ~S[b] |
| anything else, e.g. `00000001` | complex | D1=1, U = output of a complex-pattern generator |

U comes from one of the RCM's **decoder lines**, chosen by a static 3-bit
field `usel` in the crosspoint's configuration (`xp_cfg_t`):

* lines 0..5 come from **input controllers** `C` (`mc_input_ctrl`). These
  are programmable inverters. Line j carries `S[j % 3]`, inverted when
  `c_inv[j]` is set. The usual setting is lines 0..2 = S0..S2 and
  lines 3..5 = ~S0..~S2.
* lines 6..7 come from the two **complex-pattern generators**.
* unused codes read 0.

### Complex patterns: a tree of switch elements

A pattern that depends on several context bits is built from several SEs
(`mc_cplx_gen`). The SEs form a binary tree:

* **Leaves.** There are 4 leaf SEs. Each one's U input is S0 through its own
  input controller, so a leaf gives 0, 1, S0 or ~S0. Leaf `l` covers
  contexts `2l` and `2l+1`.
* **Inner nodes.** There are 3 inner nodes, each made of two SEs. Here the
  SE's **passgate** does the work. One SE follows `S[b]` and its passgate
  passes the node's "1" child. The other follows `~S[b]` and passes the "0"
  child. Both passgates drive the node's output. The root uses S2, the next
  level S1.

To program any 8-entry truth table: set every inner SE to D1=1, then set each
leaf from its two entries. `tb_mc_util_pkg::cplx_from_pattern` does this. One
generator costs 24 bits: 4 x 3 in the leaves and 3 x 4 in the inner nodes. It
can feed any number of crosspoints that share the pattern. An inner SE set to
a constant blocks or forces its branch.

## The RCM switch block

`mc_rcm` is a full crossbar. Its inputs (vertical tracks) and outputs
(horizontal tracks) are indexed as follows:

| vertical tracks (13, `vin`) | index |
|---|---|
| single-length from side s (N,E,S,W = 0..3), track t | `s*2 + t` (0..7) |
| double-length from side s | `8 + s` |
| own logic block output | `12` |

| horizontal tracks (16, `hout`) | index |
|---|---|
| logic block input k | `k` (0..3) |
| single-length to side s, track t | `4 + s*2 + t` |
| double-length to side s | `12 + s` |

Each of the 16 x 13 crosspoints has its own SE, which acts as the decoder for
that crosspoint. The **programmable switches P** (`mc_pswitch_row`) along a
horizontal track are passgates. Each one joins a vertical track to the
horizontal track when its SE says so.

Signals have two states in this model. A closed switch passes its track, the
switches on one track combine by OR, and a track with no closed switch reads
0. The row also reports `conflict` when two switches on one track are closed
in the current context. A correct configuration never does this, and the top
level brings the flag out.

Everything in the RCM is combinational. A new context ID reaches every
crosspoint through at most one input controller, the tree and one SE.

## Cells, tracks and the array

`mc_cell` joins one RCM to one logic block (`mc_lb`):

* The logic block's 4 inputs come from RCM outputs 0..3.
* Its output is RCM input 12.
* The logic block is a 4-input LUT with one 16-bit truth table per context.
* The output is either the LUT itself or a flip-flop behind it, set by
  `ff_sel`. The flip-flop clears on reset.

`mc_fpga` tiles cells in an NX x NY = 3 x 3 grid. Cell (x, y) has index
`y*3 + x`, and y grows to the north.

* **Single-length tracks.** Two per side. A cell's east output track t is
  its east neighbour's west input track t, and the same holds on the other
  sides.
* **Double-length tracks.** One per side. They skip the neighbour and arrive
  at the cell two steps away, for example from (0,1) east to (2,1) west. This
  gives a faster path across the array.
* **Edges.** A track whose source would be outside the array is read from
  `s_ext_in` / `d_ext_in` at the same `[x][y][side][track]` position. Those
  inputs are ignored anywhere else.
* **Outputs.** Every cell's outgoing tracks appear on `s_out_all` /
  `d_out_all`, so the tracks that leave at the edge serve as the array's
  outputs.

A routing fabric has combinational paths through cells and back, so lint
reports circular logic in `mc_cell`. The loops are in the structure only. A
configuration that really closes one in a context is wrong, just as on any
FPGA.

## Contexts and timing

`ctx_id` is registered on every clock (`ctx_cur`), and all cells use the
registered value. A context switch therefore takes effect one clock after
`ctx_id` changes, and the new context can change on every clock. Within a
clock, the logic and routing of the current context are combinational from
`ctx_cur` and the track inputs.

A logic block flip-flop captures its LUT output at the same edge that loads
the new context. What it captures was computed in the **old** context. A
value registered in context k is therefore read by the routing of context
k+1. This is how a time-multiplexed circuit passes data from one context to
the next, and `tb_mc_fpga` checks it.

## Loading the configuration

Each cell has a `CELL_CFG_W` = 1223-bit configuration register
(`mc_cfg_chain`, type `cell_cfg_t`):

| part | bits |
|---|---|
| LUTs: 8 contexts x 16 | 128 |
| `ff_sel` | 1 |
| input controllers | 6 |
| 2 complex generators x 24 | 48 |
| 208 crosspoints x (D1, D0, usel) | 1040 |

The nine registers form one chain. `cfg_si` enters cell 8 and `cfg_so`
leaves cell 0. To load, build `cell_cfg_t [0:8] img`, in which element 0 is
the most significant, and shift its 11 007 bits in MSB first with
`cfg_shift` high. Configuration is not cleared by reset.

## What the memory saving costs

For one RCM, the configuration is 1094 bits. A crossbar of the same size
with one bit per context per crosspoint would need 8 x 208 = 1664 bits. That
figure comes before adding the decoders such a crossbar would need to pick a
bit by context.

The saving only holds when the complex patterns fit into the RCM's **two**
generators. `tb_mc_change_rate` measures this with random routings in which
a given share of the crosspoint bits flips at every context switch:

| share of bits changing per switch | distinct complex patterns needed per RCM (avg / max) | routings that fit whole |
|---|---|---|
| 3 % | 18 / 21 | 0 of 30 |
| 5 % | 23 / 27 | 0 of 30 |

The reason is that a route which changes in an arbitrary context gives its
crosspoints irregular patterns. Regular patterns appear when the mapping
changes routes along context-bit boundaries, for example by grouping
contexts that share sub-circuits into aligned pairs or quadruples. Whatever
places the design has to do that grouping. The generator pool size is the
single parameter `N_CPLX` in `mc_pkg`. `usel`, the configuration types and
`CELL_CFG_W` follow it automatically, at 24 bits per generator plus a wider
`usel`.

## Where this RTL goes beyond, or departs from, the architecture it implements

These parts follow the architecture:

* the SE (mux, D1/D0, passgate)
* its use both as decoder and as passgate
* the constant and single-context-bit patterns
* complex patterns made from several SEs
* inverting input controllers
* programmable switches joining vertical and horizontal tracks
* cells made of a logic block and a switch block
* double-length lines
* the 3 x 3 array
* 8 contexts

These choices are this design's own:

* **Crossbar.** It is fully populated, with one SE per crosspoint. The U
  connection is a static `usel` field. The input controllers sit on the
  context-ID lines.
* **Complex-pattern generators.** They form a shared pool of two per RCM,
  arranged as binary trees.
* **Logic block.** A 4-input LUT with an optional flip-flop, 2 single and 1
  double track per side, and a full logic-block connection.
* **Loading and reset.** A scan chain loads the configuration. The context
  register is updated every clock. Reset is synchronous and active-low, and
  clears the context register and the LB flip-flops.
* **Two-state wiring.**
  * Pass-transistor switches are modelled as directional wires.
  * An open passgate drives 0, and the closed passgates on a net are ORed.
  * Real bidirectional tracks and weak undriven nodes are not modelled.

Nothing here is tied to a process. The clock and context-switching speeds of
a custom 0.18 um implementation depend on circuit design and layout, and the
RTL does not reproduce them.

## Files

| file | contents |
|---|---|
| `rtl/mc_pkg.sv` | constants, index map, configuration structs |
| `rtl/mc_se.sv` | switch element |
| `rtl/mc_input_ctrl.sv` | input controller (programmable inverter) |
| `rtl/mc_cplx_gen.sv` | complex-pattern generator (tree of SEs) |
| `rtl/mc_pswitch_row.sv` | programmable switches P on one horizontal track |
| `rtl/mc_rcm.sv` | RCM switch block |
| `rtl/mc_lb.sv` | multi-context logic block |
| `rtl/mc_cfg_chain.sv` | configuration shift register |
| `rtl/mc_cell.sv` | cell |
| `rtl/mc_fpga.sv` | top: 3x3 array |
| `tb/tb_mc_util_pkg.sv` | routing compiler used by the testbenches |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_mc_change_rate.sv` | RCM under 3 % / 5 % configuration change rates |

`tb/tb_mc_util_pkg.sv` turns an intended routing into SE settings: for each
horizontal track and each context, the index of its source track or -1. It
classifies every crosspoint pattern as constant, single-bit or complex. It
gives identical complex patterns one shared generator, and it reports
whether the routing fit.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For
example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/mc_pkg.sv tb/tb_mc_util_pkg.sv tb/tb_mc_fpga.sv --top-module tb_mc_fpga
./obj_dir/Vtb_mc_fpga
```

`tb_mc_fpga` runs the full-size array with its default parameters and builds
in about 15 s. It:

* loads a hand-mapped application through the scan chain;
* changes the context at random on every clock for 2000 clocks;
* checks the following against values computed in the testbench:
  * per-context LUT functions;
  * single-bit and complex crosspoint patterns;
  * a registered value carried over a double-length line;
  * the conflict flag;
  * the one-clock context latency.

It also counts how often each of these occurred.

To change the architecture, edit the constants in `mc_pkg`. For example,
`CTX_BITS = 2` gives 4 contexts, and `W_S`, `W_D`, `LB_K` and `N_CPLX` set
the routing and LUT sizes. `NX`/`NY` are parameters of `mc_fpga`. The
configuration types and widths are derived from these, so nothing else needs
editing. `CTX_BITS` must be at least 2.
