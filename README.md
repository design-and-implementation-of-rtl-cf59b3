# Reconfigurable approximate adders

Video and image encoders spend much of their energy in adders and
subtractors (motion estimation, DCT), and their output only has to look good,
not be bit-exact. An approximate adder that drops some low-order logic saves
power, but if the amount of approximation is fixed in silicon, the quality is
fine for some videos and poor for others. The adders here make the amount of
approximation a run-time input. Every bit cell is a *dual-mode* cell: it
either adds exactly or returns a cheap approximation that does not depend on
the incoming carry. A *degree of approximation* (DA) code says how many
low-order cells use the approximate mode. A quality controller outside the
unit can then trade output quality against power for each video, or let the
user do so.

Two adder organisations are made reconfigurable this way: a ripple-carry
adder (RCA) and a carry look-ahead adder (CLA). Each is wrapped in an
adder/subtractor block. For comparison, an exact 16-bit spanning-tree
(sparse parallel-prefix) adder sits next to them. All logic is combinational.

## Dual-mode cells

Each cell has a mode input `app` (0 = exact, 1 = approximate). In approximate
mode each output is replaced by one of the cell's inputs:

| cell | exact mode (`app = 0`) | approximate mode (`app = 1`) |
|---|---|---|
| `dmfa` (RCA bit) | `s = a^b^cin`, `cout = maj(a,b,cin)` | `s = b`, `cout = a` |
| `dmclb1` (CLA bit, with carry out) | `p = a^b`, `g = ab`, `s = p^cin`, `cout = g + p·cin` | `p = s = b`, `g = cout = a` |
| `dmclb2` (CLA bit, no carry out) | `p = a^b`, `g = ab`, `s = p^cin` | `p = s = b`, `g = a` |
| `dmpgb1` (CLA tree node, with carry out) | `p = pa·pb`, `g = gb + ga·pb`, `cout = g + p·cin` | `p = pa`, `g = gb`, `cout = g + p·cin` |
| `dmpgb2` (CLA tree node) | `p = pa·pb`, `g = gb + ga·pb` | `p = pa`, `g = gb` |

In the tree nodes, `(pa, ga)` belongs to the less significant half of the
group and `(pb, gb)` to the more significant half.

These replacements are right more often than truncation would be. For
example, `s = b` is correct whenever `a ^ cin = 0`, and `cout = a` is correct
whenever `a = b`. A real implementation would power-gate the exact logic of
an approximate cell. `dmfa` shows where the gating goes by forcing the inputs
of its exact full adder to zero while `app = 1`, so that adder does not
toggle. The other cells are plain 2:1 multiplexers.

## Degree of approximation

`approx_controller` decodes `da` into one `app` bit per cell. Bit `i` is
approximate when `i < da`. So `da = 0` gives an exact adder, and `da = W` (or
more) makes every bit approximate. The code is `$clog2(W+1)` bits wide: 4
bits for the 8-bit adders. The controller only has to tell apart two modes
per cell, which keeps it to one comparator per bit. Cells with more than two
modes would give finer control, but their decoder and multiplexers would cost
more than they save.

Approximating from the LSB up, as a count, is this design's encoding. Any
other map from code to cells only needs a new `approx_controller`.

## Reconfigurable ripple-carry adder (`reconfig_rca`)

The RCA is W `dmfa` cells in a chain, with the controller driving their
`app` inputs. An approximate cell passes its `a` bit on as its carry.
So the exact upper part of the adder still receives a plausible carry out of
the approximate lower part. The chain is cut at the exact/approximate
boundary, which also shortens the worst-case carry path.

## Reconfigurable carry look-ahead adder (`reconfig_cla`)

This is the part that needs the most care. The CLA is a binary tree over the
W bits (W a power of two, 8 by default).

```
level 3                      [0..7] PGB1  -> cout
level 2          [0..3] PGB1               [4..7] PGB2
level 1     [0..1] PGB1  [2..3] PGB2   [4..5] PGB1  [6..7] PGB2
level 0     b0 CLB1 b1 CLB2 b2 CLB1 b3 CLB2 b4 CLB1 b5 CLB2 b6 CLB1 b7 CLB2
```

* **Which blocks have a carry out.** A node that is the *less significant*
  child of its parent, and the root, is a type-1 block. It forms the carry
  out of its own group, `g + p·cin`, from the carry into that group. Every
  other node is type 2. In this arrangement each carry is formed exactly
  once. The carry into bit `m` comes from the node whose group ends at bit
  `m-1`, at the level equal to the number of trailing zeros of `m`. For
  example, c1 comes from the bit-0 cell, c2 from [0..1], c4 from [0..3], c6
  from [4..5] and cout from the root. This makes the carry tree log-depth,
  in the style of Brent-Kung.
* **Carry into a group.** Each node takes the carry into its lowest bit. That
  carry is either `cin` or a carry that a type-1 node formed earlier in the
  tree, so there are no combinational loops.
* **Modes of the tree nodes.** Bit cells follow the controller. A tree node
  is approximate only when every block below it (its whole fan-in cone) is
  approximate. In a binary tree that is the AND of its two children's modes.
  For example, with `da = 3` bits 0 to 2 and node [0..1] are approximate,
  while [2..3] and everything above it stay exact. A partly approximated
  group therefore never throws away the exact group signals of its exact
  bits.
* An approximate type-1 node still forms its carry out as `g + p·cin`, but
  from its approximate `p` and `g`.

## Adder/subtractor block (`rab`)

`rab` wraps either core. The choice is made by parameter `KIND`, with
`approx_pkg::RAB_RCA` or `RAB_CLA`. With `sub = 1` the block inverts `b` and
the carry in, so it computes `a - b - cin`, and `cout = 1` means "no borrow".
In subtract mode the approximate cells return the inverted `b`. Building the
subtractor around the adder core this way is this design's choice.

## Spanning-tree adder (`spanning_tree_adder`)

This is an exact sparse parallel-prefix adder, 16 bits by default. It works
in three stages:

1. **Pre-computation.** `p_i = a_i ^ b_i` and `g_i = a_i b_i`.
2. **Prefix stage.** First, each 4-bit group is reduced to one `(G, P)` pair
   by a tree of black cells (`pp_black_cell`, the operator
   `(gl,pl) o (gr,pr) = (gl + pl·gr, pl·pr)`). Then a Kogge-Stone tree runs
   over the group pairs, with the carry in treated as position -1
   (`g = cin`, `p = 0`). It yields the carries into each group and the carry
   out. Where the right-hand span already reaches the carry in, only the
   generate half is needed, and a grey cell (`pp_grey_cell`) is used.
3. **Final computation.** Inside each group a 4-bit ripple chain starts from
   the group carry and gives `s_i = p_i ^ c_i`.

Only every fourth carry comes from the tree, which is what keeps the tree
small. The group size (`BLOCK = 4`), the Kogge-Stone group tree and the
ripple sum stage are this design's choices for the sparse tree.

## Top level (`reconfig_arith_unit`)

| port | width | meaning |
|---|---|---|
| `a`, `b` | 16 | operands; the RABs use bits 7:0 |
| `cin` | 1 | carry in (borrow in when subtracting) |
| `sub` | 1 | 1 = the two RABs subtract |
| `da` | 4 | degree of approximation of both RABs |
| `rca_sum`, `rca_cout` | 8, 1 | RCA-based RAB |
| `cla_sum`, `cla_cout` | 8, 1 | CLA-based RAB |
| `sta_sum`, `sta_cout` | 16, 1 | spanning-tree adder (always exact, always adds) |

Parameters: `RAB_WIDTH = 8` and `STA_WIDTH = 16`. `DAW` follows from
`RAB_WIDTH`. The three units run side by side on shared operands, so their
results and costs can be compared directly. `da` is a plain input. Deciding
it, for example from the PSNR (peak signal-to-noise ratio) of a video against
a quality target, is the job of a controller outside this unit.

## Accuracy

The end-to-end testbench measured the mean absolute error of the 9-bit result
`{cout, sum}`. It used random operands and about 10,000 operations per code,
mixing addition and subtraction:

| da | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|---|
| RCA | 0 | 0.50 | 1.0 | 2.0 | 4.0 | 8.0 | 15.8 | 32.2 | 63.8 |
| CLA | 0 | 0.63 | 1.1 | 2.8 | 4.9 | 11.4 | 20.0 | 46.5 | 79.0 |

For the RCA the error roughly doubles with each extra approximate bit. The
CLA loses a little more, because an approximate tree node drops the lower
half's generate and the upper half's propagate from the group it passes on.

## Choices and departures

* The cell equations, the two-mode controller, the fan-in-cone rule for tree
  nodes, the 8-bit RCA/CLA and the 16-bit spanning-tree adder are the
  design's.
* This implementation chose the following:
  * the DA encoding;
  * the placement of type-1 and type-2 blocks in the CLA tree;
  * the subtract control;
  * the shared operands at the top level;
  * the internal structure of the spanning-tree adder.
* Power gating appears only as operand isolation. The design's power and
  FPGA timing figures (about 22.5 ns for the RCA, 21.8 ns for the CLA and
  16.6 ns for the spanning-tree adder) cannot be reproduced by simulating
  this RTL. The reported I/O counts (54 and 55 pins) also hint that the
  RCA/CLA may have been synthesised wider than 8 bits. `RAB_WIDTH` can be
  raised to compare: the RCA accepts any width, the CLA needs a power of two.
* The unit does not include the video encoder itself (motion estimation,
  DCT), or the run-time heuristics that choose `da` per video.

## Files

* `rtl/approx_pkg.sv`: shared types (`pg_t`, `rab_kind_e`) and `da_width()`.
* `rtl/dmfa.sv`, `dmclb1.sv`, `dmclb2.sv`, `dmpgb1.sv`, `dmpgb2.sv`: the
  dual-mode cells.
* `rtl/approx_controller.sv`: the DA decoder.
* `rtl/reconfig_rca.sv`, `rtl/reconfig_cla.sv`: the reconfigurable adders.
* `rtl/rab.sv`: the adder/subtractor block.
* `rtl/pp_black_cell.sv`, `rtl/pp_grey_cell.sv`,
  `rtl/spanning_tree_adder.sv`: the prefix adder.
* `rtl/reconfig_arith_unit.sv`: the top level.
* `tb/tb_<module>.sv`: one self-checking testbench per module.
* `tb/tb_ref_pkg.sv`: the reference models the testbenches share. They are
  written from the mode table, with a recursive `(P, G)` evaluation for the
  CLA, independently of the RTL structure.

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. A
watchdog ends it with a failure if it hangs. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_reconfig_arith_unit \
  rtl/approx_pkg.sv tb/tb_ref_pkg.sv tb/tb_reconfig_arith_unit.sv
./obj_dir/Vtb_reconfig_arith_unit
```

List the packages first, as above. Every other file is found through `-y`.

What each testbench covers:

* The cell testbenches are exhaustive.
* `tb_reconfig_rca` and `tb_reconfig_cla` try every operand pair, both carry
  values and every DA code (1.2 M checks each, under a second).
* `tb_rab` covers add and subtract, with both cores.
* `tb_reconfig_arith_unit` runs the whole unit at its default parameters. It
  changes `da` between operations and counts that every mechanism occurred:
  * exact mode;
  * approximate cells and approximate tree nodes;
  * a fully approximate adder;
  * a carry passed from the approximate part into the exact part;
  * subtraction, a mode switch and each adder's carry out.
