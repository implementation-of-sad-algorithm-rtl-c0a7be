# Folded-tree prefix and SAD processor

A binary tree of adders over 8 inputs needs 7 processing elements (PEs),
arranged in 3 levels: 4, then 2, then 1. Each PE does useful work in only one
of the three steps. A **folded tree** folds that tree back onto itself so
that the same 4 PEs serve every level. The result needs about half the PEs and
much less wiring. The cost is that one operation now takes log2(N) clock
cycles instead of passing through a pipeline. For sensor data that arrives at
well under 100 kHz, that trade is cheap.

This RTL uses the folded tree in two ways:

* **Parallel prefix.** The tree runs Blelloch's two-phase scan over 8
  values: a *trunk* phase up to the root, then a *twig* phase back down. It
  returns the sum of the 8 values and the 8 exclusive prefix sums. This is
  the kind of on-node data aggregation that a wireless sensor node does.
* **Sum of absolute differences (SAD).** The same tree, with the leaf PEs
  taking |X − Y| instead of X + Y, computes one row of a block-matching SAD.
  An accumulator, two pixel memories, a search sequencer and a minimum
  selector turn it into a full-search motion estimator for 4×4 blocks.

The top level, `ft_sad_top`, holds both units side by side.

## Folding 7 tree nodes onto 4 PEs

Number the PEs PE1–PE4. Level 0 holds the leaves and level 2 the root. At
level *l*, the active PEs are the last `4 >> l` of them:

| level | active PEs | node inputs come from |
|-------|------------|-----------------------|
| 0 (leaves) | PE1 PE2 PE3 PE4 | input pairs (in0,in1) (in2,in3) (in4,in5) (in6,in7) |
| 1 | PE3 PE4 | PE3 ← (PE1, PE2), PE4 ← (PE3, PE4) |
| 2 (root) | PE4 | PE4 ← (PE3, PE4) |

So PE1 and PE2 work once per phase, PE3 twice and PE4 three times. A PE reads
the registered outputs of the PEs that served the level below. This can be
its own output: PE4 reads itself at levels 1 and 2. These reads are the
feedback wires of the folded tree. The routing is computed in
`folded_tree.sv` from the general rule: PE *j* (0-based) serves level *l*
when `j >= N/2 − (N/2 >> l)`. The rule works for any power-of-two N, and
`folded_tree_tb` also tests a 16-input tree on 8 PEs.

### Lsave: why PEs need a small register file

In the trunk phase, each node keeps its left operand (*Lsave*) for use in the
twig phase. A PE that serves several nodes must therefore keep several Lsave
values: PE4 keeps three, PE3 two, and PE1 and PE2 one each. `pe.sv` holds
`RF_DEPTH` entries. `folded_tree` sizes them per PE using
`ft_pkg::pe_rf_depth`. Each level uses its level number as the register-file
address. As a result, the trunk instructions at all levels are identical
except for that address.

## The PE and its program

| op | used in | action (results registered, one cycle) |
|----|---------|----------------------------------------|
| `OP_ADD` | trunk | `Lsave[addr] <= L; out_l <= L + R` |
| `OP_ABSDIFF` | trunk, level 0, SAD mode | `Lsave[addr] <= L; out_l <= abs(L − R)` |
| `OP_TWIG` | twig | `out_l <= S; out_r <= S + Lsave[addr]` |
| `OP_NOP` | PE idle | hold |

`ft_ctrl` is the program sequencer. It has no instruction memory. A phase
and a level counter produce, each cycle, the instruction for every PE, with
the level as the address. The routing multiplexers in `folded_tree` use the
same phase and level.

## Trunk and twig: an example

With inputs `3 1 2 0 4 1 1 3`:

* **Trunk (up).** Level 0 produces 4 2 5 4. Level 1 produces 6 9. The root
  produces **15**. The saved left values are 3, 2, 4, 1 at level 0, 4, 5 at
  level 1 and 6 at the root.
* **Twig (down).** The identity 0 enters the root. Each PE passes S to its
  left child and S + Lsave to its right child. At the leaves, the two
  outputs of PE *j* are the exclusive prefix sums of inputs 2*j* and 2*j*+1:
  **0 3 4 6 6 10 11 12**.

Timing of one operation (cycle 0 is the cycle `start` is high and `ready` is
high; `din` is sampled at the end of it):

| cycle | 0 | 1 | 2 | 3 | 4 | 5 | 6 |
|-------|---|---|---|---|---|---|---|
| executing | trunk L0 | trunk L1 | trunk L2 | twig L2 | twig L1 | twig L0 | – |
| flags | | | | `total_valid` | | | `prefix_valid`, `ready` |

`total` is only meaningful while `total_valid` is high, because the twig
phase overwrites the root register. `prefix` holds its value until the next
start. In SAD mode the twig phase is skipped. `ready` is then high again in
the `total_valid` cycle, so rows can follow every 3 cycles, and the tree
gives one result per log2(N) cycles.

Widths: the prefix unit takes 4-bit inputs and produces 7-bit results
(8 × 15 = 120 fits). In general the datapath is `DW + log2(N)` bits, which
cannot overflow for the reduction.

## SAD on the folded tree

For SAD mode, the eight tree inputs are the pixel pairs
`(X0, Y0, X1, Y1, X2, Y2, X3, Y3)` of one block row. X is the current block
and Y is the reference. PE1–PE4 take |Xi − Yi|. PE3 and PE4 add pairs of
these differences, and PE4 adds the two sums. The result is the *partial
SAD* of that row (11 bits for 8-bit pixels). The accumulator `sad_acc` adds
the four partial SADs of a 4×4 block to give the block SAD (13 bits, at most
4080).

### Motion search

* `pixel_mem` ×2 are register arrays. One is the 4×4 current block; the other
  is the 8×8 reference window (block plus ±2 margin on each side). Both are
  written one pixel per clock. A combinational read returns 4 adjacent pixels
  of a row.
* `me_ctrl` runs the full search. It loops over dy = −2..2 (outer loop),
  then dx = −2..2, then the 4 block rows. For each row it reads current
  row *r* and reference row `r+dy+2`, columns `dx+2 .. dx+5`. It starts the
  tree whenever the tree is ready. While the row is in flight, it keeps the
  row's tags (first/last row, first/last candidate, dx, dy). It presents
  them in the cycle the tree reports the result.
* `mv_select` keeps the smallest block SAD and its (dx, dy). The first
  candidate is always taken. After that, only a strictly smaller SAD
  replaces the best one, so on a tie the earliest candidate in raster order
  wins.

A search takes 25 candidates × 4 rows × 3 cycles + 2 = **302 cycles** from
`me_start` to `me_done`.

## Top-level interface (`ft_sad_top`)

| group | ports |
|-------|-------|
| clock/reset | `clk`, `rst_n` (synchronous, active low) |
| prefix unit | `pfx_start`, `pfx_ready`, `pfx_din[8]` (4 b), `pfx_total` (7 b) + `pfx_total_valid`, `pfx_out[8]` (7 b) + `pfx_out_valid` |
| current block | `cur_we`, `cur_wr_row`, `cur_wr_col` (2 b each), `cur_wr_data` (8 b) |
| reference window | `ref_we`, `ref_wr_row`, `ref_wr_col` (3 b each), `ref_wr_data` (8 b) |
| search | `me_start`, `me_busy`, `me_done`, `min_sad` (13 b), `mv_dx`, `mv_dy` (signed 4 b) |

Load both memories, then pulse `me_start` while `me_busy` is low. Do not
write the memories during a search.

Parameters: `PFX_N` (8), `PFX_DW` (4), `BLK` (4), `PIX_W` (8) and `SEARCH_R`
(2). Derived widths follow from them. The folded tree needs a power-of-two
number of inputs, so `PFX_N` and `2*BLK` must be powers of two.

## What follows the architecture and what is chosen here

These parts follow the source architecture:

* the 4-PE folding and its node-to-PE assignment
* the trunk and twig operations, with identity 0 at the root
* the per-PE Lsave counts (1, 1, 2, 3) and per-level register-file addresses
* the eight 4-bit inputs with 7-bit output
* the mapping of a 4-pair SAD onto the same tree, with the trunk phase only
* accumulating four partial SADs into a block SAD

These parts are this design's own choices, because the architecture leaves
them open:

* one tree level per clock cycle, and all handshakes (`start`/`ready`,
  one-cycle valid pulses)
* synchronous reset
* instruction encoding, and a counter-generated program
* 8-bit pixels
* full search over ±2 (25 candidates) with an 8×8 window
* memory organisation, with register arrays and combinational reads
* the tie rule of the selector
* the extension of the folding rule to N other than 8

Not included: the unfolded 7-PE binary tree, which serves only as the
comparison point, and any FPGA-specific wrapper. Published FPGA utilisation
figures for this kind of design (tens of slices, 29 I/O pins) describe an
implementation whose memories and search size are not known. They should
not be compared with this RTL, which has 216 flip-flops and 784 memory bits
and exposes its memory write ports.

## Simulation

Each module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and stops after a watchdog limit.
`ft_sad_top_tb` is the end-to-end test at default parameters:

* **Prefix unit:** the example above, all-maximum inputs, and random
  back-to-back operations.
* **Searches:** an exact copy, a noisy copy, a flat picture (all SADs tie),
  maximum contrast and random pictures. Each result is checked against a
  full search computed in the testbench, and the search time is checked at
  302 cycles.
* **Coverage:** it counts trunk phases, twig phases, back-to-back starts,
  SAD rows, block accumulations, best-vector replacements and ties, and
  requires each to occur.

With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/ft_pkg.sv \
          tb/ft_sad_top_tb.sv --top-module ft_sad_top_tb
./obj_dir/Vft_sad_top_tb
```

Replace `ft_sad_top_tb` with `pe_tb`, `ft_ctrl_tb`, `folded_tree_tb`,
`pixel_mem_tb`, `sad_acc_tb`, `mv_select_tb` or `me_ctrl_tb` to run a single
block's test. All run in well under a second.

## Files

* `rtl/ft_pkg.sv`: instruction and phase types, activation and
  register-file-depth functions
* `rtl/pe.sv`: processing element
* `rtl/ft_ctrl.sv`: PE program sequencer
* `rtl/folded_tree.sv`: N/2 PEs with the folding interconnect
* `rtl/pixel_mem.sv`: pixel store with row-segment reads
* `rtl/sad_acc.sv`: partial-SAD accumulator
* `rtl/mv_select.sv`: minimum-SAD motion-vector selector
* `rtl/me_ctrl.sv`: full-search sequencer
* `rtl/ft_sad_top.sv`: top level
