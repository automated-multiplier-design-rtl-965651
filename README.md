# Column-compression multipliers: Wallace and Dadda trees with fast and hybrid final adders

An unsigned N x N multiplier produces N^2 bit products `a[i] & b[j]`, each of
weight `i+j`. Stacked by weight they form a trapezoid: column `c` holds
`min(c+1, 2N-1-c)` bits. A column-compression multiplier shrinks that
trapezoid to two rows using (3,2) counters (full adders) and (2,2) counters
(half adders), with no carry propagating sideways inside a stage, and only
then adds the two rows with one fast carry-propagate adder. The number of
counter stages grows roughly as log1.5(N), so the delay grows with log N
while area grows with N^2.

This RTL builds the two classic reduction schemes from one parameterised
description, for any N from 3 to 64:

* **Wallace**: reduce as much as possible in every stage.
* **Dadda**: reduce as little as possible in every stage, just enough to hit
  the next height in the sequence 2, 3, 4, 6, 9, 13, 19, 28, 42, 63.

On top of those it provides the variations that matter when such a
multiplier is tuned:
* the counter cell a tree is made of (a plain standard cell, a 9-gate
  NAND/NOR/INV full adder, a 14-transistor pass-logic full adder, or a mix of
  the last two per column);
* the final adder (a hierarchical carry-lookahead adder, or one of three
  hybrid adders cut to the arrival-time profile of a given tree).

Everything is plain synthesizable SystemVerilog. The tree structure is
computed at elaboration time by constant functions, and `generate` loops
instantiate the counters.

## The bit-product matrix

`pp_matrix` is N^2 two-input AND gates. `pp[j][i] = a[i] & b[j]` sits in row
`j` at column `i+j`. The registered multipliers put D flip-flops on both
operands in front of it (`operand_reg`), so a product appears one clock after
its operands are loaded. Everything after the registers is combinational.

## Wallace reduction: rows in groups of three

`wallace_tree` works on rows. In each stage the rows of the current matrix are
taken three at a time, top to bottom. Within a group of three rows:

* a column holding three bits gets a full adder;
* a column holding two bits gets a half adder;
* a column holding one bit passes it down unchanged.

Each group turns into two rows: a sum row, and a carry row shifted one column
left. When the row count is not a multiple of three, the one or two rows left
over pass to the next matrix unchanged. The next matrix lists the rows in this
order: sum row and carry row of group 0, then of group 1, and so on, then the
left-over rows. Stages repeat until two rows remain. The row count follows
`r -> 2*floor(r/3) + r mod 3`, so 16 rows take 6 stages and 64 rows take 10.

For N = 12 this gives 102 full adders, 34 half adders, five stages and an
18-bit final adder over columns 6..23. For N = 16 the final adder is 25 bits
wide (columns 7..31). Below the adder's first column, every column has
already shrunk to one bit, which is a finished product bit.

## Dadda reduction: column heights

`dadda_tree` works on columns. The target heights `d(k)` are 2, 3, 4, 6, 9, 13,
19, 28, 42, 63, given by `d(k+1) = floor(1.5*d(k))`. The first target is the
largest one below N. In each stage every column is brought down to the next
target:

* full adders are placed while the column, counting the carries it will
  receive from the column to its right, is two or more bits over the target;
* a half adder is placed when it is exactly one over;
* remaining bits pass down.

A counter's sum stays in its column. Its carry lands in the next column of the
next matrix.

For N = 12 the heights are 9, 6, 4, 3, 2, with 99 full adders, 11 half adders
and a 22-bit final adder over columns 1..22. For any N the full-adder count is
N^2 - 4N + 3 and the half-adder count is N - 1. The final adder is wider than
Wallace's (30 bits for N = 16 against 25) because Dadda leaves two bits in
almost every column.

## How the trees are generated

The bookkeeping lives in the package `mult_pkg`. Constant functions replay the
reduction on bit counts only:

* `wallace_rows(n, s)` and `wallace_mask(n, s)` give the number of rows in
  stage `s`, and which columns of each row are occupied.
* `dadda_table(n, kind)` gives, per stage and column, the column height, the
  number of full adders and the number of half adders.
* `wallace_cpa_lo/hi` and `dadda_cpa_lo/hi` give the column span the final
  adder must cover.

The modules call these functions into `localparam` tables, then walk them
with nested `generate` loops. Each stage's matrix is its own
generate-block variable (`g_mat[s].m` in the Wallace tree, `g_mat[s].col` in
the Dadda tree). This keeps the netlist an acyclic chain of stages; one big
array would look like a feedback loop to some tools.

Slot bookkeeping in the Dadda tree: in stage `s`, column `c`, full adder `k`
takes positions `3k..3k+2`, and half adder `k` takes the two positions after
all the full adders. In the next matrix, column `c` is filled in this order:

1. the bits it passed down;
2. the sums of its own full adders, then of its half adders;
3. the carries from column `c-1` (full adders first, then half adders).

The Wallace tree keeps whole rows instead: sum row `2g`, carry row `2g+1`,
then the left-over rows.

The tables are sized for `MAX_N = 64` (128 columns, 12 stages). Raising the
limit means raising those three constants.

## Counter cells

The cells are selected by the `STYLE` parameter (`cell_style_e`):

| style | full adder | half adder | structure |
|---|---|---|---|
| `CELL_STD` | `fa_std` | `ha_std` | sum = a^b^cin; carry = a&b \| cin&(a^b) |
| `CELL_GATE9` | `fadder9` | `hadder` | 9 and 4 gates of NAND2/NOR2/INV |
| `CELL_FA14` | `fa14trans` | `hadder` | XNOR node steering cin/a, written as muxes |
| `CELL_HYBRID` | mix of `fa14trans` / `fadder9` | `hadder` | Dadda 16x16 only |

* `fadder9` builds a XOR b from a NOR, a NAND, an inverter and a NOR, then
  repeats that with cin for the sum. The carry is a NAND of the two NAND
  outputs.
* `hadder` is the first half of that: carry = INV(NAND), sum = NOR(NOR, carry).
* `fa14trans` is a transistor-level cell. Here it is modelled by its switch
  function: `h = XNOR(a,b)`; sum = `h ? cin : ~cin`; cout = `h ? a : cin`.
  Its output buffers and threshold effects have no logic meaning and are left
  out.
* `fa_cell` and `ha_cell` are thin wrappers that pick the cell from `STYLE`.

**Hybrid tree.** `CELL_HYBRID` targets the 16x16 Dadda tree. The fast
`fa14trans` cell is used for only part of the full adders:

* The 32 product columns are split into groups of five (0-4, 5-9, ...,
  25-31).
* Each group gets a fixed quota of fast cells: 3, 9, 11, 23, 7 and 0.
* Inside a group the full adders are ranked by stage, then column, then
  index. The first ones in the ranking get `fa14trans`; the rest use
  `fadder9`.

That gives 53 fast cells out of 195. The per-group quotas are the published
result of a timing-driven optimisation. Which adders inside a group get the
fast cells is this design's own rule, because the optimisation itself (swapping cells along critical paths
until the arrival times are met) is a physical-design step and RTL cannot
express it. The logic is the same whatever cells are chosen.

## The final carry-propagate adder

`cpa_stage` takes the two rows, passes the product bits below the adder's
first column straight through, and adds columns `LO..HI` with the adder chosen
by `ADDER` (`adder_kind_e`). The carry out becomes product bit `HI+1` when
that bit exists (Dadda, `HI = 2N-2`). For Wallace `HI = 2N-1` and the carry out
is always zero.

### Carry-lookahead adder

`cla_adder` is a multi-level carry-lookahead adder built from lookahead
blocks of at most four bits (`cla_lookahead`, `K = 1..4`):

* Level 0 forms the bit generate/propagate signals `g = a&b` and `p = a^b`.
* Each level groups up to four (g, p) pairs into a group (G, P) pair.
* Carries come back down the same tree.
* A block over a group of fewer than four pairs uses the matching
  1-, 2- or 3-bit lookahead block, so no unused logic is built.

The number of levels is `ceil(log4 W)`: three levels for 30 bits and four for
55 to 64 bits. Inside a block, carry `i` is the full sum of products
`g[j] & p[j+1..i-1]` plus `cin & p[0..i-1]`.

### Hybrid final adders

Bits leaving a reduction tree do not all arrive at the same time. Middle
columns go through the most counter stages; edge columns go through few.
Each hybrid adder splits the word into sections that match one tree's arrival
profile:

| module | tree | width | sections (low to high) |
|---|---|---|---|
| `hybrid_adder_w16` | 16x16 Wallace | 25 | CLA 8, CLA 4, carry-select 4, carry-select 9 |
| `hybrid_adder_d16` | 16x16 Dadda | 30 | ripple 16 (fadder9 chain), CLA 4, carry-select 4, 3, 3 |
| `hybrid_adder_w32` | 32x32 Wallace | 56 | CLA 22, CLA 4, carry-select 16, carry-select 14 |

How the sections are chosen:

* **Low bits.** Bits that arrive at about the same time get a CLA. Bits whose
  arrival rises steeply get a ripple-carry adder, because each bit arrives
  about when the rippled carry does (the Dadda low half).
* **Latest bits.** The latest-arriving bits get a small 4-bit CLA, so they
  cross few lookahead levels before their carry moves on.
* **Early high bits.** The high bits arrive early and get carry-select
  sections (`csel_cla_adder`). Each section holds two CLAs, one computing with
  carry-in 0 and one with carry-in 1. The real carry only picks the result.
  CLAs are used inside instead of ripple adders because the section's low
  bits arrive soon after the bits below it.

The 32-bit Wallace tree needs only 55 columns (9..63). The adder keeps its
56-bit width, and its top input bit is tied to zero.

## Complete multipliers and the suite top

`wallace_multiplier` and `dadda_multiplier` chain the parts:

`operand_reg -> pp_matrix -> tree -> cpa_stage`

Parameters:

| parameter | meaning |
|---|---|
| `N` | operand width, 3..64 (default 16) |
| `STYLE` | counter cells (default `CELL_STD`) |
| `ADDER` | final adder (default `ADD_CLA`) |
| `REG_INPUTS` | 1 puts the operand flip-flops in front (default). 0 makes the multiplier purely combinational, with `clk`/`rst_n` unused. |

Timing:
* With registers, the product `p` (2N bits) is valid one clock edge after
  `a`/`b` are presented. It stays valid as long as the operands are held.
* `rst_n` is active low and synchronous, and clears both operand registers,
  so the product reads zero after reset.

The hybrid adders have fixed widths, so they go with the tree they were cut
for:
* `ADD_HYB_W16` needs Wallace with N = 16;
* `ADD_HYB_D16` needs Dadda with N = 16;
* `ADD_HYB_W32` needs Wallace with N = 32.

`multiplier_suite_top` places ten multipliers side by side. Each has its own
ports, so they can be exercised or synthesised separately:

| instance | configuration |
|---|---|
| `u_auto_w`, `u_auto_d` | registered Wallace / Dadda, `N_AUTO` bits (default 64), standard cells, CLA |
| `u_hyb` | 16x16 Dadda, hybrid fa14trans/fadder9 tree, CLA |
| `u_gate_w8`, `u_gate_d8`, `u_gate_w16`, `u_gate_d16` | 8x8 and 16x16 Wallace / Dadda of NAND/NOR/INV cells (fadder9, hadder), CLA |
| `u_hfa_w16`, `u_hfa_d16`, `u_hfa_w32` | 16x16 Wallace, 16x16 Dadda and 32x32 Wallace with their hybrid final adders |

Only the two `u_auto` multipliers are registered. The others are combinational
from their operand ports to their product ports.

## Simulating

Each testbench in `tb/` is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<m>`. The package has to come first on the
command line. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/mult_pkg.sv tb/tb_dadda_multiplier.sv --top-module tb_dadda_multiplier
./obj_dir/Vtb_dadda_multiplier
```

What the testbenches check:

* **Cells** (`tb_fa_std`, `tb_fadder9`, `tb_fa14trans`, `tb_ha_std`, `tb_hadder`):
  every input combination.
* **Trees** (`tb_wallace_tree`, `tb_dadda_tree`, both using `tree_harness`):
  for several N up to 64 and for the gate-level and hybrid styles, they check
  three things:
  * `row0 + row1 == a*b`;
  * no bit is left in `row1` below the final adder's first column;
  * nothing is left above its last column.
* **Adders**: `tb_cla_lookahead` is exhaustive for K = 1..4. `tb_cla_adder`
  covers widths 1 to 64. The hybrid and carry-select testbenches count each
  carry-select section's incoming carry and fail if either value never
  occurred.
* **Multipliers** (`tb_wallace_multiplier`, `tb_dadda_multiplier`): all
  8x8 products 1..255 x 1..255, random and corner operands at 16, 32 and 64
  bits, and every cell style and hybrid adder. The registered one-cycle
  latency is checked on every cycle.
* **Whole suite** (`tb_multiplier_suite_top`): runs the top at its default
  parameters for 3000 cycles. It also counts how often each mechanism
  occurred and fails on any that never did:
  * reset clearing the product;
  * a held product staying stable;
  * the Dadda carry into the top product bit;
  * each carry-select section seeing both carry values.

All testbenches finish in a few seconds. The longest are the two multiplier
testbenches, at about 2 s each after compilation.

## Limits and departures

* **Size.** N is limited to 3..64 by the package constants `MAX_N`, `MAX_C` and
  `MAX_S`.
* **Hybrid tree.** The hybrid cell assignment is defined only for the 16x16
  Dadda tree. The fast-cell quotas per column group are fixed. Which adders
  inside a group are fast is decided by the ranking rule above, not by timing.
* **Hybrid adders.**
  * The 16x16 Dadda hybrid adder splits its top 10 bits into carry-select
    sections of 4, 3 and 3 bits. Only "three blocks" is specified for that
    region, so the split is this design's choice.
  * For the 16x16 Wallace adder, the sections are taken as 8, 4, 4 and 9
    bits.
* **32x32 Dadda.** A 32x32 Dadda multiplier gets a 62-bit CLA (columns
  1..62) from this reduction. No hybrid adder is provided for it.
* **Operand registers.** They have a synchronous active-low reset and no load
  enable. Both are choices made here.
* **Cells not modelled.** Only cells with a fully specified logic network are
  built: the standard cell, fadder9, hadder and fa14trans. Other full-adder
  circuits (10- and 12-transistor cells, a 12-gate adder) and the modified
  half adder are not.
* **Electrical effects.** Input fan-out buffering, dual supply voltages
  (assigning low-Vdd gates off the critical path) and transistor-level drive
  effects have no logic function. They are not represented; they belong to
  synthesis and physical design.
* **Carry-lookahead adder.** Its lookahead groups are the low-order-first
  groups of four at every level. The published designs specify the 4-bit
  lookahead limit but not the grouping.
