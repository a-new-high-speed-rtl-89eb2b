# Radix-4 Booth multiplier with a regular 4-2 counter tree

This is a signed N × N multiplier, 54 × 54 by default, with a 108-bit
product. It is built for regularity as much as for speed. The design splits
the work into the three usual steps and gives each step a dedicated
structure:

1. **Partial-product generation**: radix-4 (modified) Booth recoding halves
   the number of partial products, from N to N/2.
2. **Partial-product reduction**: a tree of 4-2 counters, with 8-2 counter
   slices as its last stage, reduces all rows to two. It keeps the
   logarithmic depth of a Wallace/Dadda tree. Every bit column, however, is
   the same slice, as in an array multiplier.
3. **Final addition**: a two-step carry-lookahead adder adds the two rows.

The operands are registered. The product is combinational from those
registers and is valid one clock after the operands are captured.

## Files

| file | module | role |
|---|---|---|
| `rtl/booth_pkg.sv` | package | `booth_sel_t` select bundle; helper functions for the tree's row counts |
| `rtl/booth_multiplier.sv` | `booth_multiplier` | top: operand registers, N/2 encoders and muxes, tree, final adder |
| `rtl/booth_encoder.sv` | `booth_encoder` | one radix-4 Booth digit → `neg`, `two`, `one`, `zero` |
| `rtl/booth_pp_mux.sv` | `booth_pp_mux` | selects 0, X, 2X and inverts it for negative digits (N+2 bits) |
| `rtl/counter_3to2.sv` | `counter_3to2` | full adder |
| `rtl/counter_4to2.sv` | `counter_4to2` | 4-2 counter made of two 3-2 counters |
| `rtl/counter_8to2.sv` | `counter_8to2` | one column slice of the 8-input 4-2 tree (three 4-2 counters) |
| `rtl/pp_reduction_tree.sv` | `pp_reduction_tree` | R rows → 2 rows |
| `rtl/cla_block.sv` | `cla_block` | one B-bit lookahead module |
| `rtl/cla_final_adder.sv` | `cla_final_adder` | two-step carry-lookahead adder built from `cla_block` modules |

## Interface of `booth_multiplier`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock of the operand registers |
| `rst_n` | in | 1 | asynchronous active-low reset; clears `out_valid` only |
| `in_valid` | in | 1 | capture `x` and `y` at this rising edge |
| `x` | in | N | multiplicand, two's complement |
| `y` | in | N | multiplier, two's complement |
| `out_valid` | out | 1 | `p` holds the product of the captured operands |
| `p` | out | 2N | product, two's complement |

Timing works as follows:
- Operands presented with `in_valid` at edge *t* give `p` and `out_valid = 1`
  after edge *t* and before edge *t+1*.
- Operands can be sent every cycle.
- When `in_valid` is low, the registers hold, so `p` keeps the last product.
- The clock period must cover the whole combinational path: encoder, mux,
  tree and adder.

`N` must be even. Both operands are signed. To multiply unsigned (N−1)-bit
numbers, give each operand a 0 sign bit. For example, the default N = 54
takes a 53-bit floating-point significand this way.

## Booth recoding

The multiplier is extended by a 0 below bit 0 and cut into overlapping
three-bit groups {y[2i+1], y[2i], y[2i−1]}, for i = 0 … N/2−1. Group *i* is
the digit

    d_i = y[2i−1] + y[2i] − 2·y[2i+1]  ∈ {−2, −1, 0, +1, +2},  Y = Σ d_i·4^i

`booth_encoder` turns each group into select signals:

| group | d | neg | two | one |
|---|---|---|---|---|
| 000 | 0 | 0 | 0 | 0 |
| 001, 010 | +1 | 0 | 0 | 1 |
| 011 | +2 | 0 | 1 | 0 |
| 100 | −2 | 1 | 1 | 0 |
| 101, 110 | −1 | 1 | 0 | 1 |
| 111 | 0 | 0 | 0 | 0 |

`neg` is deliberately 0 for group 111. That digit is zero, and a set `neg`
would add a stray +1 to the product.

`booth_pp_mux` forms `one ? X : two ? 2X : 0` at N+2 bits (X sign-extended)
and inverts it when `neg` is set. The row is therefore the ones' complement
of the negative value, and the missing +1 is added in the tree, as
described next.

## Row layout

The top builds R = N/2 + 1 rows of 2N bits:

- Row *i* (i < N/2): the (N+2)-bit partial product, sign-extended to 2N
  bits and shifted left by 2i. Full sign extension costs counter cells in
  the upper columns. In exchange, every row is an ordinary two's complement
  number and the tree needs no correction constant.
- Row N/2: the `neg` bit of digit *i* at bit 2i, which is the +1 that
  completes each negation. All these bits sit at different positions, so
  they fit in one row.

For N = 54 this gives 28 rows of 108 bits.

## The reduction tree

`pp_reduction_tree` is the part that takes the most care to read. It works
row-wise, and every column uses the same cells:

- **4-2 levels.** While more than eight rows remain, the rows are taken in
  groups of four. Each group goes through one `counter_4to2` per column and
  yields a sum row and a carry row; the carry row is shifted up one column.
  If three rows are left over, they go through a row of `counter_3to2`
  cells. One or two left-over rows pass through unchanged.
- **Final stage.** The last rows, at most eight and padded with zeros, go
  through one `counter_8to2` slice per column. The slice's `s` outputs form
  the sum row. Its `c` outputs, shifted up one column, form the carry row.

For the default, the row count goes 28 → 14 → 8 → 2: two 4-2 levels and the
8-2 stage. For N = 16 it goes 9 → 5 → 2.

**Lateral carries.** A 4-2 counter takes five bits of equal weight (`x[3:0]`
and `cin`) and gives `s` (weight 1) plus `c` and `cout` (weight 2). `cout`
goes to the `cin` of the next column in the same row. `cout` is computed
only from `x[2:0]`, so it never depends on `cin`. A row of 4-2 counters
therefore has no ripple: its delay is two full adders whatever the width.

The 8-2 slice applies the same rule. It passes five lateral signals upward:
- the two `cout`s of its first-level counters;
- the two first-level `c` bits, which the slice above feeds into its
  second-level counter;
- the second level's `cout`.

The slice's invariant is

    Σx + Σci = s + 2·(c + Σco)

**Top column.** Carries out of the top column are dropped, so the tree
computes the sum of its rows modulo 2^2N. This is exact, because the signed
product of two N-bit numbers always fits in 2N bits.

## Final adder

`cla_final_adder` cuts the 2N-bit operands into modules of B = 4 bits. A
width that B does not divide gets a shorter last module. Addition then runs
in two steps:

- **Step 1.** Inside a module (`cla_block`), every carry is a sum of
  products of the bit generate and propagate signals and the module
  carry-in.
- **Step 2.** Each module exports its group generate G and group propagate
  P. The next module's carry-in is G | P·c_in, one AND-OR per module.

The multiplier ties the adder's carry-in to 0, and the carry-out is unused.

## What follows the source design, and what was chosen here

The following follow the source design:
- the radix-4 Booth digit set and the grouping with an appended 0;
- partial products two bits wider than the multiplicand;
- reduction with 4-2 counters ending in an eight-input 4-2 counter slice
  built from 3-2 and 4-2 counters;
- a regular tree in which every column is the same slice;
- a two-step carry-lookahead final adder whose module carry comes from the
  previous module's carry-out;
- the 54-bit default size.

The following are this design's own choices:
- the internal circuit of the 4-2 counter (two full adders). The source
  presents a new 4-2 counter but does not describe it;
- how the three 4-2 counters inside the 8-2 slice are wired;
- the row-wise tree layout, with 3-2 rows for three left-over rows;
- full sign extension, and one extra row for the +1 bits;
- the module size B = 4;
- operand registers in front of a combinational datapath, the valid flag
  and the reset.

The encoder's select equations are derived from the digit formula above.

Not included:
- The source also describes a final adder whose length can change: it skips
  low bits that are already decided and can inject a carry at any position.
  It says too little about where that length comes from for the feature to
  be built. This adder always adds the full width.
- Dual-rail domino carries with completion detection, and a flip-flop with
  merged AND-OR logic for shift-and-add designs. These are transistor-level
  techniques, outside RTL.
- Delay, area and power at 70 nm (3.4 ns for 54 × 54). These depend on the
  process and were not evaluated here.
- A split-operand structure with a "verification circuit", shown only as a
  block diagram with no explanation of its control signals.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and stops early on a watchdog.

| testbench | what it checks |
|---|---|
| `tb_booth_encoder` | all 8 groups against the digit formula |
| `tb_booth_pp_mux` | N = 54, digits −2…+2 × corner and 2000 random X: signed(pp) + neg = d·X |
| `tb_counter_3to2`, `tb_counter_4to2` | exhaustive; for the 4-2 counter, also that `cout` does not depend on `cin` |
| `tb_counter_8to2` | all 2^13 input combinations of one slice, plus a 16-column array of slices on random rows |
| `tb_pp_reduction_tree` | R = 28, 11, 9, 5, 3 at W = 108; random, negative and all-ones rows |
| `tb_cla_final_adder` | W = 108 with full-length carry chains and random operands; W = 10 with a sweep of every 7th input combination |
| `tb_booth_multiplier` | top at the default N = 54 with no parameter changed: 3000 operations, corner and random operands, idle cycles |
| `tb_booth_multiplier_small` | N = 8, all 65536 operand pairs; N = 16, 20000 random pairs |

`tb_booth_multiplier` checks three things on every operation:
- `out_valid` rises exactly one cycle after `in_valid`;
- `p` equals a plain 108-bit signed multiplication;
- `p` holds through idle cycles.

It also counts the Booth digit classes that occurred (−2, −1, 0 from 000,
0 from 111, +1, +2), negative operands and hold cycles. Any of these that
never occurred counts as a failure.

To run a testbench with Verilator, here the full-size one:

    verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
        rtl/booth_pkg.sv tb/tb_booth_multiplier.sv --top-module tb_booth_multiplier
    ./obj_dir/Vtb_booth_multiplier

Replace the testbench file and `--top-module` to run any other testbench.

## Changing the design

- **Operand width.** Set `N` on `booth_multiplier`; it must be even. The
  tree depth and the adder follow automatically.
- **Lookahead module size.** It is the `B` parameter on the `cla_final_adder`
  instance inside `booth_multiplier`.
- **Pipeline stage.** The tree's row count after each level comes from
  `booth_pkg::tree_rows_after`. That makes a level boundary the natural
  place to add a register stage.
