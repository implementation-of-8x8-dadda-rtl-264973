# Approximate 8x8 Dadda multiplier with inexact 4-2 compressors

An 8x8 unsigned multiplier spends most of its area, delay and power in the
carry-save tree that reduces the 64 partial-product bits to two rows. This
design makes that tree cheaper by replacing its exact 4-2 compressors with
two approximate ones. The results are no longer exact. The partial-product
generator and the final adder stay exact. The intended use is error-tolerant
pixel arithmetic, such as multiplying two greyscale images pixel by pixel.

The RTL contains:

* the exact 4-2 compressor and the two approximate ones, Design 1 and Design 2;
* a two-stage Dadda reduction tree for the 8x8 matrix, built from half adders,
  full adders and 18 compressors of one selectable kind;
* the complete multiplier: AND-gate partial products, the tree, and a
  ripple-carry final adder;
* a top level that runs the same operands through three trees in parallel:
  all Design 1, all Design 2, and all exact.

Everything is combinational: there is no clock, reset or register anywhere.

## The 4-2 compressor and its two approximations

A 4-2 compressor is one column slice of a carry-save tree. It takes four bits
`x1..x4` of weight 1, plus `cin` from the compressor one column lower. It
produces `sum` (weight 1), and `carry` and `cout` (both weight 2). The exact
cell obeys `x1+x2+x3+x4+cin = sum + 2*(carry+cout)`.

**Exact** (`comp42_exact`). This is two cascaded full adders. `cout` is the
carry of `x1+x2+x3`, so it never depends on `cin`, and a row of these cells has
no rippling carry. A property the approximate cells rely on: `carry == cin` in
24 of the 32 input states.

**Design 1** (`comp42_approx1`). This cell keeps all five pins and simplifies
all three outputs:

```
carry' = cin
cout'  = (x1 | x2) & (x3 | x4)
sum'   = ~cin & ((x1 ~^ x2) | (x3 ~^ x4))
```

`carry'` becomes a plain wire. `sum'` is forced to 0 whenever `cin` is 1. Of the
32 input states, 12 give a wrong value, and each is off by exactly 1:

| cin | inputs               | exact | Design 1 |
|-----|----------------------|-------|----------|
| 0   | 0000                 | 0     | 1        |
| 0   | 1100, 0011           | 2     | 1        |
| 0   | 1111                 | 4     | 3        |
| 1   | 0000                 | 1     | 2        |
| 1   | 1100, 0011           | 3     | 2        |
| 1   | 1010, 1001, 0110, 0101 | 3   | 4        |
| 1   | 1111                 | 5     | 4        |

Bit order is x1 x2 x3 x4. The value shown is `sum + 2*(carry+cout)`.

**Design 2** (`comp42_approx2`). This cell swaps the roles of `carry` and
`cout`: `carry` takes Design 1's `cout'` equation, and `cout` is defined to
equal `cin`. In a tree every compressor chain starts with `cin = 0`, so every
`cout` and `cin` is then 0 and both pins disappear:

```
carry' = (x1 | x2) & (x3 | x4)
sum'   = (x1 ~^ x2) | (x3 ~^ x4)
```

This is wrong in 4 of 16 states (0000, 1100, 0011, 1111), each by 1.

The `carry' = cin` rule, the swap of `carry` and `cout` in Design 2, and the
pairing of the inputs as (x1,x2) and (x3,x4) come from the design this RTL
implements. The equations of `cout'` and `sum'` are an interpretation. They fit
the gate structure of the original design and its stated intent that `sum`
should be simplified towards 0. They are the part of this RTL most worth
re-checking against any other source.

## The reduction tree

Columns are numbered by weight, from 0 to 14. Before reduction their heights
are 1, 2, ..., 8, ..., 2, 1. Stage 1 reduces every column to at most four
bits. Stage 2 reduces them to at most two. The cell counts per stage are the
design's own: 2 HA + 2 FA + 8 compressors, then 1 HA + 1 FA + 10 compressors.

| column | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| partial products | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 7 | 6 | 5 | 4 | 3 | 2 | 1 |
| stage 1 cells | | | | | HA | C | C, HA | C, C | C, C | C, FA | C | FA | | | |
| after stage 1 | 1 | 2 | 3 | 4 | 4 | 4 | 4 | 4 | 3 | 4 | 4 | 4 | 4 | 2 | 1 |
| stage 2 cells | | | HA | C | C | C | C | C | C | C | C | C | C | FA | |
| after stage 2 | 1 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 2 |

Wiring rules, chosen for this implementation:

* **Chains.** `cout` of a compressor feeds `cin` of the compressor in the next
  column up. Stage 1 has the chains 5→6→7a→8a→9→10 and 7b→8b. Stage 2 has one
  chain, 3→4→…→12. Every chain starts with `cin = 0`.
* **Chain ends.** Where a chain has no compressor in the next column, the last
  `cout` becomes the third input of a full adder. These are the FAs at columns
  9 and 11 in stage 1, and at column 13 in stage 2.
* **Half-adder and full-adder carries.** These are ordinary bits of the next
  column and never enter a `cin` pin. So with Design 2, which has no `cin`, no
  bit of the matrix is dropped.
* **Pin order.** Within a column, bits go to the compressor pins in this order:
  * leftover partial products, in partial-product row order;
  * then carries from the column below;
  * then sums made in this column.

  For the exact tree the order does not matter. For the approximate trees it
  does, because the cells treat (x1,x2) and (x3,x4) as pairs.

With exact compressors the tree gives `a*b` exactly for all 65,536 operand
pairs. This is checked.

## Accuracy you should expect

With every compressor approximate, the tree is wrong for almost every input.
The errors are large in absolute terms. The figures below come from
exhaustive simulation of all 65,536 operand pairs:

| tree | wrong results | mean error distance | largest error |
|------|---------------|---------------------|---------------|
| Design 1 | 99.80 % | 3638 | 9448 |
| Design 2 | 99.29 % | 3302 | 8440 |

Most of the error comes from the all-zero input state. Both approximate cells
output 1 for `0000`, and a partial-product bit is 0 three times out of four.
An all-zero matrix therefore gives a fixed offset: `0*0` yields 8440 in both
approximate trees. Small products are affected most. Large ones fare better:
for example, `255*255` gives 56697 (Design 1) and 57337 (Design 2), against
65025.

On two generated 256x256 test images, the product scaled back to 8 bits
(`p >> 8`) reaches a PSNR of about 21.7 dB (Design 1) and 21.9 dB (Design 2)
against the exact product.

## Interfaces

`dadda_approx_top` (top level, no parameters):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a`, `b` | in | 8 | unsigned operands (e.g. one pixel of each image) |
| `p_design1` | out | 16 | product from the all-Design-1 tree |
| `p_design2` | out | 16 | product from the all-Design-2 tree |
| `p_exact` | out | 16 | product from the all-exact tree, i.e. `a*b` |

`dadda8x8 #(.KIND(...))` is the multiplier on its own. It has ports `a`, `b`
and `p`, with `KIND` of type `dadda_pkg::comp_kind_e`: `COMP_EXACT`,
`COMP_DESIGN1` (default) or `COMP_DESIGN2`. `dadda_tree` has the same
parameter. It takes `pp[j][i] = a[i] & b[j]` and returns the two 15-bit rows.

## Files

`rtl/`:

* `dadda_pkg.sv`: compressor-kind enum and sizes.
* `half_adder.sv`, `full_adder.sv`: exact adder cells.
* `comp42_exact.sv`, `comp42_approx1.sv`, `comp42_approx2.sv`: the three
  compressors.
* `comp42.sv`: selects one of the three by parameter. Design 2's missing
  `cout` is tied to 0 here.
* `pp_gen.sv`: the partial-product generator.
* `dadda_tree.sv`: the reduction tree.
* `cpa.sv`: the ripple-carry final adder, width `W` (default 15).
* `dadda8x8.sv`: the multiplier.
* `dadda_approx_top.sv`: the top level.

`tb/`:

* One self-checking testbench per module, `tb_<module>.sv`.
* `dadda_ref_pkg.sv`: an independent reference model of the tree. It is a
  procedural model that pushes bits between per-column queues, and it states
  the compressors as arithmetic rules rather than gate equations.
* `tb_dadda_approx_top.sv`: the end-to-end test. It multiplies the two
  generated images and reports the error figures above.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the repository root, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/dadda_pkg.sv tb/dadda_ref_pkg.sv tb/tb_dadda_approx_top.sv \
    --top-module tb_dadda_approx_top -Mdir obj_top
./obj_top/Vtb_dadda_approx_top
```

Use the same command with another `tb_<module>.sv` to run that unit's test.
Every test finishes in well under a second.

## Where this departs from, or goes beyond, the original description

* The `cout'` and `sum'` equations of Design 1, and so both equations of
  Design 2, are interpreted, as explained above.
* The original names two schemes for using the approximate compressors but
  does not describe them. Here they are taken to be "all Design 1" and "all
  Design 2".
* The exact tree in the top level is an addition, for measuring the error in
  place.
* Which cell sits in which column follows the cell counts and compressor
  positions of the original reduction diagram. How the HA and FA carries and
  the chain ends are wired is this design's own choice. So is the order in
  which a column's bits meet the compressor pins.
* The final adder is required only to be exact. A ripple-carry adder is used.
* The multiplier was originally demonstrated on an FPGA. No board-level I/O,
  registers or timing constraints are included here.
* Example operand/product pairs shown for the original implementation do not
  match this RTL, nor the exact product. They were not used as test vectors.
