# Faithfully rounded truncated multiplier and truncated-MCMA FIR filter

An N×N multiplier produces 2N product bits, but a DSP datapath usually keeps only
the top P of them. Computing all 2N bits and then throwing the low half away wastes
area and power. This design never computes the low half exactly. It drops some low
partial-product bits before the adder tree, forms only the carry out of the
remaining low bits, and adds one fixed bias constant. The P-bit result `r` then
always satisfies

    -ulp < r·ulp − exact ≤ ulp          (ulp = weight of the lowest kept bit)

So `r` is either `floor(exact/ulp)` or one more than that.

The same idea scales from one product to a whole FIR filter. A direct-form filter
computes `y[n] = Σ a_i·x[n−i]`, with the coefficients `a_i` fixed at elaboration.
This design does not build one multiplier per tap. It puts the partial-product bits
of every product into one bit matrix, together with a single constant row. That is
the MCMA (multiple-constant multiplication/accumulation) block. The design then
deletes low bits across the whole matrix under one shared error budget. It reduces
the matrix with one carry-save tree and one carry-propagate adder, and rounds once.
The filter's output error is at most one ulp, exactly as for a single multiplier.

There are two datapaths, side by side in the top level `trunc_fir_top`:

| datapath | module | what it computes | timing |
|---|---|---|---|
| FIR filter | `fir_trunc` | 8 symmetric taps, 4 signed 8-bit coefficients, 8-bit signed samples, 8-bit output | one sample per clock, output one clock after the sample |
| multiplier | `trunc_mult` | unsigned 8×8, 8 most significant product bits | combinational |

## The error budget: deletion plus rounding

This is the part that needs the most care; everything else follows from it.
The kept result differs from the exact value in two places:

1. **Deletion.** Partial-product bits are removed before reduction. Each deleted bit
   is 0 or 1, so deleting bits can only make the sum smaller. Bits are deleted greedily,
   starting with the lowest column. Deletion stops as soon as one more bit would make
   the largest possible total of all deleted bits exceed one ulp. The deletion error is
   therefore in `[−ulp, 0]`.
2. **Rounding by truncation.** The tree reduces the matrix to two rows. Below the
   ulp these two rows are not added. A chain of carry-only cells works out just the
   carry they send into the ulp column: an AND gate (HC) in column 0, then a majority
   gate (FC) per column. That carry becomes the carry-in of the final adder, and the
   low sum bits are dropped. The dropped value is below one ulp, so the rounding error
   is in `(−ulp, 0]`.

Both errors are one-sided. A constant of exactly one ulp is added to the matrix:
half an ulp centres each error. The total error then lies in `(−ulp, ulp]`.

One row of the matrix is never deleted. In the multiplier it is row 0 (`x AND y[0]`);
in the filter it is the row of the lowest set bit of `a_0`. Bits are removed only by
deletion within the budget above and by the final rounding. There is no separate
truncation step before the tree.

Worked example, the default `trunc_mult` (N = P = 8, ulp = 2^8 = 256 in product units):

| column c (weight 2^c) | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 … 15 |
|---|---|---|---|---|---|---|---|---|---|---|
| bits in the full matrix | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 7 | 6 … 0 |
| deleted | 0 | 1 | 2 | 3 | 4 | 4 | 0 | 0 | 0 | 0 |
| deleted weight, cumulative | 0 | 2 | 10 | 34 | 98 | 226 | 226 | 226 | 226 | 226 |

Column 5 can lose only 4 of its 5 deletable bits: a fifth would bring the total to
258, over the budget of 256. Column 6 has 30 left, less than the weight of one of its
bits. That makes 14 deleted bits in all (`DELETED` in `trunc_mult.sv`). The one-ulp bias
is a single constant 1 in column 8, so column 8 holds 8 bits going into the tree.
The tree then needs 26 full adders and 5 half adders in 4 carry-save stages. The
rounding chain below the ulp adds 1 AND and 7 majority gates.
Over all 65,536 operand pairs the result is `floor(exact/256)` in 11,840 cases and
one more in 53,696 cases. It is never further off.

## Signed rows without sign extension (MCMA)

In the filter, both the samples and the coefficients are two's complement. Each
coefficient `a_i` contributes one row per set bit j: the pre-added sample `s_i`,
shifted by j. The coefficient's sign bit has weight −2^(CW−1), so that row is
`−s_i = ~s_i + 1`. Sign extension of every row would make the matrix tall. Instead:

- the sign bit `b` of a row, weight −2^(SW−1) within the row, is rewritten as
  `(1 − b) − 1`. The row stores the inverted sign bit, and the −1 moves into a constant.
- positive rows: plain data bits and an inverted sign bit.
- negated rows: inverted data bits and a plain sign bit. The "+1" of the
  negation also moves into the constant.
- all of these constants, plus the one-ulp bias, are summed at elaboration time
  (modulo 2^W) into one constant row, `K` in `mcma_trunc.sv`.

The whole computation wraps modulo 2^W. W is chosen so that the exact sum plus one ulp
cannot wrap: `W = SW + CW + clog2(NCOEF)` = 9 + 8 + 2 = 19 by default.
The default coefficients have 19 set bits, so the filter's matrix has 19 rows of 9 bits
plus the constant row. Deletion removes 65 bits, and the tallest column holds 19 bits.

## The reduction tree (`pp_reduce`)

`pp_reduce` is generic. It takes the per-column heights `H0` as a parameter and builds
the tree from `fa_cell` and `ha_cell` instances at elaboration time:

- Stage targets follow the Dadda sequence 2, 3, 4, 6, 9, 13, … Each stage compresses
  only what the next target requires, so the number of carry-save levels is minimal.
- In each column and stage, an excess `e` over the target is removed with `floor(e/2)` full
  adders and `e mod 2` half adders. That is at most one half adder per column and
  stage, because a full adder removes two bits and a half adder only one.
- Every column ends with at most two bits. The outputs are the two rows `row_a` and
  `row_b`, plus `carry_u`, the carry out of the columns below the ulp column `U`,
  which the rounding chain described above produces.
- The schedule (heights, FA and HA counts per stage and column) is computed once into
  localparam tables (`HT`, `NFT`, `NHT`). Each stage has its own bit array
  `g_st[s].v`. The cell totals are in `N_FA` and `N_HA`.

Cell counts at the default sizes:

| matrix | stages | full adders | half adders | carry-only cells |
|---|---|---|---|---|
| full 8×8 product, nothing deleted | 4 | 35 | 7 | – |
| truncated 8×8 multiplier (`trunc_mult`) | 4 | 26 | 5 | 8 |
| filter MCMA (`mcma_trunc`) | 6 | 84 | 13 | 11 |

The first row equals the published count for a full 8×8 Dadda-style reduction to two
rows: 35 full and 7 half adders.

## The FIR filter (`fir_trunc`)

```
x_in ─┬─► D ─► D ─► D ─► D ─► D ─► D ─► D        (tap_delay, 7 registers)
      │   x[n-1] …                 x[n-7]
      └─► pre-adders  s_i = x[n-i] + x[n-7+i],  i = 0..3   (9 bits, no wrap)
          └─► mcma_trunc (one matrix, one tree, one CPA, round to 8 bits)
              └─► y_out register
```

- **Symmetric taps.** A linear-phase filter has `a_i = a_{NT−1−i}`. The two samples
  that share a coefficient are added first, which halves the number of products. With
  `SYMMETRIC = 0` the block is a plain direct form with NCOEF taps and no pre-adders.
- **Timing.** The pre-adders and the MCMA are combinational. A sample presented with
  `in_valid` high at a rising edge enters the delay line at that edge. At the same edge,
  `y_out` takes that sample's output and `out_valid` rises. The latency is one clock
  and the throughput is one sample per clock. With `in_valid` low the filter holds its
  state and `out_valid` falls. The whole MCMA sits in one clock cycle, which makes
  it the critical path. The structure has no pipeline registers in the tree.
- **Output scaling.** `y_out` is the top 8 bits of the 19-bit accumulator, i.e.
  `y[n] / 2^11`. It is signed and correct to within one ulp.
- **Reset.** Asynchronous, active low. It clears the delay line, `y_out` and `out_valid`.
- **Coefficients.** The `COEFS` parameter holds packed signed 8-bit values; index 0
  is `a_0`. The defaults are 10110101, 11011011, 00101101 and 10010110
  (−75, −37, 45, −106). Any other constant set works: the matrix, the deletion and the
  constant row are recomputed at elaboration.

## Files

| file | role |
|---|---|
| `rtl/trunc_fir_top.sv` | top: filter and multiplier side by side |
| `rtl/fir_trunc.sv` | FIR: delay line, pre-adders, MCMA, output register |
| `rtl/mcma_trunc.sv` | truncated MCMA: PP matrix with constant row, deletion, tree, CPA |
| `rtl/trunc_mult.sv` | stand-alone unsigned truncated multiplier |
| `rtl/pp_reduce.sv` | generic Dadda-scheduled FA/HA tree to two rows, with the carry-only rounding chain below the ulp |
| `rtl/tap_delay.sv` | sample delay line with shift enable |
| `rtl/fa_cell.sv`, `rtl/ha_cell.sv` | full and half adder cells |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Every testbench checks its module against values it computes independently: exact
integer products and sums, held against the one-ulp bound. Each one prints
`TB_RESULT checks=N failures=M` at the end. For example, with Verilator 5:

```
verilator --binary --timing -y rtl tb/trunc_fir_top_tb.sv --top-module trunc_fir_top_tb
./obj_dir/Vtrunc_fir_top_tb
```

What the testbenches cover:

- `trunc_fir_top_tb` runs everything at default parameters. It streams 4,000 samples
  with random idle cycles, starting with 01001010, 00100110, 01101001, 11000011 and
  10100101. It checks every output's timing and its error bound, and then runs all
  65,536 multiplier operand pairs. It also counts, and requires, each of the following:
  idle cycles, both rounding directions in both datapaths, pre-adder sums beyond the
  8-bit range, products by negative coefficients, and deleted bits in both datapaths.
- `fir_trunc_tb` covers the symmetric and the plain form, the reset state and
  the one-cycle latency.
- `mcma_trunc_tb` runs every combination of extreme inputs plus 50,000 random input
  sets.
- `trunc_mult_tb` is exhaustive.
- `pp_reduce_tb` checks that the two output rows add up to the matrix sum, for
  20,000 random matrices. It does so at U = 8 (the truncated multiplier), at U = 16
  (the whole sum goes through the carry chain) and at U = 0 (a plain untruncated 8×8
  tree). It also checks the 35 FA + 7 HA count of the full 8×8 tree.
- `tap_delay_tb`, `fa_cell_tb` and `ha_cell_tb` complete the set.

## Where this RTL departs from, or fills in, the original description

- **Pre-adder width.** In the original filter example the pair sums are 8 bits wide and
  wrap around. Here they are 9 bits wide and never wrap.
- **A multiplier example.** The original shows 10101010 × 10001000 giving 01011001 (89).
  The exact product is 23,120, which is 90.3 ulp, so 89 is outside the stated one-ulp
  bound. This design returns 90 or 91, and that example is not used as a check value.
- **Bias.** The original diagrams show half an ulp added in the column below the ulp.
  The error analysis, however, offsets both the deletion error and the rounding error by
  half an ulp. This design follows the error analysis and adds one ulp. That is what
  keeps the result within the bound.
- **Tree schedule.** The per-column full/half-adder allocation is a Dadda schedule
  with at most one half adder per column and stage. For a full 8×8 tree it matches the
  published 35 FA + 7 HA two-row reduction. The published alternative that reduces
  some columns to a single bit (38 FA + 8 HA) is not built. The cell counts of the
  truncated trees differ somewhat from the published truncated example, because the
  bits chosen for deletion differ.
- **Deletion details.** The deletion budget is the same as the original's, but
  which bits go is this design's own choice. Within a column, the highest rows lose
  their bits first. The undeletable row is the first row of the matrix.
- **Chosen without guidance.** These are this design's own choices: the output scaling
  of the filter, the accumulator width, the handshake, the reset, and the even tap
  count. A symmetric filter of odd length, with an unpaired centre tap, is not
  provided. A Booth-encoded version of the multiplier was only suggested and is not
  provided.
- **Pipelining.** The original suggests pipeline registers inside the tree as a
  possible speed improvement. This design has none; all the MCMA work is done in one clock.
