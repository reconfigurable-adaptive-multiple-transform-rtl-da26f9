# Reconfigurable 4x4 AMT transform, five ways

Versatile Video Coding chooses, block by block, one of five integer transforms
for the residual. The five are DCT-II, DCT-V, DCT-VIII, DST-I and DST-VII. This
scheme is called Adaptive Multiple Transform (AMT). Only one transform is
applied to a given block. So one circuit can serve all five if its constant
multipliers can be switched between the five coefficient sets.

This RTL implements a 4x4 two-dimensional AMT transform whose constant
multiplications use only shifts and adders (they are *multiplierless*). It
builds the reconfigurable multiplier stage in five different ways. The five ways
trade parallel sharing of adders against time-multiplexing of adders, and one of
them runs on a clock four times faster than the rest. All five, plus the
single-transform circuits they are derived from, sit side by side in the top
level. They compute identical results on identical cycles, so they can be
compared directly.

## What is computed

For a 4x4 residual block `S` and the selected matrix `DTT`:

    D = DTT * S * DTT^T

The matrices are the 4-point integer AMT kernels, `round(512 * orthonormal
basis)`:

| transform | row 0 | row 1 | row 2 | row 3 |
|---|---|---|---|---|
| DCT-II   | 256 256 256 256 | 334 139 -139 -334 | 256 -256 -256 256 | 139 -334 334 -139 |
| DCT-V    | 194 274 274 274 | 274 241 -86 -349 | 274 -86 -349 241 | 274 -349 241 -86 |
| DCT-VIII | 336 296 219 117 | 296 0 -296 -296 | 219 -296 -117 336 | 117 -296 336 -219 |
| DST-I    | 190 308 308 190 | 308 190 -190 -308 | 308 -190 -190 308 | 190 -308 308 -190 |
| DST-VII  | 117 219 296 336 | 296 296 0 -296 | 336 -117 -296 219 | 219 -336 296 -117 |

Transform identifier `tid` (3 bits, type `tr_id_t`): 0 DCT-II, 1 DCT-V,
2 DCT-VIII, 3 DST-I, 4 DST-VII. Codes 5 to 7 act as DCT-II. The same
identifier is used for both directions of a block.

Number formats, all two's complement (`amt_pkg`):

| quantity | width | note |
|---|---|---|
| input and intermediate sample | 10 bit | `data_t` |
| coefficient | 10 bit | largest magnitude is 349 |
| one product | 19 bit | `prod_t`; four of them make the 76-bit bank of MCM_MIX2 |
| sum of four products | 21 bit | `sum_t`; this is also the output width |

The two 1-D passes are the same circuit. So the first pass's 21-bit results are
brought back to 10 bits before the second pass, using
`(t + 512) >>> 10` (round half up). Every row of every matrix has an
absolute sum of at most 1024. The rounded value therefore always lies in
[-512, 511], and no saturation is needed. The outputs are the exact 21-bit
second-pass sums, with no final scaling.

## Datapath and timing (`amt_2d`)

```
 in_col (column c of S) --> [1-D pass] --> round --> [transposing bank] --> [1-D pass] --> out_row (row i of D)
                              T = DTT*S        10 b     columns in, rows out     D[i][k] = sum_j DTT[k][j] T[i][j]
```

* One column enters per `clk` cycle (`in_valid`, `in_col[r] = S[r][c]`).
  Blocks may follow each other with no gap, and idle cycles may occur
  anywhere. `in_tid` is taken with the first column of a block.
* Each 1-D pass takes one cycle. Its output register is loaded at the edge
  that takes its input.
* The **transposing bank** (`transpose_bank`) holds one block: 16 ten-bit
  registers. The first pass writes it column by column. After the fourth
  column the bank sends rows 0 to 3 to the second pass on the next four
  cycles. A second bank is not needed at full rate, because the bank's
  addressing direction alternates from block to block. While row `r` of the
  old block is being read, column `r` of the new block is written into exactly
  the cells that row `r` is freeing. The new column arrives in the same cycle
  or later.
* **Latency:** if the columns of a block enter on cycles `c`..`c+3`, the rows
  of `D` come out on cycles `c+6`..`c+9`. `out_valid` is high for exactly those
  four cycles, and `out_tid` gives the block's identifier. Throughput is one
  block every four cycles.

## The five reconfigurable multiplier organisations

In a 1-D pass, sample `s_j` of the input column is multiplied by the four
coefficients `DTT[0..3][j]`, which are column `j` of the matrix. These products
are summed per output: `t[k] = sum_j DTT[k][j] * s_j`. The 16 constant
products are where the organisations differ. `amt_1d` selects one with its
`ARCH` parameter.

| `ARCH` | blocks per 1-D pass | products out of one block together | products multiplexed in one block | built from |
|---|---|---|---|---|
| `ARCH_STANDALONE` | 4 | 4 | none (one transform only) | `mcm_par_core` |
| `ARCH_MCM_PAR` | 20 (4 x 5) | 4 | 0 (output mux outside the blocks) | `amt_mult_par` |
| `ARCH_MCM_MUX` | 16 | 1 | 5 | `mcm_mux_core` |
| `ARCH_MCM_MIX0` | 16 | 1 | 5 (mux inside the block) | `amt_mix0_block` |
| `ARCH_MCM_MIX1` | 4 | 4 | 5 groups of 4 | `amt_mix1_block` |
| `ARCH_MCM_MIX2` | 4 | 1 | 20, time-shared over 4 fast cycles | `amt_mix2_block` |

There are two basic building blocks:

* **MCM-parallel** (`mcm_par_core`) has one input and `NOUT` fixed
  constants, and gives all products at once. Each constant is split into an
  odd part and a power of two (for example 296 = 37 << 3). One
  "fundamental" is built per distinct odd magnitude. Every product reuses it
  through a wired shift and, for a negative coefficient, a negation. In
  DCT-II column 0 (256, 334, 256, 139), for example, the two 256s cost nothing.
  A new fundamental is first sought as one addition or subtraction of two
  terms already available (the sample, or an earlier fundamental, one of
  them shifted). In DCT-VIII column 0 (336, 296, 219, 117), for example,
  219 = 256 - 37 once 37 exists. Only when no such form exists does the
  fundamental get its own CSD shift-add chain.
* **MCM-multiplexed** (`mcm_mux_core`) has one input and `NSEL`
  constants, and gives the product for the constant picked by `sel`. It is a
  single chain of `T` add/subtract terms, where `T` is the largest number of
  canonical signed digits (CSD) among the constants. Term `n` takes the
  sample shifted to the `n`-th digit position of the selected constant, so
  each shifter becomes a small multiplexer of fixed shifts. Whether term `n`
  adds or subtracts is also selected. A constant with fewer digits gates its
  spare terms to zero.

The organisations are built from these two blocks:

* **MCM_PAR** has, per input sample, five complete single-transform
  MCM-parallel blocks, one per transform, and a 5-to-1 multiplexer on the
  groups of four products. The blocks themselves are not changed.
* **MCM_MUX** uses one MCM-multiplexed block per matrix position, 16 in all.
  Each chooses among the five coefficients at that position.
* **MCM_MIX0** uses one MCM-parallel block per matrix position. It forms all
  five transforms' products at that position together, and a multiplexer
  inside the block passes one of them on.
* **MCM_MIX1** uses one block per input sample with one shared set of
  shifted sample copies. The selector is decoded once for all four outputs.
  There are four add/subtract chains: the adders that a one-of-twenty block
  would time-share are copied four times, so four products come out together.
* **MCM_MIX2** uses one one-of-twenty MCM-multiplexed block per input
  sample, run on `clk_fast`, which is four times `clk` (see below).

### MCM_MIX2 and its two clocks

This is the part that needs the most care. `clk_fast` must run at exactly four
times `clk`, and every fourth rising edge of `clk_fast` must coincide with a
rising edge of `clk`. `quarter_phase` produces `column_idx`, the number of the
current quarter of the `clk` period (0 is the quarter just after a `clk`
edge). It keeps a toggle flop on `clk` and a copy of that flop on
`clk_fast`. The two differ only during quarter 0, and this difference
re-aligns a 2-bit counter every period. So it needs no reset alignment between
the clocks.

In quarter `q` of a period, each `amt_mix2_block` forms
`s * DTT_tid[q][j]`, selecting with `4*tid + column_idx`. The `clk_fast`
edge that ends the quarter stores the product in register `q` of a
4 x 19 = 76-bit bank. The fourth product is stored by the edge that
coincides with the next `clk` edge. So a register on `clk` could not capture
the sum at that edge. Instead, the output register of an MCM_MIX2 pass is
clocked by `clk_fast` and loaded at the end of quarter 0 of the following
period. At that moment register 0 is overwritten with the next sample's
product, but the sum is taken from the old values.

The result: the output changes a quarter period after the other
organisations' outputs, but it is stable at the next `clk` edge. The pass
therefore has the same one-cycle latency and the same `out_valid` timing as
the others. The combinational path after it gets three quarters of a period.
The inputs of an MCM_MIX2 pass must stay constant for the whole `clk` period,
which they do because they come from registers on `clk`.

## Top level (`amt_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `clk_fast`, `rst_n` | in | 1 each | datapath clock; 4x clock, edge aligned (used only by MCM_MIX2); asynchronous active-low reset |
| `in_valid`, `in_tid`, `in_col` | in | 1, 3, 4x10 | one column of `S` per cycle and the block's transform |
| `out_valid[a]`, `out_tid[a]`, `out_row[a]` | out | 5, 5x3, 5x4x21 | results of reconfigurable variant `a`: 0 MCM_PAR, 1 MCM_MUX, 2 MCM_MIX0, 3 MCM_MIX1, 4 MCM_MIX2 |
| `sa_out_valid[t]`, `sa_out_row[t]` | out | 5, 5x4x21 | single-transform circuit `t`; it always applies transform `t`, whatever `in_tid` is |

Hierarchy:

```
amt_top
 +- amt_2d x5 (ARCH = MCM_PAR .. MCM_MIX2)   +- amt_2d x5 (ARCH_STANDALONE, FIXED_TR = 0..4)
     +- amt_1d (pass 1), transpose_bank, amt_1d (pass 2)
         +- amt_mult_par -> mcm_par_core -> const_mult     (MCM_PAR)
         +- mcm_mux_core                                   (MCM_MUX)
         +- amt_mix0_block -> mcm_par_core                 (MCM_MIX0)
         +- amt_mix1_block                                 (MCM_MIX1)
         +- amt_mix2_block -> mcm_mux_core, quarter_phase  (MCM_MIX2)
         +- mcm_par_core                                   (STANDALONE)
amt_pkg: sizes, types, coefficient table, CSD helper functions
```

To use a single variant, instantiate `amt_2d` with the `ARCH` you want.

## Size of the organisations

Generic gate-level synthesis with Yosys (`synth -flatten`) of one `amt_2d`
per organisation gives these numbers. The standalone row is the DCT-VIII
circuit.

| `ARCH` | gate cells | flip-flop bits |
|---|---|---|
| MCM_PAR | 25,327 | 309 |
| MCM_MUX | 26,173 | 309 |
| MCM_MIX0 | 25,939 | 309 |
| MCM_MIX1 | 25,152 | 309 |
| MCM_MIX2 | 14,473 | 925 |
| STANDALONE | 7,282 | 306 |

The first four organisations share the same registers. They are:

* the two 4x21-bit pass outputs;
* the 16x10-bit transpose bank;
* the valid and identifier bits.

MCM_MIX2 adds a 76-bit product bank to each of its eight multiplier
blocks (four per pass), which is 608 bits. Each pass also adds a 4-bit
`column_idx` generator. The output registers of the passes are moved to
`clk_fast` but are not larger. That trade is the point of MCM_MIX2: about 40% less logic
for three times the flip-flops. MCM_MIX2 also needs a four-times-faster
clock for its multiplier blocks.

The combinational part of the first four organisations is close, because
the synthesiser merges many shifts and additions whatever their
organisation. Mapping onto a particular FPGA or cell library will move
these numbers.

## How far to trust it, and where it is this design's own

* **Adder graphs.** The shift/add structures here use CSD digits. The
  sharing is greedy: equal odd parts and one-adder reuse of earlier
  fundamentals (MCM-parallel), or equal digit slots (MCM-multiplexed). This is a deliberately simple stand-in
  for a dedicated MCM optimiser, which searches for deeper shared
  subexpressions. The arithmetic results are exact. But adder and shifter
  counts will be higher than an optimiser's, and the ranking of the five
  organisations by area may differ.
* **Coefficient values** are the standard 4-point AMT kernels listed above.
  The testbenches recompute them from the closed-form cosine and sine
  definitions and do not use the RTL's table.
* **Own choices:**
  * the 10/19/21-bit widths (19 bits is fixed by the 76-bit bank);
  * the rounding between passes;
  * the identifier encoding;
  * the single-bank alternating transpose;
  * one register stage per pass;
  * the MCM_MIX2 output capture on `clk_fast`;
  * the asynchronous active-low reset, which clears all registers.
* **Not covered:**
  * block sizes other than 4x4, including VVC's 8x8 up to 64x64;
  * different horizontal and vertical transforms for one block;
  * the manually designed reference circuits that the multiplierless
    versions are usually compared with.

## Simulating

Every testbench checks its own outputs and ends by printing
`TB_RESULT checks=N failures=M`. To run the end-to-end test of the whole
design with plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/amt_pkg.sv tb/tb_amt_ref_pkg.sv tb/tb_amt_top.sv --top-module tb_amt_top
./obj_dir/Vtb_amt_top
```

Replace `tb_amt_top` with any other testbench to run it:

| testbench | what it checks |
|---|---|
| `tb_amt_top` | all ten 2-D circuits at default sizes; about 335 random blocks; exact output cycle per row |
| `tb_amt_2d` | 2-D transform with MCM_PAR and MCM_MIX2 |
| `tb_amt_1d` | all organisations of the 1-D pass; one-cycle latency and valid/tid tracking |
| `tb_transpose_bank` | row order and timing; back-to-back and gapped blocks |
| `tb_mcm_par_core`, `tb_mcm_mux_core`, `tb_amt_mult_par`, `tb_amt_mix0_block`, `tb_amt_mix1_block`, `tb_amt_mix2_block` | every product against recomputed coefficients, for extreme and random samples and every identifier code |

`tb_amt_top` also counts how often each mechanism occurred, and fails if one
never did:
* every transform, and the unused identifier codes;
* back-to-back blocks and idle cycles inside a block;
* transform switches between blocks;
* extreme-value blocks;
* both addressing directions of the transposing bank;
* all four MCM_MIX2 quarter phases.

`tb_clkgen` provides the pair of edge-aligned clocks (period 40 and 10), and
`tb_amt_ref_pkg` the reference model.
