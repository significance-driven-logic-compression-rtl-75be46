# SDLC approximate 8 x 8 multiplier with approximate full adders

Most of the energy of an array or tree multiplier goes into adding up the partial-product
matrix. The taller the matrix, the more adder levels it takes. This design makes the matrix
half as tall before any addition takes place. It does this with **significance-driven logic
compression (SDLC)**: in the less significant part of the matrix, pairs of partial-product
bits that have the same weight are merged by a single OR gate. Any merge error therefore stays
among the low-order bits, and the high-order bits are kept exact. The resulting 4-row matrix
is summed by a two-stage Wallace tree and a ripple-carry adder. To save more energy, the full
adders in the low-order columns can be replaced by one of four *approximate* full adders,
which are mirror adders with some transistors removed.

The multiplier is unsigned, 8 x 8 bits, with a 16-bit product, and purely combinational. To
show it in use, a 3x3 Gaussian blur filter uses nine of these multipliers. The filter is the
top level of the RTL.

```
a[7:0], b[7:0]
   │
   ▼
sdlc_ppm      64 AND gates → 4 logic clusters of 2 rows → OR merge → remap by weight → 4 rows
   │ rows[4][16]
   ▼
sdlc_wallace  stage 1: rows 1-3 → sum + carry      stage 2: + row 4 → two rows, P3..P0 final
   │ sum_row, carry_row
   ▼
sdlc_rca      ripple-carry adder, columns 4..15 → p[15:0]
```

## 1. Logic compression: from 8 rows to 4

Write the partial products as `a_i b_j`, which has weight `i+j`. Rows `b_{2k}` and `b_{2k+1}`
(k = 0..3) form *logic cluster* k, which becomes row `r = k+1` of the compressed matrix.
Inside a cluster, the bits `a_i b_{2k}` and `a_{i-1} b_{2k+1}` lie in the same column, and
the compressor replaces the two of them with

    O(i,2k) = a_i b_{2k}  OR  a_{i-1} b_{2k+1}        i = 1 .. L(r)

The cluster length shrinks from row to row, so that more of the upper part of the matrix stays
exact:

    L(r) = (N + d - 2) - r              for 1 <= r < ceil(N/d)
    L(r) = (2N - 3) - (d + 1)(r - 1)    for r = ceil(N/d)

For N = 8 and d = 2 this gives L = 7, 6, 5, 4. The products that fall outside every cluster are
then *remapped*: they move to another row in the same column (weight), which leaves four rows:

| row | weight 0 … | OR outputs | upper bits (kept exact) | span |
|-----|-----------|------------|-------------------------|------|
| 1 | a0b0 (w0) | O(1,0)..O(7,0) (w1-7) | a7b1..a7b7 (w8-14) | 0-14 |
| 2 | a0b2 (w2) | O(1,2)..O(6,2) (w3-8) | a6b3..a6b7 (w9-13) | 2-13 |
| 3 | a0b4 (w4) | O(1,4)..O(5,4) (w5-9) | a5b5..a5b7 (w10-12) | 4-12 |
| 4 | a0b6 (w6) | O(1,6)..O(4,6) (w7-10) | a4b7 (w11) | 6-11 |

This is the only error the compression makes: if both inputs of an OR are 1, the column counts
one instead of two, so the product comes out low by `2^(i+2k)`. The product can only come out
too low. About half of all 65536 operand pairs have at least one such merge. The mean relative
error over operands 1..100 is 2.5 % (this is the exact-adder configuration below).

`sdlc_ppm` is written for any even N, with the formula above giving the cluster lengths. The
accumulation tree, however, exists only for N = 8.

## 2. Wallace accumulation

Every column is added at the same time. The names below are the ones used in the source
diagram of the accumulation tree. They also appear in the comments of
`tb/tb_sdlc_ref_pkg.sv`.

* **Stage 1** adds rows 1-3. Columns 2, 3 and 13 hold two bits each and use half adders:
  P2/C00, S0/C0 and S10/C10. Columns 4-12 use full adders, S1/C1 … S9/C9. Bits of weight 0, 1
  and 14 pass straight through, and row 4 waits for stage 2.
* **Stage 2** adds, in each column, the stage-1 sum, the stage-1 carry that comes up from the
  column below, and the row-4 bit if there is one. Columns 3-5 and 12-14 use half adders and
  columns 6-11 use full adders. Column 3 gives the final bit P3 and the carry C11. Columns
  4-14 give S12..S22, with carries C12..C22 going one column up.
* **Final adder** (`sdlc_rca`): P0..P3 are already final. The carry row C11..C22 and the sum
  row S12..S22 are added by a ripple-carry adder over columns 4..15. Column 4 is a half adder
  and columns 5-14 are full-adder cells. Column 15 produces only a sum: the carry out of bit 15
  is dropped.

## 3. The five full-adder cells

`KIND` (type `sdlc_pkg::adder_kind_e`) selects the cell used by every *full* adder in product
columns below `APPROX_COLS`. Full adders in the columns above it, and all half adders, are
always exact.

| KIND | cell | transistors | sum | carry | wrong outputs (of 16) |
|------|------|-------------|-----|-------|-----------------------|
| `ADD_EXACT`   | mirror adder     | 24 | a⊕b⊕ci | ab+b·ci+a·ci | 0 |
| `ADD_APPROX1` | approx. adder 1  | 19 | a'b'ci + ab·ci | exact | 2 (sum at 010, 100) |
| `ADD_APPROX2` | approx. adder 2  | 16 | a'b'ci + ab·ci | b + a·ci | 3 (carry at 010) |
| `ADD_APPROX3` | approx. adder 3  | 14 | ¬carry | exact | 2 (sum at 000, 111) |
| `ADD_APPROX4` | approx. adder 4  | 11 | ¬carry | b + a·ci | 4 |

Adder 3 is the default, because its energy saving (about 42 % against the exact-adder
multiplier) is the best of the four.

The carry of adders 2 and 4, `b + a·ci`, is **not symmetric** in `a` and `b`, so the order in
which the rows enter a cell changes the result. Rows are fed as `a, b, ci` in the order they
are stacked:
* Stage 1: row 1, row 2, row 3.
* Stage 2: stage-1 carry, stage-1 sum, row 4.
* Final adder: carry row, sum row, ripple carry.

`fa_cell` instantiates all five cells and uses the constant `KIND` to pick one, so synthesis
keeps only the chosen cell.

Measured over operands 1..100 (mean relative error of the product, printed by
`tb_sdlc_mult`), with `APPROX_COLS = 8`: exact cells 2.5 %, adder 1 23.7 %, adder 2 14.4 %,
adder 3 50.2 %, adder 4 100.6 %. These errors are large for small operands. For the large
products of an image filter they matter little (see below).

## 4. Gaussian blur filter (top level)

`sdlc_gauss_filter` takes one 3x3 window of 8-bit pixels per clock and multiplies each pixel
by its tap of the σ = 1 mask:

    78 125  78
   125 203 125
    78 125  78

The nine products are summed exactly. The sum is shifted right by 10 (the mask sums to 1015)
and saturated at 255. The result is registered, so `pixel`/`out_valid` follow
`window`/`in_valid` by exactly one clock. `rst_n` is a synchronous, active-low reset.
Windows are formed by the caller: there are no line buffers.

On a generated 96 x 96 test image, `tb_gauss_adder_sweep` measures the PSNR of each
configuration against the same blur done with exact multiplications:

| configuration | exact cells | adder 1 | adder 2 | adder 3 | adder 4 |
|---|---|---|---|---|---|
| PSNR against the exact blur (dB) | 37.5 | 34.2 | 36.1 | 38.3 | 38.7 |

Adders 3 and 4 err upwards, so they partly cancel the downward error of the OR compression.
This is why they come out closest to the exact blur.

## 5. Files

| file | contents |
|------|----------|
| `rtl/sdlc_pkg.sv` | `adder_kind_e`, N = 8, cluster depth 2, Gaussian mask and shift |
| `rtl/fa_mirror_exact.sv`, `rtl/fa_approx1..4.sv` | the five full-adder cells |
| `rtl/half_adder.sv`, `rtl/fa_cell.sv` | exact half adder; cell selected by `KIND` |
| `rtl/sdlc_ppm.sv` | partial products, logic clusters, OR compression, remapping |
| `rtl/sdlc_wallace.sv` | the two Wallace stages |
| `rtl/sdlc_rca.sv` | final ripple-carry adder |
| `rtl/sdlc_mult.sv` | the multiplier (`KIND`, `APPROX_COLS`) |
| `rtl/sdlc_gauss_filter.sv` | 3x3 Gaussian blur, top level |
| `tb/tb_*.sv` | one self-checking testbench per module, plus the workload sweep |
| `tb/tb_sdlc_ref_pkg.sv` | bit-level reference model used by the testbenches |

## 6. Simulating

Every testbench checks its own results and ends by printing
`TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/sdlc_pkg.sv tb/tb_sdlc_ref_pkg.sv tb/tb_sdlc_gauss_filter.sv \
    --top-module tb_sdlc_gauss_filter -Mdir obj && ./obj/Vtb_sdlc_gauss_filter
```

Replace the testbench name to run another one. Verilator finds the other modules in `rtl/` by
their file names.
* `tb_sdlc_mult` checks all 65536 operand pairs in all five configurations.
* `tb_sdlc_ppm` checks the compressed matrix for every operand pair.
* `tb_sdlc_gauss_filter` streams a 64 x 64 image through the top level at its default
  parameters. It checks every pixel and the one-clock latency. It fails if either error
  mechanism (OR-merge loss, approximate-adder deviation) never occurs.

Each run takes under a second.

## 7. What is defined by the method and what is chosen here

Taken from the method as published:
* the AND array;
* the cluster lengths and the OR merge;
* the remapped rows;
* the position of every adder in the two Wallace stages and the ripple-carry final adder;
* the five cells' logic;
* the unsigned 8-bit operands;
* the Gaussian mask.

Chosen here, where the method is silent:

* **Which columns are "least significant".** Approximate cells are applied to the less
  significant bits, but no boundary is given. `APPROX_COLS = 8` (the lower half of the
  product) is a choice. It strongly affects accuracy: smaller values bring every
  configuration closer to the exact-cell multiplier.
* **Half adders are always exact.** Only three-input positions use the selected cell.
* **Operand order into the asymmetric cells** (see section 3).
* **Top carry.** The carry out of column 15 is dropped.
* **Filter details.** The shift by 10 with saturation, the single register stage, the
  reset, and the caller-formed windows are all chosen here.

Known departures and limits:

* The published comparison of the five multipliers gives an accuracy column ("error 100*100")
  of 0, 0.44, 0.44, 2.36 and 3.32. Its metric is not defined, and neither the error of the
  single product 100 x 100 nor the mean relative error over 100 x 100 operand pairs reproduces
  it for any boundary column. The accuracy of this RTL is therefore not checked against those
  figures. Its power, delay and LUT figures are properties of an FPGA implementation and are
  not modelled.
* Only cluster depth 2 is built. Depths 3 and 4 give shorter matrices but larger errors; they
  appear only in the method's accuracy study.
* Signed operands are not supported.
