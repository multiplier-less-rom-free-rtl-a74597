# 8x8 2-D DCT with ROM-free distributed arithmetic and an error-compensated adder tree

This core computes the 8x8 two-dimensional discrete cosine transform, the
transform used in JPEG- and MPEG-style image and video coding. It takes one row
of eight pixels per clock and returns one column of eight coefficients per
clock. It uses no multipliers and no ROM. Every constant product is split into
bit-weighted sums of the inputs (distributed arithmetic, DA). The DA words are
then combined in one clock by a parallel adder tree. That tree drops most of its
low-order columns and adds back a constant for what it dropped. The design works
at a DA precision of 9 bits (coefficients with 8 fractional bits), and the
words between the two 1-D stages are 12 bits.

At a 125 MHz clock, eight pixels per clock gives 1 Gpixel/s. That is far more
than 1080p60 (1920 x 1080 x 60 = 124 Mpixel/s) needs.

## From multiplications to DA words

A 1-D DCT output is an inner product `Z = sum_i C_i * x_i` with constant
coefficients. Write each coefficient as a 9-bit two's complement fraction. Bit 8
has weight -2^0 and bit 8-j has weight 2^-j. Regrouping the sum by bit weight
gives

    Z = -y_0 + y_1/2 + y_2/4 + ... + y_8/256,
    y_j = sum of the x_i whose coefficient has bit (8-j) set

Each DA word `y_j` is therefore the sum of a fixed subset of the inputs. Only
adders are needed, and the subsets are known at design time.

The coefficients are `C_k = round(256 * cos(k*pi/16))`. They live in
`rtl/dct_pkg.sv`:

| k | C_k | +C_k bits (weights -1, 1/2 .. 1/256) | -C_k bits  |
|---|-----|--------------------------------------|------------|
| 1 | 251 | 0 1111 1011                          | 1 0000 0101 |
| 2 | 237 | 0 1110 1101                          | 1 0001 0011 |
| 3 | 213 | 0 1101 0101                          | 1 0010 1011 |
| 4 | 181 | 0 1011 0101                          | 1 0100 1011 |
| 5 | 142 | 0 1000 1110                          | 1 0111 0010 |
| 6 |  98 | 0 0110 0010                          | 1 1001 1110 |
| 7 |  50 | 0 0011 0010                          | 1 1100 1110 |

A negative coefficient is used in its own two's complement form. It then
contributes to the sign word `y_0`. For example, `Z4 = C4*A0 - C4*A1` has
`y_0 = A1`, `y_1 = A0`, `y_2 = A1`, `y_3 = A0`, `y_4 = A0`, `y_5 = A1`, and so on.
For Z1 the words are `y_1 = b0+b1+b2`, `y_2 = b0+b1`, `y_3 = b0+b3`,
`y_4 = b0+b1+b3`, `y_5 = b0+b2`, and so on. The testbenches check these
bit-level forms word by word.

## The 1-D 8-point core (`dct1d`)

The core computes `Z_n = k_n * sum_m x_m cos((2m+1) n pi / 16)`, with
`k_0 = 1/sqrt(2)` and `k_n = 1` otherwise. This is the DCT without its usual
factor 1/2. The even/odd decomposition splits it into two 4x4 problems.

* **Butterfly (`dct_butterfly`), 12 adders/subtractors.**
  `a_i = x_i + x_(7-i)` and `b_i = x_i - x_(7-i)` for i = 0..3. Then
  `A0 = a0+a3`, `A1 = a1+a2`, `B0 = a0-a3` and `B1 = a1-a2`.
* **Two DA even elements (`dae`).** PAIR 0 maps A0 and A1 to the words of Z0
  (`C4*(A0+A1)`, where every word is 0 or A0+A1, so one adder) and of Z4
  (`C4*(A0-A1)`). PAIR 1 maps B0 and B1 to the words of Z2 (`C2*B0 + C6*B1`) and
  of Z6 (`C6*B0 - C2*B1`).
* **One DA odd element (`dao`).** It maps b0..b3 to the words of Z1, Z3, Z5 and
  Z7. It uses the odd matrix with rows `(C1 C3 C5 C7)`, `(C3 -C7 -C1 -C5)`,
  `(C5 -C1 C7 C3)` and `(C7 -C5 C3 -C1)`.
* **`da_butterfly_matrix`** is these four parts together. Its output is the
  9 x 8 DA words, which are registered.
* **Eight optimized adder trees (`oat`)**, one per output, finish all eight
  results in the next clock.

Each element builds its words directly as sums of the selected inputs, with no
hand-written sharing of partial sums. Synthesis merges the common terms. For
example, the whole Z0/Z4 element reduces to a single adder.

Word widths grow by one bit per adder level. The words are IN_W+3 bits: 12 bits
for the 9-bit first stage and 15 bits for the 12-bit second stage.

## The optimized adder tree and its error compensation (`oat`, `csa_tree`)

This is the least obvious part of the design. A serial DA unit would shift and
add the 9 words over 9 clocks. The tree instead lays out all 9 shifted words at
once and adds them in a single combinational pass. `csa_tree` first reduces them
with rows of full-adder (3:2) cells, then uses one carry-propagate adder at the
end.

Scaled by 2^8, the sum has 8 fractional columns, and the second stage drops 2
more for its 1/4 scaling. The columns below the output LSB are the *truncation
part*. If they are simply cut away, every carry they would have produced is
lost. That costs about half an LSB on average, plus a further error that depends
on the data. The tree handles the truncation part in three ways:

1. **Kept columns.** The `TP_MAJOR` (= 3) columns next to the output are kept,
   so their carries reach the result exactly.
2. **Columns not built.** The columns below those are not built at all. For each
   bit that would fall there, half its weight is added back as a constant. This
   is the expected value if each bit is 1 with probability 1/2.
3. **Rounding.** The same constant adds half an output LSB, so the result is
   rounded rather than floored.

The sign word enters as `~y_0`. Its `+1` is folded into the same constant, so
the negation costs no adder.

The constant is worked out at elaboration time (`comp_const` in `oat.sv`):

    COMP = floor( (sum of 2^c over all word bits in columns c < T - TP_MAJOR) / 2 )
           + 2^(Q-1) + 2^(T-1)

Here T is the number of truncated columns. This gives 448 for the first stage
(T = 8) and 1152 for the second (T = 10).

Measured on 20 000 random word sets against the exact sum rounded to nearest:

* Every output is within 1 LSB.
* About 92 % of outputs are exact.
* The mean error is +0.06 LSB.

Without the compensation (plain truncation) the mean error becomes -0.7 to
-0.8 LSB and only 20 to 30 % of outputs are exact; the testbench rejects that.

The second stage can saturate its output to 12 bits (`SAT`). The first stage
cannot overflow 12 bits: the largest result is 8 * 256 / sqrt(2) ≈ 1448.

## The 2-D core (`dct2d`) and the transpose buffer

    in_row (8 x 9b) -> dct1d (rows) -> transpose_buffer (2 x 8x8x12b) -> dct1d (columns) -> out_col (8 x 12b)

* **First 1-D core.** This core takes 9-bit input and rounds its result to a
  12-bit integer. Its adder-tree outputs are not registered inside the core
  (`OUT_REG = 0`): the transpose buffer is their register.
* **Transpose buffer.** Ping-pong buffer with two register banks of 8 x 8
  twelve-bit words.
  * Rows fill one bank. When the eighth row is written, the bank is marked
    full, writing moves to the other bank, and `bank_swap` pulses.
  * A full bank is read one column per clock and freed after its eighth column.
  * Filling a bank takes at least 8 clocks and reading one takes exactly 8, so
    the writer never waits. An assertion guards this.
* **Second 1-D core.** This core takes 12-bit input, scales its output by 1/4
  and saturates it to 12 bits.

Overall scaling gives the orthonormal 2-D DCT:

    Y[u][v] = 1/4 c(u) c(v) sum_r sum_c x[r][c] cos((2r+1)u pi/16) cos((2c+1)v pi/16),
    c(0) = 1/sqrt(2), c(k) = 1

### Interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset (valid bits and buffer control only) |
| `in_valid` | in | 1 | `in_row` carries a pixel row this clock |
| `in_row[8]` | in | 9 signed | row r of a block, element c = x[r][c] |
| `out_valid` | out | 1 | `out_col` carries a coefficient column |
| `out_first` | out | 1 | this is column 0 of a block |
| `out_idx` | out | 3 | column index v |
| `out_col[8]` | out | 12 signed | `out_col[u] = Y[u][v]` |
| `bank_swap` | out | 1 | the transpose buffer completed a bank |

* **Row order.** Rows of a block must be sent in order, r = 0..7, and blocks
  follow one another.
* **No back-pressure.** `in_valid` may drop between any two rows. The output
  cannot be stalled.
* **Output order.** Results come out in column order, that is, the block
  transposed. Swap indices downstream if row order is wanted.
* **Input format.** 8-bit pixels should be level-shifted by -128. The full
  9-bit signed range is accepted.

### Timing

| path | latency |
|------|---------|
| `dct1d` with registered output | 2 clocks (input presented → output presented) |
| 2-D core, rows sent back to back, first column | registered 10 clock edges after the edge that takes the block's first row (presented 11 clocks after the first row) |
| 2-D core, last column | 7 clocks after the first column |

Throughput is one row in and one column out per clock, with no gaps between
blocks.

## Accuracy

The end-to-end test streams a generated 256 x 256 8-bit image of gradients,
sinusoids, noise and a high-contrast checkerboard. It then adds four blocks at
the extremes of the input range.

* Every coefficient is within 2 of the double-precision orthonormal DCT.
* Reconstructing the image with a double-precision inverse DCT gives
  62.6 dB PSNR.

Three sources contribute to the error:

* 9-bit coefficient quantisation, the largest;
* rounding the intermediate result to 12 bits;
* the adder trees' dropped columns, bounded as described above.

## Design choices and departures

These points are this design's own choices, since the underlying description
leaves them open:

* **Adder tree at cell level.** The exact full-adder/half-adder arrangement of
  the adder tree, and its exact compensation circuit, are not reproduced here.
  The tree is a generic 3:2 reduction. The compensation is the statistical
  constant described above, with the three most significant truncated columns
  kept exactly.
* **Word sharing.** The shared partial sums inside the DA elements are left to
  synthesis.
* **Scaling.** The split of the overall 1/4 scaling is entirely in the second
  stage. The 12-bit intermediate is a rounded integer.
* **Output saturation.** The second stage saturates to 12 bits.
* **Pipeline.** The cut is after the DA-butterfly-matrix and after the adder
  trees, and the first core's adder trees write straight into the transpose
  buffer. The quoted core latency of 10 clock cycles matches the edge count
  above. Counted from first row presented to first column presented, it is 11.
* **Transpose buffer.** It is double-buffered, and results are read out in
  column (transposed) order.
* **Control.** Valid/first/index handshake, asynchronous reset of control state
  only.

Not covered: the clock rate (125 MHz on a Virtex-II Pro class FPGA is the
reference figure) has not been checked with timing analysis.

## Files

| file | contents |
|------|----------|
| `rtl/dct_pkg.sv` | DA precision, quantised cosines, even/odd coefficient matrices |
| `rtl/dct_butterfly.sv` | 12-adder input butterfly |
| `rtl/dae.sv`, `rtl/dao.sv` | DA even and odd processing elements |
| `rtl/da_butterfly_matrix.sv` | butterfly + 2 DAE + DAO |
| `rtl/csa_tree.sv` | full-adder reduction tree |
| `rtl/oat.sv` | optimized adder tree with error compensation |
| `rtl/dct1d.sv` | pipelined 1-D 8-point DCT |
| `rtl/transpose_buffer.sv` | ping-pong 8x8 transpose memory |
| `rtl/dct2d.sv` | 2-D DCT top |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

Synthesis with default parameters gives about 1100 word-level cells and 621
flip-flop bits, plus the 1536 bits of the transpose buffer.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. For example,
the full 2-D test:

    verilator --binary --timing --assert -Irtl -Itb rtl/dct_pkg.sv tb/tb_dct2d.sv \
              --top-module tb_dct2d -Mdir obj_dct2d
    ./obj_dct2d/Vtb_dct2d

The other testbenches build the same way: `tb_dct1d`, `tb_transpose_buffer`,
`tb_oat`, `tb_da_butterfly_matrix`, `tb_dae`, `tb_dao` and `tb_dct_butterfly`.
Each runs in well under a second.

Parameters to experiment with:

* `TP_MAJOR` on `dct2d`: more exact columns give less error and more adders.
* `IN_W`, `TB_W` and `OUT_W` for other word lengths. The coefficient precision
  is `Q` in `dct_pkg`, and the table of `ck` must be regenerated with it.
