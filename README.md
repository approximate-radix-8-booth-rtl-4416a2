# Approximate fixed-width Booth multiplier and squarer

A fixed-width multiplier takes two N-bit operands and returns only N bits of
the 2N-bit product: the upper half, with the binary point taken between
columns N-1 and N. Getting those N bits exactly (post-truncation with
rounding) means building and adding the whole partial product array,
including the lower half that is then thrown away. Skipping the lower half
(direct truncation) is cheap, but the result is several LSBs too small,
because the carries out of the discarded columns are lost.

This design sits between the two. It follows a general model for
approximate array arithmetic with three units:

* **LPCU** (low-precision computing unit) adds only the accurate part of the
  array, columns N .. 2N-1. It uses a carry-save compressor tree and a
  final carry-propagate adder. On its own this is a direct-truncated
  result.
* **ECU** (error compensation unit) estimates the carry that the truncated
  part, columns 0 .. N-1, would have sent into column N, rounding included.
* **CU** (combine unit) adds that estimate to the LPCU result.

The model is applied twice, with N = 16 by default:

* `aaac_booth_mult`: a signed 16 x 16 radix-4 Booth multiplier with a
  16-bit output. It stays within 1 LSB of the correctly rounded product.
  The mean absolute error over random operands is about 0.16 LSB.
* `aaac_squarer`: an unsigned 16-bit squarer with a 16-bit output. It
  stays within 2 LSB of the correctly rounded square. The mean absolute
  error over all inputs is about 0.17 LSB.

`aaac_top` puts the two side by side. Each has its own ports. Both are
purely combinational: there is no clock, no register and no handshake.
Their delay is the delay of the logic.

## The partial product arrays

Both units reduce their arithmetic to the same form: a set of 2N-bit rows
whose sum, modulo 2^2N, is the exact result. `aaac_lpcu` and `aaac_ecu`
then work on any such row set. They take the row count as a parameter.

### Booth array (`booth_encoder`, `booth_selector`, `booth_pp_array`)

The multiplier B is recoded into N/2 radix-4 digits. Digit i is
`-2*b[2i+1] + b[2i] + b[2i-1]`, with `b[-1] = 0`:

| b[2i+1] b[2i] b[2i-1] | digit |
|:---:|:---:|
| 000 | 0 |
| 001, 010 | +1 |
| 011 | +2 |
| 100 | -2 |
| 101, 110 | -1 |
| 111 | 0 |

`booth_encoder` gives each digit as `one`, `two` and `neg`. `neg` is low
for 111, so a zero digit always gives an all-zero row.

`booth_selector` picks 0, A or 2A (N+1 bits, so that 2A is exact). For a
negative digit it inverts the word. That gives the ones complement. The
missing +1 (the negation bit n_i) is not added in the row.

`booth_pp_array` produces N/2 + 1 rows:

* Rows 0 .. N/2-1 are the selected words, shifted to column 2i and
  sign-extended to 2N bits.
* The last row holds the negation bits, n_i at column 2i.

All negation bits lie in the truncated part, because 2i < N. Sign
extension repeats the sign bit rather than using the inverted-sign and
constant-ones trick. The two forms differ only in columns at or above N.
There they give the same sum modulo 2^N, so the truncated part and the
result are unaffected. A synthesis tool folds the repeated sign bits into
the adder either way.

### Squaring array (`sq_pp_array`)

Booth recoding is not used for the squarer. A*A is the sum of:

* a_i at column 2i;
* a_i & a_j, for i < j, at column i+j+1.

Every bit is a two-input AND. This triangle is 9 bits high at column N.
To bring it down to N/2 rows, the two bits of column 2m, a_m and
a_(m-1)&a_m, are rewritten as:

* a_m & ~a_(m-1) in column 2m;
* a_m & a_(m-1) in column 2m+1.

These have the same value (a_m + a_m*a_(m-1) = 2*a_m*a_(m-1) +
a_m*(1-a_(m-1))). After this, no column has more than N/2 bits. The bits of
each column are then stacked from row 0 down. This gives the eight rows
PS_0 .. PS_7 for N = 16.

The rewrite moves value only from an even column to the odd column just
above it. It never crosses the boundary between columns N-1 and N. So the
accurate part and the top two truncated columns keep the same weighted
sums as the plain triangle.

## Error compensation

The ECU forms only the ECU_COLS most significant truncated columns: by
default two, columns N-1 and N-2. It sums their bits, each with its weight
inside the window, adds a constant bias and shifts:

    comp = ( sum over rows of rows[r][N-1 : N-ECU_COLS] + ECU_BIAS ) >> ECU_COLS

The bias is in units of column N-ECU_COLS. It stands for two things:

* the rounding 1 in column N-1;
* the expected carry out of the columns below the window, which are never
  built.

The biases were chosen by minimising the mean absolute error against the
rounded exact result: 200,000 random operands for the multiplier and random
inputs for the squarer. The window is parameterised so that accuracy can be
traded for area:

| window (ECU_COLS) | multiplier best bias, max / mean abs. error | squarer best bias, max / mean abs. error |
|:---:|:---:|:---:|
| 0 (pure truncation) | - , 7 / 3.0 LSB | - , about 1.8 LSB mean |
| 1 | 3, 3 / 0.41 | 2, 3 / 0.42 |
| 2 (default) | 4, 1 / 0.17 | 3, 2 / 0.17 |
| 3 | 6, 1 / 0.09 | 5, 1 / 0.09 |
| 4 | 10, 1 / 0.04 | 9, 1 / 0.04 |

If you change `ECU_COLS_P` on `aaac_booth_mult` or `aaac_squarer`, change
`ECU_BIAS` with it. For the squarer, an odd window would split a column
pair that the folding rewrite moved. The error figures then need
re-checking.

The default compensation never exceeds 7. The upper bits of the ECU's
N-bit output are therefore constant zero and are removed by synthesis.

## Modules

| module | role | parameters (default) |
|---|---|---|
| `aaac_pkg` | shared constants: WIDTH 16, ECU_COLS 2, biases 4 (multiplier) and 3 (squarer) | |
| `booth_encoder` | one radix-4 digit from a bit triplet | |
| `booth_selector` | one row: 0, +-A, +-2A in ones complement | N (16) |
| `booth_pp_array` | N/2 Booth rows plus the negation-bit row | N (16) |
| `sq_pp_array` | N/2 rows of the folded AND squaring array | N (16) |
| `csa32` | word-level 3:2 compressor (a row of full adders) | W (16) |
| `csa_tree` | Wallace tree of `csa32`, ROWS words down to sum and carry | W (16), ROWS (9) |
| `aaac_lpcu` | accurate parts of the rows through `csa_tree`, then a carry-propagate adder | N (16), ROWS (9) |
| `aaac_ecu` | carry estimate from the top truncated columns | N, ROWS, ECU_COLS (2), ECU_BIAS (4) |
| `aaac_cu` | lp + comp modulo 2^N | N (16) |
| `aaac_booth_mult` | signed fixed-width multiplier | N (16), ECU_COLS_P (2), ECU_BIAS (4) |
| `aaac_squarer` | unsigned fixed-width squarer | N (16), ECU_COLS_P (2), ECU_BIAS (3) |
| `aaac_top` | both units, separate ports | N (16) |

Top-level ports of `aaac_top`:

| port | dir | width | meaning |
|---|---|---|---|
| `mul_a` | in | N | signed multiplicand |
| `mul_b` | in | N | signed multiplier (Booth-recoded) |
| `mul_p` | out | N | approximately round(mul_a*mul_b / 2^N), as N-bit two's complement |
| `sq_a` | in | N | unsigned input |
| `sq_p` | out | N | approximately round(sq_a^2 / 2^N) |

N must be even.

## Compression

The LPCU reduces its rows with `csa_tree`, a Wallace-style tree of 3:2
compressors. At each level the rows are taken three at a time. Each group
of three goes through a `csa32`, which gives a sum word (bitwise XOR) and a
carry word (bitwise majority, shifted up one column). The one or two rows
left over pass down unchanged.

* The multiplier's 9 rows become 6, 4, 3 and then 2 words: four
  full-adder delays.
* The squarer's 8 rows become 6, 4, 3 and then 2 words, also four delays.

A single carry-propagate adder then sums the two words. Everything is
taken modulo 2^N, so carries out of the top column are dropped.

The ECU's small window sum and the CU's addition are written as plain
word-level additions. The carry-propagate adders are written the same way.
Synthesis chooses their adder structure.

## Departures and open points

* Only radix-4 recoding is built: two multiplier bits per digit and eight
  partial products for 16 bits. A radix-8 recoder (digits -4..+4, needing
  a precomputed 3A) is not included.
* The internal logic of the ECU is this design's own: a window of exact
  columns plus a constant. The general model only says the ECU is a
  low-cost estimator of the truncated part's carry. Schemes that decide the
  compensation from the Booth digits, or that are more elaborate, are not
  implemented.
* The squarer is unsigned. A signed input needs its absolute value taken
  first, since the square of x equals the square of |x|.
* The compressors are 3:2 full-adder compressors in a Wallace
  arrangement. 4:2 compressors or a Dadda schedule would do the same job.
* Sign handling, the eight-row folding of the squaring array, the CU as a
  plain adder and the absence of pipeline registers are also this design's
  choices.
* Direct-truncated and post-truncated (rounded exact) versions serve only
  as references in the testbenches. They are not separate RTL modules. To
  get direct truncation in RTL, tie the CU's `comp` input to zero.
* No timing, area or power figure has been reproduced. Published FPGA
  figures for this kind of circuit are about 10 ns and 1200 LUTs for the
  multiplier, and about 3 ns and 560 LUTs for the squarer (Xilinx
  Spartan-3E). They depend on the tool and the device.

## Verification

Each module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>`. Expected values come from
`tb/aaac_ref_pkg.sv`, which computes them from the number-level
definitions (Booth digit arithmetic, the a_i*a_j triangle) in 64-bit
integers, not from the RTL structure.

* `tb_booth_encoder`: all 8 triplets.
* `tb_booth_selector`: all digits, with corner and random multiplicands.
* `tb_booth_pp_array`: every row, and the row sum equal to A*B.
  Covers corner operands and 5,000 random pairs.
* `tb_sq_pp_array`: all 65,536 inputs. Checks the row sum equal to A*A and
  the window sums of the accurate part and the top two columns.
* `tb_csa32`, `tb_csa_tree`: the carry-save identity. The tree is tested
  at 1, 2, 3, 8, 9 and 17 rows.
* `tb_aaac_lpcu`, `tb_aaac_ecu`, `tb_aaac_cu`: random rows and operands.
* `tb_aaac_booth_mult`: checks the bit-exact model of the approximation and
  the 1 LSB bound. Covers 36 corner pairs and 20,000 random pairs, and
  prints the mean absolute error.
* `tb_aaac_squarer`: checks the bit-exact model and the 2 LSB bound on all
  65,536 inputs.
* `tb_aaac_top`: end to end at the default size, with no parameter
  overrides. Runs 20,001 operand sets through both units. It counts every
  Booth digit value, negative operands, outputs where compensation changed
  the truncated result, and outputs that differ from the rounded exact
  result. A mechanism that never occurs counts as a failure.

Every testbench has a time-out watchdog that reports a failure. To run one
with Verilator (5.x):

    verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/aaac_pkg.sv tb/aaac_ref_pkg.sv tb/tb_aaac_top.sv \
        --top-module tb_aaac_top -o sim
    ./obj_dir/sim

Replace `tb_aaac_top` with the testbench you want. All of them finish in
seconds.
