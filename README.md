# Pipelined fixed-width Booth multiplier with an MLCP error estimator

Many signal-processing datapaths multiply two L-bit numbers but keep only an
L-bit result. Computing the full 2L-bit product and then rounding wastes
about half of the multiplier's adders. A *fixed-width* multiplier never
builds most of the low half of the partial-product matrix. It adds up the
upper half (the **main part**, MP) and replaces the discarded low half (the
**truncation part**, TP) with a cheap estimate of the carries that part
would have sent upward.

This design is a radix-4 (modified) Booth multiplier of that kind. It
estimates the truncated part with a **multi-level conditional probability
(MLCP)** estimator:

* The `w` truncated columns nearest the cut (the **major** part, `T_mj`)
  are built and added exactly.
* The columns below them (the **minor** part, `T_mi`) are not built. They
  are replaced by their expected value, given which Booth digits are
  nonzero.

The result is

    Pq = MP + sigma * 2^L,      sigma = Round(T_mj + T_mi)

For w ≥ 2 it is within one unit of the last place (ulp) of the exact
product. The array is built from 5:2 compressors and split into a
three-stage pipeline. The defaults are L = 16 and w = 3.

## The partial-product matrix and where it is cut

Radix-4 Booth recoding turns the multiplier Y into L/2 digits
`d_j = -2*y[2j+1] + y[2j] + y[2j-1]`, with `y[-1] = 0`:

| y[2j+1] y[2j] y[2j-1] | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
|---|---|---|---|---|---|---|---|---|
| digit | 0 | +1 | +1 | +2 | -2 | -1 | -1 | 0 |
| nonzero code z | 0 | 1 | 1 | 1 | 1 | 1 | 1 | 0 |

Row j of the matrix is `d_j * X`, shifted left by 2j columns. It is held
as L+1 bits `p[i][j]`, which are X or 2X, inverted when the digit is
negative. The two's-complement `+1` of a negative digit is a separate bit
`n_j` in column 2j. Sign extension uses the usual trick: each row's sign bit
is inverted, and one constant (`mlcp_pkg::mp_const`) is added to the
matrix. That constant lies entirely in the main part.

The columns are split as follows (for w = 3):

```
column:   2L-1 ........ L | L-1  L-2  L-3 | L-4 ........ 0
          main part MP    | major  T_mj   | minor  T_mi
          built           | built         | not built, estimated
```

The hardware covers a window of L+w+1 columns, from L-w-1 to 2L-1. It adds
everything in the window and keeps the top L bits:

* the carries that leave the major columns become sigma;
* a half unit placed in column L-1 turns the final truncation into
  round-half-up;
* the estimate goes into the extra column L-w-1.

## The MLCP estimate

A nonzero Booth digit selects ±X or ±2X, with the sign equally likely
either way. So given `z_j = 1`, every bit `p[i][j]` of row j and its
correction bit `n_j` is 1 with probability 1/2. If row j reaches into the
minor part, its minor bits fill columns 2j .. L-w-1. Their expected sum is

    sum_{c=2j}^{L-w-1} 2^c / 2  +  2^(2j) / 2  =  2^(L-w-1)

This value is **the same for every row**. Each nonzero row in the minor
part adds half a unit of column L-w, and a zero row adds nothing. The whole
estimate is therefore a count:

    T_mi ≈ k * 2^(L-w-1),     k = number of j with z_j = 1 and 2j <= L-w-1

For L = 16 and w = 3, rows 0 to 6 count. For L = 8, rows 0 to 2 count. The
compensated circuit (`mlcp_comp`) outputs `k + 2^w` at the bottom of the
window: that is the estimate plus the rounding half unit. It needs only a
small population count and no comparison logic. The estimate uses every
nonzero code at once, not one code at a time; this is what separates MLCP
from single-code conditional-probability estimators. The closed form above
is this implementation's own derivation. The source paper states the
principle but leaves the formula to its references.

Measured accuracy, in ulp = 2^L:

| configuration | mean abs. error | max abs. error |
|---|---|---|
| L = 8, signed, all 65536 pairs | 0.253 | 0.625 |
| L = 8, unsigned, all 65536 pairs | 0.253 | 0.625 |
| L = 16, signed, random | ≈ 0.26 | < 0.8 |

The L = 8 rows come from the exhaustive testbench. The L = 16 row comes
from random sampling.

w trades accuracy for area. Each extra column is built and added exactly,
and the estimate then covers less. For L = 8, signed, all pairs:

| w | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|
| mean abs. error (ulp) | 0.333 | 0.263 | 0.253 | 0.250 | 0.249 | 0.249 | 0.249 |
| max abs. error (ulp) | 1.5 | 0.75 | 0.625 | 0.563 | 0.531 | 0.5 | 0.5 |

With w = 1 the error can exceed one ulp. From w = 6 on, the largest error
is half an ulp, which is the bound of a correctly rounded result.

## Signed and unsigned operands

`SIGNED = 1`, the default, treats X and Y as two's complement. `SIGNED = 0`
treats them as unsigned:

* both operands are zero-extended by two bits;
* one more Booth row is added, with digit 0 or +1, starting at column L.

The extra row lies entirely in the main part, so the truncation part and
the estimator do not change. The paper defines its operands as two's
complement. Its worked examples, however, are unsigned products, and the
unsigned configuration reproduces them exactly:

| X | Y | exact | Pq | Pq·2^8 | error |
|---|---|---|---|---|---|
| 1110_0000 | 1111_1011 | 56224 | 1101_1100 | 56320 | 96 |
| 1010_1010 | 1010_1010 | 28900 | 0111_0001 | 28928 | 28 |

## The carry-save array

`csa_array` reduces N operands of W bits to a sum row and a carry row. With
the default 16-bit settings, W = 20 and N = 11: eight rows, the `n_j` bits,
the sign constant and the estimate. Each level of the tree works like this:

* Groups of five operands go through a row of **5:2 compressors**.
* A remainder of four goes through a 5:2 row with a zero fifth operand.
* A remainder of three goes through a row of full adders.
* One or two left-over operands pass through unchanged.

For N = 11 this gives two levels: 11 → 5 → 2.

Each 5:2 compressor satisfies

    x1+x2+x3+x4+x5+cin1+cin2 = sum + 2*(carry + cout1 + cout2)

Here `cout1` and `cout2` do not depend on `cin1`/`cin2`, so a compressor row
has no ripple. The cell is built from three full adders. The tree shape is
computed at elaboration time from N (`mlcp_pkg::csa_count`), so the array
adapts to other L, w and SIGNED settings.

A ripple-carry adder (`cpa`) merges the two rows: a half adder in bit 0 and
full adders above it. Bits `[L+w:w+1]` of its sum are Pq.

## Pipeline and interface

```
            stage 1                    stage 2                                stage 3
 x, y ──► booth_encoder ──► R ──┬── rows, n bits, constant ──► csa_array ──► R ──► cpa ──► R ──► pq
                                └── z ──► mlcp_comp ── estimate ──┘
 in_valid ────────────────► R ─────────────────────────────────────────────► R ──────────► R ──► out_valid
```

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous, active-low; clears the valid bits only |
| `in_valid` | in | 1 | `x`, `y` carry an operand pair this cycle |
| `x`, `y` | in | L | multiplicand and multiplier |
| `out_valid` | out | 1 | `pq` carries a result |
| `pq` | out | L | fixed-width product |

* One operand pair is accepted per clock, with no stalls.
* A pair sampled at rising edge n is on `pq`, with `out_valid` high, after
  edge n+2, so a receiver takes it at edge n+3.
* The data registers are not reset. Only the valid bits are.

Parameters of `top_fixed_booth`:

| parameter | default | meaning |
|---|---|---|
| `L` | 16 | operand and result width. Must be even. The sign constant is computed for L ≤ 32. |
| `W_MJ` | 3 | w, the number of exactly added truncation columns, 1 to L-1. Larger w means more accuracy and more area. |
| `SIGNED` | 1 | 1: two's complement operands. 0: unsigned operands. |

## Files

| file | contents |
|---|---|
| `rtl/mlcp_pkg.sv` | Booth digit type; row count and width; window width; sign constant; tree shape |
| `rtl/booth_digit_enc.sv` | one radix-4 Booth digit (the table above) |
| `rtl/booth_encoder.sv` | recoding, partial products, cut into the window, nonzero codes |
| `rtl/mlcp_comp.sv` | MLCP estimate plus rounding half unit |
| `rtl/compressor_5_2.sv`, `rtl/full_adder.sv`, `rtl/half_adder.sv` | adder cells |
| `rtl/csa_array.sv` | carry-save reduction tree |
| `rtl/cpa.sv` | carry-propagate adder |
| `rtl/top_fixed_booth.sv` | the pipelined multiplier |
| `tb/mlcp_ref_pkg.sv` | integer reference model of the fixed-width product |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_fixed_width_l8` and `tb_w_sweep` |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops. For
example, the end-to-end test at the default parameters:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/mlcp_pkg.sv tb/mlcp_ref_pkg.sv tb/tb_top_fixed_booth.sv \
    --top-module tb_top_fixed_booth
./obj_dir/Vtb_top_fixed_booth
```

For any other testbench, change the file and the top name. The other
modules are found through `-Irtl`.

* **`tb_top_fixed_booth`** runs 5004 operand pairs through the default
  16-bit signed pipeline, with random bubbles. It compares every result with
  `mlcp_ref_pkg` and checks:
  * the 3-cycle latency;
  * the one-ulp error bound;
  * that each mechanism occurs: back-to-back results, bubbles, negative and
    zero Booth digits, sigma = 0, sigma ≥ 1, sigma ≥ 2, and a compensation
    carry that reaches the upper bits of Pq.

  The reference model works on integers (`d_j * X`, products and
  differences), not on the bit matrix, so it checks the RTL's column
  bookkeeping independently.
* **`tb_fixed_width_l8`** runs both 8-bit configurations. It checks the two
  worked examples above and then all 65536 operand pairs.
* **`tb_w_sweep`** runs seven 8-bit units, w = 1 to 7, over all pairs.
  It checks every result, and checks that the mean error does not grow with
  w. A 16-bit unsigned unit runs random pairs alongside it.
* The block testbenches are exhaustive where the input space is small (adder
  cells, compressor, Booth digit, all nonzero-code patterns). Elsewhere they
  use corner values plus random values. `tb_csa_array` covers every tree
  shape (N = 3, 4, 6, 7, 10, 11).

## How far this follows the paper, and where it departs

Taken from the paper:

* radix-4 Booth recoding and its digit/nonzero-code table;
* the MP / TP split, with `sigma = Round(T_mj + T_mi)` added at column L;
* the major/minor split of TP, with w = 3;
* the major part added in an array of 5:2 compressors;
* a minor part estimated from all nonzero codes, every element having the
  same value;
* a CSA array reducing to two rows, then a CPA;
* a pipelined organisation;
* the 8- and 16-bit sizes;
* the top-level name.

Choices made here, where the paper gives no detail:

* The closed form of the estimate (derived above) and round-half-up
  rounding.
* The pipeline: three stages, with their register placement, the valid
  handshake and the reset. The paper only says the multiplier is pipelined.
* The 5:2 compressor as three full adders. The paper mentions XOR-XNOR and
  multiplexer-based cells.
* The grouping of the compression tree, a ripple-carry CPA, and the `n_j`
  bits as a separate operand row.
* Sign extension by inverted sign bits plus one constant.
* The `SIGNED` parameter, which reconciles the two's-complement definition
  with the unsigned worked examples.

Not reproduced:

* The paper's delay comparison (about 6 ns for the pipelined 8- and 16-bit
  versions, against 7.5 to 10.3 ns for unpipelined arrays). Those figures
  come from the paper's synthesis flow, and a simulation cannot confirm
  them.
* The 4:2-compressor variant the paper compares against is not part of this
  design.
