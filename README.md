# Pre-encoded radix-4 multiplier with a Dadda tree

A multiplier spends most of its area and delay summing partial products.
Recoding one operand into radix-4 signed digits halves their number: an
8-bit operand becomes four digits instead of eight bits. The usual recoder is
Modified Booth, and it sits on the multiplier's critical path. If that
operand is a constant coefficient, as in a filter, the recoding can be done
once, ahead of time, and the digits can be stored instead of the binary
coefficient. The multiplier then contains no recoder at all.

This design uses a *non-redundant* radix-4 signed-digit form (NR4SD) for
the recoded operand. It comes in two variants:

| form    | digits 0 .. k-2   | top digit (k-1)      |
|---------|-------------------|----------------------|
| NR4SD-  | {-2, -1, 0, +1}   | {-2, -1, 0, +1, +2}  |
| NR4SD+  | {-1, 0, +1, +2}   | {-2, -1, 0, +1, +2}  |

Each low digit takes one of only four values, so it fits in two bits, the
same as the binary pair it replaces. The partial products are reduced to
two rows by a Dadda tree, and a carry-propagate adder then forms the product.
The default build is an 8x8 two's complement multiplier with a registered
16-bit output.

```
 y[7:0] ──► nr4sd_encoder ──enc[3:0]──► pre_encoded_multiplier ──► out reg ──► out[15:0]
            (NR4SD- or +)               │ pp_generator             (clk, rst)
 x[7:0] ───────────────────────────────►│ dadda_tree
                                        │ final adder
```

## Recoding: the HA* cell and the digit chain

Recoding works on one bit pair at a time, from the least significant end,
with a carry `c` of weight 4 passed from pair to pair (`c_0 = 0`). For pair
*j* (bits `b_2j+1`, `b_2j`, incoming carry `c_2j`) the cell produces a digit
`d_j` and a carry `c_2j+2` such that

    2*b_2j+1 + b_2j + c_2j = 4*c_2j+2 + d_j.

The inputs sum to a value from 0 to 4, and five values cannot all fit a
four-value digit set. An ordinary half adder does not fix this. The cell
therefore uses a modified half adder, **HA\*** (`ha_star.sv`):

    c = p | q      s = p ^ q       so   2c - s = p + q.

Its carry is set when *either* input is set, and the sum bit then carries a
negative weight. So a single 1 becomes "carry one, subtract one" rather than
"keep one".

* **NR4SD-** (`nr4sd_minus_digit.sv`): an ordinary half adder adds `b_2j`
  and `c_2j`, giving `n_2j` (weight +1) and `c_2j+1`. HA\* then adds `b_2j+1`
  and `c_2j+1`, giving `n_2j+1` (weight -2) and `c_2j+2`. The digit is
  `d_j = -2*n_2j+1 + n_2j`, which lies in {-2,-1,0,+1}.
* **NR4SD+** (`nr4sd_plus_digit.sv`): HA\* adds `b_2j` and `c_2j`, giving
  `n_2j` (weight -1) and `c_2j+1`. An ordinary half adder then adds `b_2j+1`
  and `c_2j+1`, giving `n_2j+1` (weight +2) and `c_2j+2`. The digit is
  `d_j = 2*n_2j+1 - n_2j`, which lies in {-1,0,+1,+2}.

The complete recoding tables (the value of `b_2j+1 b_2j c_2j` → `c_2j+2`, digit):

| b1 b0 c | NR4SD-   | NR4SD+   |
|---------|----------|----------|
| 0 0 0   | 0, 0     | 0, 0     |
| 0 0 1   | 0, +1    | 0, +1    |
| 0 1 0   | 0, +1    | 0, +1    |
| 0 1 1   | 1, -2    | 0, +2    |
| 1 0 0   | 1, -2    | 0, +2    |
| 1 0 1   | 1, -1    | 1, -1    |
| 1 1 0   | 1, -1    | 1, -1    |
| 1 1 1   | 1, 0     | 1, 0     |

**Top digit.** The last pair holds the two's complement sign bit (weight
-2 within the pair), and no carry can leave it. `mb_msd_encoder.sv` forms
`d_k-1 = -2*b_2k-1 + b_2k-2 + c_2k-2`, which is an ordinary Modified Booth
digit in {-2..+2}. The sign weight absorbs the last carry, so the digits
give back the signed value exactly: `y = sum_j d_j * 4^j`.

`nr4sd_encoder.sv` chains k-1 cells (k = N/2) and the top-digit cell.
Parameter `MODE` selects the form. The carry ripples through the chain, but
in the intended use this recoder runs off line, once per coefficient.

**Digit encoding.** Between blocks a digit travels as the one-hot struct
`digit_enc_t` (`nr4sd_pkg.sv`). It has four lines, `two_n`, `one_n`,
`one_p` and `two_p`, all zero for digit 0. An NR4SD- cell drives only
`one_p`, `one_n` and `two_n`; an NR4SD+ cell drives only `one_p`, `one_n`
and `two_p`. The one-hot lines are decoded from the cells' two `n` bits.
They are what a coefficient memory would hold (three bits per low digit),
so the multiplier itself decodes nothing:

    NR4SD-: one+ = n0 & ~n1   one- = n0 & n1   two- = ~n0 & n1
    NR4SD+: one+ = n0 & n1    one- = n0 & ~n1  two+ = ~n0 & n1

## Multiplier core

`pre_encoded_multiplier.sv` accepts *any* digit vector in {-2..+2}^k.
Stored NR4SD- digits, NR4SD+ digits and Booth digits all work, with no mode
setting.

**Partial products** (`pp_generator.sv`). Row *j* selects `a`, `2a` or 0,
sign-extended to N+1 bits, and inverts it for a negative digit. The row is
`d_j*a - neg_j`, and the separate bit `neg_j` restores the missing +1 at
column 2j.

**Sign handling and dot matrix** (`dadda_tree.sv`). Row *j* starts at column
2j. Its sign bit is placed *inverted*, which uses
`-s*2^m = (1-s)*2^m - 2^m`. The sum of all the `-2^m` terms is one constant,

    CORR = -sum_j 2^(N+2j) mod 2^2N      (0xAB00 for N = 8),

and it enters the matrix as extra fixed 1 dots. No row needs sign-extension
bits. All arithmetic is modulo 2^2N; a signed NxN product always fits.

**Dadda reduction.** The stage limits are 2, 3, 4, 6, 9, 13, ... Starting from
the largest limit below the tallest column, each stage walks the columns
from bit 0 upward. It places full adders, plus one half adder for an excess
of one, only until the column fits the stage's limit. The count includes
the carries that arrive from the column below in the same stage. Dots
that are not used pass on unchanged. The schedule depends only on N. The
loops in `dadda_tree` therefore unroll into a fixed array of adders, and the
synthesis tool sees only gates. For N = 8:

| stage limit | column heights after (bit 0 .. 15)     | FA | HA |
|-------------|----------------------------------------|----|----|
| initial     | 2 1 3 2 4 3 5 4 5 4 3 3 2 2 1 1        |    |    |
| 4           | 2 1 3 2 4 3 4 4 4 4 4 3 2 2 1 1        | 1  | 3  |
| 3           | 2 1 3 2 3 3 3 3 3 3 3 3 3 2 1 1        | 5  | 3  |
| 2           | 2 1 2 2 2 2 2 2 2 2 2 2 2 2 2 1        | 9  | 3  |

Two rows are left, and `p = row0 + row1` is a plain 2N-bit adder left to
synthesis.

## Top level and timing

`pre_encoded_dadda_top.sv`: ports `clk`, `rst`, `x[N-1:0]`, `y[N-1:0]`,
`out[2N-1:0]`, and parameters `N = 8` and `MODE = NR4SD_MINUS`.

* `y` is recoded and `x` is the multiplicand. Both are two's complement.
* The path from the inputs to the register is purely combinational. The
  only storage is the 2N-bit output register, loaded on the rising edge of
  `clk`. `out` therefore shows `x*y` one clock edge after the operands are
  applied.
* `rst` is synchronous and active high, and clears `out`.
* Example: x = 26, y = 10 gives out = 260 (0x0104) after one edge.

To multiply by stored coefficients, instantiate `pre_encoded_multiplier`
directly and feed its `enc` port from a memory of recoded digits. The recoder
then runs off line, for example with `nr4sd_encoder` in a testbench or as a
constant function. The memory itself is not part of this RTL.

## Choices made by this implementation

The following are this design's own, not fixed by the method:

* Which operand is recoded (`y`), the reset polarity, and the lack of an
  input register.
* `NR4SD_MINUS` as the default form. Both forms are built and pass the same tests.
* The partial product format: a one's complement row plus `neg`, with the
  inverted-sign constant.
* The decode from `n` bits to one-hot lines, and the logic of the Booth top digit.
* A plain adder as the final carry-propagate adder.
* N must be even.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`. Each testbench also has a watchdog.

| testbench | what it covers |
|-----------|----------------|
| `tb_ha_star` | all four inputs; `-2c + s = -p - q` |
| `tb_nr4sd_minus_digit`, `tb_nr4sd_plus_digit` | all eight input cases against the table above, digit range, one-hot encoding |
| `tb_mb_msd_encoder` | all eight cases of the top digit |
| `tb_nr4sd_encoder` | every 8-bit and 10-bit input, both forms: digits sum to the signed value, ranges, top digit reaches all of -2..+2 |
| `tb_pp_generator` | all 256 multiplicands x all five digit values |
| `tb_dadda_tree` | 20000 random and corner matrices at N = 8 and N = 16 |
| `tb_pre_encoded_multiplier` | 256 multiplicands x all 625 digit vectors |
| `tb_pre_encoded_dadda_top` | both forms side by side: reset, one-cycle latency, 26 x 10, all 65536 operand pairs, reset mid-stream; a 16x16 instance with 20000 random and extreme pairs; counts every digit value, the Booth top digit at +-2 and reset, and fails if any never occurs |
| `tb_pre_encoded_dadda_top_full` | the top at its default parameters: reset, 26 x 10, all 65536 operand pairs |

To run one with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/nr4sd_pkg.sv \
        --top-module tb_pre_encoded_dadda_top tb/tb_pre_encoded_dadda_top.sv
    ./obj_dir/Vtb_pre_encoded_dadda_top

Every testbench finishes within a few seconds.

## Files

`rtl/`: `nr4sd_pkg` (shared types), `half_adder`, `ha_star`,
`nr4sd_minus_digit`, `nr4sd_plus_digit`, `mb_msd_encoder`, `nr4sd_encoder`,
`pp_generator`, `dadda_tree`, `pre_encoded_multiplier`,
`pre_encoded_dadda_top`. `tb/`: one testbench per module, plus the
full-size test of the top.
