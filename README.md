# Radix-8 Booth-folding squarers, exact and approximate

A squarer multiplies a number by itself. A general multiplier does that job
with a lot of redundant hardware. Both factors are the same, so every cross
product `a_i * a_j` turns up twice. This RTL implements a squarer that removes
that redundancy on top of Radix-8 Booth recoding. The operand is cut into
3-bit digits in the range -4..4, and the array of partial products is *folded*
so that each digit pair is handled once. For N = 16 the product array holds
five rows of shrinking length plus a few 3-bit square terms. A Radix-8 Booth
multiplier of the same width needs six full-width rows.

Three approximate versions follow from the exact squarer. Each one gives up a
little accuracy in the low half of the result to save area and power. This
suits error-tolerant uses such as signal detection or distance computations in
clustering.

| squarer | what is approximated in the N low result columns | 16-bit NMED (measured) |
|---|---|---|
| exact | nothing | 0 |
| R8AS1 | digit ±3 recoded to ±2 or ±4 (encoder AR8E1) | 0.88e-5 |
| R8AS2 | digits ±3 and ±4 recoded to ±2 (encoder AR8E2) | 1.16e-5 |
| R8AS3 | AR8E2, plus carry-free approximate compressors, six dropped low columns and one compensating bit | 2.02e-5 |

NMED is the mean absolute error over all operands, divided by the largest
square, 2^(2N-2).

All the logic is combinational: there is no clock, no reset and no handshake.
The operand width `N` is a parameter and defaults to 16. Widths of 12, 13, 16
and 32 are simulated.

---

## 1. Folding the square

Write the N-bit two's complement operand as Radix-8 Booth digits:

    A   = sum_i A_i * 8^i,          i = 0 .. G-1,  G = ceil(N/3)
    A_i = -4 a[3i+2] + 2 a[3i+1] + a[3i] + a[3i-1]     (a[-1] = 0)

When N is not a multiple of 3, the operand is sign-extended to 3G bits for
the digits. The square then splits into two kinds of terms:

    A^2 = sum_i A_i^2 * 2^(6i)  +  sum_{i<t} 2 A_i A_t * 2^(3i+3t)

The cross products of digit i with all higher digits are gathered into one
row per digit:

    A^2 = sum_{i=0}^{G-1} C_i * 2^(6i)  +  sum_{i=0}^{G-2} P_i * 2^(6i+4)

    C_i = A_i^2                        (square term: 0, 1, 4, 9 or 16)
    P_i = A_i * sum_{t>i} A_t 8^(t-i-1) = A_i * (B_i + a[3i+2])
    B_i = a[N-1 : 3i+3] read as a signed number

The key step is the second form of P_i. The digits above i, taken together,
are just the upper operand bits B_i plus the Booth "borrow" bit a[3i+2]. So
each row multiplies the *original operand bits* by one digit, and only one
operand is ever recoded.

**Negative digits need no +1.** A digit is negative exactly when
a[3i+2] = 1. Then

    P_i = A_i (B_i + 1) = -|A_i| (B_i + 1) = |A_i| * ~B_i

where `~B_i` is the bitwise inverse. So a negative digit inverts B_i and uses
the digit's magnitude, and the result is exact. `r8_pp_row` does this. It
inverts B_i when the negate flag is set, builds the multiples x1, x2 = x1<<1,
x3 = x1 + x2 (the only adder in the row) and x4 = x1<<2, and uses the one-hot
selects m1..m4 to pick one multiple for each bit. The row is W_i = N-3i-1 bits
wide, and its sign bit lands at column N+3i+2.

**Square terms are tiny.** A_i^2 is one of 0, 1, 4, 9, 16. Bit 1 is therefore
always zero (R8AS3 still gives it a place, see section 7), and the other bits are two- or three-input products of XORs of
neighbouring operand bits (`r8_square_term`).

**The 16 folds into the row.** C_i = 16 happens only for |A_i| = 4. In that
case P_i is a multiple of 4, so its bit 0 is zero. The 16 has the same weight
as P_i bit 0, so it is ORed into that bit. Only the top digit keeps a
separate bit 4 in its square term. This shortens every square-term row to
three bits (weights 1, 4, 8).

**Sign extension by one constant.** Every row's sign bit is inverted, and one
constant is added:

    K = -sum_{i=0}^{G-2} 2^(N+3i+2)  mod 2^(2N)

For N = 12 this is 0xEDC000. Its ones are at columns 14-16, 18-19 and 21-23.

The matrix for N = 12 (P_i bit j sits at column 6i+4+j, C_i bit k at column
6i+k, and `~` marks an inverted sign bit):

    column      23 ......................... 12 11 ........... 4  3  2  1  0
    P_0                              ~P0,10 ... P0,0 (cols 14..4)
    C_0                                                      C03 C02   C00
    P_1                      ~P1,7 ... P1,0 (cols 17..10)
    C_1                                           C13 C12 . C10 (cols 9..6)
    P_2             ~P2,4 ... P2,0 (cols 20..16)
    C_2                               C23 C22 . C20 (cols 15..12)
    C_3      C34 C33 C32 . C30 (cols 22..18)
    K        1 1 1 . 1 1 . 1 1 1 (cols 23..14)

## 2. Digit encoders

Each group {a[3i+2], a[3i+1], a[3i], a[3i-1]} feeds an encoder. The encoder
outputs the struct `booth_sel_t` = {m4, m3, m2, m1, neg}. It is defined in
`r8sq_pkg` together with the shared geometry functions.

| code | 0000 | 0001 0010 | 0011 0100 | 0101 | 0110 | 0111 | 1000 | 1001 | 1010 | 1011 1100 | 1101 1110 | 1111 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|
| exact digit | 0 | +1 | +2 | +3 | +3 | +4 | -4 | -3 | -3 | -2 | -1 | 0 |
| AR8E1 | 0 | +1 | +2 | **+2** | **+4** | +4 | -4 | **-4** | **-2** | -2 | -1 | 0 |
| AR8E2 | 0 | +1 | +2 | **+2** | **+2** | **+2** | **-2** | **-2** | **-2** | -2 | -1 | 0 |

* AR8E1 (`ar8e1_encoder`) never selects x3. This removes the row adder from
  the approximate bits. Its four recodings err by +1, -1, +1 and -1 digit
  units, so the errors tend to cancel.
* AR8E2 (`ar8e2_encoder`) selects only x1 or x2, like a Radix-4 selector. Its
  digit errors always shrink the magnitude.

The approximate encoders only drive row bits that fall in columns below N
(`APPROX_BITS` of `r8_pp_row`). Bits at column N and above always use the
exact encoder, so one row can mix both encoders. The square terms are always
exact.

## 3. Carry-free compressors and the compensating one (R8AS3)

R8AS3 does not reduce the N low columns with full adders. It uses
compressors that never send a carry to the next column:

| block | outputs (same weight as inputs) | ones out vs. ones in |
|---|---|---|
| `ac21` | S = x1 x2 | one fewer (if any) |
| `ac32` | S1 = x1 x2, S2 = (x1+x2) x3 | one fewer (if any) |
| `ac42` | S1 = x1 x2 + x3 x4, S2 = (x1+x2)(x3+x4) | one fewer, two fewer for 1111 |

`r8_approx_tree` runs in stages. In each stage, every column with two or more
bits is compressed on its own: two bits go through AC_21, three through AC_32,
and four or more send their lowest four slots through AC_42 while the rest
move down. Stages repeat, always at least one, until no column holds more
than two bits. Column heights and the number of stages are worked out at
elaboration from N. At N = 16 one stage is enough and uses only AC_21 and
AC_32. At N = 32 the tree has two stages, and AC_42 covers columns 18-31 in
the first stage.

Almost every compressed column loses about one unit of its own weight, so
the total loss is close to 2^N - 1. A single 1 added at column N (in the
constant row) offsets it. The six lowest columns are dropped outright, which
keeps the remaining error mostly on one side before compensation. After
compensation, errors of both signs remain: at N = 16, 55056 operands come out
above the exact square and 10480 below.

**Reading the output.** The exact square never sets output bit 2N-1. An
approximate result can therefore be read as a signed 2N-bit number. This
matters at N = 32. There the two compressor stages can lose more than the one
compensating 2^32, so a few small operands give a slightly negative result,
which wraps to a large unsigned number. The testbenches read the outputs as
signed.

## 4. Exact reduction and final adder

The folded rows, the merged square-term row, the constant row and (for R8AS3)
the two rows left by the approximate tree are all reduced by `csa_tree`. This
is a row-wise carry-save tree that takes three rows at a time into a row of
full adders. Its two output rows go to `cla_adder`, a carry-lookahead adder
that is recursive in groups of four. `cla_lcu` is the 4-bit lookahead block,
and the same block combines group propagate/generate pairs at each level
above. The width is padded inside to a power of four.

## 5. Modules and parameters

| module | role |
|---|---|
| `r8sq_pkg` | `enc_mode_e`, `booth_sel_t`, matrix geometry functions (`col_height`, `p_slot`, `num_stages`, `sign_const_bit`) |
| `r8_booth_encoder`, `ar8e1_encoder`, `ar8e2_encoder` | digit selects |
| `r8_square_term` | C_i |
| `r8_pp_row` | one folded row (multiples, select, C_i4 fold, sign-bit inversion) |
| `ac21`, `ac32`, `ac42`, `r8_approx_tree` | carry-free compression of the low columns |
| `csa_tree`, `cla_adder`, `cla_lcu` | exact reduction and final addition |
| `r8_booth_squarer` | the squarer core: `N`, `ENC` (ENC_EXACT / ENC_AR8E1 / ENC_AR8E2), `ACOMP`, `TRUNC` (6) |
| `r8as1`, `r8as2`, `r8as3` | the three approximate configurations of the core |
| `r8_squarer_top` | exact, R8AS1, R8AS2 and R8AS3 side by side on one operand `a[N-1:0]`, outputs `sq_exact`, `sq_r8as1`, `sq_r8as2`, `sq_r8as3` (2N bits each) |

Every module accepts any `N >= 4`. Widths that are not multiples of 3 are
handled (13 and 16 are tested).

## 6. Accuracy and verification

The testbenches in `tb/` check themselves and print
`TB_RESULT checks=... failures=...`. Each block is checked against its truth
table or an arithmetic model. The exact squarer is compared with `a*a` for
every 12-, 13- and 16-bit operand and for random 32-bit ones. The approximate
squarers are compared bit-for-bit with `r8sq_ref_pkg`, an integer model. That
model works from digit values and from the compressors' "ones lost" rule, not
from the gates. `tb_r8_squarer_top` runs all 65536 operands through the top at
its default width. It also counts that each approximation actually occurs:
±3 digits rounded up and down, ±4 digits, errors of both signs.

Measured NMED, next to the figures published for the scheme:

| | 12-bit | published | 16-bit | published | 32-bit (200k random) | published |
|---|---|---|---|---|---|---|
| R8AS1 | 1.41e-4 | 2.02e-4 | 0.88e-5 | 1.04e-5 | 2.7e-10 | 2.2e-7 |
| R8AS2 | 1.76e-4 | 2.27e-4 | 1.16e-5 | 1.13e-5 | 3.3e-10 | 2.9e-7 |
| R8AS3 | 4.12e-4 | 3.92e-4 | 2.02e-5 | 2.35e-5 | 7.2e-10 | 4.4e-7 |

The 12- and 16-bit values agree within a factor of 1.5. The 32-bit values
keep the published order but are about 800 times smaller. The published
32-bit figures probably use a different normalisation or a wider approximate
region. The source does not say which, so the 32-bit testbench only checks the
order and an upper bound.

### Application runs

`tb_am_detector` is a square-law AM detector. Two signals are sampled at
20 kHz: a 1 kHz carrier with a 50 Hz message at depth 0.5, and a 1.5 kHz
carrier with a 200 Hz message at depth 0.25. Samples are 16 bits with 14
fraction bits. Each sample is squared by all four squarers. The testbench then
applies a 20-tap moving average, a square root and mean removal. The moving
average has a zero at twice either carrier frequency.

| signal | SNR vs. message, every squarer | SNR vs. ideal-square detector: exact / R8AS1 / R8AS2 / R8AS3 |
|---|---|---|
| 1 kHz / 50 Hz | 34.9 dB | 95.9 / 87.4 / 84.6 / 78.8 dB |
| 1.5 kHz / 200 Hz | 26.0 dB | 88.5 / 84.5 / 79.8 / 81.4 dB |

The detector itself limits the SNR against the message. The squarer's error
is some 50 dB below that. Figures of about 28-29 dB have been published for
this experiment. The filter behind them is unknown, so only the order of
magnitude can be compared.

`tb_kmeans` clusters 600 Gaussian points around three overlapping centres.
Every point-to-centre distance dx^2 + dy^2 is taken from the squarer under
test. The labels of the exact run serve as reference. The F1-measure of each
approximate run is then:

| coordinate format | R8AS1 | R8AS2 | R8AS3 |
|---|---|---|---|
| 11 fraction bits (differences fill the operand) | 1.000 | 1.000 | 1.000 |
| 8 fraction bits (small operands) | 0.998 | 0.990 | 0.963 |
| published (format not stated) | 0.937 | 0.924 | 0.911 |

The approximation only shows when the squared differences fall mostly into
the N low, approximated columns.

## 7. Where this RTL makes its own choices

* **Negative rows** are formed as `|A_i| * ~B_i`, with B_i inverted before the
  multiples are built. This keeps the x3 multiple exact. Inverting after the
  select, which the published bit-level equation suggests, is off by 2 for x3.
* **Negate flag** = a[3i+2] AND NOT(a[3i+1] a[3i] a[3i-1]), as in the
  published equation. (With the inversion done on B_i, the flag a[3i+2] alone
  would do as well.)
* **Compressor placement** follows the column-height rule (2 → AC_21,
  3 → AC_32, ≥4 → AC_42), which reproduces the published 32-bit column map.
  The published 12- and 16-bit designs list AC_21/AC_32/AC_42 at fixed weights
  4-7/8-11/12-15. In the folded matrix those columns hold at most 2, 2 and 3
  bits. An AC_42 with an input tied to 0 computes exactly what an AC_32 does,
  and an AC_32 with a 0 input computes what an AC_21 does. The fixed placement
  therefore gives the same sums as the rule used here. The 16-bit R8AS3 simply
  instantiates the smaller compressors and has no AC_42.
* The always-zero square-term bit C_i1 keeps its place in the approximate
  columns as a constant-0 compressor input, as the published 32-bit column map
  draws it. Only with that slot do the column heights call for exactly the
  compressors of that map in both stages. On column 7 it makes an AC_21 with
  one zero input, which drops that column's other bit. Without the slot the
  R8AS3 NMED would be 4.23e-4 at 12 bits and 2.03e-5 at 16 bits.
* **Truncation** of the six lowest columns applies at every N, not only at 32.
* **Exact reduction** is a row-wise carry-save tree. The source only says the
  reduction is exact.
* Approximate outputs can go slightly negative at N = 32 (section 3).

The amplitude-modulation detector and k-means clustering, which use these
squarers as example applications, are not part of the RTL. Two testbenches
run them around `r8_squarer_top` (next section).

## 8. Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Irtl -Itb -y rtl -y tb \
        rtl/r8sq_pkg.sv tb/r8sq_ref_pkg.sv tb/tb_r8_squarer_top.sv \
        --top-module tb_r8_squarer_top
    ./obj_dir/Vtb_r8_squarer_top

Swap in any other `tb/tb_*.sv` and its module name to run that test.
`tb_r8as_32bit` is the 32-bit accuracy run. `tb_r8as1/2/3` print the 12- and
16-bit NMED. `tb_am_detector` and `tb_kmeans` are the two application runs.
Each run takes seconds.

To change the width, set `N` on `r8_squarer_top` or `r8_booth_squarer`. To
try another configuration, set `ENC`, `ACOMP` and `TRUNC` on
`r8_booth_squarer`. Everything else (groups, row widths, column heights,
number of compressor stages, sign constant) follows from `N` at elaboration.
