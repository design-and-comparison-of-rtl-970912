# Radix-8 and radix-16 Booth multipliers, 16 × 16 signed

A plain array multiplier adds one partial product per multiplier bit: sixteen
rows for a 16-bit operand. Higher-radix Booth recoding cuts that number by
reading the multiplier several bits at a time and turning each group into one
signed digit. A radix-8 digit covers 3 bits and lies in −4…+4; a radix-16
digit covers 4 bits and lies in −8…+8. Fewer rows mean a shallower adder, but
the digits now ask for multiples of the multiplicand that are not simple shifts
(3M for radix-8; 3M, 5M and 7M for radix-16), and each of those costs a
carry-propagate adder before the partial products can even be formed.

This RTL implements both variants as two separate, purely combinational
16 × 16 two's complement multipliers, so that they can be simulated,
synthesised and compared side by side:

| | radix-8 (`booth_r8_mult`) | radix-16 (`booth_r16_mult`) |
|---|---|---|
| bits per digit | 3 (group of 4 with overlap) | 4 (group of 5 with overlap) |
| digit set | −4 … +4 | −8 … +8 |
| partial products, N = 16 | 6 | 4 |
| hard multiples (adders) | 3M (1) | 3M, 5M, 7M (3) |
| partial product width | N + 2 = 18 bits | N + 3 = 19 bits |

For reference, an FPGA implementation of these two designs (Virtex-4) was
reported at 25.18 ns / 773 four-input LUTs for radix-8 and 25.00 ns / 1188 LUTs
for radix-16: radix-16 slightly faster, at about 1.5 times the area.

## Recoding the multiplier

The multiplier `b` gets a 0 appended below its LSB (bit y₋₁) and is
sign-extended at the top until it fills a whole number of groups. Group `j`
of a radix-2^K multiplier is the K+1 bits `y[K·j+K-1 … K·j-1]`; neighbouring
groups share one bit. Its digit is the group read as a two's complement number
with the overlap bit added:

    radix-8:  d = −4·y[i+2] + 2·y[i+1] + y[i] + y[i−1]
    radix-16: d = −8·y[i+3] + 4·y[i+2] + 2·y[i+1] + y[i] + y[i−1]

and `b = Σ d_j · 2^(K·j)` exactly. The two encoders (`booth_r8_encoder`,
`booth_r16_encoder`) hold these mappings as a 16-entry and a 32-entry case
table. A run of ones costs nothing (`1111` and `11111` give 0), the top code of
a positive run gives the largest positive digit (`0111` → +4,
`01111` → +8) and `1000` / `10000` the most negative one.

For N = 16 the radix-8 multiplier needs ⌈16/3⌉ = 6 groups; the top group is
`{b15, b15, b15, b14}`, whose digit is −b15 + b14 (−1, 0 or +1). The radix-16 multiplier
needs exactly ⌈16/4⌉ = 4 groups and no extension.

Digits travel in sign/magnitude form, `booth_pkg::booth_digit_t`
(`neg`, 4-bit `mag`). Zero is always encoded as `+0`.

## Multiples and partial products

`booth_multiples` forms `k·M` for k = 0 … MAXMAG once per multiplier, in
`W = N + log2(MAXMAG)` bits, which is just enough for `MAXMAG · M` at any N-bit
signed M. Even multiples are wires (`2M = M≪1`, `6M = 3M≪1` …); each odd one
is `(k−1)·M + M`, one adder each.

`booth_pp_select` (one per digit) picks `mult[mag]` and, for a negative digit,
inverts it. The +1 that completes the negation is not added in the row; it
leaves as `neg` and is added in the row's lowest column by the summation. The
row therefore equals `digit·M − neg`, and no adder sits between the recoder and
the summation.

## The sign-extension trick

Row j has weight 2^(K·j) and is W bits wide, but the product is 2N bits wide.
Sign-extending every row to the left edge would make each row 2N bits and
every upper column would carry copies of sign bits. Instead, `booth_pp_sum`
uses the identity

    sext(x) = (x XOR 2^(W−1)) − 2^(W−1)

for each W-bit row x: flip its sign bit, keep the row W bits wide, and
collect all the `−2^(W−1+K·j)` terms into one constant

    CORR = − Σ_j 2^(W−1+K·j)   (mod 2^(2N))

which is computed at elaboration time (a function of N and K) and added once.
The product is then

    product = CORR + Σ_j ( {~row_j[W−1], row_j[W−2:0]} + neg_j ) · 2^(K·j)   (mod 2^(2N))

Bits that fall above column 2N−1 (the last radix-8 row reaches column 32) are
dropped, which is exact because the whole sum is taken modulo 2^(2N).

The sum itself is written as one multi-operand addition and left to the
synthesis tool. No particular adder tree or final adder is prescribed; swapping
in a Wallace/Dadda tree with a fast final adder is the obvious place to change
the design's speed, and it would not change any interface.

## The overflow output

Each multiplier has an `ovf` output. A 16 × 16 signed product always fits 32
bits, so `ovf` here reports that the product does not fit in **N** bits signed,
that is, that truncating it to the operand width would change its value
(upper N+1 product bits not all equal). Ignore it if the full product is used.

## Modules

| module | what it is |
|---|---|
| `booth_pkg` | `booth_digit_t`, `num_pp(n, k)` |
| `booth_r8_encoder`, `booth_r16_encoder` | group → digit tables |
| `booth_multiples` | 0…MAXMAG × M |
| `booth_pp_select` | one partial product row per digit |
| `booth_pp_sum` | sign-extension trick and final sum |
| `booth_r8_mult`, `booth_r16_mult` | the two multipliers, parameter `N` (default 16) |
| `booth_mult_top` | both multipliers side by side, ports `r8_*` and `r16_*` |

Multiplier ports: `a` (multiplicand, N bits), `b` (multiplier, the recoded
operand, N bits), `product` (2N bits), `ovf`. All are two's complement. There is
no clock and no reset: outputs follow the inputs after one combinational delay,
with no latency in cycles. Register the inputs and outputs outside if the
multiplier is to sit in a pipeline.

`N` can be changed on either multiplier; the number of groups, the row width and
the correction constant follow from it. The radix is fixed per module
(K = 3 or 4); `booth_multiples` and `booth_pp_sum` take `MAXMAG` and `K` so they
serve both.

## Where this departs from, or adds to, the original description

- **Partial product counts.** The original text states four partial products
  for radix-8 and five for radix-16. Four radix-8 rows cover only 12 multiplier
  bits, and five radix-16 rows are what an *unsigned* 16-bit multiplier needs.
  This RTL multiplies signed 16-bit operands and uses 6 (radix-8) and 4
  (radix-16) rows, the counts that cover all 16 bits of a two's complement
  multiplier.
- **Sign handling.** Operands are two's complement only; there is no unsigned
  mode.
- **Own choices** where the description says nothing: how the hard multiples are
  built (one adder each), negation as invert-plus-carry-in, the constant form of
  the sign-extension trick, the adder for the rows, the sign/magnitude digit
  encoding and the meaning of `ovf`.
- The recoding tables are followed exactly.

## Simulating

Every module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and stops itself with a watchdog:

| testbench | covers |
|---|---|
| `tb_booth_r8_encoder`, `tb_booth_r16_encoder` | all group codes against the digit formula |
| `tb_booth_multiples` | k·M for both MAXMAG values, corners and random M |
| `tb_booth_pp_select` | random multiples and digits |
| `tb_booth_pp_sum` | random digit vectors for K = 3 and 4 against Σ d_j·M·2^(Kj) |
| `tb_booth_r8_mult`, `tb_booth_r16_mult` | N = 16 corner and 20 000 random pairs; N = 8 exhaustive (65 536 pairs) |
| `tb_booth_mult_top` | both multipliers at default size, corner × corner and 40 000 random pairs, cross-check of the two, coverage of every group code and both `ovf` values |

Products are compared with the simulator's own signed multiplication. With
Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/booth_pkg.sv \
        tb/tb_booth_mult_top.sv -y rtl --top-module tb_booth_mult_top
    ./obj_dir/Vtb_booth_mult_top

Replace the testbench name to run another one. Each runs in well under a
second.
