# 32-bit floating-point multiplier: modified Booth, Wallace tree, carry look-ahead

This is a pipelined multiplier for IEEE-754 single-precision numbers, written
for FPGAs. Almost all of its logic and delay is in the 24×24-bit significand
product, so that part is built for speed:

- radix-4 (modified) Booth recoding halves the number of partial products to 13;
- a Wallace tree made mostly of 4:2 compressors reduces the 13 rows to two
  in three levels;
- a carry look-ahead adder (CLA) adds the last two rows.

Around that core, simpler logic adds the exponents, normalises the product,
cuts the mantissa to the output width, and handles zero, overflow and
underflow.

The architecture follows a published design: Booth recoding into 13 rows, a
tree of 3:2 and 4:2 compressors, a CLA for the final addition, and the
normalise / round / exponent-check flow. The published design also gives
the exact 4:2 compressor equations, two test vectors and the register
layout. The finer points are this design's own choices, and each one is
named below.

## What it computes

```
c = a × b        a, b: IEEE-754 single (1 sign, 8 exponent, 23 mantissa bits)
c: {sign, 8-bit exponent, MAN_OUT_W-bit mantissa}, exponent bias 127
```

| case | result |
|---|---|
| either operand has exponent field 0 (zero or denormal) | zero: exponent 0, mantissa 0, sign = sign(a) xor sign(b) |
| biased result exponent ≥ 255 | saturates to the largest finite magnitude: exponent 254, mantissa all ones, sign kept |
| biased result exponent ≤ 0 | flushed to zero, sign kept |
| otherwise | the normalised product, truncated (default) or rounded to nearest-even |

Exponent field 255 on an input has no special meaning. Infinity and NaN are
not recognised, and such an operand is multiplied as an ordinary large
number, so the result normally saturates. Denormal inputs are flushed to
zero and denormal results are never produced.

**Rounding.** By default the mantissa is **truncated** (rounded toward
zero). The published design's results show this: `3f67e1fb × 3e0208d5`
gives `3deb9182`, where IEEE round-to-nearest would give `3deb9183`.
Setting `ROUND = ROUND_NEAREST_EVEN` rounds to nearest with ties to even.

**Output width.** `MAN_OUT_W = 23` (default) gives a 32-bit IEEE-single
result, as in the published simulation and pin count.
`MAN_OUT_W = 31` gives the 40-bit extended format (1 + 8 + 31 bits) that
the published text also describes. In that format the product keeps 8 more
bits of its 47 fraction bits. The exponent format is the same in both
widths.

## Pipeline and interface (`float_mult`)

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | rising-edge clock |
| `rst_n` | in | 1 | asynchronous, active low; clears every register |
| `en` | in | 1 | `a`, `b` are valid this cycle |
| `a`, `b` | in | 32 | operands |
| `c` | out | 9 + MAN_OUT_W | product |
| `valid` | out | 1 | `c` holds a new product |

There are two register stages:

```
edge k   : en=1 → a_reg, b_reg ← a, b;  mult_en ← 1      (a_reg/b_reg hold while en=0)
cycle k  : exponent add, Booth → Wallace → CLA, normalise, round, exception check
edge k+1 : c ← result (only if mult_en), valid ← mult_en
```

The latency is two rising edges: operands presented with `en` high at edge
k give `c` with `valid` high right after edge k+1. A new pair can be
presented every cycle. `c` holds its last value while no new result
arrives. `valid` is high for exactly one cycle per accepted pair.

The register set matches the published one: 32 + 32 operand bits, `mult_en`,
23 mantissa bits, 8 exponent bits and `valid`. This design also registers
the sign of the result, which makes 98 flip-flops rather than 97. With
back-to-back operands, a sign formed from the operand registers would
already belong to the next pair.

## The significand multiplier (`mant_mult`)

The significands are `x = 1.a_man` and `y = 1.b_man`, as 24-bit unsigned
numbers. `p = x·y` is 48 bits and lies in [2^46, 2^48).

### Booth recoding (`booth_encoder`, `booth_pp_gen`)

The multiplier `y` is read as a 25-bit two's-complement number with a zero
sign bit. With `y(-1) = 0`, it is cut into 13 overlapping groups
`{y(2i+1), y(2i), y(2i-1)}`, i = 0..12. Each group is a digit

```
d_i = y(2i-1) + y(2i) − 2·y(2i+1)  ∈ {0, ±1, ±2}
y   = Σ d_i · 4^i
```

| y(2i+1) y(2i) y(2i-1) | digit | one | two | neg |
|---|---|---|---|---|
| 000 | 0 | 0 | 0 | 0 |
| 001, 010 | +X | 1 | 0 | 0 |
| 011 | +2X | 0 | 1 | 0 |
| 100 | −2X | 0 | 1 | 1 |
| 101, 110 | −X | 1 | 0 | 1 |
| 111 | 0 | 0 | 0 | 0 |

Row i is built as follows:

- The selects pick 0, X or 2X as a 26-bit value.
- For a negative digit the row is **inverted** (one's complement).
- The row is **sign-extended to the full 48 bits** and shifted left by 2i.

A negative row also needs a +1 to complete the two's complement. That bit
goes into row i+1 at column 2i, which row i+1 leaves empty because it
starts at column 2i+2. The rows are added modulo 2^48. This is exact because
the true product is positive and below 2^48.

The multiplier's sign bit is 0, so the top group is `{0, 0, y23}` and its
digit is 0 or +X. It never needs a +1 that would have no row to go into,
and 13 rows are enough. An assertion in `booth_pp_gen` checks this.

### 4:2 compressor (`compressor_4_2`)

One cell adds four bits of equal weight plus a carry from the bit below:

```
P1 + P2 + P3 + P4 + CIN = S + 2·(C + COUT)

X    = P1 ⊕ P2 ⊕ P3 ⊕ P4
S    = X ⊕ CIN
COUT = P1·P2 + P3·P4
C    = X ? CIN : (P1 + P2)·(P3 + P4)
```

COUT does not depend on CIN. A row of cells chains COUT of bit i into CIN
of bit i+1, and no carry ripples along it. S and COUT are the published
equations. C is the one function that makes the cell exact with that COUT:

- With an odd number of ones among P1..P4, CIN settles the sum.
- With an even number, C must carry exactly when the ones are not both
  inside one pair.

It is not the "generate-or-propagate" form that is often quoted. That form
is wrong with this COUT: for 1110 with CIN = 0 it would give 5, not 3.

`csa_3_2` is a plain full adder, the 3:2 compressor.
`compressor_4_2_row` and `csa_3_2_row` are W-bit rows. Each returns its
carry vector already shifted to its weight and drops what leaves bit 47.

### Wallace tree (`wallace_tree`)

```
level 1:  rows 0-3 → 4:2   rows 4-7 → 4:2   rows 8-11 → 4:2   row 12 passes      13 → 7
level 2:  4 of those → 4:2                   other 3 → 3:2                         7 → 4
level 3:  4:2                                                                      4 → 2
```

The tree has three compressor levels. The grouping is this design's own; the published description
gives only the style of connection. The two outputs, Sum and Carry, go to
the CLA.

### Carry look-ahead adder (`cla4`, `cla_lcu4`, `cla_adder`)

`cla4` is the 4-bit block:

- bit generate `g = x & y` and propagate `p = x ^ y`;
- every carry c1..c4 written out from g, p and c0, so all carries appear
  at once;
- the block's group generate G and group propagate P as outputs.

`cla_adder` pads to 64 bits and uses 16 blocks. Four look-ahead carry units
(`cla_lcu4`, which use the same equations on G/P) give the carries between
blocks within each 16-bit group, and a fifth gives the carries between the
groups. This three-level arrangement is this design's choice; the published
description shows only the 4-bit block.

## Exponent, normalisation, exceptions

- **`fp_exp_add`**: `e_sum = a_exp + b_exp − 127`, as a signed 10-bit value.
- **`fp_normalize_round`**: `p` lies in [1, 4) with its binary point after
  bit 46.
  - If bit 47 is set, the product is shifted right by one and the exponent
    gets +1. Otherwise it is used as it is.
  - The product of two significands in [1, 2) is always below 4. The
    two-place shift that the published flow also lists can therefore never
    occur and is not built.
  - The 47 fraction bits are cut to MAN_OUT_W.
  - With round-to-nearest, a mantissa of all ones can round up to 2.0. It
    then becomes 1.0 and the exponent gets another +1.
- **`fp_exception`**: saturates on overflow, flushes on underflow or zero,
  and packs the result (see the table above). The published flow names the
  zero exponent "−128". Here it is the all-zero exponent field.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| `float_mult`, `fp_normalize_round`, `fp_exception` | `MAN_OUT_W` | 23 | output mantissa bits (31 = 40-bit extended format) |
| `float_mult`, `fp_normalize_round` | `ROUND` | `ROUND_TRUNC` | or `ROUND_NEAREST_EVEN` |
| `mant_mult`, `booth_pp_gen` | `N` | 24 | significand width; the tree is wired for 13 rows, so 23 or 24 |
| `wallace_tree`, `cla_adder` | `W` | 48 | row width (`cla_adder`: up to 64) |
| `fp_exp_add` | `E`, `BIAS` | 8, 127 | exponent width and bias |

Shared constants and the `fp32_t` operand struct are in `rtl/fpm_pkg.sv`.

## Verification

Every module has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=N failures=M`.

- Exhaustive tests: `booth_encoder` (8 codes), `compressor_4_2` (32 inputs,
  including the S and COUT equations), `csa_3_2`, `cla4` (512 inputs,
  including G and P) and `fp_exp_add` (all 65,536 exponent pairs).
- `booth_pp_gen` checks every row against its Booth digit, and the row sum
  against x·y.
- `wallace_tree`, `cla_adder` and `mant_mult` are checked with random and
  corner values against integer arithmetic.
- `fp_normalize_round` runs in all four width/rounding configurations
  against a reference that reads the product's double-precision encoding.
  The cases include ties and round-up carries.
- `tb_float_mult` runs the top at its default parameters against a
  double-precision reference model (`tb/fpm_ref_pkg.sv`). Both operands
  are widened to doubles, multiplied exactly, then cut to the output
  format.
  - It checks the two published pairs bit for bit: `3f67e1fb × 3e0208d5 =
    3deb9182` and `3f78e1fb × 3e0299d5 = 3dfdf09f`.
  - It checks the two-edge latency of every result, and that `valid` never
    rises without a pending result.
  - It counts each mechanism and fails if one never occurs: both
    normalisation outcomes, zero operands, overflow, underflow,
    back-to-back issue, gaps and a reset mid-stream.
- `tb_float_mult_ext` runs the 40-bit truncating, 40-bit nearest-even and
  32-bit nearest-even configurations side by side.

Not verified: timing. FMAX and area on an FPGA depend on the vendor flow.
The published implementation reports about 1,800 logic elements and 34 MHz
on a Cyclone IV E, with the same two register stages as here.

## Simulating

With Verilator 5 (two-state simulation, so every register is reset):

```sh
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fpm_pkg.sv tb/fpm_ref_pkg.sv tb/tb_float_mult.sv --top-module tb_float_mult
./obj_dir/Vtb_float_mult
```

Replace `tb_float_mult` with any other `tb_*` to run one block's test.
Modules are found through `-Irtl`, one module per file. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/fpm_pkg.sv rtl/<module>.sv`.

Some unused-signal warnings remain by design:

- the padding bits of `cla_adder` and its top-level group G/P;
- the carry out of the top bit of each compressor row;
- the `shifted`, `ovf` and `unf` status nets in `float_mult`, which the
  testbench observes.
