# HYLO — a hybrid logarithmic approximate multiplier

HYLO is a 16-bit signed approximate multiplier. It approximates only the low-order
part of the product and computes the rest exactly. That keeps the error small while
the partial-product array shrinks from the eight rows of a radix-4 Booth multiplier
to four rows. It mixes the two common families of approximate multipliers:

- **Truncated / Booth-style multipliers.** The high-order partial products are made
  exactly with radix-4 Booth selection.
- **Logarithmic multipliers.** The one real multiplication left, between the two
  14-bit low segments, is replaced by shifts around the operands' leading ones. This
  is the first step of an iterative logarithmic multiplier.

The RTL here is purely combinational: two operands in, the approximate 32-bit product
out, with no clock and no registers. It is parameterised by the operand width `N`
(default 16).

## Splitting an operand

Each operand is cut into a 2-bit most significant segment (MSS) and a 14-bit least
significant segment (LSS). The two segments overlap on bit 13, and this is the key to
the whole design:

```
X1 = -2*x15 + x14 + x13          radix-4 Booth digit, value in -2..2
X0 = x[13:0] read as a signed 14-bit number
X  = X1 * 2^14 + X0              (exact for every 16-bit X)
```

Bit 13 enters `X1` with weight +1 (times 2^14) and `X0` with weight -2^13 (its sign
bit). The two contributions add up to the bit's true weight of 2^13. As a result both
segments are signed, and the top segment is one Booth digit. Multiplying out gives

```
X*Y = X1*Y1 * 2^28                 PP3  exact, tiny digit multiplier
    + X1*Y0 * 2^14                 PP2  exact, Booth selection of Y0
    + Y1*X0 * 2^14                 PP1  exact, Booth selection of X0
    + X0*Y0                        PP0  approximated (two rows, PP01 + PP02)
```

For a general `N`, the shifts are 2^(2(N-2)) and 2^(N-2).

## The exact partial products

- `booth_r4_encoder` turns `{x15, x14, x13}` into the select lines `neg`, `one` and
  `two` (type `booth_digit_t` in `hylo_pkg`).
- `booth_pp_gen` forms `digit * operand`. It picks 0, the operand or the operand
  shifted left by one, then negates in two's complement if the digit is negative.
  The output is 16 bits.
- `msb_digit_mult` multiplies the two digits. The product is one of 0, ±1, ±2 or ±4,
  so a four-output sum-of-products circuit on the six select lines replaces a
  multiplier. Its equations are given in the module header.

## The logarithmic product (`log_pp_gen`)

This is the part that needs the most care. Write `|X0| = 2^kx + X00`, where
`kx = floor(log2|X0|)` and `X00` is what lies below the leading one. Then exactly

```
X0*Y0 = sign(X0) * Y0 * 2^kx  +  sign(X0*Y0) * X00 * |Y0|
```

HYLO keeps the first term exact. In the second term it replaces `|Y0|` by its
leading power of two, `2^ky`:

```
PP01 = sign(X0)    * Y0  * 2^kx
PP02 = sign(X0*Y0) * X00 * 2^ky
```

The data path:

1. Two `sign_conv` blocks take `|X0|` and `|Y0|`. A `sign_conv` block computes
   `(a XOR neg) + neg`.
2. Two leading-one detectors (`lod`) mark the leading one of each magnitude as a
   one-hot vector.
3. Two `priority_encoder` blocks turn those vectors into `kx` and `ky`.
4. `|X0|` XOR its one-hot vector clears the leading one, which leaves `X00`.
5. A third `sign_conv` gives `X00` the sign of the product.
6. Two `barrel_shifter` blocks form the rows. The exponents cross over: `kx` shifts
   `Y0` and `ky` shifts `X00`.
7. A fourth `sign_conv` applies `sign(X0)` to the shifted `Y0`.

Points where this RTL makes its own choice:

- **Sign of PP02.** PP02 takes the sign of the product `X0*Y0`. Taking the sign of
  `Y0` alone would give the wrong sign whenever `X0 < 0`. It would also raise the mean
  relative error from about 1.9 % to about 5.9 %.
- **Where sign(X0) is applied.** `Y0` goes into its shifter unchanged, and `sign(X0)`
  is applied after the shift. The 28-bit output has room for `|Y0| * 2^13`, so
  `Y0 = -8192` needs no extra bit.
- **Zero operands.** If `X0 = 0`, the detector output is all zeros, so `X00 = 0`, and
  PP01 is forced to 0. If `Y0 = 0`, `ky` means nothing, so PP02 is forced to 0. A zero
  low segment therefore gives `PP0 = 0`, which is exact.

PP0 is exact whenever `|X0|` or `|Y0|` is zero or a power of two. Otherwise it
underestimates the magnitude of `X0*Y0`.

## Summation

The five rows are aligned and sign-extended to 32 bits: PP3, PP2, PP1, PP01 and PP02.

- **`wallace_tree`** reduces them to two rows in three levels of full-adder rows
  (`csa_row`): 5 → 4 → 3 → 2.
- **`cla_adder`** adds the two rows. It is a three-level carry-lookahead adder built
  from 4-bit lookahead units (`lcu4`). The levels work on bits, 4-bit groups and
  16-bit sections. Its width must be a multiple of 16 and at most 64.

Sign extension is done in full. There are no sign-extension-prevention constants.
With 32 bits the cost is small.

## Accuracy

Over 10,000 pairs of uniformly random 16-bit signed operands, the mean relative error
is about 1.85 %. The end-to-end testbench measures it on every run. The published
evaluation of the HYLO scheme reports 4.13 %, but does not say how its operands were
distributed. This RTL has not been reconciled with that figure. The testbench checks
only that the error stays below it. The published power, area and delay figures are
for a 180 nm standard-cell implementation. They cannot be checked from RTL.

## Module hierarchy

```
hylo_mult                 top: x, y (signed N) -> p (signed 2N)
├── booth_r4_encoder ×2   MSS digits X1, Y1
├── msb_digit_mult        PP3 = X1*Y1
├── booth_pp_gen ×2       PP2 = X1*Y0, PP1 = Y1*X0
├── log_pp_gen            PP01, PP02 ≈ X0*Y0
│   ├── sign_conv ×4
│   ├── lod ×2
│   ├── priority_encoder ×2
│   └── barrel_shifter ×2
├── wallace_tree          5 rows -> 2 (csa_row ×3)
└── cla_adder             final 32-bit add (lcu4 ×11)
hylo_pkg                  booth_digit_t
```

Each file in `rtl/` holds one module or package. The opening comment of each file
covers:

- how the module works
- its ports and timing
- which parts follow the HYLO scheme and which are this implementation's choices

## Simulating

Every block has a self-checking testbench in `tb/`, named `tb_<module>.sv`. Each one
prints `TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl rtl/hylo_pkg.sv tb/tb_hylo_mult.sv \
          --top-module tb_hylo_mult -Mdir obj_hylo -o sim
./obj_hylo/sim
```

Use the same command for any other testbench. Always list the package file first.

`tb_hylo_mult` runs the top at its default size. It compares every result bit for
bit with an integer reference model of the equations above. It also:

- checks that results are exact where the approximation must be exact
- reports the mean relative error
- counts how often each mechanism occurred, and fails if one never did

The mechanisms are: every digit value of both operands, zero low segments, all four
sign combinations of `X0` and `Y0`, a vanishing `X00`, and a non-zero PP3.

The unit testbenches are exhaustive wherever the input space is small: the encoder,
the digit multiplier, `sign_conv`, `lod` and the priority encoder. The others use
corner cases plus random vectors.

## Changing it

- **`N`** (`hylo_mult`) sets the operand width. It must be a multiple of 8, from 8 to
  32, because the product width 2N must suit `cla_adder`. The MSS stays at 2 bits (one
  Booth digit) for every `N`. `tb_hylo_mult` is written for `N = 16`.
- **Timing.** To pipeline the multiplier, the natural cut is between partial-product
  generation and the Wallace tree. The logarithmic path (sign conversion → LOD →
  encoder → shifter → sign conversion) is much longer than the Booth paths.
