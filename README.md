# Hybrid radix-4 array divider

This is a combinational divider that produces two quotient bits per stage, using the
recurrence

    R(j+1) = 4*R(j) - q(j+1)*Y,    q in {-2, -1, 0, 1, 2}

It is "hybrid" because the partial remainder and the quotient are redundant signed-digit
numbers, while the divisor stays an ordinary binary (radix-4, digits 0..3) number. A
redundant remainder needs no carry propagation: each digit position adds the selected
multiple of Y with a small cell whose carry moves only one digit to the left. The quotient
digit is picked from the **two leading remainder digits only**. That works because the divisor
is first scaled into the narrow range 1 <= Y < 1 + 1/8.

At the default size (`N = 9`) the divider has 8 stages ("slices"). Each slice delivers one
radix-4 digit, giving 16 quotient bits. There are no registers: a result appears one array
delay after the operands.

## Number formats

**Remainder digits** take values -2..2 and use three wires,
`value = p + pp - 2*m2` (`hr4_pkg::sd_digit_t`). The `pp` wire of a digit is always driven
by the carry out of the next lower position. Zero, +1 and -1 each have two codes. Remainder
digit `r[i]` has weight 4^-i, for i = 1..N-1, so |R| <= 2/3.

**Divisor digits** are two bits each, a weight-2 bit and a weight-1 bit. After scaling, the
divisor is `1.0 y2 y3 ... y(N-1)` in radix 4:

- digit 0 is 1;
- digit 1 is 0;
- digit 2 is at most 1.

Only digits 2..N-1 reach the array.

**Quotient digits** use the `(add, u1, u2)` code (`hr4_pkg::qdigit_t`):

| add | u1 | u2 | digit |
|-----|----|----|-------|
| 0 | x | 0 | 0 |
| 0 | 0 | 1 | +1 |
| 0 | 1 | 1 | +2 |
| 1 | 0 | 0 | -1 |
| 1 | 1 | 0 | -2 |
| 1 | x | 1 | "minus zero" |

`add` means the multiple is added (the digit is negative). `u1` selects 2Y rather than Y.
`u2` has two jobs:

- it makes the LOW_MUX complement the multiple when subtracting;
- it is the +1 injected at the least significant position that completes that
  one's complement.

Minus zero adds all ones plus that +1, which is zero, but it moves one unit between the
leading digit and the rest. The selector needs this for exactly one case (see below).

## One slice: HEAD and TAILs

`hr4_slice` is one step of the recurrence. The shift by 4 is wiring: digit `i+1` of R(j)
lines up with digit `i` of R(j+1).

- **TAIL cell** (`hr4_tail`), one for each digit position 2..N-1:
  - **UP_MUX** (controlled by `u1`) picks digit i of Y or of 2Y. The digit of 2Y is the
    low bit of `y_i` followed by the high bit of `y_(i+1)`.
  - **LOW_MUX** (controlled by `add`, `u2`) outputs `my = add&x | u2&~x` per bit. This gives
    0, the complement, the true value or all ones.
  - The **hybrid adder** (`hr4_hyb_adder`) adds `my` (0..3) to remainder digit `i+1`. It
    has two cells:
    - a full adder sums the three weight-1 wires;
    - a **PPM** cell (`hr4_ppm`, "plus-plus-minus": +2, -2 and +2 in; +4 and -2 out)
      handles weight 2.

    The PPM is the same full adder with one input and the sum inverted. The +4 output is
    the `pp` wire of the digit one place to the left. Each carry moves one position only.
- The `pp` wire of the last digit is driven by `u2`, the +1 of a subtraction.
- **HEAD cell** (`hr4_head`) = quotient selector + one hybrid adder for digit 1. The divisor
  digit there is 0 for both Y and 2Y, so the adder adds `3*u2` to `r2`. Its carry out, and
  everything at weight 1, is dropped. The next section explains why nothing is lost.

## Quotient selection (the subtle part)

Let `E = 4*r1 + r2`, an integer from -10 to 10. The new digit 1 comes out as
`4*(r1 - q) + r2 - u2 + carry`. With a carry of 0 or 1 it stays within -2..2 exactly when
`4*(r1 - q) + r2 - u2` is in -2..1. Solving for q gives the selection rule in `hr4_qsel`:

| E | -10..-7 | -6..-3 | -2..1 | 2 | 3..6 | 7..10 |
|---|---------|--------|-------|---|------|-------|
| q | -2 | -1 | 0 | minus zero | +1 | +2 |

For E = 2, plain zero would leave a leading digit of 2 before the carry, so minus zero (u2 = 1)
is required. For E = -1..1 either zero works; this design uses plain zero.

Because the leading value is then fixed by its residue mod 4, the HEAD's adder only needs the
low two wires of `r2 + 3*u2`.

In terms of 4R, the digits below r2 add at most ±1/6. So the rule selects:

- q = 0 for 4R in [-2/3, 2/3];
- q = 1 for [7/12, 5/3];
- q = 2 for [19/12, 8/3];
- and the mirror image for negative digits.

The overlaps are the redundancy that makes a two-digit look-ahead enough.

The logic equations (the `r*` are digit `r1`):

    m2 = (r2 == -2)                 p2 = (r2 == +2)
    u1 = ~p2 & ~r1.p & ~r1.pp  |  ~m2 & r1.p & r1.pp
    u2 = (r1 == 1) | (r1 == 2) | (r1 == 0) & p2
    add = (r1 == -2) | (r1 == -1) & ~p2 | (r1 == 0) & p2 | (r1 == 1) & m2

`u1` only matters when the digit is ±2. It is therefore allowed to be 1 for some zero digits,
which keeps it a two-term expression.

## Range reduction (`hr4_prescale`)

X and Y are multiplied by the same constant K, so X/Y is unchanged and 1 <= K*Y < 9/8. The
index is the four fraction bits of Y after the binary point:

| index | K | index | K |
|---|---|---|---|
| 0-1 | 1/2+1/4+1/4 | 8-9 | 1/2+1/8+1/16 |
| 2 | 1+1/16-1/8 | 10-11 | 1/4+1/4+1/8 |
| 3 | 1/2+1/4+1/8 | 12 | 1/2+1/16+1/32 |
| 4-5 | 1/2+1/4+1/16 | 13-15 | 1/4+1/4+1/16 |
| 6-7 | 1/4+1/4+1/4 | | |

Each K is three power-of-two terms. The product is therefore a row of full adders
(carry-save) followed by one carry-propagate adder.

For index 2 (1.125 <= Y < 1.1875), no sum of three *positive* powers of two fits. That entry
subtracts its third term: the complemented input plus a +1 in the free carry LSB. The table is
this design's choice; any K per interval with 1 <= K*Ymin and K*Ymax <= 9/8 will do.

Products are exact, with 5 guard bits, and then truncated toward minus infinity. The scaled
dividend is recoded into remainder digits by wiring alone, with radix-4 Booth recoding:
`m2` = high bit of the pair, `p` = low bit, `pp` = high bit of the next lower pair.

## On-the-fly quotient conversion (`hr4_otf_stage`)

Beside each slice, two two's complement words are kept: Q and QM = Q - 1. Appending digit q
works as follows:

- `Q' = q >= 0 ? {Q, q} : {QM, q+4}`
- `QM' = q > 0 ? {Q, q-1} : {QM, q+3}`

This is a 2-way selection and a 2-bit append, with no carry chain. The words start at Q = 0
and QM = -1.

## Top level and interface (`hr4_divider_top`, parameter `N`, default 9)

| port | dir | width | meaning |
|---|---|---|---|
| `x` | in | 2N-2 | dividend, two's complement, value `x * 2^-(2N-2)` in [-1/2, 1/2) |
| `y` | in | 2N-1 | divisor mantissa, value `y * 2^-(2N-2)` in [1, 2) (top bit 1) |
| `quo` | out | 2N-1 | quotient Q, two's complement, units 4^-(N-1) |
| `q_dig` | out | (N-1)×3 | quotient digits q1..q(N-1) in the code above |
| `rem` | out | (N-1)×3 | final remainder digits |
| `xs`, `ys` | out | as x, y | scaled operands K*X and K*Y |

With all values as integers in units of u = 4^-(N-1), the outputs satisfy
`xs * 4^(N-1) = quo * ys + rem` exactly. |rem| is at most (2/3)*4^(N-1), so `quo` is within
about 2 units of X/Y. A negative final remainder is **not** corrected, so the quotient may be
one unit above the truncated quotient.

## Where this follows the source and where it does not

Taken from the source description:

- the recurrence and digit sets;
- the remainder and quotient-digit codes;
- the HEAD/TAIL organisation with one-digit carries;
- the UP_MUX/LOW_MUX/PPM/FA make-up of the TAIL;
- the PPM built from a full adder;
- the `u1` equation and the structure of `u2`;
- range reduction by a three-term constant;
- on-the-fly conversion.

This design's own choices:

- **Selection rule and `add` equation.** Derived from the arithmetic above and checked
  exhaustively; they agree with the published selection boundaries.
- **`u2` as the LSB +1.** `u2` drives the last digit's `pp` wire, which is the +1 that
  completes the one's complement.
- **LOW_MUX table.** Its mapping is derived from the quotient code.
- **TAIL count.** The slice has N-2 TAIL cells (positions 2..N-1) plus the HEAD for
  position 1.
- **The K table.** It includes one entry with a subtracted term.
- **Operand formats.** The x/y formats and the Booth-style dividend recoding are this
  design's own.
- **No remainder correction.** None is made.

Not modelled:

- transistor-level details, such as the inverting "symmetrical" full adder;
- the layout and pads of the original chip.

## Files

- `rtl/hr4_pkg.sv` holds the digit types and two value helpers.
- The cells, bottom up: `hr4_fa`, `hr4_ppm`, `hr4_hyb_adder`, `hr4_tail`, `hr4_qsel`,
  `hr4_head`, `hr4_slice`, `hr4_otf_stage`, `hr4_array`, `hr4_prescale`, `hr4_divider_top`.
- Every module has a self-checking testbench `tb/tb_<module>.sv`. Each ends by printing
  `TB_RESULT checks=... failures=...`.

The small cells are tested exhaustively. The slice, array, scaler and top are tested with
random operands against integer reference arithmetic. The top's testbench runs at the
default size and also sweeps every one of the 2^16 divisor mantissas. It also counts every quotient digit value, minus zero, every scaling constant,
negative dividends and negative remainders, and fails if any of them never occurs.

To simulate with Verilator 5:

    verilator --binary --timing -Irtl rtl/hr4_pkg.sv tb/tb_hr4_divider_top.sv \
        --top-module tb_hr4_divider_top -o sim && obj_dir/sim

To change the size, set `N` on `hr4_divider_top` (N >= 3). The quotient has 2(N-1) bits.
