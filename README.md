# Single precision floating-point unit with a radix-4 Booth multiplier

This is a small IEEE-754 binary32 arithmetic unit that adds, subtracts and
multiplies two 32-bit floating-point numbers, written to be demonstrated on an
FPGA board that has only 16 switches and 16 LEDs. Its two ideas are:

* the 24 x 24-bit significand product is built from **radix-4 Booth recoded**
  partial products, 13 instead of 24, and
* a 32-bit operand pair and a 32-bit result are moved through the board's
  **16-bit switch and LED banks in halves**, steered by five control inputs.

The whole arithmetic path is combinational. The only state is the four 16-bit
operand registers of the board interface.

## Module hierarchy

```
fpu_top                    board-level top
├── basys3_io              operand entry (switches) and result display (LEDs)
└── fpu_core               operation select
    ├── fp_addsub          add / subtract
    │   ├── fp_unpack x2   operand decomposition
    │   └── fp_round_pack  normalise, round, pack, overflow/underflow
    └── fp_mul             multiply
        ├── fp_unpack x2
        ├── booth_radix4_mult   24x24 significand product
        │   └── booth_encoder x13
        └── fp_round_pack
fp_pkg                     fp32_t struct, flag struct, op codes, constants
```

Every file in `rtl/` holds one module or package of the same name and starts
with a comment describing its interface and timing.

## Number format and operand decomposition

A binary32 word is `{sign[31], exponent[30:23], mantissa[22:0]}`, exponent
biased by 127 (`fp_pkg::fp32_t`). `fp_unpack` restores the hidden bit of a
normal number, giving a 24-bit significand `1.m`. Zero and subnormal numbers
(exponent field 0) get hidden bit 0 and an *effective* exponent of 1, so the
adder and multiplier treat every finite number the same way. Exponent 255 is
Inf (mantissa 0) or NaN.

## Addition and subtraction (`fp_addsub`)

1. The sign of B is flipped for subtraction.
2. The operand with the larger magnitude is found by comparing
   `{exponent, significand}` as one number. The result takes its sign, and the
   significand difference below can never go negative.
3. The smaller significand is extended by three bits (guard, round, sticky)
   and shifted right by the exponent difference in one step. Everything that
   falls off the end is ORed into the sticky bit. With a difference of 27 or
   more only the sticky bit survives.
4. The 27-bit aligned significands are added if the effective signs agree and
   subtracted otherwise, into a 28-bit sum with a carry bit.
5. `fp_round_pack` does the rest. A carry needs a 1-bit right shift. A
   cancellation may need a left shift of up to 27 bits. Deep cancellation only
   happens when the exponents differ by 0 or 1, and then no bit has gone into
   the sticky position, so the left shift stays exact.

An exact zero sum is +0, except when both addends are negative (for example
-0 + -0), which gives -0.

## Multiplication (`fp_mul`, `booth_radix4_mult`)

* sign = sign(A) XOR sign(B)
* exponent = exp(A) + exp(B) - 127, kept as a 12-bit signed value so that
  results out of range can still be detected
* significand = the 48-bit product of the two 24-bit significands, which lies
  in [1, 4) for normal operands and so has two integer bits

The significand multiplier zero-extends the multiplier B to 26 bits and reads
it in 13 overlapping groups `{b[2i+1], b[2i], b[2i-1]}`, with `b[-1] = 0`.
Each group selects one partial product:

| group       | partial product |
|-------------|-----------------|
| 000, 111    | 0               |
| 001, 010    | +A              |
| 011         | +2A             |
| 100         | -2A             |
| 101, 110    | -A              |

`booth_encoder` turns a group into three control bits: zero, double and
negate. Each partial product is formed in 48-bit two's complement and shifted
left by 2i. The 13 partial products are summed modulo 2^48. The true product
is below 2^48, so the sign extensions cancel and the sum is exact. The sum is
one adder chain: there is no Wallace tree and no register stage. A faster
implementation would change this first.

## Normalisation, rounding and packing (`fp_round_pack`)

This is the part that is hardest to get right, and both datapaths share it.
The input is a sign, a signed biased exponent `e` and a W-bit significand
`sig` with two integer bits, i.e.

    value = sig / 2^(W-2) * 2^(e - 127)

(W = 28 from the adder, 48 from the multiplier).

1. **Normalise.** A leading-zero count `lz` shifts `sig` left until bit W-1
   is set, and the exponent becomes `e + 1 - lz`. This one rule covers both
   cases: the right shift after a carry or a product >= 2 (lz = 0, exponent
   +1) and the left shift after cancellation or for a subnormal operand.
2. **Subnormal results.** If the exponent is now below 1, the significand is
   shifted right by `1 - exponent`, and the shifted-out bits go into a sticky
   bit. The exponent field becomes 0. This gives gradual underflow, not a
   flush to zero.
3. **Round to nearest, ties to even.** Keep the top 24 bits. The next bit is
   the guard bit, and all lower bits together with the step-2 sticky form the
   sticky bit. Add one when `guard & (sticky | lsb)`.
4. **Pack by addition.** The word is `((exponent-1) << 23) + rounded_24_bit_significand`.
   A rounding carry out of the significand moves into the exponent without
   any extra logic. A subnormal that rounds up to 2^23 becomes the smallest
   normal number in the same way. A packed exponent of 255 or more is
   replaced by Inf.

## Special values and flags

`fpu_core` returns three flags with every result (`fp_pkg::fp_flags_t`):

| flag      | set when |
|-----------|----------|
| exception | an operand is Inf or NaN |
| overflow  | finite operands give a result that rounds to Inf |
| underflow | a non-zero exact result ends with exponent field 0 (subnormal or zero) |

A NaN operand, Inf - Inf and Inf x 0 give the quiet NaN `7FC00000`. Any other
Inf operand gives an Inf of the matching sign. The flag names come from the
description this unit follows. The exact conditions above are this
implementation's choice: `underflow` is raised even when a subnormal result is
exact, which is stricter than the IEEE-754 default flag.

## Operation select

`fpu_core` runs the adder and the multiplier in parallel, and `op` picks the
output: `00` A+B, `01` A-B, `10` A*B. `11` also selects the multiplier.

## Board interface (`basys3_io`)

Five control inputs select the action. The pin names are those of a Digilent
Basys-3 board:

| btn_a (V16) | btn_b (V17) | btn_out (W16) | btn_mode (W15) | sel (V15) | action |
|---|---|---|---|---|---|
| 0 | 0 | 0 | 0 | 0 | clear A and B |
| 1 | 0 | 0 | 0 | x | A[15:0] <= sw |
| 1 | 0 | 0 | 1 | x | A[31:16] <= sw |
| 0 | 1 | 0 | 0 | x | B[15:0] <= sw |
| 0 | 1 | 0 | 1 | x | B[31:16] <= sw |
| 0 | 0 | 1 | x | 0 | led = result[15:0] |
| 0 | 0 | 1 | x | 1 | led = result[31:16] |

Timing and behaviour:

* Loads are level-sensitive. The chosen half register takes `sw` on every
  rising edge of `clk` while the combination is held.
* Any combination not in the table holds the operands, and the LEDs echo the
  switches so the value being entered can be checked.
* `rst` is synchronous and active high, and clears the operands.
* The result and the flags follow the operand registers combinationally, so
  they are valid one clock edge after the last operand half was loaded.

`fpu_top` also brings out the full 32-bit `result`, the three flags, and the
2-bit `op` select. The board has no pin assigned to `op`, so on hardware it
would be wired to spare switches.

## How far it can be trusted

* The four datapath blocks and the board interface each have a
  self-checking testbench. So does the top, which runs complete sequences:
  switch entry, operation, LED read-back in two halves.
* The expected results come from `tb/fp_ref_pkg.sv`, a reference model that
  works in a different way from the hardware:
  * a sum is formed exactly as a 300-bit integer, a product exactly with `*`;
  * rounding compares the discarded remainder with half an ULP.
* The random operands are biased towards close exponents, near-cancellation,
  subnormals, values near overflow, Inf and NaN.
* About 74,000 checks pass. Each testbench fails on a deliberately broken
  copy of its module: a dropped sticky bit, a wrong bias, a wrong Booth digit,
  round-half-up instead of ties-to-even, and so on.
* The top testbench counts every mechanism and fails if one never occurs:
  clear, reset, the four load steps, both display halves, switch echo, add,
  sub, mul, overflow, underflow, exception, carry and cancellation.

Not covered:

* Nothing has been run on an FPGA.
* No timing figures are given: the unit is combinational, and its depth
  (13-operand adder chain, 48-bit leading-zero count, rounding adder) limits
  the clock of anything that registers its output.
* Only round-to-nearest-even is implemented. No other rounding mode, no
  inexact flag, no division or square root.

## Where this design departs from the description it follows, or fills gaps

* The rounding mode, subnormal support, NaN/Inf rules, the conditions behind
  the three flags and the operation encoding were not specified. They are
  chosen here as IEEE-754 defaults or simple conventions.
* The original text names the display control pin W17 in one place and W16
  in its control table; this design follows the table (W16).
* On the board the LEDs echo the switches when no display is selected; this
  follows a simulation view of the original design.
* A published simulation shows `product_result = 40180000` for operands with
  upper halves `4020` and `3fc0`. That is not the IEEE-754 product of 2.5 and
  1.5 (`40700000`). This design produces the IEEE value, and the top-level
  test checks it.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_fpu_top.sv --top-module tb_fpu_top
./obj_dir/Vtb_fpu_top
```

Replace `tb_fpu_top` with any other `tb_*` to test one block. The block
testbenches are `tb_fp_unpack`, `tb_booth_encoder`, `tb_booth_radix4_mult`,
`tb_fp_round_pack`, `tb_fp_addsub`, `tb_fp_mul`, `tb_fpu_core` and
`tb_basys3_io`. Each testbench ends by printing
`TB_RESULT checks=N failures=M`, and each has a watchdog that fails it if
it hangs. All of them finish in well under a second.

## Changing it

* **Field widths, bias, op codes:** these are in `fp_pkg`. The datapaths are
  written for binary32. `booth_radix4_mult` has a `WIDTH` parameter, and
  `fp_round_pack` has `W` (significand width) and `EW` (exponent width).
* **Pipelining:** a register between `booth_radix4_mult` and `fp_round_pack`
  in `fp_mul`, and another after the alignment adder in `fp_addsub`, are the
  natural cut points. The testbenches apply an operand and sample after a
  delay, so they would need a matching wait.
