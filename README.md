# Geometric-mean approximate floating-point adder

This is a floating-point adder for non-negative operands. It has no alignment shifter, no
normaliser and no rounding logic. It replaces the sum with its geometric-mean estimate:

    x + y  ~  max(x, y, 2*sqrt(x*y))

When x and y are close, `2*sqrt(x*y)` is close to `x + y`, and it is exact when x = y. When one
operand is more than four times the other, the larger operand alone is the better answer, so the
maximum picks it. The worst relative error of this rule is -0.2, at x = 4y, and it is the same in
every format.

The estimate costs almost nothing on the raw bit patterns. Read the pattern of a positive float
as an unsigned fixed-point number with `MAN_W` fraction bits. That number is `log2(x)` plus a
constant bias (Mitchell's approximation). In this domain:

| real operation | on bit patterns X, Y                 |
|----------------|--------------------------------------|
| x * y          | X + Y - B  (B = bias << MAN_W)       |
| sqrt(x)        | (X + B) >> 1                         |
| 2 * x          | X + D      (D = 1 << MAN_W)          |

The bias cancels, and `2*sqrt(x*y)` becomes `(X + Y + 2D) >> 1`. Positive float patterns sort
in the same order as their values, so the maximum is a plain unsigned comparison. The circuit is:

    y = max(X, Y, (X + Y + C) >> 1),      C = 2D + 1 = 2^(MAN_W+1) + 1

It needs one three-input adder, whose `>> 1` is only wiring, and two magnitude comparators.

## Why C = 2D + 1

With `C = 2D` (exactly the formula above), the integer floor moves the crossover point by one
pattern. The worst error is then `-(1+u)/(5+u)`, where `u = 2^-MAN_W`. It occurs when x is a
power of two and y is the pattern just above x/4. Adding 1 to the constant has three effects:

* The worst error becomes exactly -0.2 (at x = 4y) for every format.
* If the two operands have the same exponent, the mean term is the correctly rounded sum. The
  result has exponent `E+1` and mantissa `(ma + mb + 1) >> 1`, so ties round up. With `C = 2D`,
  ties round down.
* If the exponents are three or more apart, `X - Y > 2D` and the result is the larger operand.
  Once the exponents differ by more than `MAN_W`, that is also the correctly rounded sum.

Inexact results therefore come from two bands of operand pairs:

* **Exponents one or two apart.** The mean term supplies the result. An odd exponent sum moves
  half a unit into the mantissa, and the geometric mean falls short of the arithmetic one.
* **Exponents 3 to `MAN_W` apart.** The larger operand is returned, and the smaller one's
  contribution, though smaller than 1/8 of the result, is dropped.

The second band is narrow for 8-bit formats and wide for binary32. That is one reason why the
error rate depends so much on the format.

Measured with the error-statistics testbench, over positive normal operands up to half the
largest finite value:

| format | pairs            | max rel. error | mean rel. error | NMED     | not RNE-exact |
|--------|------------------|----------------|-----------------|----------|---------------|
| E5M2   | all (13 456)     | 0.200          | 2.850e-2        | 1.051e-3 | 13.2 %        |
| E4M3   | all (10 816)     | 0.200          | 5.424e-2        | 4.960e-3 | 43.9 %        |
| BF16   | 2^20 sampled     | 0.200          | 3.59e-3         | (noisy)  | 6.3 %         |
| FP16   | 2^20 sampled     | 0.200          | 2.91e-2         | (noisy)  | 61.9 %        |
| FP32   | 2^20 sampled     | 0.200          | 3.62e-3         | (noisy)  | 18.0 %        |
| FP32, values uniform | 2^20 sampled | 0.200    | 5.99e-2         | 2.60e-2  | 73.8 %        |

The last row draws operand values, not bit patterns, uniformly. Almost all such values lie in
the top few binades, so the operands are often close and the mean term is used far more often.
The figures therefore depend strongly on how the operands are distributed.

NMED is the mean absolute error divided by the largest finite value. It is dominated by the few
pairs in the top binades, so a 2^20 sample does not pin it down. The E4M3 figures use an
IEEE-style range: the all-ones exponent is reserved and the largest finite value is 240.

## Infinity, NaN and overflow

The +infinity pattern and the NaN patterns sort above every finite pattern. The maximum therefore
passes them through, as long as the mean term does not itself climb above them. Two large
operands can push `(X + Y + C) >> 1` past infinity. One example is infinity plus the largest
finite value, where the mean term lands on a NaN pattern.

* `OVF_SAT = 0` is the default. Overflow is not handled, which is how the adder is normally sized
  and compared. The internal sum is one bit wider than the format, so it never wraps. A mean term
  past the top of the positive range shows up with the sign bit set.
* `OVF_SAT = 1` clamps the mean term at `SAT_PATTERN` before the maximum:
  `max(X, Y, min(M, SAT_PATTERN))`. `SAT_PATTERN` is +infinity by default. Finite operands then
  give at most +infinity, and infinity and NaN operands are returned unchanged.

Negative operands and subnormals are outside the design. The sign bit must be 0. Nothing checks
this.

## Two ways to select the term (`SEL`)

* `SEL_MAX3` is the default. `max(X, Y)` is formed in parallel with the adder, and one final
  comparison picks the larger of the two.
* `SEL_DIFF` works from the difference `X - Y`. It returns X if `X - Y >= 2D`, Y if
  `Y - X >= 2D`, and otherwise the mean term. The two forms give identical results, which the
  testbench checks bit for bit. `SEL_DIFF` can suit dedicated hardware, because the selection
  signal no longer waits for the adder.

With `OVF_SAT = 1`, `SEL_DIFF` handles an over-range mean term the same way the three-way maximum
does. It returns the larger operand if that is a NaN, and `SAT_PATTERN` otherwise. This rule is
a choice of this implementation.

## Modules

| file                 | what it is |
|----------------------|------------|
| `rtl/gm_add_pkg.sv`  | Field widths of the five formats (`FMT_E5M2`, `FMT_E4M3`, `FMT_BF16`, `FMT_FP16`, `FMT_FP32`) and the `sel_mode_e` enum. |
| `rtl/gm_add.sv`      | The combinational adder. Parameters: `EXP_W`, `MAN_W` (default binary32, 8/23), `ROUND_UP` (1: C = 2D+1), `OVF_SAT`, `SEL`, `SAT_PATTERN`. Ports: `a`, `b`, `y`, each `1+EXP_W+MAN_W` bits. |
| `rtl/gm_add_reg.sv`  | `gm_add` between an input register stage and an output register stage. This is the arrangement in which the adder's area, delay and energy are usually quoted: the whole adder forms one register-to-register path. A `valid` bit travels with the data. The latency is 2 cycles, it accepts one operation per cycle and it never stalls. `rst_n` is an asynchronous active-low reset that clears every register. |
| `rtl/gm_add_top.sv`  | Five independent `gm_add_reg` lanes, one per format: `e5m2`, `e4m3` (8 bit), `bf16`, `fp16` (16 bit) and `fp32`. Each lane has `<f>_in_valid`, `<f>_a`, `<f>_b`, `<f>_out_valid` and `<f>_y`. `ROUND_UP`, `OVF_SAT` and `SEL` apply to all lanes. |

With `OVF_SAT = 1`, the E4M3 lane clamps at `0x7E`, the largest finite OFP8 E4M3 value, because
that format has no infinity. The other lanes clamp at +infinity.

After coarse synthesis, a binary32 `gm_add` maps to a three-input adder, two comparators and two
32-bit multiplexers: 15 word-level cells in all. The registered top holds 250 flip-flops.

## What follows the method and what is added here

The method fixes the formula `max(X, Y, (X + Y + C) >> 1)`, the constant `C = 2D + 1`, the
parallel maximum, the clamp at the infinity pattern and the difference-based selection rule. It
also fixes the five formats and the registers on the inputs and outputs.

This implementation adds the following:

* binary32 as the default width of the single adder;
* the valid bit and the reset of the registered wrapper;
* the one-bit-wider internal sum;
* the saturation behaviour of `SEL_DIFF`;
* the E4M3 clamp value;
* the multi-format top, which puts separately sized adders side by side.

## Testbenches

All testbenches check themselves and print `TB_RESULT checks=N failures=M`.

* `tb/tb_gm_add.sv` runs seven configurations of `gm_add`:
  * E5M2 and E4M3 on every operand pair;
  * binary32 with `SEL_MAX3` and with `SEL_DIFF`;
  * binary16 with `C = 2D`;
  * bfloat16 with saturation, in both selection modes.

  Each result is compared bit for bit with the formula, computed independently in 64-bit
  integers. The testbench also checks these properties:
  * equal exponents give the correctly rounded sum;
  * exponents three or more apart give the larger operand;
  * the relative error stays within 0.2 (or `(1+u)/(5+u)` when `C = 2D`) and reaches that bound;
  * with saturation, infinity and NaN pass through and finite operands never exceed infinity.

  The per-configuration work is in `tb/tb_gm_add_lane.sv`.
* `tb/tb_gm_add_reg.sv` feeds one pair per cycle with gaps in `in_valid`. It checks the 2-cycle
  latency of `out_valid` and every result, and that reset clears the outputs.
* `tb/tb_gm_add_top.sv` drives all five lanes at the default parameters. It mixes random pairs,
  pairs with close or equal exponents, x = 4y points and infinity/NaN operands. For each lane it
  counts how often the result was operand a, operand b, the mean term, or a passed-through
  infinity/NaN. Each of the four must occur at least once in every lane.
* `tb/tb_gm_add_errstats.sv`, with `tb/tb_gm_stat_lane.sv`, measures the error statistics in the
  table above and checks them against the expected figures. For the sampled formats, the
  tolerance is 10 % on the mean error and 1.5 points on the error rate.
* `tb/gm_fp_pkg.sv` holds the reference helpers used by the testbenches: pattern to real, real to
  the nearest-even pattern, and the formula.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing -Wno-fatal -y rtl -y tb \
        rtl/gm_add_pkg.sv tb/gm_fp_pkg.sv tb/tb_gm_add_top.sv \
        --top-module tb_gm_add_top --Mdir obj_top
    ./obj_top/Vtb_gm_add_top

Replace `tb_gm_add_top` with `tb_gm_add`, `tb_gm_add_reg` or `tb_gm_add_errstats` to run the
others. Each finishes in a second or two. To use another format, set `EXP_W` and `MAN_W` on
`gm_add` or `gm_add_reg`. `N` and `SAT_PATTERN` follow from them.

## Limits

* Operands must be non-negative and normal. Negative inputs and subnormals give meaningless
  results.
* Without `OVF_SAT`, operands near the top of the range can produce NaN or sign-bit-set patterns.
* The error rate is high by design (up to 62 % for binary16). Inexact results come from operand
  pairs whose exponents differ by 1 to `MAN_W`. The relative error is bounded
  by 0.2.
* The timing, area and energy of the adder were not reproduced here. Only the logic is given.
