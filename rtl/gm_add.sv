// gm_add -- approximate floating-point addition through the geometric mean.
//
// What it does
//   For two non-negative floating-point numbers x and y the sum is
//   approximated as max(x, y, 2*sqrt(x*y)): when the operands are close the
//   geometric-mean term is near the sum, and once one operand is more than
//   four times the other the larger operand alone is the better answer.
//   The worst relative error of this rule is -0.2 (at x = 4y).
//
// How it works
//   A positive IEEE-754-style bit pattern X, read as an unsigned fixed-point
//   number with MAN_W fraction bits, is log2(x) plus the bias (Mitchell's
//   approximation). In that domain a product is a sum, a square root is a
//   halving and a doubling adds D = 1 << MAN_W, so 2*sqrt(x*y) becomes
//       M = (X + Y + C) >> 1,   C = 2D + 1 (ROUND_UP = 1) or 2D (ROUND_UP = 0)
//   and the result is max(X, Y, M). Bit patterns of positive floats are
//   ordered like their values, so the maximum is a plain unsigned compare.
//   No variable shifter and no normaliser is needed. With C = 2D + 1 the
//   error is exactly -0.2 at x = 4y for every format, operands with equal
//   exponents give a correctly rounded sum (ties rounded up), and operands
//   whose exponents differ by more than MAN_W give the larger operand, also
//   correctly rounded. With C = 2D the worst error is -(1+u)/(5+u),
//   u = 2^-MAN_W, and ties round down.
//
//   SEL = SEL_MAX3 forms max(X, Y) in parallel with M and then compares the
//   two. SEL = SEL_DIFF instead steers the result from the difference X - Y:
//   X if X - Y >= 2D, Y if Y - X >= 2D, otherwise M; this gives the same
//   numbers.
//
//   Infinity and NaN patterns sit above all finite patterns, so they pass
//   through the maximum unchanged as long as X + Y + C does not overflow.
//   OVF_SAT = 1 clamps M at SAT_PATTERN (by default the +infinity pattern) so
//   that two large finite operands give +infinity instead of a wrapped
//   value. The default (OVF_SAT = 0) leaves overflow unhandled, which is the
//   configuration in which the adder is sized and compared with others.
//
// Interface and timing
//   a, b : operand bit patterns {sign, exponent, mantissa}, sign must be 0;
//          a negative operand or a subnormal gives no meaningful result.
//   y    : result bit pattern, same format.
//   Purely combinational, no clock; one adder (X + Y + C is a three-input
//   add), one or two magnitude comparators and multiplexers.
//
//   From the published method: the formula, the constant C = 2D + 1, the parallel
//   maximum, the saturation at the infinity pattern and the difference-based
//   selection. Own choices: FP32 as default widths, the internal sum is one
//   bit wider than the format so it never wraps (without OVF_SAT a sum past
//   2^(N) shows up as a pattern with the sign bit set), and, in SEL_DIFF
//   mode with OVF_SAT, an over-range M yields the larger operand if that is a
//   NaN pattern and SAT_PATTERN otherwise, the value the three-way maximum
//   gives.
module gm_add
  import gm_add_pkg::*;
#(
  parameter int unsigned EXP_W    = 8,
  parameter int unsigned MAN_W    = 23,
  parameter bit          ROUND_UP = 1'b1,
  parameter bit          OVF_SAT  = 1'b0,
  parameter sel_mode_e   SEL      = SEL_MAX3,
  parameter int unsigned N        = 1 + EXP_W + MAN_W,
  parameter logic [N-1:0] SAT_PATTERN = {1'b0, {EXP_W{1'b1}}, {MAN_W{1'b0}}}
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] y
);

  // D = 1 << MAN_W is one step of the exponent field; C = 2D (+1).
  localparam logic [N:0] TWO_D = (N+1)'(1) << (MAN_W + 1);
  localparam logic [N:0] C     = TWO_D + (N+1)'(ROUND_UP);

  logic [N:0]   sum;      // X + Y + C, one bit wider than the format
  logic [N-1:0] gm;       // (X + Y + C) >> 1: approximate 2*sqrt(x*y)
  logic [N-1:0] gm_lim;   // gm, clamped when OVF_SAT is set
  logic         gm_over;  // gm lies above SAT_PATTERN

  always_comb begin
    sum     = {1'b0, a} + {1'b0, b} + C;
    gm      = N'(sum >> 1);
    gm_over = OVF_SAT && (gm > SAT_PATTERN);
    gm_lim  = gm_over ? SAT_PATTERN : gm;
  end

  if (SEL == SEL_MAX3) begin : g_max3
    logic [N-1:0] ab_max;  // max(X, Y), in parallel with the adder
    always_comb begin
      ab_max = (a >= b) ? a : b;
      y      = (ab_max >= gm_lim) ? ab_max : gm_lim;
    end
  end else begin : g_diff
    logic [N:0] diff;      // X - Y, two's complement, N+1 bits
    logic       a_far;     // X - Y >=  2D
    logic       b_far;     // X - Y <= -2D
    logic [N-1:0] larger;
    always_comb begin
      diff   = {1'b0, a} - {1'b0, b};
      a_far  = !diff[N] && (diff >= TWO_D);
      b_far  =  diff[N] && ((-diff) >= TWO_D);
      larger = diff[N] ? b : a;
      if (a_far)
        y = a;
      else if (b_far)
        y = b;
      else if (gm_over && (larger > SAT_PATTERN))
        y = larger;
      else
        y = gm_lim;
    end
  end

endmodule
