// tb_gm_add_lane -- checks one configuration of gm_add (used by tb_gm_add).
//
// Drives the combinational adder with operand pairs and checks each result:
//   1. bit-exact against the defining expression
//      max(X, Y, min((X + Y + C) >> 1, SAT)) computed in 64-bit integers;
//   2. equal exponents: result is the sum rounded to nearest (ties up when
//      ROUND_UP, down otherwise), i.e. exponent + 1, mantissa (ma+mb+RU)/2;
//   3. exponents three or more apart: result is the larger operand;
//   4. finite normal operands: |relative error| <= 0.2 (ROUND_UP = 1) or
//      (1+u)/(5+u), u = 2^-MAN_W (ROUND_UP = 0), measured with reals;
//   5. OVF_SAT: an infinity or NaN operand is returned unchanged, finite
//      operands never give a pattern above SAT_PATTERN.
// EXHAUSTIVE sweeps all pairs of non-negative patterns; otherwise NRAND
// random pairs, half of them with nearby exponents, plus directed cases.
// In exhaustive mode the largest error seen must also reach the bound.
// Starts on the rising edge of `start`, raises `done` when finished.
module tb_gm_add_lane
  import gm_add_pkg::*;
  import gm_fp_pkg::*;
#(
  parameter int unsigned EXP_W      = 8,
  parameter int unsigned MAN_W      = 23,
  parameter bit          ROUND_UP   = 1'b1,
  parameter bit          OVF_SAT    = 1'b0,
  parameter sel_mode_e   SEL        = SEL_MAX3,
  parameter int unsigned N          = 1 + EXP_W + MAN_W,
  parameter logic [N-1:0] SAT_PATTERN = {1'b0, {EXP_W{1'b1}}, {MAN_W{1'b0}}},
  parameter bit          EXHAUSTIVE = 1'b0,
  parameter int          NRAND      = 20000
) (
  input  logic start,
  output int   checks,
  output int   failures,
  output logic done
);

  logic [N-1:0] a, b, y;

  gm_add #(
    .EXP_W(EXP_W), .MAN_W(MAN_W), .ROUND_UP(ROUND_UP), .OVF_SAT(OVF_SAT),
    .SEL(SEL), .N(N), .SAT_PATTERN(SAT_PATTERN)
  ) dut (.a(a), .b(b), .y(y));

  localparam longint unsigned POS_MAX = (64'd1 << (N - 1)) - 1;
  localparam longint unsigned E_ONES  = (64'd1 << EXP_W) - 1;
  localparam real U = 1.0 / real'(64'd1 << MAN_W);
  localparam real BOUND = ROUND_UP ? 0.2 : (1.0 + U) / (5.0 + U);

  real max_err;

  function automatic bit is_normal_finite(longint unsigned p);
    longint unsigned e;
    e = fp_exp(p, EXP_W, MAN_W);
    return (e >= 1) && (e < E_ONES);
  endfunction

  task automatic check(string what, bit ok, longint unsigned pa, longint unsigned pb);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10)
        $display("FAIL [%0d/%0d %s] %s: a=%h b=%h y=%h", EXP_W, MAN_W,
                 SEL.name(), what, pa, pb, y);
    end
  endtask

  task automatic apply(longint unsigned pa, longint unsigned pb);
    longint unsigned ea, eb, ma, mb, yy, expct;
    real s, err;
    a = N'(pa);
    b = N'(pb);
    #1;
    yy = 64'(y);
    ea = fp_exp(pa, EXP_W, MAN_W);  eb = fp_exp(pb, EXP_W, MAN_W);
    ma = fp_man(pa, MAN_W);         mb = fp_man(pb, MAN_W);
    // 1. defining expression
    expct = gm_formula(pa, pb, MAN_W, ROUND_UP, OVF_SAT, 64'(SAT_PATTERN));
    check("formula", yy == expct, pa, pb);
    // 2. equal exponents: correctly rounded
    if (ea == eb && ea >= 1 && ea + 1 < E_ONES)
      check("same-exponent rounding",
            yy == (((ea + 1) << MAN_W) | ((ma + mb + 64'(ROUND_UP)) >> 1)), pa, pb);
    // 3. far apart: the larger operand
    if (ea >= eb + 3) check("far exponent, a larger", yy == pa, pa, pb);
    if (eb >= ea + 3) check("far exponent, b larger", yy == pb, pa, pb);
    // 4. relative error bound
    if (is_normal_finite(pa) && is_normal_finite(pb) && is_normal_finite(yy) &&
        yy <= 64'(SAT_PATTERN)) begin
      s   = fp_value(pa, EXP_W, MAN_W) + fp_value(pb, EXP_W, MAN_W);
      err = (fp_value(yy, EXP_W, MAN_W) - s) / s;
      if (err < 0.0) err = -err;
      if (err > max_err) max_err = err;
      check("relative error bound", err <= BOUND + 1e-12, pa, pb);
    end
    // 5. infinity / NaN handling with saturation
    if (OVF_SAT) begin
      if (pa > 64'(SAT_PATTERN) || pb > 64'(SAT_PATTERN))
        check("special propagated", yy == ((pa > pb) ? pa : pb), pa, pb);
      else
        check("saturated", yy <= 64'(SAT_PATTERN), pa, pb);
    end
  endtask

  function automatic longint unsigned rand_pos();
    return {$urandom, $urandom} & POS_MAX;
  endfunction

  // A random normal pattern whose exponent is within +-2 of p's.
  function automatic longint unsigned near(longint unsigned p);
    longint signed e;
    e = longint'(fp_exp(p, EXP_W, MAN_W)) + longint'($urandom_range(4)) - 2;
    if (e < 1) e = 1;
    if (e > longint'(E_ONES) - 2) e = longint'(E_ONES) - 2;
    return (longint'(e) << MAN_W) | ({$urandom, $urandom} & ((64'd1 << MAN_W) - 1));
  endfunction

  longint unsigned one, p2, inf;

  initial begin
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    max_err  = 0.0;
    a        = '0;
    b        = '0;
    @(posedge start);
    one = longint'((64'd1 << (EXP_W - 1)) - 1) << MAN_W;  // 1.0
    inf = E_ONES << MAN_W;
    if (EXHAUSTIVE) begin
      for (longint unsigned i = 0; i <= POS_MAX; i++)
        for (longint unsigned j = 0; j <= POS_MAX; j++)
          apply(i, j);
      // the error bound is reached somewhere in the format
      check("bound reached", max_err >= BOUND - 1e-12, 0, 0);
    end else begin
      for (int k = 0; k < NRAND; k++) begin
        longint unsigned p;
        p = rand_pos();
        if (k % 2 == 0) apply(p, rand_pos());
        else            apply(p, near(p));
      end
      // x a power of two, y = x/4 and the pattern just above it
      for (int k = -3; k <= 3; k++) begin
        p2 = one + (longint'(k + 4) << MAN_W);
        apply(p2, p2 - (64'd2 << MAN_W));
        apply(p2 - (64'd2 << MAN_W) + 1, p2);
      end
      // x = 4y reaches -0.2 exactly when C = 2D + 1
      if (ROUND_UP) begin
        max_err = 0.0;
        apply(one + (64'd2 << MAN_W), one);
        check("error at x = 4y is 0.2", max_err > 0.2 - 1e-12, 0, 0);
      end else begin
        max_err = 0.0;
        apply(one + (64'd2 << MAN_W), one + 1);
        check("worst error (1+u)/(5+u)", max_err > BOUND - 1e-12, 0, 0);
      end
      // infinity and NaN with finite and with each other
      apply(inf, one);
      apply(one, inf);
      apply(inf | 1, one);
      apply(inf, inf - 1);
      apply(inf - 1, inf - 1);
      apply(inf, inf | 5);
      apply(POS_MAX, inf);
    end
    done = 1'b1;
  end

endmodule
