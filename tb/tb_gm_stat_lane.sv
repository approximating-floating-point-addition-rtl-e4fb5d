// tb_gm_stat_lane -- error statistics of gm_add for one format (used by
// tb_gm_add_errstats).
//
// Every format is treated IEEE-style: the all-ones exponent is reserved,
// so the largest finite pattern is 0 11..10 11..1 (for E4M3 this is 240).
// Operands are non-negative normal bit patterns from the smallest normal
// number up to half the largest finite number (so the exact sum cannot
// overflow). EXHAUSTIVE uses every pair of such patterns; otherwise two
// vectors of NVEC patterns drawn uniformly over the same range are crossed
// (NVEC^2 pairs); FLOAT_DIST draws values uniformly instead of patterns.
// For each pair the exact sum s is formed in double
// precision and the adder's result r is compared with it:
//   max RED : largest |r - s| / s
//   MRED    : mean of |r - s| / s
//   NMED    : mean of |r - s| divided by the largest finite value
//   ER      : share of results that differ from s rounded to nearest-even
// Each figure is checked against the expected value REF_* within a relative
// tolerance TOL (ER within TOL_ER percentage points). NMED is dominated by
// the few pairs in the top binades, so with sampled operands it is only
// reported (CHECK_NMED = 0).
module tb_gm_stat_lane
  import gm_fp_pkg::*;
#(
  parameter int unsigned EXP_W      = 5,
  parameter int unsigned MAN_W      = 2,
  parameter bit          EXHAUSTIVE = 1'b1,
  parameter int          NVEC       = 1024,
  parameter real         REF_MAXRED = 0.2,
  parameter real         REF_MRED   = 0.0,
  parameter real         REF_NMED   = 0.0,
  parameter real         REF_ER     = 0.0,    // percent
  parameter real         TOL        = 0.02,
  parameter real         TOL_ER     = 0.5,
  parameter bit          CHECK_NMED = 1'b1,
  parameter bit          FLOAT_DIST = 1'b0,   // sample values, not patterns
  parameter string       NAME       = "fmt"
) (
  input  logic start,
  output int   checks,
  output int   failures,
  output logic done
);

  localparam int unsigned N = 1 + EXP_W + MAN_W;
  localparam longint unsigned ONE_E   = 64'd1 << MAN_W;
  localparam longint unsigned MAX_FIN = (((64'd1 << EXP_W) - 1) << MAN_W) - 1;
  localparam longint unsigned LO = ONE_E;             // smallest normal
  localparam longint unsigned HI = MAX_FIN - ONE_E;   // largest finite / 2

  logic [N-1:0] a, b, y;
  gm_add #(.EXP_W(EXP_W), .MAN_W(MAN_W)) dut (.a(a), .b(b), .y(y));

  real    sum_red, sum_ed, max_red, maxval;
  longint npairs, nwrong;
  longint unsigned va[], vb[];

  // A value drawn uniformly from [0, largest finite / 2], rounded to the
  // nearest pattern and kept at or above the smallest normal.
  function automatic longint unsigned rand_value();
    real v;
    longint unsigned p;
    v = (real'($urandom) + real'($urandom) / 4294967296.0) / 4294967296.0 *
        fp_value(HI, EXP_W, MAN_W);
    if (v < fp_value(LO, EXP_W, MAN_W)) return LO;
    p = fp_rne(v, EXP_W, MAN_W);
    return (p > HI) ? HI : p;
  endfunction

  task automatic one_pair(longint unsigned pa, longint unsigned pb);
    real s, r, d;
    a = N'(pa);
    b = N'(pb);
    #1;
    s = fp_value(pa, EXP_W, MAN_W) + fp_value(pb, EXP_W, MAN_W);
    r = fp_value(64'(y), EXP_W, MAN_W);
    d = (r > s) ? r - s : s - r;
    sum_red += d / s;
    sum_ed  += d;
    if (d / s > max_red) max_red = d / s;
    if (64'(y) != fp_rne(s, EXP_W, MAN_W)) nwrong++;
    npairs++;
  endtask

  task automatic check(string what, real got, real want, real tol);
    real dev;
    checks++;
    dev = got - want;
    if (dev < 0.0) dev = -dev;
    if (dev > tol) begin
      failures++;
      $display("FAIL %s %s: %g, expected %g", NAME, what, got, want);
    end
  endtask

  initial begin
    real mred, nmed, er;
    checks = 0; failures = 0; done = 1'b0;
    a = '0; b = '0;
    sum_red = 0.0; sum_ed = 0.0; max_red = 0.0; npairs = 0; nwrong = 0;
    @(posedge start);
    maxval = fp_value(MAX_FIN, EXP_W, MAN_W);
    if (EXHAUSTIVE) begin
      for (longint unsigned i = LO; i <= HI; i++)
        for (longint unsigned j = LO; j <= HI; j++)
          one_pair(i, j);
    end else begin
      va = new[NVEC];
      vb = new[NVEC];
      for (int i = 0; i < NVEC; i++) begin
        if (FLOAT_DIST) begin
          va[i] = rand_value();
          vb[i] = rand_value();
        end else begin
          va[i] = LO + ({$urandom, $urandom} % (HI - LO + 1));
          vb[i] = LO + ({$urandom, $urandom} % (HI - LO + 1));
        end
      end
      for (int i = 0; i < NVEC; i++)
        for (int j = 0; j < NVEC; j++)
          one_pair(va[i], vb[j]);
    end
    mred = sum_red / real'(npairs);
    nmed = sum_ed / real'(npairs) / maxval;
    er   = 100.0 * real'(nwrong) / real'(npairs);
    $display("%s: %0d pairs  max RED %.3e  MRED %.3e  NMED %.3e  ER %.1f%%",
             NAME, npairs, max_red, mred, nmed, er);
    check("max RED", max_red, REF_MAXRED, 0.005 * REF_MAXRED);
    check("MRED",    mred,    REF_MRED,   TOL * REF_MRED);
    if (CHECK_NMED) check("NMED", nmed, REF_NMED, TOL * REF_NMED);
    check("ER",      er,      REF_ER,     TOL_ER);
    done = 1'b1;
  end

endmodule
