// tb_gm_add_errstats -- accuracy of gm_add in the five formats.
//
// Measures maximum and mean relative error, normalised mean error distance
// and error rate (against round-to-nearest-even) of the adder with its
// default constant C = 2D + 1, over positive normal operands up to half the
// largest finite value, and compares them with the expected figures:
//   E5M2, E4M3 : every operand pair (exhaustive);
//   BF16, FP16, FP32 : 1024 x 1024 pairs of uniformly drawn bit patterns,
//                      with wider tolerances for the sampling; NMED is
//                      only reported for these.
//   FP32 values : as FP32, but with operand values (not bit patterns) drawn
//                 uniformly, which weights the top binades heavily.
// All formats use the IEEE-style range (all-ones exponent reserved), E4M3
// included, which is the range the expected figures belong to.
// A watchdog ends the run with a failure after 10 s of simulated time.
`timescale 1ns/1ps
module tb_gm_add_errstats;

  localparam int L = 6;
  logic [L-1:0] start;
  logic [L-1:0] done;
  int           chk[L], fail[L];
  int           checks, failures;

  tb_gm_stat_lane #(.EXP_W(5), .MAN_W(2), .NAME("E5M2"),
    .REF_MRED(2.85e-2), .REF_NMED(1.05e-3), .REF_ER(13.2))
    l0 (.start(start[0]), .checks(chk[0]), .failures(fail[0]), .done(done[0]));
  tb_gm_stat_lane #(.EXP_W(4), .MAN_W(3), .NAME("E4M3"),
    .REF_MRED(5.42e-2), .REF_NMED(4.96e-3), .REF_ER(43.9))
    l1 (.start(start[1]), .checks(chk[1]), .failures(fail[1]), .done(done[1]));
  tb_gm_stat_lane #(.EXP_W(8), .MAN_W(7), .NAME("BF16"), .EXHAUSTIVE(1'b0),
    .REF_MRED(3.62e-3), .REF_NMED(1.30e-5), .REF_ER(6.3), .TOL(0.1), .TOL_ER(1.5), .CHECK_NMED(1'b0))
    l2 (.start(start[2]), .checks(chk[2]), .failures(fail[2]), .done(done[2]));
  tb_gm_stat_lane #(.EXP_W(5), .MAN_W(10), .NAME("FP16"), .EXHAUSTIVE(1'b0),
    .REF_MRED(2.88e-2), .REF_NMED(9.91e-4), .REF_ER(61.0), .TOL(0.1), .TOL_ER(1.5), .CHECK_NMED(1'b0))
    l3 (.start(start[3]), .checks(chk[3]), .failures(fail[3]), .done(done[3]));
  tb_gm_stat_lane #(.EXP_W(8), .MAN_W(23), .NAME("FP32"), .EXHAUSTIVE(1'b0),
    .REF_MRED(3.63e-3), .REF_NMED(1.28e-5), .REF_ER(18.1), .TOL(0.1), .TOL_ER(1.5), .CHECK_NMED(1'b0))
    l4 (.start(start[4]), .checks(chk[4]), .failures(fail[4]), .done(done[4]));
  tb_gm_stat_lane #(.EXP_W(8), .MAN_W(23), .NAME("FP32 values"), .EXHAUSTIVE(1'b0),
    .FLOAT_DIST(1'b1),
    .REF_MRED(6.30e-2), .REF_NMED(2.68e-2), .REF_ER(75.1), .TOL(0.1), .TOL_ER(1.5))
    l5 (.start(start[5]), .checks(chk[5]), .failures(fail[5]), .done(done[5]));

  function automatic void total();
    checks = 0;
    for (int i = 0; i < L; i++) begin
      checks   += chk[i];
      failures += fail[i];
    end
  endfunction

  initial begin
    start = '0;
    failures = 0;
    for (int i = 0; i < L; i++) begin
      #1 start[i] = 1'b1;
      wait (done[i]);
    end
    total();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10s;
    failures = 1;
    total();
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
