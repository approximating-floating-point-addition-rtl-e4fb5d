// tb_gm_add -- self-checking testbench of the combinational geometric-mean
// adder gm_add.
//
// Runs seven configurations one after the other (see tb_gm_add_lane for the
// checks made on each result):
//   E5M2 and E4M3, every pair of non-negative patterns;
//   binary32 with default parameters, both selection forms (max and
//   difference), random and directed operands;
//   binary16 with C = 2D, where the worst error is (1+u)/(5+u);
//   bfloat16 with saturation at +infinity, both selection forms.
// A watchdog ends the run with a failure after 20 ms of simulated time.
`timescale 1ns/1ps
module tb_gm_add;
  import gm_add_pkg::*;

  localparam int L = 7;
  logic [L-1:0] start;
  int           chk [L];
  int           fail[L];
  logic [L-1:0] done;
  int           checks, failures;

  tb_gm_add_lane #(.EXP_W(5), .MAN_W(2),  .EXHAUSTIVE(1'b1))
    l0 (.start(start[0]), .checks(chk[0]), .failures(fail[0]), .done(done[0]));
  tb_gm_add_lane #(.EXP_W(4), .MAN_W(3),  .EXHAUSTIVE(1'b1))
    l1 (.start(start[1]), .checks(chk[1]), .failures(fail[1]), .done(done[1]));
  tb_gm_add_lane
    l2 (.start(start[2]), .checks(chk[2]), .failures(fail[2]), .done(done[2]));
  tb_gm_add_lane #(.SEL(SEL_DIFF))
    l3 (.start(start[3]), .checks(chk[3]), .failures(fail[3]), .done(done[3]));
  tb_gm_add_lane #(.EXP_W(5), .MAN_W(10), .ROUND_UP(1'b0))
    l4 (.start(start[4]), .checks(chk[4]), .failures(fail[4]), .done(done[4]));
  tb_gm_add_lane #(.EXP_W(8), .MAN_W(7),  .OVF_SAT(1'b1))
    l5 (.start(start[5]), .checks(chk[5]), .failures(fail[5]), .done(done[5]));
  tb_gm_add_lane #(.EXP_W(8), .MAN_W(7),  .OVF_SAT(1'b1), .SEL(SEL_DIFF))
    l6 (.start(start[6]), .checks(chk[6]), .failures(fail[6]), .done(done[6]));

  initial begin
    start = '0;
    for (int i = 0; i < L; i++) begin
      #1 start[i] = 1'b1;
      wait (done[i]);
    end
    checks   = 0;
    failures = 0;
    for (int i = 0; i < L; i++) begin
      checks   += chk[i];
      failures += fail[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    checks   = 0;
    failures = 1;
    for (int i = 0; i < L; i++) begin
      checks   += chk[i];
      failures += fail[i];
    end
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
