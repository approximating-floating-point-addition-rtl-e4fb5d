// tb_gm_add_reg -- self-checking testbench of the registered adder
// gm_add_reg (binary32, default parameters).
//
// Feeds one operand pair per cycle, with in_valid toggled at random, and
// keeps a queue of expected results computed from the adder's defining
// expression max(X, Y, (X + Y + C) >> 1). Every cycle it checks that
// out_valid equals in_valid of two cycles earlier and, when valid, that y
// is the expected result: latency 2 cycles, one result per cycle. It also
// checks that reset clears out_valid. A watchdog ends the run after 10000
// cycles.
`timescale 1ns/1ps
module tb_gm_add_reg;
  import gm_fp_pkg::*;

  localparam int EW = 8, MW = 23, N = 1 + EW + MW;
  localparam int NOPS = 3000;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         in_valid, out_valid;
  logic [N-1:0] a, b, y;
  int           checks = 0, failures = 0, cycles = 0;
  int           nvalid = 0;

  gm_add_reg dut (
    .clk, .rst_n, .in_valid, .a, .b, .out_valid, .y
  );

  always #5 clk = ~clk;

  // expected (valid, result) two cycles back
  logic         v_hist [2];
  logic [N-1:0] y_hist [2];

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10) $display("FAIL cycle %0d: %s (y=%h)", cycles, what, y);
    end
  endtask

  function automatic logic [N-1:0] rand_op();
    logic [N-1:0] p;
    p = N'($urandom) & {1'b0, {(N-1){1'b1}}};
    return p;
  endfunction

  initial begin
    rst_n    = 1'b0;
    in_valid = 1'b0;
    a        = '0;
    b        = '0;
    v_hist   = '{1'b0, 1'b0};
    y_hist   = '{'0, '0};
    repeat (3) @(posedge clk);
    #1 check("reset clears out_valid", out_valid == 1'b0);
    check("reset clears y", y == '0);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < NOPS; k++) begin
      @(negedge clk);
      // what should come out now, given what went in two edges ago
      check("out_valid latency 2", out_valid == v_hist[1]);
      if (v_hist[1]) begin
        check("result", y == y_hist[1]);
        nvalid++;
      end
      // new operands: mostly nearby values so the mean term is exercised
      v_hist[1] = v_hist[0];
      y_hist[1] = y_hist[0];
      in_valid  = ($urandom_range(3) != 0);
      a         = rand_op();
      b         = (k % 2) ? rand_op() : (a ^ N'($urandom_range(1 << (MW + 1))));
      b[N-1]    = 1'b0;
      v_hist[0] = in_valid;
      y_hist[0] = N'(gm_formula(64'(a), 64'(b), MW, 1'b1, 1'b0, 64'd0));
    end
    check("valid results seen", nvalid > NOPS / 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 10000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
