// tb_gm_add_top -- end-to-end testbench of gm_add_top at its default
// parameters (all five format lanes: E5M2, E4M3, bfloat16, binary16,
// binary32).
//
// All lanes run at once: every cycle each lane gets a new operand pair
// (valid most of the time), and two cycles later its result is compared
// with the defining expression max(X, Y, (X + Y + C) >> 1). Operands are a
// mix of random patterns, pairs with nearby exponents, x = 4y points and
// infinity/NaN operands. The testbench counts, per lane, how often the
// result was the first operand, the second operand, the geometric-mean term,
// and how often an infinity or NaN operand was passed through; each of these
// must happen at least once in every lane. Latency (2 cycles) and
// throughput (one result per cycle per lane) are checked through out_valid.
// A watchdog ends the run after 20000 cycles.
`timescale 1ns/1ps
module tb_gm_add_top;
  import gm_fp_pkg::*;

  localparam int L = 5;
  localparam int NOPS = 4000;
  localparam int EW[L] = '{5, 4, 8, 5, 8};
  localparam int MW[L] = '{2, 3, 7, 10, 23};
  localparam string NAME[L] = '{"E5M2", "E4M3", "BF16", "FP16", "FP32"};

  logic clk = 1'b0;
  logic rst_n;
  always #5 clk = ~clk;

  logic            in_v [L];
  logic            out_v[L];
  longint unsigned a    [L];
  longint unsigned b    [L];
  longint unsigned y    [L];

  logic [7:0]  e5m2_y, e4m3_y;
  logic [15:0] bf16_y, fp16_y;
  logic [31:0] fp32_y;

  gm_add_top dut (
    .clk, .rst_n,
    .e5m2_in_valid(in_v[0]), .e5m2_a(8'(a[0])),  .e5m2_b(8'(b[0])),
    .e5m2_out_valid(out_v[0]), .e5m2_y(e5m2_y),
    .e4m3_in_valid(in_v[1]), .e4m3_a(8'(a[1])),  .e4m3_b(8'(b[1])),
    .e4m3_out_valid(out_v[1]), .e4m3_y(e4m3_y),
    .bf16_in_valid(in_v[2]), .bf16_a(16'(a[2])), .bf16_b(16'(b[2])),
    .bf16_out_valid(out_v[2]), .bf16_y(bf16_y),
    .fp16_in_valid(in_v[3]), .fp16_a(16'(a[3])), .fp16_b(16'(b[3])),
    .fp16_out_valid(out_v[3]), .fp16_y(fp16_y),
    .fp32_in_valid(in_v[4]), .fp32_a(32'(a[4])), .fp32_b(32'(b[4])),
    .fp32_out_valid(out_v[4]), .fp32_y(fp32_y)
  );

  always_comb begin
    y[0] = 64'(e5m2_y);
    y[1] = 64'(e4m3_y);
    y[2] = 64'(bf16_y);
    y[3] = 64'(fp16_y);
    y[4] = 64'(fp32_y);
  end

  int checks = 0, failures = 0, cycles = 0;
  // expected valid / result / which term, two deep per lane
  logic            ev  [L][2];
  longint unsigned ey  [L][2];
  int              eterm[L][2];  // 0: a, 1: b, 2: mean, 3: special
  int              seen[L][4];

  task automatic check(int l, string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %s cycle %0d: %s (y=%h expected %h)", NAME[l], cycles,
                 what, y[l], ey[l][1]);
    end
  endtask

  function automatic longint unsigned pos_mask(int l);
    return (64'd1 << (EW[l] + MW[l])) - 1;
  endfunction

  // New operands for lane l, in one of several flavours.
  task automatic new_ops(int l, int k);
    longint unsigned one, inf, m;
    int e;
    one = longint'((64'd1 << (EW[l] - 1)) - 1) << MW[l];
    inf = ((64'd1 << EW[l]) - 1) << MW[l];
    m   = (64'd1 << MW[l]) - 1;
    case ($urandom_range(5))
      0: begin                              // random patterns
        a[l] = {$urandom, $urandom} & pos_mask(l);
        b[l] = {$urandom, $urandom} & pos_mask(l);
      end
      1, 2: begin                           // nearby exponents
        e    = 1 + $urandom_range((1 << EW[l]) - 4);
        a[l] = (longint'(e) << MW[l]) | ({$urandom, $urandom} & m);
        b[l] = (longint'(e + $urandom_range(2)) << MW[l]) | ({$urandom, $urandom} & m);
        if ($urandom_range(1)) begin
          one  = a[l];
          a[l] = b[l];
          b[l] = one;
        end
      end
      3: begin                              // x = 4y and just around it
        a[l] = one + (64'd2 << MW[l]) + $urandom_range(1);
        b[l] = one + $urandom_range(1);
      end
      4: begin                              // same exponent
        e    = 1 + $urandom_range((1 << EW[l]) - 4);
        a[l] = (longint'(e) << MW[l]) | ({$urandom, $urandom} & m);
        b[l] = (longint'(e) << MW[l]) | ({$urandom, $urandom} & m);
      end
      default: begin                        // infinity or NaN with a small operand
        a[l] = (k % 3 == 0) ? inf : (inf | (1 + ($urandom & m)) & (inf | m));
        b[l] = one + ($urandom & m);
        if ($urandom_range(1)) begin
          one  = a[l];
          a[l] = b[l];
          b[l] = one;
        end
      end
    endcase
  endtask

  function automatic int term_of(int l, longint unsigned pa, longint unsigned pb,
                                 longint unsigned r);
    longint unsigned inf;
    inf = ((64'd1 << EW[l]) - 1) << MW[l];
    if ((pa >= inf || pb >= inf) && r == ((pa > pb) ? pa : pb)) return 3;
    if (r == pa) return 0;
    if (r == pb) return 1;
    return 2;
  endfunction

  initial begin
    rst_n = 1'b0;
    for (int l = 0; l < L; l++) begin
      in_v[l] = 1'b0;
      a[l] = 0;
      b[l] = 0;
      ev[l] = '{1'b0, 1'b0};
      ey[l] = '{0, 0};
      eterm[l] = '{0, 0};
      seen[l] = '{0, 0, 0, 0};
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int k = 0; k < NOPS; k++) begin
      @(negedge clk);
      for (int l = 0; l < L; l++) begin
        check(l, "out_valid two cycles after in_valid", out_v[l] == ev[l][1]);
        if (ev[l][1]) begin
          check(l, "result", y[l] == ey[l][1]);
          seen[l][eterm[l][1]]++;
        end
        ev[l][1]    = ev[l][0];
        ey[l][1]    = ey[l][0];
        eterm[l][1] = eterm[l][0];
        new_ops(l, k);
        in_v[l]     = ($urandom_range(7) != 0);
        ev[l][0]    = in_v[l];
        ey[l][0]    = gm_formula(a[l], b[l], MW[l], 1'b1, 1'b0, 64'd0);
        eterm[l][0] = term_of(l, a[l], b[l], ey[l][0]);
      end
    end
    for (int l = 0; l < L; l++) begin
      $display("%s: result = a %0d, = b %0d, = mean term %0d, special passed %0d",
               NAME[l], seen[l][0], seen[l][1], seen[l][2], seen[l][3]);
      check(l, "first operand selected",  seen[l][0] > 0);
      check(l, "second operand selected", seen[l][1] > 0);
      check(l, "mean term selected",      seen[l][2] > 0);
      check(l, "infinity/NaN passed",     seen[l][3] > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) cycles++;

  initial begin
    wait (cycles == 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
