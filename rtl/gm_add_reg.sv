// gm_add_reg -- the geometric-mean adder between an input and an output
// register stage.
//
// What it does
//   Wraps the combinational gm_add (result = max(X, Y, (X + Y + C) >> 1) on
//   positive floating-point bit patterns) with a register on each operand
//   and a register on the result. This is the arrangement in which the
//   adder's area, energy and delay are quoted: registers on input and output,
//   so the whole combinational adder sits in one register-to-register path.
//
// Interface and timing
//   clk, rst_n : rising-edge clock, asynchronous active-low reset that
//                clears all registers.
//   in_valid, a, b : operands, captured on every rising edge.
//   out_valid, y   : result of the operands captured two edges earlier.
//   Latency 2 cycles, one new operation accepted every cycle, no stall.
//
//   From the published method: registers on the inputs and the output around the
//   combinational adder. Own choices: the valid bit that travels with the
//   data and the reset of all registers.
module gm_add_reg
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
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         out_valid,
  output logic [N-1:0] y
);

  logic         v_q;
  logic [N-1:0] a_q, b_q, y_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      a_q       <= '0;
      b_q       <= '0;
      out_valid <= 1'b0;
      y         <= '0;
    end else begin
      v_q       <= in_valid;
      a_q       <= a;
      b_q       <= b;
      out_valid <= v_q;
      y         <= y_d;
    end
  end

  gm_add #(
    .EXP_W      (EXP_W),
    .MAN_W      (MAN_W),
    .ROUND_UP   (ROUND_UP),
    .OVF_SAT    (OVF_SAT),
    .SEL        (SEL),
    .N          (N),
    .SAT_PATTERN(SAT_PATTERN)
  ) u_add (
    .a(a_q),
    .b(b_q),
    .y(y_d)
  );

endmodule
