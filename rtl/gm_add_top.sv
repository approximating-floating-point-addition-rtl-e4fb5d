// gm_add_top -- geometric-mean approximate adders for the five evaluated
// floating-point formats, side by side.
//
// What it does
//   Holds one registered geometric-mean adder (gm_add_reg) per format:
//     E5M2 and E4M3 (8-bit OFP8), bfloat16 and binary16 (16 bit) and
//     binary32 (32 bit).
//   Each lane approximates the sum of two non-negative operands as
//   max(X, Y, (X + Y + C) >> 1) on their bit patterns, C = 2^(MAN_W+1) + 1,
//   with a worst-case relative error of -0.2. The lanes are independent and
//   share only clock and reset.
//
// Interface and timing
//   For each lane <f> in {e5m2, e4m3, bf16, fp16, fp32}:
//     <f>_in_valid, <f>_a, <f>_b  operands (sign bit 0), taken every cycle;
//     <f>_out_valid, <f>_y        result two cycles later.
//   ROUND_UP, OVF_SAT and SEL are passed to every lane (see gm_add).
//
//   From the published method: the five formats and the input/output registers.
//   Own choice: with OVF_SAT = 1 the E4M3 lane, whose format has no
//   infinity, clamps at its largest finite pattern 0x7E instead of an
//   infinity pattern; the other lanes clamp at +infinity.
module gm_add_top
  import gm_add_pkg::*;
#(
  parameter bit        ROUND_UP = 1'b1,
  parameter bit        OVF_SAT  = 1'b0,
  parameter sel_mode_e SEL      = SEL_MAX3
) (
  input  logic        clk,
  input  logic        rst_n,

  input  logic        e5m2_in_valid,
  input  logic [7:0]  e5m2_a,
  input  logic [7:0]  e5m2_b,
  output logic        e5m2_out_valid,
  output logic [7:0]  e5m2_y,

  input  logic        e4m3_in_valid,
  input  logic [7:0]  e4m3_a,
  input  logic [7:0]  e4m3_b,
  output logic        e4m3_out_valid,
  output logic [7:0]  e4m3_y,

  input  logic        bf16_in_valid,
  input  logic [15:0] bf16_a,
  input  logic [15:0] bf16_b,
  output logic        bf16_out_valid,
  output logic [15:0] bf16_y,

  input  logic        fp16_in_valid,
  input  logic [15:0] fp16_a,
  input  logic [15:0] fp16_b,
  output logic        fp16_out_valid,
  output logic [15:0] fp16_y,

  input  logic        fp32_in_valid,
  input  logic [31:0] fp32_a,
  input  logic [31:0] fp32_b,
  output logic        fp32_out_valid,
  output logic [31:0] fp32_y
);

  gm_add_reg #(
    .EXP_W(FMT_E5M2.exp_w), .MAN_W(FMT_E5M2.man_w),
    .ROUND_UP(ROUND_UP), .OVF_SAT(OVF_SAT), .SEL(SEL)
  ) u_e5m2 (
    .clk, .rst_n,
    .in_valid(e5m2_in_valid), .a(e5m2_a), .b(e5m2_b),
    .out_valid(e5m2_out_valid), .y(e5m2_y)
  );

  gm_add_reg #(
    .EXP_W(FMT_E4M3.exp_w), .MAN_W(FMT_E4M3.man_w),
    .ROUND_UP(ROUND_UP), .OVF_SAT(OVF_SAT), .SEL(SEL),
    .SAT_PATTERN(8'h7E)
  ) u_e4m3 (
    .clk, .rst_n,
    .in_valid(e4m3_in_valid), .a(e4m3_a), .b(e4m3_b),
    .out_valid(e4m3_out_valid), .y(e4m3_y)
  );

  gm_add_reg #(
    .EXP_W(FMT_BF16.exp_w), .MAN_W(FMT_BF16.man_w),
    .ROUND_UP(ROUND_UP), .OVF_SAT(OVF_SAT), .SEL(SEL)
  ) u_bf16 (
    .clk, .rst_n,
    .in_valid(bf16_in_valid), .a(bf16_a), .b(bf16_b),
    .out_valid(bf16_out_valid), .y(bf16_y)
  );

  gm_add_reg #(
    .EXP_W(FMT_FP16.exp_w), .MAN_W(FMT_FP16.man_w),
    .ROUND_UP(ROUND_UP), .OVF_SAT(OVF_SAT), .SEL(SEL)
  ) u_fp16 (
    .clk, .rst_n,
    .in_valid(fp16_in_valid), .a(fp16_a), .b(fp16_b),
    .out_valid(fp16_out_valid), .y(fp16_y)
  );

  gm_add_reg #(
    .EXP_W(FMT_FP32.exp_w), .MAN_W(FMT_FP32.man_w),
    .ROUND_UP(ROUND_UP), .OVF_SAT(OVF_SAT), .SEL(SEL)
  ) u_fp32 (
    .clk, .rst_n,
    .in_valid(fp32_in_valid), .a(fp32_a), .b(fp32_b),
    .out_valid(fp32_out_valid), .y(fp32_y)
  );

endmodule
