// gm_add_pkg -- shared types and constants of the geometric-mean adder.
//
// The adder approximates x + y (x, y >= 0) by max(x, y, 2*sqrt(x*y)) and
// evaluates that expression directly on the IEEE-754-style bit patterns with
// integer operations (Mitchell's logarithm: a bit pattern read as a fixed-point
// number is roughly log2 of the value plus a bias). This package holds:
//   * the exponent/mantissa widths of the five formats the design is sized for
//     (OFP8 E5M2 and E4M3, bfloat16, binary16, binary32);
//   * sel_mode_e, which chooses between the two equivalent ways of picking the
//     result term: a three-way maximum (the form the design is built around)
//     or a selection driven by the difference X - Y (an equivalent rewriting
//     the design also offers for dedicated hardware);
//   * fmt_t, a small struct that bundles a format's field widths.
// Nothing here is clocked; it is constants and types only.
package gm_add_pkg;

  // Field widths of one floating-point format (sign bit not counted).
  typedef struct packed {
    int unsigned exp_w;
    int unsigned man_w;
  } fmt_t;

  localparam fmt_t FMT_E5M2 = '{exp_w: 5, man_w: 2};
  localparam fmt_t FMT_E4M3 = '{exp_w: 4, man_w: 3};
  localparam fmt_t FMT_BF16 = '{exp_w: 8, man_w: 7};
  localparam fmt_t FMT_FP16 = '{exp_w: 5, man_w: 10};
  localparam fmt_t FMT_FP32 = '{exp_w: 8, man_w: 23};

  // How the result term is chosen.
  //   SEL_MAX3 : result = max(X, Y, M) with M = (X + Y + C) >> 1; the maximum
  //              of X and Y is formed in parallel with M.
  //   SEL_DIFF : result = X if X - Y >= 2D, Y if Y - X >= 2D, else M
  //              (D = 1 << mantissa width); numerically the same.
  typedef enum logic {
    SEL_MAX3 = 1'b0,
    SEL_DIFF = 1'b1
  } sel_mode_e;

endpackage
