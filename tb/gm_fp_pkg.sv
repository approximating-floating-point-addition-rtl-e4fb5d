// gm_fp_pkg -- testbench-side floating-point helpers for the geometric-mean
// adder testbenches.
//
// Bit patterns are carried in 64-bit integers together with the format's
// exponent and mantissa widths, so one set of functions serves every format.
//   fp_value   : value of a positive normal pattern as a real (2^(E-bias)*(1+m/2^t))
//   fp_rne     : the pattern of a positive real rounded to nearest, ties to
//                even (the reference rounding of a correct adder)
//   gm_formula : max(X, Y, min((X + Y + C) >> 1, SAT)), the adder's defining
//                expression, evaluated in wide integer arithmetic
// None of these touch the design; they are the independent reference.
package gm_fp_pkg;

  function automatic longint unsigned fp_exp(longint unsigned p, int ew, int mw);
    return (p >> mw) & ((64'd1 << ew) - 1);
  endfunction

  function automatic longint unsigned fp_man(longint unsigned p, int mw);
    return p & ((64'd1 << mw) - 1);
  endfunction

  function automatic real pow2(int k);
    return 2.0 ** real'(k);
  endfunction

  function automatic real fp_value(longint unsigned p, int ew, int mw);
    int bias;
    bias = (1 << (ew - 1)) - 1;
    return pow2(int'(fp_exp(p, ew, mw)) - bias) *
           (1.0 + real'(fp_man(p, mw)) / pow2(mw));
  endfunction

  // Round a positive real to the nearest normal pattern, ties to even.
  // Values past the top exponent give a pattern with the all-ones exponent.
  function automatic longint unsigned fp_rne(real s, int ew, int mw);
    int bias, e;
    real q, rem, fl;
    longint unsigned m;
    bias = (1 << (ew - 1)) - 1;
    e = int'($floor($ln(s) / $ln(2.0)));
    if (s < pow2(e)) e--;
    if (s >= pow2(e + 1)) e++;
    if (e < 1 - bias) e = 1 - bias;
    q   = (s / pow2(e) - 1.0) * pow2(mw);
    fl  = real'(longint'(q - 0.5));          // floor for q >= 0
    if (fl > q) fl = fl - 1.0;
    if (fl + 1.0 <= q) fl = fl + 1.0;
    rem = q - fl;
    m   = longint'(fl);
    if (rem > 0.5 || (rem == 0.5 && m[0])) m++;
    if (m == (64'd1 << mw)) begin
      m = 0;
      e++;
    end
    return (longint'(64'(e + bias)) << mw) | m;
  endfunction

  function automatic longint unsigned gm_formula(longint unsigned x, longint unsigned y,
                                                 int mw, bit round_up, bit sat,
                                                 longint unsigned sat_pat);
    longint unsigned mean, r;
    mean = (x + y + (64'd2 << mw) + 64'(round_up)) >> 1;
    if (sat && mean > sat_pat) mean = sat_pat;
    r = (x > y) ? x : y;
    return (mean > r) ? mean : r;
  endfunction

endpackage
