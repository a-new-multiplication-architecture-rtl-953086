// dbns_pkg: types and constants shared by the DBNS x floating-point datapath.
//
// A DBNS (double-base number system) operand is one term s * 2^b * 3^t with a
// sign s and two signed exponents b (binary) and t (ternary). The exponents are
// 9 bits wide, as produced by the double-base number encoder of the ADC. The
// other operand format is IEEE-754 single precision.
//
// The package also holds elaboration-time helper functions that derive the
// constants of the mantissa comparator bank: a fixed-point log2(1+f) routine
// and the threshold search built on it. They are used only in constant
// expressions and generate no hardware of their own.
package dbns_pkg;

  localparam int unsigned EXP_W  = 9;    // DBNS exponent width (binary and ternary)
  localparam int unsigned FRAC_W = 23;   // IEEE single fraction width
  localparam int unsigned FEXP_W = 8;    // IEEE single exponent width

  // One DBNS term: value = (-1)^s * 2^b * 3^t
  typedef struct packed {
    logic                    s;
    logic signed [EXP_W-1:0] b;
    logic signed [EXP_W-1:0] t;
  } dbns_t;

  // IEEE-754 single precision word
  typedef struct packed {
    logic              sign;
    logic [FEXP_W-1:0] exp;
    logic [FRAC_W-1:0] frac;
  } float32_t;

  // log2(3) = 1.1001010111000000000110 1... (binary), rounded to 23 fraction
  // bits: 13295629 / 2^23. Its set bits are the shift amounts of the ternary
  // exponent conversion.
  localparam logic [FRAC_W:0] LOG2_3_Q23 = 24'd13295629;

  // D_MAX = max over f in [0,1] of log2(1+f) - f, reached at f0 = 1/ln2 - 1.
  // D_MAX = 0.0860713..., f0 = 0.4426950...
  localparam longint DMAX_Q23 = 722019;      // round(D_MAX * 2^23)
  localparam longint DMAX_Q30 = 92418389;    // round(D_MAX * 2^30)
  localparam longint F0_Q23   = 3713595;     // round(f0 * 2^23)

  // log2(1 + f / 2^23) in Q0.30, by repeated squaring (elaboration time only).
  function automatic longint log2_1p_q30(input longint f);
    longint unsigned x;
    longint          r;
    x = (64'(f) + (64'd1 << 23)) << 7;        // Q1.30, value in [1,2)
    r = 0;
    for (int k = 29; k >= 0; k--) begin
      x = (x * x) >> 30;
      if (x >= (64'd2 << 30)) begin
        x = x >> 1;
        r = r | (longint'(1) << k);
      end
    end
    return r;
  endfunction

  // d(f) = log2(1+f) - f in Q0.30
  function automatic longint dcorr_q30(input longint f);
    return log2_1p_q30(f) - (f <<< 7);
  endfunction

  // Threshold i (0..n-1) of an n-comparator bank, n odd. With K = (n-1)/2 and
  // step delta = D_MAX/(K+1), thresholds 0..K-1 are where d(f) rises through
  // delta, 2*delta, ..., threshold K is the peak f0, and thresholds K+1..n-1
  // are where d(f) falls back through K*delta, ..., delta.
  function automatic longint mant_threshold(input int i, input int n);
    longint lvl, lo, hi, mid;
    int     k, j;
    k = (n - 1) / 2;
    if (i == k) return F0_Q23;
    j   = (i < k) ? i + 1 : n - i;
    lvl = (longint'(j) * DMAX_Q30) / (longint'(k) + 1);
    if (i < k) begin                    // rising side: first f with d(f) >= lvl
      lo = 0;
      hi = F0_Q23;
      while (lo < hi) begin
        mid = (lo + hi) / 2;
        if (dcorr_q30(mid) >= lvl) hi = mid;
        else                       lo = mid + 1;
      end
    end else begin                      // falling side: first f with d(f) < lvl
      lo = F0_Q23;
      hi = longint'(1) << 23;
      while (lo < hi) begin
        mid = (lo + hi) / 2;
        if (dcorr_q30(mid) < lvl) hi = mid;
        else                      lo = mid + 1;
      end
    end
    return lo;
  endfunction

  // Shift constant of segment c (0..n): the middle of the band of d(f) values
  // the segment spans, (2*min(c, n-c) + 1) * D_MAX / (n+1), in Q0.23.
  function automatic longint mant_dconst(input int c, input int n);
    int j, m;
    j = (c < n - c) ? c : n - c;
    m = 2 * j + 1;
    return (longint'(m) * DMAX_Q23 + (longint'(n) + 1) / 2) / (longint'(n) + 1);
  endfunction

endpackage
