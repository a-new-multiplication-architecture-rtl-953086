// dbns_ref_pkg: reference arithmetic for the testbenches, written in double
// precision and independent of the RTL.
//
//   f2r        IEEE single bits -> real (subnormals read as zero)
//   r2f        real -> IEEE single bits, round to nearest even, subnormal
//              results flushed to zero, overflow to infinity
//   dbns_val   2^b * 3^t
//   mul_model  value the DBNS x float multiplier is specified to produce:
//              S = f + d + frac(t*log2 3), result (1+frac(S)) *
//              2^(Bc-127 + b + floor(t*log2 3) + floor(S)), with d the middle
//              of the step band of d(f) = log2(1+f) - f that f falls in
//   near_step  true when d(f) lies within tol of a step boundary, where the
//              comparator bank may legitimately pick either neighbour
package dbns_ref_pkg;

  localparam real DMAX  = 0.0860713320559342;
  localparam real LOG23 = 1.5849625007211562;

  function automatic real log2r(input real x);
    return $ln(x) / $ln(2.0);
  endfunction

  function automatic real f2r(input logic [31:0] w);
    real m;
    if (w[30:23] == 8'd0) return 0.0;
    m = 1.0 + real'(w[22:0]) / 8388608.0;
    m = m * $pow(2.0, real'(int'(w[30:23]) - 127));
    return w[31] ? -m : m;
  endfunction

  function automatic logic [31:0] r2f(input real x);
    logic [63:0]  bits;
    logic         s, g, st;
    int           e;
    logic [24:0]  m;
    if (x == 0.0) return 32'd0;
    bits = $realtobits(x);
    s    = bits[63];
    e    = int'(bits[62:52]) - 1023 + 127;
    m    = {2'b01, bits[51:29]};
    g    = bits[28];
    st   = |bits[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0)   return {s, 31'd0};
    if (e >= 255) return {s, 8'hFF, 23'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic real dbns_val(input int b, input int t);
    return $pow(2.0, real'(b)) * $pow(3.0, real'(t));
  endfunction

  function automatic real dfun(input real f);
    return log2r(1.0 + f) - f;
  endfunction

  function automatic real dstep(input real f, input int n);
    real step;
    int  j, k;
    k    = (n - 1) / 2;
    step = DMAX / real'(k + 1);
    j    = int'($floor(dfun(f) / step));
    if (j > k) j = k;
    if (j < 0) j = 0;
    return (real'(2 * j) + 1.0) * step / 2.0;
  endfunction

  function automatic bit near_step(input real f, input int n, input real tol);
    real step, q;
    step = DMAX / real'((n - 1) / 2 + 1);
    q    = dfun(f) / step;
    return (q - $floor(q) < tol) || ($ceil(q) - q < tol);
  endfunction

  // value of the specified product of coefficient w and DBNS term (s,b,t)
  function automatic real mul_model(input logic [31:0] w, input bit s,
                                    input int b, input int t, input int n);
    real f, p, fl, sv, v;
    if (w[30:23] == 8'd0) return 0.0;
    f  = real'(w[22:0]) / 8388608.0;
    p  = real'(t) * LOG23;
    fl = $floor(p);
    sv = f + dstep(f, n) + (p - fl);
    v  = (1.0 + sv - $floor(sv)) *
         $pow(2.0, real'(int'(w[30:23]) - 127 + b) + fl + $floor(sv));
    return (w[31] ^ s) ? -v : v;
  endfunction

endpackage
