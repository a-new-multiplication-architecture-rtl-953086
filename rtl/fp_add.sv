// fp_add: IEEE-754 single-precision adder used to accumulate products.
//
// The operand of larger magnitude is kept, the other is aligned to it with
// guard, round and sticky bits, the mantissas are added or subtracted, the
// result is normalised (one right shift after a carry, or a left shift by
// the leading-zero count after cancellation) and rounded to nearest, ties to
// even. Subnormal inputs are read as zero and subnormal results are flushed
// to zero; infinities and NaNs follow IEEE rules (NaN results are the quiet
// NaN 0x7FC00000). An exact zero sum of opposite operands is +0.
//
// The source design only asks for a floating-point adder after the
// multiplier; its structure, rounding and special cases are this design's.
//
// Interface: a, b (float32_t) in; y (float32_t) out. Timing: combinational.
module fp_add
  import dbns_pkg::*;
(
  input  float32_t a,
  input  float32_t b,
  output float32_t y
);

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  float32_t           big, sml;
  logic [FRAC_W:0]    mb, ms;          // mantissas with hidden bit
  logic [7:0]         diff;
  logic [FRAC_W+3:0]  mb_x, ms_x;      // mantissa . guard round sticky
  logic [FRAC_W+4:0]  sum;
  logic [FRAC_W+3:0]  nrm;
  logic signed [9:0]  e;
  int unsigned        lz;
  logic               g, r, st, up;
  logic [FRAC_W+1:0]  rnd;

  always_comb begin
    // order by magnitude
    if ({a.exp, a.frac} >= {b.exp, b.frac}) begin
      big = a; sml = b;
    end else begin
      big = b; sml = a;
    end
    mb   = (big.exp == '0) ? '0 : {1'b1, big.frac};
    ms   = (sml.exp == '0) ? '0 : {1'b1, sml.frac};
    diff = big.exp - sml.exp;
    if (big.exp != '0 && sml.exp == '0)
      diff = 8'd255;                   // zero operand: nothing to align
    mb_x = {mb, 3'b000};
    if (diff >= 8'(FRAC_W + 4))
      ms_x = {{(FRAC_W+3){1'b0}}, |ms};
    else begin
      ms_x = {ms, 3'b000} >> diff;
      ms_x[0] = ms_x[0] | |({ms, 3'b000} & ((FRAC_W+4)'(1) << diff) - 1'b1);
    end

    if (big.sign == sml.sign) sum = {1'b0, mb_x} + {1'b0, ms_x};
    else                      sum = {1'b0, mb_x} - {1'b0, ms_x};

    e   = 10'(big.exp);
    nrm = sum[FRAC_W+3:0];
    lz  = 0;
    if (sum[FRAC_W+4]) begin           // carry out: shift right, keep sticky
      nrm = sum[FRAC_W+4:1];
      nrm[0] = nrm[0] | sum[0];
      e   = e + 10'sd1;
    end else begin
      // leading-zero count: the last (highest) one found wins
      for (int k = 0; k <= FRAC_W + 3; k++)
        if (sum[k]) lz = FRAC_W + 3 - k;
      nrm = nrm << lz;
      e   = e - 10'(lz);
    end

    g   = nrm[2];
    r   = nrm[1];
    st  = nrm[0];
    up  = g & (r | st | nrm[3]);
    rnd = {1'b0, nrm[FRAC_W+3:3]} + (FRAC_W+2)'(up);
    if (rnd[FRAC_W+1]) begin
      rnd = rnd >> 1;
      e   = e + 10'sd1;
    end

    y.sign = big.sign;
    y.exp  = e[7:0];
    y.frac = rnd[FRAC_W-1:0];

    if (sum == '0 || big.exp == '0) begin              // exact zero
      y = '0;
      if (big.exp == '0) y.sign = a.sign & b.sign;
    end else if (e <= 10'sd0) begin                    // flush to zero
      y = '0;
      y.sign = big.sign;
    end else if (e >= 10'sd255) begin                  // overflow
      y.exp  = '1;
      y.frac = '0;
    end

    // infinities and NaNs
    if ((a.exp == '1 && a.frac != '0) || (b.exp == '1 && b.frac != '0))
      y = QNAN;
    else if (a.exp == '1 && b.exp == '1)
      y = (a.sign == b.sign) ? a : float32_t'(QNAN);
    else if (a.exp == '1)
      y = a;
    else if (b.exp == '1)
      y = b;
  end

endmodule
