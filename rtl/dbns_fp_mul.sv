// dbns_fp_mul: multiplier of a DBNS operand by an IEEE single coefficient,
// with the product delivered in IEEE single format.
//
// The coefficient is (1+f) * 2^(Bc-127) and the data operand s * 2^b * 3^t.
// Both are moved into the base-2 exponent domain and added there:
//   1+f   ~ 2^(f+d)         d from the comparator bank (mant_corr)
//   3^t   = 2^(I+F)         I, F from the shift-and-add conversion
//   T     ~ 2^(f+d+F) * 2^(Bc+b+I)
// and the fractional power is taken back with the linear rule 2^x ~ 1+x:
//   S = f+d+F < 1   :  mantissa 1+S,      exponent Bc+b+I
//   1 <= S < 2      :  mantissa S,        exponent Bc+b+I+1
//   S >= 2          :  mantissa S-1,      exponent Bc+b+I+2
// In every case the stored fraction is S mod 1 and the integer part of S is
// added to the exponent. So the whole datapath is one 23-bit three-operand
// addition for the mantissa, one exponent addition and the comparators.
//
// The mantissa and exponent paths and the two normalisation cases follow the
// source design. The third case (S >= 2) is kept for generality: with 9-bit t
// the fraction F never exceeds 0.99699 and f+d stays below 1.0007, so it
// does not occur in this configuration. The handling of zero, infinity
// and NaN coefficients, and the saturation of out-of-range exponents (to
// infinity, and to zero without subnormals) are this design's choices.
// The sign is the XOR of both signs.
//
// Accuracy: the input side is corrected by d, the output side uses 2^x ~ 1+x
// without correction, so the product can exceed the exact one by up to
// about 6 % (at fractional part 0.443) and falls short by at most the
// comparator error D_MAX/(N+1).
//
// Interface: coef (float32_t), x (dbns_t) in; p (float32_t) and the
// normalisation case (carry = integer part of S) out. Timing: combinational.
module dbns_fp_mul
  import dbns_pkg::*;
#(
  parameter int unsigned N = 127
) (
  input  float32_t    coef,
  input  dbns_t       x,
  output float32_t    p,
  output logic [1:0]  carry
);

  logic [FRAC_W-1:0]         d;
  logic [$clog2(N+1)-1:0]    seg;
  logic signed [EXP_W:0]     i_part;
  logic [FRAC_W-1:0]         f_part;

  mant_corr #(.N(N)) u_corr (
    .frac (coef.frac),
    .d    (d),
    .seg  (seg)
  );

  frac_int_conv u_conv (
    .t      (x.t),
    .i_part (i_part),
    .f_part (f_part)
  );

  // mantissa path: S = f + d + F
  logic [FRAC_W+1:0] s_sum;
  assign s_sum = (FRAC_W+2)'(coef.frac) + (FRAC_W+2)'(d) + (FRAC_W+2)'(f_part);
  assign carry = s_sum[FRAC_W+1:FRAC_W];

  // exponent path: Bc + b + I + carry
  localparam int unsigned EW = 12;
  logic signed [EW-1:0] e_sum;
  assign e_sum = EW'(signed'({1'b0, coef.exp})) + EW'(x.b) + EW'(i_part)
               + EW'(signed'({1'b0, carry}));

  always_comb begin
    p.sign = coef.sign ^ x.s;
    if (coef.exp == '1) begin                 // infinity or NaN passes through
      p.exp  = '1;
      p.frac = coef.frac;
    end else if (coef.exp == '0) begin        // zero (subnormals read as zero)
      p.exp  = '0;
      p.frac = '0;
    end else if (e_sum >= EW'(255)) begin     // overflow: infinity
      p.exp  = '1;
      p.frac = '0;
    end else if (e_sum <= EW'(0)) begin       // underflow: zero
      p.exp  = '0;
      p.frac = '0;
    end else begin
      p.exp  = e_sum[FEXP_W-1:0];
      p.frac = s_sum[FRAC_W-1:0];
    end
  end

endmodule
