// frac_int_conv: the "fraction and integer conversion" of the ternary
// exponent.
//
// 3^t is rewritten as 2^(t*log2 3) = 2^(I+F) with integer I and fraction
// F in [0,1). The product t*log2(3) is formed without a multiplier: t is
// shifted right by each bit position where the binary expansion of log2(3)
// has a one and the shifted copies are added. I is the floor of the sum and
// F its 23-bit fractional part.
//
// The shift-and-add method follows the source design. The set of shifts is
// that of log2(3) rounded to 23 fraction bits (shifts 0,1,4,6,8,9,10,20,21,23),
// a design choice that keeps the error of t*log2(3) below |t|*2^-24.
//
// Interface: t (9-bit signed) in; i_part (10-bit signed) and f_part (23-bit
// unsigned fraction) out. Timing: combinational.
module frac_int_conv
  import dbns_pkg::*;
(
  input  logic signed [EXP_W-1:0]  t,
  output logic signed [EXP_W:0]    i_part,
  output logic        [FRAC_W-1:0] f_part
);

  localparam int unsigned PW = EXP_W + FRAC_W + 1;   // |t*log2 3| < 2^9

  logic signed [PW-1:0] p;

  always_comb begin
    p = '0;
    for (int k = 0; k <= FRAC_W; k++)
      if (LOG2_3_Q23[k])
        p = p + (PW'(t) <<< k);       // t * 2^(k-23), in units of 2^-23
  end

  assign i_part = p[PW-1:FRAC_W];     // arithmetic floor
  assign f_part = p[FRAC_W-1:0];

endmodule
