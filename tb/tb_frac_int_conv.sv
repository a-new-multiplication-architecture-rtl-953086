// tb_frac_int_conv: exhaustive check of the ternary exponent conversion.
// For every 9-bit t the outputs must equal floor and fraction of t times
// log2(3) rounded to 23 fraction bits (an integer product here), and I + F
// must lie within |t|*2^-24 + 2^-23 of the real t*log2(3).
module tb_frac_int_conv;
  import dbns_ref_pkg::*;

  logic signed [8:0]  t;
  logic signed [9:0]  i_part;
  logic [22:0]        f_part;
  int checks = 0, failures = 0;

  frac_int_conv dut (.t(t), .i_part(i_part), .f_part(f_part));

  initial begin
    longint p;
    real    v, err;
    for (int tv = -256; tv <= 255; tv++) begin
      t = 9'(tv);
      #1;
      p = longint'(tv) * 64'sd13295629;
      checks++;
      if (longint'(i_part) != (p >>> 23) || longint'(f_part) != (p & 64'h7FFFFF)) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d I=%0d F=%0d want I=%0d F=%0d",
                                    tv, i_part, f_part, p >>> 23, p & 64'h7FFFFF);
      end
      v   = real'(i_part) + real'(f_part) / 8388608.0;
      err = v - real'(tv) * LOG23;
      if (err < 0) err = -err;
      checks++;
      if (err > real'(tv < 0 ? -tv : tv) / 16777216.0 + 1.0 / 8388608.0) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d error %g", tv, err);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
