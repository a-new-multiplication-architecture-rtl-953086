// tb_mant_corr_sweep: error of the mantissa comparator bank against the
// number of comparators N = 1, 3, 7, ..., 511.
//
// One comparator bank per N is driven with the same fraction f, swept over
// [0,1) in steps of 2^-16. For each N the largest |d - (log2(1+f) - f)| is
// measured and checked against D_MAX/(N+1) (the design bound, within 2^-22)
// and against the published maximum errors 0.0430, 0.0215, 0.0108, 0.0054,
// 0.0027, 0.0013, 0.0006, 0.0003, 0.00015, which are given to one or two
// significant digits: the measured value must lie between 3 % below and
// 15 % above them.
module tb_mant_corr_sweep;
  import dbns_ref_pkg::*;

  localparam int NN = 9;
  localparam int    NLIST [NN] = '{1, 3, 7, 15, 31, 63, 127, 255, 511};
  localparam real   EPUB  [NN] = '{0.0430, 0.0215, 0.0108, 0.0054, 0.0027,
                                   0.0013, 0.0006, 0.0003, 0.00015};

  logic [22:0] frac;
  logic [22:0] d [NN];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NN; g++) begin : g_bank
    logic [$clog2(NLIST[g]+1)-1:0] seg;
    mant_corr #(.N(NLIST[g])) u_corr (.frac(frac), .d(d[g]), .seg(seg));
  end

  initial begin
    real emax [NN];
    real e, f;
    for (int i = 0; i < NN; i++) emax[i] = 0.0;
    for (int s = 0; s < (1 << 16); s++) begin
      frac = 23'(s << 7);
      #1;
      f = real'(frac) / 8388608.0;
      for (int i = 0; i < NN; i++) begin
        e = real'(d[i]) / 8388608.0 - dfun(f);
        if (e < 0) e = -e;
        if (e > emax[i]) emax[i] = e;
      end
    end
    for (int i = 0; i < NN; i++) begin
      $display("N=%0d  max error %.6f  (bound %.6f, published %.5f)",
               NLIST[i], emax[i], DMAX / real'(NLIST[i] + 1), EPUB[i]);
      checks++;
      if (emax[i] > DMAX / real'(NLIST[i] + 1) + 1.0 / 4194304.0) begin
        failures++;
        $display("FAIL N=%0d exceeds bound", NLIST[i]);
      end
      checks++;
      if (emax[i] < 0.97 * EPUB[i] || emax[i] > 1.15 * EPUB[i]) begin
        failures++;
        $display("FAIL N=%0d differs from published %f", NLIST[i], EPUB[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
