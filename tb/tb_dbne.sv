// tb_dbne: checks the double-base number encoder for every thermometer code.
// The expected exponents are found here by searching all 9-bit ternary
// exponents t (with the two nearest binary exponents b for each) for the
// term 2^b 3^t closest to the level voltage 0.55 + (DV-1)*0.5/62. The
// sixteen levels of the published code table are also checked directly.
module tb_dbne;
  import dbns_pkg::*;
  import dbns_ref_pkg::*;

  logic [62:0] therm;
  dbns_t       x;
  logic [5:0]  level;
  int checks = 0, failures = 0;

  dbne dut (.therm(therm), .x(x), .level(level));

  // DV, b, t of the published rows
  int tab [16][3] = '{
    '{1, -134, 84},  '{5, 191, -121}, '{9, 115, -73},  '{13, 207, -131},
    '{17, -186, 117}, '{21, -10, 6},   '{25, -151, 95}, '{29, 193, -122},
    '{33, 136, -86},  '{37, 163, -103}, '{41, 190, -120}, '{45, -184, 116},
    '{49, 11, -7},    '{53, 206, -130}, '{57, -84, 53},  '{61, 195, -123}};

  task automatic drive(input int k);
    therm = '0;
    for (int i = 0; i < k; i++) therm[i] = 1'b1;
    #1;
  endtask

  initial begin
    real v, e, best, lsb;
    int  bb, bt, b0, dv;
    lsb = 0.5 / 62.0;
    for (int k = 0; k <= 63; k++) begin
      drive(k);
      dv = (k == 0) ? 1 : k;
      v  = 0.55 + real'(dv - 1) * lsb;
      best = 1.0e9; bb = 0; bt = 0;
      for (int t = -256; t <= 255; t++) begin
        b0 = int'($floor(log2r(v) - real'(t) * LOG23));
        for (int b = b0; b <= b0 + 1; b++) begin
          if (b < -256 || b > 255) continue;
          e = dbns_val(b, t) - v;
          if (e < 0) e = -e;
          if (e < best) begin best = e; bb = b; bt = t; end
        end
      end
      checks++;
      if (int'(x.b) != bb || int'(x.t) != bt || x.s != 1'b0 || int'(level) != k) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d got b=%0d t=%0d lvl=%0d want b=%0d t=%0d",
                                    k, x.b, x.t, level, bb, bt);
      end
      // error within 0.15 LSB
      e = dbns_val(int'(x.b), int'(x.t)) - v;
      if (e < 0) e = -e;
      checks++;
      if (e > 0.15 * lsb) begin
        failures++;
        $display("FAIL k=%0d error %f LSB", k, e / lsb);
      end
    end
    for (int r = 0; r < 16; r++) begin
      drive(tab[r][0]);
      checks++;
      if (int'(x.b) != tab[r][1] || int'(x.t) != tab[r][2]) begin
        failures++;
        $display("FAIL table row DV=%0d got b=%0d t=%0d", tab[r][0], x.b, x.t);
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
