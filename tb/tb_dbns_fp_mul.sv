// tb_dbns_fp_mul: checks the DBNS x float multiplier against the specified
// approximation (dbns_ref_pkg::mul_model) and against the exact product.
//
// Random coefficients with random sign, fraction and exponent are multiplied
// by DBNS terms whose exponents span the 9-bit range while b + t*log2 3
// stays near the ADC range. Each result must match the model to 4e-5
// (relative), unless the fraction sits on a step boundary of the comparator
// bank, where either neighbouring step is accepted. The ratio to the exact
// product must lie in [1 - D_MAX/128 - 1e-4, 1.0625]. Both
// normalisation cases (integer part of f+d+F = 0 and 1) must occur; the
// third (2) cannot arise with 9-bit t, whose largest fraction of t*log2(3)
// is 0.99699, and is only counted. Zero, infinity, overflow and underflow
// are checked directly.
module tb_dbns_fp_mul;
  import dbns_pkg::*;
  import dbns_ref_pkg::*;

  localparam int N = 127;

  float32_t    coef, p;
  dbns_t       x;
  logic [1:0]  carry;
  int checks = 0, failures = 0;
  int ncase [3] = '{0, 0, 0};

  dbns_fp_mul dut (.coef(coef), .x(x), .p(p), .carry(carry));

  task automatic run(input logic [31:0] w, input bit s, input int b, input int t);
    real got, want, exact, rel, ratio;
    coef = w;
    x.s  = s;
    x.b  = 9'(b);
    x.t  = 9'(t);
    #1;
    got   = f2r(p);
    want  = mul_model(w, s, b, t, N);
    exact = f2r(w) * dbns_val(b, t) * (s ? -1.0 : 1.0);
    rel   = (got - want) / want;
    if (rel < 0) rel = -rel;
    ncase[carry]++;
    checks++;
    if (rel > 4.0e-5 &&
        !near_step(real'(w[22:0]) / 8388608.0, N, 1.0e-3)) begin
      failures++;
      if (failures < 10) $display("FAIL w=%h b=%0d t=%0d got=%g want=%g", w, b, t, got, want);
    end
    ratio = got / exact;
    checks++;
    if (ratio < 1.0 - DMAX / 128.0 - 1.0e-4 || ratio > 1.0625) begin
      failures++;
      if (failures < 10) $display("FAIL ratio %f w=%h b=%0d t=%0d", ratio, w, b, t);
    end
  endtask

  task automatic special(input logic [31:0] w, input int b, input int t,
                         input logic [31:0] want);
    coef = w; x.s = 1'b0; x.b = 9'(b); x.t = 9'(t);
    #1;
    checks++;
    if (p !== want) begin
      failures++;
      $display("FAIL special w=%h b=%0d t=%0d got=%h want=%h", w, b, t, p, want);
    end
  endtask

  initial begin
    int t, b;
    logic [31:0] w;
    for (int i = 0; i < 40000; i++) begin
      t = int'($urandom_range(511)) - 256;
      b = -int'($floor(real'(t) * LOG23)) + int'($urandom_range(4)) - 2;
      if (b < -256 || b > 255) continue;
      w = {1'($urandom), 8'(64 + $urandom_range(127)), 23'($urandom)};
      run(w, 1'($urandom), b, t);
    end
    // Table-style operands: coefficient 1.0 times the encoded voltages
    run(32'h3F80_0000, 1'b0, -134, 84);
    run(32'h3F80_0000, 1'b0, 207, -131);
    for (int c = 0; c < 2; c++) begin
      checks++;
      if (ncase[c] == 0) begin
        failures++;
        $display("FAIL normalisation case %0d never occurred", c);
      end
    end
    special(32'h0000_0000, 5, 3, 32'h0000_0000);   // zero coefficient
    special(32'h8000_0000, 5, 3, 32'h8000_0000);
    special(32'h7F80_0000, 5, 3, 32'h7F80_0000);   // infinity
    special(32'h7F00_0000, 255, 0, 32'h7F80_0000); // overflow
    special(32'h0100_0000, -256, 0, 32'h0000_0000);// underflow
    special(32'h3F80_0000, 0, 0, 32'h3F80_1609);   // 1.0 * 1: f=0 still gets d = D_MAX/128
    $display("cases: S<1 %0d, 1<=S<2 %0d, S>=2 %0d", ncase[0], ncase[1], ncase[2]);
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
