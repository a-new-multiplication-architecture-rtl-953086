// tb_fp_add: checks the single-precision adder bit for bit against a
// double-precision sum rounded to single (round to nearest even, subnormals
// flushed). Random operands cover same and opposite signs, all exponent
// distances, near-cancellation; zeros, infinities and NaN are directed.
module tb_fp_add;
  import dbns_pkg::*;
  import dbns_ref_pkg::*;

  float32_t a, b, y;
  int checks = 0, failures = 0;
  int ncancel = 0;

  fp_add dut (.a(a), .b(b), .y(y));

  task automatic run(input logic [31:0] av, input logic [31:0] bv);
    logic [31:0] want;
    a = av; b = bv;
    #1;
    want = r2f(f2r(av) + f2r(bv));
    checks++;
    if (y !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %h + %h = %h want %h", av, bv, y, want);
    end
  endtask

  task automatic directed(input logic [31:0] av, input logic [31:0] bv,
                          input logic [31:0] want);
    a = av; b = bv;
    #1;
    checks++;
    if (y !== want) begin
      failures++;
      $display("FAIL %h + %h = %h want %h", av, bv, y, want);
    end
  endtask

  initial begin
    logic [31:0] av, bv;
    for (int i = 0; i < 100000; i++) begin
      av = {1'($urandom), 8'(40 + $urandom_range(170)), 23'($urandom)};
      case (i % 4)
        0: bv = {1'($urandom), 8'(40 + $urandom_range(170)), 23'($urandom)};
        1: bv = {1'($urandom), 8'(int'(av[30:23]) - int'($urandom_range(30))), 23'($urandom)};
        2: begin   // near cancellation
             bv = {~av[31], av[30:23], av[22:0] ^ 23'($urandom_range(15))};
             ncancel++;
           end
        default: bv = {1'($urandom), av[30:23], 23'($urandom)};
      endcase
      run(av, bv);
    end
    directed(32'h3F80_0000, 32'hBF80_0000, 32'h0000_0000);  // 1 - 1 = +0
    directed(32'h0000_0000, 32'h4040_0000, 32'h4040_0000);  // 0 + 3
    directed(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);  // -0 + -0
    directed(32'h7F80_0000, 32'h3F80_0000, 32'h7F80_0000);  // inf + 1
    directed(32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000);  // inf - inf
    directed(32'h7F7F_FFFF, 32'h7F7F_FFFF, 32'h7F80_0000);  // overflow
    directed(32'h3F80_0000, 32'h3380_0000, 32'h3F80_0000);  // 1 + 2^-24: tie to even
    directed(32'h3F80_0001, 32'h3380_0000, 32'h3F80_0002);  // tie rounds up to even
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
