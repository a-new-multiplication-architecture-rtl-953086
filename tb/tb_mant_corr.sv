// tb_mant_corr: self-checking testbench of the mantissa comparator bank.
//
// The reference computes d(f) = log2(1+f) - f in double precision and checks,
// for directed and random fractions f, that the selected shift constant is
// within the promised bound D_MAX/(N+1) (plus 2^-22 for rounding) of d(f),
// that the segment index never decreases as f increases, that all N+1
// segments are used over a dense sweep, and that the constants match the
// closed form (2*min(c,N-c)+1)*D_MAX/(N+1).
module tb_mant_corr;
  import dbns_pkg::*;

  localparam int unsigned N = 127;

  logic [22:0]             frac;
  logic [22:0]             d;
  logic [$clog2(N+1)-1:0]  seg;
  int checks = 0, failures = 0;

  mant_corr dut (.frac(frac), .d(d), .seg(seg));

  localparam real DMAX = 0.0860713320559342;

  function automatic real dref(input real f);
    return $ln(1.0 + f) / $ln(2.0) - f;
  endfunction

  task automatic check_one(input logic [22:0] fv);
    real f, err, dc, want;
    int  j;
    frac = fv;
    #1;
    f   = real'(fv) / 8388608.0;
    dc  = real'(d) / 8388608.0;
    err = dc - dref(f);
    if (err < 0) err = -err;
    checks++;
    if (err > DMAX / real'(N + 1) + 1.0 / 4194304.0) begin
      failures++;
      if (failures < 10)
        $display("FAIL f=%f seg=%0d d=%f dref=%f err=%g", f, seg, dc, dref(f), err);
    end
    j    = (int'(seg) < int'(N) - int'(seg)) ? int'(seg) : int'(N) - int'(seg);
    want = real'(2 * j + 1) * DMAX / real'(N + 1);
    checks++;
    if ((dc - want > 1.0e-6) || (want - dc > 1.0e-6)) begin
      failures++;
      if (failures < 10) $display("FAIL seg=%0d d=%f want=%f", seg, dc, want);
    end
  endtask

  initial begin
    int prev;
    bit seen [N+1];
    prev = 0;
    for (int i = 0; i <= N; i++) seen[i] = 0;
    // directed ends and peak
    check_one(23'd0);
    check_one(23'h7FFFFF);
    check_one(23'd3713595);
    // dense monotone sweep
    for (int i = 0; i < (1 << 23); i += 512) begin
      check_one(23'(i));
      seen[seg] = 1;
      checks++;
      if (int'(seg) < prev) begin
        failures++;
        $display("FAIL segment decreased at f=%0d", i);
      end
      prev = int'(seg);
    end
    for (int i = 0; i <= N; i++) begin
      checks++;
      if (!seen[i]) begin
        failures++;
        $display("FAIL segment %0d never selected", i);
      end
    end
    // random
    for (int i = 0; i < 20000; i++) check_one(23'($urandom));
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
