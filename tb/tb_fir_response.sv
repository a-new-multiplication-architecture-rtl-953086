// tb_fir_response: magnitude response of the 52-tap DBNS filter.
//
// A 52-tap low-pass (cut-off 0.5*pi rad/sample, Blackman window) is loaded
// into dbns_fir. For each test frequency a unit sine is encoded sample by
// sample into the nearest signed DBNS term with 9-bit exponents and fed to
// the filter; the output amplitude is measured by correlation over the
// outputs after the delay line has filled. The same is done for a
// double-precision filter with the same coefficients on the exact sine.
// Checks: in the pass band (0.1..0.4 pi) the DBNS gain is within 0.6 dB of
// the ideal gain (the multiplier reads high by about 4 % on average); in the
// stop band (0.62..0.9 pi) the DBNS response is below -45 dB and no better
// than the ideal response, the floor being set by the multiplier's
// data-dependent error. The measured levels are printed.
module tb_fir_response;
  import dbns_pkg::*;
  import dbns_ref_pkg::*;

  localparam int  TAPS = 52;
  localparam int  NS   = 200;
  localparam int  NF   = 8;
  localparam real PI   = 3.141592653589793;
  localparam real WLIST [NF] = '{0.1, 0.2, 0.3, 0.4, 0.62, 0.7, 0.8, 0.9};

  logic clk = 1'b0, rst_n = 1'b0;
  logic coef_we = 1'b0;
  logic [$clog2(TAPS)-1:0] coef_addr = '0;
  float32_t coef_data = '0;
  logic in_valid = 1'b0, in_ready, out_valid;
  dbns_t in_x = '0;
  float32_t out_y;
  int checks = 0, failures = 0;

  dbns_fir dut (.*);

  always #5 clk = ~clk;

  real hr [TAPS];

  // nearest signed DBNS term with 9-bit exponents
  function automatic dbns_t encode(input real v);
    dbns_t r;
    real   a, e, best;
    int    b0;
    r    = '0;
    r.s  = (v < 0.0);
    a    = (v < 0.0) ? -v : v;
    best = 1.0e30;
    if (a < 1.0e-30) a = 1.0e-30;
    for (int t = -160; t <= 160; t++) begin
      b0 = int'($floor(log2r(a) - real'(t) * LOG23));
      for (int b = b0; b <= b0 + 1; b++) begin
        if (b < -256 || b > 255) continue;
        e = dbns_val(b, t) - a;
        if (e < 0) e = -e;
        if (e < best) begin best = e; r.b = 9'(b); r.t = 9'(t); end
      end
    end
    return r;
  endfunction

  initial begin
    real m, w, xs [NS], ys, yi, si, ci, sd, cd, gd, gi, gdb, gidb;
    for (int k = 0; k < TAPS; k++) begin
      m  = real'(k) - real'(TAPS - 1) / 2.0;
      hr[k] = (m == 0.0) ? 0.5 : $sin(PI * 0.5 * m) / (PI * m);
      hr[k] = hr[k] * (0.42 - 0.5 * $cos(2.0 * PI * real'(k) / real'(TAPS - 1))
                            + 0.08 * $cos(4.0 * PI * real'(k) / real'(TAPS - 1)));
      hr[k] = f2r(r2f(hr[k]));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < TAPS; k++) begin
      @(posedge clk);
      coef_we <= 1'b1; coef_addr <= 6'(k); coef_data <= r2f(hr[k]);
    end
    @(posedge clk);
    coef_we <= 1'b0;

    for (int fi = 0; fi < NF; fi++) begin
      w  = WLIST[fi] * PI;
      si = 0.0; ci = 0.0; sd = 0.0; cd = 0.0;
      for (int n = 0; n < NS; n++) begin
        xs[n] = $sin(w * real'(n) + 0.3);
        @(posedge clk);
        in_valid <= 1'b1;
        in_x     <= encode(xs[n]);
        @(posedge clk);
        in_valid <= 1'b0;
        do @(posedge clk); while (!out_valid);
        #1;
        ys = f2r(out_y);
        yi = 0.0;
        for (int k = 0; k < TAPS; k++)
          yi = yi + hr[k] * ((n - k >= 0) ? xs[n-k] : $sin(w * real'(n - k) + 0.3));
        if (n >= TAPS) begin
          sd = sd + ys * $sin(w * real'(n)); cd = cd + ys * $cos(w * real'(n));
          si = si + yi * $sin(w * real'(n)); ci = ci + yi * $cos(w * real'(n));
        end
      end
      gd   = 2.0 * $sqrt(sd * sd + cd * cd) / real'(NS - TAPS);
      gi   = 2.0 * $sqrt(si * si + ci * ci) / real'(NS - TAPS);
      gdb  = 20.0 * $log10(gd);
      gidb = 20.0 * $log10(gi);
      $display("w=%.2f*pi  DBNS %7.2f dB   ideal %7.2f dB", WLIST[fi], gdb, gidb);
      checks++;
      if (WLIST[fi] < 0.5) begin
        if (gdb - gidb > 0.6 || gidb - gdb > 0.6) begin
          failures++;
          $display("FAIL pass band gain differs");
        end
      end else if (gdb > -45.0 || gdb < gidb - 1.0) begin
        failures++;
        $display("FAIL stop band level");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
