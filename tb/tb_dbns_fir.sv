// tb_dbns_fir: end-to-end check of the FIR inner-product processor.
//
// A 52-tap windowed-sinc low-pass (cut-off 0.5*pi rad/sample, Hamming
// window) is written through the coefficient port, then DBNS samples spread
// over the ADC range are fed in. Each output is compared with a double-
// precision sum of the specified per-tap products (dbns_ref_pkg::mul_model)
// over the samples received so far; the tolerance is float accumulation
// error plus one comparator step for products whose fraction lies on a step
// boundary. The test also checks the latency (TAPS+1 edges from acceptance
// to out_valid), that in_ready is low while busy and that samples offered
// then are ignored, and it counts outputs formed during start-up.
module tb_dbns_fir;
  import dbns_pkg::*;
  import dbns_ref_pkg::*;

  localparam int TAPS = 52;
  localparam int N    = 127;
  localparam int NS   = 70;

  logic clk = 1'b0, rst_n = 1'b0;
  logic coef_we = 1'b0;
  logic [$clog2(TAPS)-1:0] coef_addr = '0;
  float32_t coef_data = '0;
  logic in_valid = 1'b0, in_ready, out_valid;
  dbns_t in_x = '0;
  float32_t out_y;

  int checks = 0, failures = 0;
  int n_startup = 0, n_ignored = 0, n_full = 0;

  dbns_fir dut (.*);

  always #5 clk = ~clk;

  logic [31:0] h [TAPS];
  int          xb [NS], xt [NS];

  initial begin
    real wc, hv, m, yref, tol, term, got;
    int  lat;
    for (int k = 0; k < TAPS; k++) begin
      m  = real'(k) - real'(TAPS - 1) / 2.0;
      wc = 0.5;
      hv = (m == 0.0) ? wc : $sin(3.141592653589793 * wc * m) / (3.141592653589793 * m);
      hv = hv * (0.54 - 0.46 * $cos(2.0 * 3.141592653589793 * real'(k) / real'(TAPS - 1)));
      h[k] = r2f(hv);
    end
    for (int i = 0; i < NS; i++) begin
      xt[i] = int'($urandom_range(320)) - 160;   // keeps b within 9 bits
      xb[i] = -int'($floor(real'(xt[i]) * LOG23)) - int'($urandom_range(1));
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    for (int k = 0; k < TAPS; k++) begin
      @(posedge clk);
      coef_we <= 1'b1; coef_addr <= 6'(k); coef_data <= h[k];
    end
    @(posedge clk);
    coef_we <= 1'b0;
    for (int i = 0; i < NS; i++) begin
      @(posedge clk);
      in_valid <= 1'b1;
      in_x     <= '{s: 1'b0, b: 9'(xb[i]), t: 9'(xt[i])};
      @(posedge clk);
      #1;
      while (!in_ready && !in_valid) begin @(posedge clk); #1; end
      lat = 0;
      // keep in_valid high with a different sample: it must be ignored
      in_x <= '{s: 1'b0, b: 9'(0), t: 9'(0)};
      do begin
        @(posedge clk);
        #1;
        lat++;
        if (!in_ready && in_valid) n_ignored++;
        if (lat == 2) in_valid <= 1'b0;
      end while (!out_valid && lat < 200);
      checks++;
      if (lat != TAPS + 1) begin
        failures++;
        $display("FAIL latency %0d", lat);
      end
      yref = 0.0; tol = 0.0;
      for (int k = 0; k < TAPS && k <= i; k++) begin
        term = mul_model(h[k], 1'b0, xb[i-k], xt[i-k], N);
        yref = yref + term;
        tol  = tol + (term < 0 ? -term : term) *
               (near_step(real'(h[k][22:0]) / 8388608.0, N, 1.0e-3) ? 2.0e-3 : 2.0e-6);
      end
      got = f2r(out_y);
      checks++;
      if ((got - yref > tol + 1.0e-30) || (yref - got > tol + 1.0e-30)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%g ref=%g tol=%g", i, got, yref, tol);
      end
      if (i < TAPS - 1) n_startup++; else n_full++;
    end
    checks++;
    if (n_startup == 0 || n_full == 0 || n_ignored == 0) begin
      failures++;
      $display("FAIL mechanism not exercised: startup=%0d full=%0d ignored=%0d",
               n_startup, n_full, n_ignored);
    end
    $display("startup outputs %0d, full outputs %0d, ignored offers %0d",
             n_startup, n_full, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
