// tb_adc_dbns_fir_top: runs the whole chain, analog voltage to filtered
// IEEE-single output, with the top at its default size (52 taps, 127
// comparators).
//
// A 52-tap Hamming-windowed low-pass (cut-off 0.5*pi rad/sample) is loaded,
// then a two-tone signal inside 0.55..1.05 V is sampled, with a few samples
// driven below and above the range. For every sample the encoder output is
// checked against the nearest ADC level (within 0.15 LSB), and every filter
// output against (a) the specified multiplier approximation summed in double
// precision and (b) the ideal filter of the level voltages, within the
// approximation's 6.3 % bound. Latency must be TAPS+1 edges. Mechanisms that
// must each occur at least once: start-up outputs, full-history outputs,
// strobes ignored while busy, clamping below and above the input range,
// both mantissa normalisation cases, and negative products.
module tb_adc_dbns_fir_top;
  import dbns_ref_pkg::*;

  localparam int TAPS = 52;
  localparam int N    = 127;
  localparam int NS   = 64;
  localparam real LSB = 0.5 / 62.0;

  logic clk = 1'b0, rst_n = 1'b0;
  real  vin = 0.8;
  logic sample = 1'b0, ready;
  logic coef_we = 1'b0;
  logic [5:0]  coef_addr = '0;
  logic [31:0] coef_data = '0;
  logic y_valid;
  logic [31:0] y;
  logic signed [8:0] x_b, x_t;
  logic [5:0] x_level;

  adc_dbns_fir_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_startup = 0, n_full = 0, n_ignored = 0, n_low = 0, n_high = 0;
  int n_case0 = 0, n_case1 = 0, n_neg = 0;

  // count multiplier events while the filter walks its taps
  always @(posedge clk) begin
    if (dut.u_fir.busy && int'(dut.u_fir.k) < TAPS && dut.u_fir.xvalid[dut.u_fir.k_idx]) begin
      if (dut.u_fir.mul_carry == 2'd0) n_case0++;
      else                             n_case1++;
      if (dut.u_fir.mul_p.sign) n_neg++;
    end
  end

  logic [31:0] h [TAPS];
  int          sb [NS], st [NS];
  real         sv [NS];

  initial begin
    real m, hv, v, yref, tol, term, got, yid, sabs, e;
    int  lvl, lat;
    for (int k = 0; k < TAPS; k++) begin
      m  = real'(k) - real'(TAPS - 1) / 2.0;
      hv = $sin(3.141592653589793 * 0.5 * m) / (3.141592653589793 * m);
      hv = hv * (0.54 - 0.46 * $cos(2.0 * 3.141592653589793 * real'(k) / real'(TAPS - 1)));
      h[k] = r2f(hv);
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
      v = 0.8 + 0.2 * $sin(0.3 * real'(i)) + 0.04 * $sin(2.7 * real'(i));
      if (i == 10) v = 0.50;           // below range
      if (i == 20) v = 1.10;           // above range
      @(posedge clk);
      vin    <= v;
      sample <= 1'b1;
      @(posedge clk);                  // accepting edge
      #1;
      lvl = int'($floor((v - 0.55) / LSB + 0.5)) + 1;
      if (lvl < 1)  begin lvl = 1;  n_low++;  end
      if (lvl > 63) begin lvl = 63; n_high++; end
      sb[i] = int'(x_b); st[i] = int'(x_t);
      sv[i] = 0.55 + real'(lvl - 1) * LSB;
      e = dbns_val(sb[i], st[i]) - sv[i];
      if (e < 0) e = -e;
      checks++;
      if (e > 0.15 * LSB) begin
        failures++;
        $display("FAIL sample %0d v=%f level voltage %f code b=%0d t=%0d", i, v, sv[i], sb[i], st[i]);
      end
      lat = 0;
      do begin
        @(posedge clk);
        #1;
        lat++;
        if (lat == 3) sample <= 1'b0;
        if (lat < 3 && !ready) n_ignored++;
      end while (!y_valid && lat < 200);
      checks++;
      if (lat != TAPS + 1) begin
        failures++;
        $display("FAIL latency %0d", lat);
      end
      yref = 0.0; tol = 0.0; yid = 0.0; sabs = 0.0;
      for (int k = 0; k < TAPS && k <= i; k++) begin
        term = mul_model(h[k], 1'b0, sb[i-k], st[i-k], N);
        yref = yref + term;
        tol  = tol + (term < 0 ? -term : term) *
               (near_step(real'(h[k][22:0]) / 8388608.0, N, 1.0e-3) ? 2.0e-3 : 2.0e-6);
        yid  = yid + f2r(h[k]) * sv[i-k];
        sabs = sabs + (f2r(h[k]) < 0 ? -f2r(h[k]) : f2r(h[k])) * sv[i-k];
      end
      got = f2r(y);
      checks++;
      if ((got - yref > tol) || (yref - got > tol)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%g model=%g tol=%g", i, got, yref, tol);
      end
      checks++;
      if ((got - yid > 0.063 * sabs) || (yid - got > 0.063 * sabs)) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d y=%g ideal=%g", i, got, yid);
      end
      if (i < TAPS - 1) n_startup++; else n_full++;
    end

    $display("startup %0d full %0d ignored %0d clamp-low %0d clamp-high %0d case0 %0d case1 %0d negative %0d",
             n_startup, n_full, n_ignored, n_low, n_high, n_case0, n_case1, n_neg);
    checks++;
    if (n_startup == 0 || n_full == 0 || n_ignored == 0 || n_low == 0 || n_high == 0 ||
        n_case0 == 0 || n_case1 == 0 || n_neg == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
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
