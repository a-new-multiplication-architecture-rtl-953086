// mant_corr: comparator bank that selects the shift constant d for the
// coefficient mantissa.
//
// The multiplier treats the coefficient mantissa 1+f as 2^(f+d): d(f) =
// log2(1+f) - f is zero at f = 0 and f = 1 and peaks at D_MAX = 0.0861 for
// f = 0.4427. N parallel 23-bit comparators compare f with constants y_1..y_N
// and the number of comparators that fire selects one of N+1 constants d.
//
// Thresholds: with K = (N-1)/2 and step D_MAX/(K+1), the thresholds are the
// points where d(f) crosses each step on the rising side, the peak, and the
// crossings on the falling side. Each segment between thresholds holds d(f)
// within one step, and its constant is the middle of that step, so the
// error is at most D_MAX/(N+1): 0.0430, 0.0215, ... 0.00067 for N = 1, 3, ...
// 127. Both the thresholds and the constants are computed at elaboration.
// The comparator bank, the selection of d and N = 127 follow the source
// design; the placement rule of the thresholds and the mid-step constants
// are this design's reading of it. N must be odd.
//
// Interface: frac (23-bit fraction f) in; d (Q0.23) and seg (segment index)
// out. Timing: combinational, one comparator level plus a count and a mux.
module mant_corr
  import dbns_pkg::*;
#(
  parameter int unsigned N = 127
) (
  input  logic [FRAC_W-1:0]        frac,
  output logic [FRAC_W-1:0]        d,
  output logic [$clog2(N+1)-1:0]   seg
);

  localparam int unsigned SW = $clog2(N + 1);

  initial assert (N % 2 == 1) else $error("mant_corr: N must be odd");

  logic [N-1:0]        hit;
  logic [FRAC_W-1:0]   drom [N+1];

  for (genvar i = 0; i < N; i++) begin : g_cmp
    localparam logic [FRAC_W:0] Y = (FRAC_W+1)'(mant_threshold(i, N));
    assign hit[i] = {1'b0, frac} >= Y;
  end

  for (genvar c = 0; c <= N; c++) begin : g_dconst
    localparam logic [FRAC_W-1:0] DC = FRAC_W'(mant_dconst(c, N));
    assign drom[c] = DC;
  end

  always_comb begin
    seg = '0;
    for (int i = 0; i < N; i++)
      seg = seg + SW'(hit[i]);
  end

  assign d = drom[seg];

endmodule
