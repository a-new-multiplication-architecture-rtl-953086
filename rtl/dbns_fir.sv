// dbns_fir: FIR filter y(n) = sum_k h(k) x(n-k) with DBNS input samples and
// IEEE single coefficients and output, built as an inner-product processor
// around a single DBNS x float multiplier and a floating-point accumulator.
//
// Samples enter a TAPS-deep delay line. For each accepted sample the
// controller walks k = 0..TAPS-1: in one cycle the product h(k)*x(n-k) is
// formed and registered, in the next it is added to the running sum, so the
// recursion acc <- acc + h(k) x(n-k) runs one tap per cycle. A tap whose
// delay-line stage has not yet received a sample (start-up after reset)
// contributes +0, which makes the filter start from an all-zero history.
//
// The filter equation, TAPS = 52 and the use of the DBNS multiplier follow
// the source design; the sequential one-multiplier schedule, the handshake
// and the coefficient write port are this design's choices.
//
// Interface:
//   coef_we/coef_addr/coef_data : write one coefficient (IEEE single); a
//       write takes effect at the next clock edge and should not be issued
//       while busy (checked by an assertion).
//   in_valid/in_ready/in_x : a sample is accepted on a clock edge with
//       in_valid && in_ready; in_ready is low while a sum is being formed.
//   out_valid/out_y : out_valid pulses for one cycle with the filter output.
// Timing: out_valid rises TAPS+1 clock edges after the accepting edge; a new
// sample can be accepted on the edge after that, i.e. one output per TAPS+2
// cycles. Active-low synchronous reset clears the delay line and the state.
module dbns_fir
  import dbns_pkg::*;
#(
  parameter int unsigned TAPS = 52,
  parameter int unsigned N    = 127
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     coef_we,
  input  logic [$clog2(TAPS)-1:0]  coef_addr,
  input  float32_t                 coef_data,
  input  logic                     in_valid,
  output logic                     in_ready,
  input  dbns_t                    in_x,
  output logic                     out_valid,
  output float32_t                 out_y
);

  localparam int unsigned KW = $clog2(TAPS + 1);

  float32_t          coef_mem [TAPS];
  dbns_t             xline    [TAPS];
  logic [TAPS-1:0]   xvalid;

  logic              busy;
  logic [KW-1:0]     k;
  logic              pv;
  float32_t          prod, acc;

  float32_t          mul_p, add_y;
  logic [1:0]        mul_carry;
  logic [$clog2(TAPS)-1:0] k_idx;

  assign in_ready = ~busy;
  assign k_idx    = k[$clog2(TAPS)-1:0];

  dbns_fp_mul #(.N(N)) u_mul (
    .coef  (coef_mem[k_idx]),
    .x     (xline[k_idx]),
    .p     (mul_p),
    .carry (mul_carry)
  );

  fp_add u_add (
    .a (acc),
    .b (prod),
    .y (add_y)
  );

  always_ff @(posedge clk) begin
    if (coef_we)
      coef_mem[coef_addr] <= coef_data;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      for (int i = 0; i < TAPS; i++) xline[i] <= '0;
      xvalid    <= '0;
      busy      <= 1'b0;
      k         <= '0;
      pv        <= 1'b0;
      prod      <= '0;
      acc       <= '0;
      out_valid <= 1'b0;
      out_y     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (!busy) begin
        if (in_valid) begin
          xline[0] <= in_x;
          for (int i = 1; i < TAPS; i++) xline[i] <= xline[i-1];
          xvalid <= {xvalid[TAPS-2:0], 1'b1};
          busy   <= 1'b1;
          k      <= '0;
          pv     <= 1'b0;
          acc    <= '0;
        end
      end else begin
        if (k < KW'(TAPS)) begin
          prod <= xvalid[k_idx] ? mul_p : '0;
          pv   <= 1'b1;
          k    <= k + 1'b1;
        end else begin
          pv   <= 1'b0;
        end
        if (pv) begin
          acc <= add_y;
          if (k == KW'(TAPS)) begin
            busy      <= 1'b0;
            out_valid <= 1'b1;
            out_y     <= add_y;
          end
        end
      end
    end
  end

  // a coefficient must not change while a sum is being formed
  assert property (@(posedge clk) disable iff (!rst_n) busy |-> !coef_we)
    else $error("dbns_fir: coefficient write while busy");

endmodule
