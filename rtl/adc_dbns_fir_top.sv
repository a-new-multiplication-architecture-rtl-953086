// adc_dbns_fir_top: a flash ADC with a double-base number encoder feeding a
// FIR filter whose multiplier takes the encoder's DBNS output directly.
//
// Signal flow: analog vin -> 63 comparators (behavioural model) ->
// thermometer code -> DBNE ROM encoder -> DBNS sample 2^b 3^t -> FIR filter
// (DBNS x IEEE-single multiplier + floating-point accumulator) -> IEEE-single
// output. A sample is taken on a clock edge where sample && ready; the
// filter output appears TAPS+1 edges later on y_valid/y.
//
// The chain ADC -> DBNE -> DBNS multiplier -> FIR follows the source design;
// sampling on a strobe is this design's choice.
//
// Interface: clk, rst_n (active-low synchronous); vin (real, volts);
// sample/ready; coefficient write port coef_we/coef_addr/coef_data;
// y_valid/y; x_b/x_t/x_level expose the encoder output for observation.
module adc_dbns_fir_top
  import dbns_pkg::*;
#(
  parameter int unsigned TAPS = 52,
  parameter int unsigned N    = 127
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  real                      vin,
  input  logic                     sample,
  output logic                     ready,
  input  logic                     coef_we,
  input  logic [$clog2(TAPS)-1:0]  coef_addr,
  input  logic [31:0]              coef_data,
  output logic                     y_valid,
  output logic [31:0]              y,
  output logic signed [EXP_W-1:0]  x_b,
  output logic signed [EXP_W-1:0]  x_t,
  output logic [5:0]               x_level
);

  logic [62:0] therm;
  dbns_t       x;
  float32_t    y_f;

  flash_adc_model u_adc (
    .vin   (vin),
    .therm (therm)
  );

  dbne u_dbne (
    .therm (therm),
    .x     (x),
    .level (x_level)
  );

  dbns_fir #(.TAPS(TAPS), .N(N)) u_fir (
    .clk       (clk),
    .rst_n     (rst_n),
    .coef_we   (coef_we),
    .coef_addr (coef_addr),
    .coef_data (float32_t'(coef_data)),
    .in_valid  (sample),
    .in_ready  (ready),
    .in_x      (x),
    .out_valid (y_valid),
    .out_y     (y_f)
  );

  assign y   = y_f;
  assign x_b = x.b;
  assign x_t = x.t;

endmodule
