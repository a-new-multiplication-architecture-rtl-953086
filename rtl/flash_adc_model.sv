// flash_adc_model: behavioural model (not synthesizable) of the comparator
// bank of a 6-bit flash ADC.
//
// The analog input range is 0.55 V to 1.05 V, split into 63 levels
// DV = 1..63 with level voltage V(DV) = V_LOW + (DV-1)*LSB and
// LSB = (V_HIGH - V_LOW)/62 = 8.065 mV. Comparator k (k = 1..63) drives
// therm[k-1] high when vin >= V(k) - LSB/2, so the number of ones in the
// thermometer code is the level nearest to vin (0 below half an LSB under
// 0.55 V). The range, resolution and LSB follow the source design; the
// half-LSB placement of the thresholds is this model's choice.
//
// Interface: vin is a real voltage; therm is the 63-bit thermometer code.
// Timing: combinational and ideal (no delay, offset or bubbles).
module flash_adc_model #(
  parameter real         V_LOW  = 0.55,
  parameter real         V_HIGH = 1.05,
  parameter int unsigned BITS   = 6
) (
  input  real                  vin,
  output logic [2**BITS-2:0]   therm
);

  localparam int unsigned NCMP = 2**BITS - 1;
  localparam real         LSB  = (V_HIGH - V_LOW) / real'(NCMP - 1);

  always_comb begin
    for (int k = 1; k <= NCMP; k++)
      therm[k-1] = (vin >= V_LOW + (real'(k) - 1.5) * LSB);
  end

endmodule
