// tb_flash_adc_model: sweeps the input voltage of the comparator-bank model
// and checks that the output is a thermometer code whose count of ones is
// the nearest level round((vin-0.55)/LSB)+1, limited to 0..63.
module tb_flash_adc_model;
  real         vin;
  logic [62:0] therm;
  int checks = 0, failures = 0;

  flash_adc_model dut (.vin(vin), .therm(therm));

  localparam real LSB = 0.5 / 62.0;

  initial begin
    int ones, want;
    bit mono;
    for (int i = 0; i <= 3000; i++) begin
      vin = 0.40 + 0.8 * real'(i) / 3000.0 + 1.0e-7;
      #1;
      ones = $countones(therm);
      mono = 1;
      for (int k = 1; k < 63; k++) if (therm[k] && !therm[k-1]) mono = 0;
      want = int'($floor((vin - 0.55) / LSB + 0.5)) + 1;
      if (want < 0)  want = 0;
      if (want > 63) want = 63;
      checks++;
      if (!mono || ones != want) begin
        failures++;
        if (failures < 10) $display("FAIL vin=%f ones=%0d want=%0d mono=%0d", vin, ones, want, mono);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
