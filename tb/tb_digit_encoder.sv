// Testbench for digit_encoder: sweeps the stage input over the full range for
// a 2.5-bit (m = 2) and a 1.5-bit (m = 1) sub-ADC, builds the comparator
// outputs from the ideal thresholds (odd multiples of 1/2^(m+1)) and checks
// each digit against the interval the input falls in.
module tb_digit_encoder;
  import adc_cal_pkg::*;
  logic [5:0] therm2;
  logic [1:0] therm1;
  digit_t d2 [3];
  digit_t d1 [1];
  int checks = 0, failures = 0;

  digit_encoder #(.M(2)) dut2 (.therm(therm2), .d(d2));
  digit_encoder #(.M(1)) dut1 (.therm(therm1), .d(d1));

  function automatic int sgn_beyond(real x, real t);
    if (x > t) return 1;
    else if (x < -t) return -1;
    else return 0;
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x;
    for (int i = -1000; i <= 1000; i++) begin
      x = i / 1001.0;
      for (int j = 0; j < 6; j++) therm2[j] = (x > (2*j - 5) / 8.0);
      for (int j = 0; j < 2; j++) therm1[j] = (x > (2*j - 1) / 4.0);
      #1;
      // m = 2: D_1 beyond +-1/8, D_2 beyond +-3/8, D_3 beyond +-5/8
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (int'(d2[k]) != sgn_beyond(x, (2*k + 1) / 8.0)) begin
          failures++;
          $display("m=2 x=%f D_%0d=%0d", x, k + 1, d2[k]);
        end
      end
      checks++;
      if (int'(d1[0]) != sgn_beyond(x, 0.25)) begin
        failures++;
        $display("m=1 x=%f D_1=%0d", x, d1[0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
