// Testbench for cap_shuffle: exhaustively applies every digit combination,
// swap sign N and calibrated-capacitor index M to a 2.5-bit (m = 2) and a
// 1.5-bit (m = 1) instance and compares the hold-phase connections with the
// shuffling rule written out per capacitor (one-based indices as in the
// description of the scheme).
module tb_cap_shuffle;
  import adc_cal_pkg::*;
  digit_t d2 [3];
  digit_t d1 [1];
  logic   n_pos;
  logic [1:0] sel2;
  logic [0:0] sel1;
  conn_t  c2 [4];
  conn_t  c1 [2];
  int checks = 0, failures = 0;

  cap_shuffle #(.M(2)) dut2 (.d(d2), .n_pos(n_pos), .sel(sel2), .conn(c2));
  cap_shuffle #(.M(1)) dut1 (.d(d1), .n_pos(n_pos), .sel(sel1), .conn(c1));

  function automatic conn_t ref_of(int v);
    return (v > 0) ? CONN_POS : (v < 0) ? CONN_NEG : CONN_ZERO;
  endfunction

  task automatic expect_conn(string what, conn_t got, conn_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("%s: got %s expected %s", what, got.name(), exp.name());
    end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dv [1:3];
    int mm;
    conn_t exp_c [0:3];
    sel1 = 0;
    for (int code = 0; code < 27; code++) begin
      dv[1] = code % 3 - 1; dv[2] = (code / 3) % 3 - 1; dv[3] = (code / 9) - 1;
      for (int k = 0; k < 3; k++) d2[k] = digit_t'(dv[k+1]);
      for (int n = 0; n < 2; n++) begin
        for (mm = 1; mm <= 3; mm++) begin
          n_pos = n[0];
          sel2 = 2'(mm - 1);
          // capacitor under calibration C_S,mm takes D_1; C_S,1 takes D_mm
          for (int k = 1; k <= 3; k++)
            exp_c[k] = ref_of((k == mm) ? dv[1] : (k == 1) ? dv[mm] : dv[k]);
          if (n_pos) exp_c[0] = CONN_RES;
          else begin
            exp_c[0]  = ref_of(dv[1]);
            exp_c[mm] = CONN_RES;
          end
          #1;
          for (int k = 0; k <= 3; k++) expect_conn($sformatf("m=2 D=%0d,%0d,%0d N=%0d M=%0d cap %0d", dv[1], dv[2], dv[3], n, mm, k), c2[k], exp_c[k]);
        end
        // one-bit stage: Fig. 3 switch pattern
        d1[0] = d2[0];
        #1;
        expect_conn("m=1 C_F", c1[0], n_pos ? CONN_RES : ref_of(dv[1]));
        expect_conn("m=1 C_S", c1[1], n_pos ? ref_of(dv[1]) : CONN_RES);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
