// Testbench for residue_corrector.  For random capacitor mismatches (up to
// +-0.5 %), stage inputs, swap signs and capacitor indices it computes the
// exact analog residue of a mismatched stage with the behavioural model,
// quantises it to the back end's format, gives the corrector the true
// mismatches as estimates, and checks that R_hat + D equals 2^m x to within
// a few LSBs (only a second-order gain term remains).  It also checks that,
// without estimates, the same residues are visibly wrong, and covers a
// 1.5-bit stage.
module tb_residue_corrector;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;
  localparam int W = 20, FRAC = 16, DG = 4, DW = FRAC + DG - 1;
  localparam real LSB = 1.0 / 65536.0;
  logic signed [W-1:0] r2, rh2, r1, rh1;
  digit_t d2 [3];
  digit_t d1 [1];
  logic n2, n1;
  logic [1:0] sel2;
  logic [0:0] sel1;
  logic signed [DW-1:0] dc2 [3];
  logic signed [DW-1:0] dc1 [1];
  int checks = 0, failures = 0, big_raw = 0;

  residue_corrector #(.M(2), .W(W), .FRAC(FRAC), .DGUARD(DG)) dut2 (
    .r_in(r2), .d(d2), .n_pos(n2), .sel(sel2), .dc(dc2), .r_hat(rh2));
  residue_corrector #(.M(1), .W(W), .FRAC(FRAC), .DGUARD(DG)) dut1 (
    .r_in(r1), .d(d1), .n_pos(n1), .sel(sel1), .dc(dc1), .r_hat(rh1));

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * real'($urandom) / 4294967295.0;
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real delta [4];
    int  v [4];
    int  dg [4];
    int  mm, fb, dsum, nk;
    real x, r, err;
    logic signed [DW-1:0] dc_true [3];
    for (int trial = 0; trial < 4000; trial++) begin
      for (int m = 1; m <= 2; m++) begin
        nk = (1 << m) - 1;
        delta[0] = 0.0;
        for (int k = 1; k <= 3; k++) begin
          delta[k] = urand(-0.005, 0.005);
          dc_true[k-1] = DW'($rtoi(delta[k] * real'(1 << (FRAC + DG))));
        end
        x = urand(-0.99, 0.99);
        dsum = 0;
        for (int i = 1; i <= nk; i++) begin dg[i] = ideal_digit(x, m, i); dsum += dg[i]; end
        mm = int'($urandom_range(1, nk));
        fb = $urandom_range(0, 1) ? 0 : mm;          // C_F or C_S,M in feedback
        // routed references: C_S,1 <- D_M, C_S,M <- D_1, C_F <- D_1 when not in feedback
        for (int k = 1; k <= nk; k++) v[k] = (k == mm) ? dg[1] : (k == 1) ? dg[mm] : dg[k];
        v[0] = dg[1];
        for (int k = nk + 1; k < 4; k++) v[k] = 0;
        r = mdac_residue(x, m, delta, v, fb, 0.0);
        // with estimates
        for (int pass = 0; pass < 2; pass++) begin
          if (m == 2) begin
            for (int k = 0; k < 3; k++) begin d2[k] = digit_t'(dg[k+1]); dc2[k] = pass ? '0 : dc_true[k]; end
            r2 = W'($rtoi(r / LSB + (r >= 0 ? 0.5 : -0.5)));
            n2 = (fb == 0); sel2 = 2'(mm - 1);
          end else begin
            d1[0] = digit_t'(dg[1]); dc1[0] = pass ? '0 : dc_true[0];
            r1 = W'($rtoi(r / LSB + (r >= 0 ? 0.5 : -0.5)));
            n1 = (fb == 0); sel1 = 1'b0;
          end
          #1;
          err = ((m == 2) ? real'(rh2) : real'(rh1)) * LSB + real'(dsum) - real'(1 << m) * x;
          if (pass == 0) begin
            checks++;
            if (err > 6 * LSB || err < -6 * LSB) begin
              failures++;
              if (failures < 10) $display("m=%0d x=%f M=%0d fb=%0d err=%0.2f LSB", m, x, mm, fb, err / LSB);
            end
          end else if (err > 40 * LSB || err < -40 * LSB) big_raw++;
        end
      end
    end
    checks++;
    if (big_raw < 100) begin failures++; $display("uncorrected residues not visibly wrong (%0d)", big_raw); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
