// Testbench for cal_stage: closes the calibration loop around behavioural
// models of a mismatched 2.5-bit stage and a mismatched 1.5-bit stage.
// Every clock a random input x is sampled, a random swap sign N and capacitor
// index M are drawn, the model's residue (ideally digitised) is fed back as R,
// and the estimator updates.  Checks:
//   * with cal_en = 0 the residue passes unchanged and estimates stay zero;
//   * with cal_en = 1 every estimate converges to the model's mismatch;
//   * after convergence the corrected residue gives 2^m x to a few LSBs,
//     while the uncorrected one does not.
// The step size is raised to 2^-STEP (from 2^-22) so the loop settles within
// the 16 million samples of the run; the mismatches are larger than typical for
// the same reason.
module tb_cal_stage;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;
  localparam int W = 20, FRAC = 16, DG = 4, DW = FRAC + DG - 1, STEP = 19;
  localparam real LSB = 1.0 / 65536.0;
  localparam int SAMPLES = 16000000;
  logic clk = 0, rst_n = 0, cal_en = 0, upd = 0;
  logic signed [W-1:0] r2, rh2, r1, rh1;
  digit_t d2 [3];
  digit_t d1 [1];
  logic n2, n1;
  logic [1:0] sel2;
  logic [0:0] sel1;
  logic signed [DW-1:0] dc2 [3];
  logic signed [DW-1:0] dc1 [1];
  int checks = 0, failures = 0;

  cal_stage #(.M(2), .W(W), .FRAC(FRAC), .DGUARD(DG), .EPS_SHIFT(STEP)) dut2 (
    .clk, .rst_n, .cal_en, .upd, .r_in(r2), .d(d2), .n_pos(n2), .sel(sel2), .r_hat(rh2), .dc(dc2));
  cal_stage #(.M(1), .W(W), .FRAC(FRAC), .DGUARD(DG), .EPS_SHIFT(STEP)) dut1 (
    .clk, .rst_n, .cal_en, .upd, .r_in(r1), .d(d1), .n_pos(n1), .sel(sel1), .r_hat(rh1), .dc(dc1));

  always #5 clk = ~clk;

  real delta2 [4] = '{0.0, 0.02, -0.015, 0.01};
  real delta1 [4] = '{0.0, -0.012, 0.0, 0.0};

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * real'($urandom) / 4294967295.0;
  endfunction

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int qnt(real r);
    return $rtoi(r / LSB + (r >= 0 ? 0.5 : -0.5));
  endfunction

  initial begin : watchdog
    repeat (SAMPLES + 10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One sample: drives both stages with input x and random N, M.
  task automatic drive(real x, output real err2, output real err1);
    int dg [4];
    int v [4];
    int mm, dsum;
    logic np2, np1;
    @(negedge clk);
    // 2.5-bit stage
    dsum = 0;
    for (int i = 1; i <= 3; i++) begin dg[i] = ideal_digit(x, 2, i); dsum += dg[i]; end
    mm  = int'($urandom_range(1, 3));
    np2 = 1'($urandom);
    for (int k = 1; k <= 3; k++) v[k] = (k == mm) ? dg[1] : (k == 1) ? dg[mm] : dg[k];
    v[0] = dg[1];
    r2 = W'(qnt(mdac_residue(x, 2, delta2, v, np2 ? 0 : mm, 0.0)));
    for (int k = 0; k < 3; k++) d2[k] = digit_t'(dg[k+1]);
    n2 = np2; sel2 = 2'(mm - 1);
    // 1.5-bit stage
    dg[1] = ideal_digit(x, 1, 1);
    np1 = 1'($urandom);
    v = '{dg[1], dg[1], 0, 0};
    r1 = W'(qnt(mdac_residue(x, 1, delta1, v, np1 ? 0 : 1, 0.0)));
    d1[0] = digit_t'(dg[1]); n1 = np1; sel1 = 1'b0;
    #1;
    err2 = real'(rh2) * LSB + real'(dsum) - 4.0 * x;
    err1 = real'(rh1) * LSB + real'(dg[1]) - 2.0 * x;
  endtask

  initial begin
    real x, e2, e1, max_raw, max_cal;
    repeat (2) @(posedge clk);
    rst_n = 1;
    upd = 1;
    // calibration off: residue passes through, estimates stay at zero
    for (int i = 0; i < 2000; i++) begin
      drive(urand(-0.99, 0.99), e2, e1);
      checks += 2;
      if (rh2 != r2 || rh1 != r1) begin failures++; $display("cal off: r_hat differs from R"); end
      if (dc2[0] != 0 || dc2[1] != 0 || dc2[2] != 0 || dc1[0] != 0) begin failures++; $display("cal off: estimate moved"); end
    end
    max_raw = 0.0;
    for (int i = 0; i < 2000; i++) begin
      drive(urand(-0.99, 0.99), e2, e1);
      if (e2 > max_raw) max_raw = e2;
      if (-e2 > max_raw) max_raw = -e2;
    end
    // calibration on
    cal_en = 1;
    for (int i = 0; i < SAMPLES - 20000; i++) begin
      drive(urand(-0.99, 0.99), e2, e1);
      if (i % 2000000 == 0)
        $display("sample %0d: dc2 = %f %f %f  dc1 = %f", i, real'(dc2[0]) / 1048576.0,
                 real'(dc2[1]) / 1048576.0, real'(dc2[2]) / 1048576.0, real'(dc1[0]) / 1048576.0);
    end
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (fabs(real'(dc2[k]) / 1048576.0 - delta2[k+1]) > 0.003) begin
        failures++; $display("m=2 estimate %0d = %f, mismatch %f", k + 1, real'(dc2[k]) / 1048576.0, delta2[k+1]);
      end
    end
    checks++;
    if (fabs(real'(dc1[0]) / 1048576.0 - delta1[1]) > 0.003) begin
      failures++; $display("m=1 estimate = %f, mismatch %f", real'(dc1[0]) / 1048576.0, delta1[1]);
    end
    // freeze the estimates and measure the remaining residue error
    cal_en = 0;
    max_cal = 0.0;
    cal_en = 1; upd = 0;
    for (int i = 0; i < 2000; i++) begin
      drive(urand(-0.99, 0.99), e2, e1);
      if (fabs(e2) > max_cal) max_cal = fabs(e2);
      if (fabs(e1) > max_cal) max_cal = fabs(e1);
    end
    $display("max residue error: uncalibrated %0.1f LSB, calibrated %0.1f LSB", max_raw / LSB, max_cal / LSB);
    checks += 2;
    if (max_cal > 0.15 * max_raw) begin failures++; $display("calibration did not reduce the error"); end
    if (max_raw < 200 * LSB) begin failures++; $display("model mismatch not visible"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
