// DC-input testbench for cal_stage.  The calibration needs no particular input
// signal, only a nonzero most significant digit D_1.  A 2.5-bit and a 1.5-bit
// stage model are driven with constant inputs:
//   * x = +0.6 and x = -0.45: every estimate must converge to its mismatch;
//   * x = 0.05, inside the band +-Vref/2^(m+1) where D_1 = 0: the estimates
//     must not move at all.
// Step size 2^-18 (raised from 2^-22) to keep the run short.
module tb_cal_stage_dc;
  import adc_cal_pkg::*;
  import adc_model_pkg::*;
  localparam int W = 20, FRAC = 16, DG = 4, DW = FRAC + DG - 1, STEP = 18;
  localparam real LSB = 1.0 / 65536.0;
  localparam int SAMPLES = 12000000;
  logic clk = 0, rst_n = 0, cal_en = 1, upd = 1;
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

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int qnt(real r);
    return $rtoi(r / LSB + (r >= 0 ? 0.5 : -0.5));
  endfunction

  initial begin : watchdog
    repeat (2 * SAMPLES + 1000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive(real x);
    int dg [4];
    int v [4];
    int mm;
    logic np2, np1;
    @(negedge clk);
    for (int i = 1; i <= 3; i++) dg[i] = ideal_digit(x, 2, i);
    mm  = int'($urandom_range(1, 3));
    np2 = 1'($urandom);
    for (int k = 1; k <= 3; k++) v[k] = (k == mm) ? dg[1] : (k == 1) ? dg[mm] : dg[k];
    v[0] = dg[1];
    r2 = W'(qnt(mdac_residue(x, 2, delta2, v, np2 ? 0 : mm, 0.0)));
    for (int k = 0; k < 3; k++) d2[k] = digit_t'(dg[k+1]);
    n2 = np2; sel2 = 2'(mm - 1);
    dg[1] = ideal_digit(x, 1, 1);
    np1 = 1'($urandom);
    v = '{dg[1], dg[1], 0, 0};
    r1 = W'(qnt(mdac_residue(x, 1, delta1, v, np1 ? 0 : 1, 0.0)));
    d1[0] = digit_t'(dg[1]); n1 = np1; sel1 = 1'b0;
  endtask

  task automatic run_dc(real x, bit expect_converge, int n);
    upd = 0;
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    drive(x);
    upd = 1;
    for (int i = 1; i < n; i++) drive(x);
    @(posedge clk); #1;
    $display("x = %f: estimates %f %f %f | %f", x, real'(dc2[0]) / 1048576.0, real'(dc2[1]) / 1048576.0,
             real'(dc2[2]) / 1048576.0, real'(dc1[0]) / 1048576.0);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (expect_converge ? (fabs(real'(dc2[k]) / 1048576.0 - delta2[k+1]) > 0.0035) : (dc2[k] != 0)) begin
        failures++; $display("  m=2 capacitor %0d wrong", k + 1);
      end
    end
    checks++;
    if (expect_converge ? (fabs(real'(dc1[0]) / 1048576.0 - delta1[1]) > 0.0035) : (dc1[0] != 0)) begin
      failures++; $display("  m=1 capacitor wrong");
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    run_dc(0.6, 1, SAMPLES);
    run_dc(-0.45, 1, SAMPLES);
    run_dc(0.05, 0, 100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
