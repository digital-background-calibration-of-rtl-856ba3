// Testbench for mismatch_estimator: drives random corrected residues, digits,
// swap signs, capacitor indices and update enables into a 2.5-bit instance
// with the default step size and a second instance with a coarse step size
// that reaches saturation; a 64-bit integer model of
// acc_M -= R_hat * N * D_1 (with saturation at +-1/4) predicts every estimate.
module tb_mismatch_estimator;
  import adc_cal_pkg::*;
  localparam int W = 20, FRAC = 16, DG = 4;
  localparam int EPS_A = 22, EPS_B = 6;
  localparam int DW = FRAC + DG - 1;
  logic clk = 0, rst_n = 0;
  logic upd, n_pos;
  logic signed [W-1:0] r_hat;
  digit_t d1;
  logic [1:0] sel;
  logic signed [DW-1:0] dca [3], dcb [3];
  int checks = 0, failures = 0, sat_seen = 0;
  longint acc_a [3], acc_b [3];

  mismatch_estimator #(.M(2), .W(W), .FRAC(FRAC), .DGUARD(DG), .EPS_SHIFT(EPS_A)) dut_a (
    .clk, .rst_n, .upd, .r_hat, .d1, .n_pos, .sel, .dc(dca));
  mismatch_estimator #(.M(2), .W(W), .FRAC(FRAC), .DGUARD(DG), .EPS_SHIFT(EPS_B)) dut_b (
    .clk, .rst_n, .upd, .r_hat, .d1, .n_pos, .sel, .dc(dcb));

  always #5 clk = ~clk;

  function automatic longint step(longint acc, longint v, int eps);
    longint lim = (longint'(1) <<< (FRAC + eps - 2)) - 1;   // +1/4 in accumulator LSBs
    longint nx = acc - v;
    if (nx > lim) nx = lim;
    if (nx < -lim - 1) nx = -lim - 1;
    return nx;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    int bias;
    upd = 0; n_pos = 1; r_hat = 0; d1 = 0; sel = 0;
    for (int k = 0; k < 3; k++) begin acc_a[k] = 0; acc_b[k] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 40000; i++) begin
      @(negedge clk);
      // second half: a biased residue drives instance B into saturation
      bias = (i >= 20000) ? 200000 : 0;
      r_hat = W'(int'($urandom_range(0, 200000)) - 100000 + ((i / 5000) % 2 == 0 ? bias : -bias));
      d1    = digit_t'(int'($urandom_range(0, 2)) - 1);
      n_pos = 1'($urandom);
      sel   = 2'($urandom_range(0, 2));
      upd   = ($urandom_range(0, 9) != 0);
      v = (d1 == 0) ? 0 : ((n_pos == (d1 == 1)) ? longint'(r_hat) : -longint'(r_hat));
      @(posedge clk); #1;
      if (upd) begin
        acc_a[sel] = step(acc_a[sel], v, EPS_A);
        acc_b[sel] = step(acc_b[sel], v, EPS_B);
      end
      for (int k = 0; k < 3; k++) begin
        checks += 2;
        if (longint'(dca[k]) != (acc_a[k] >>> (EPS_A - DG))) begin
          failures++; if (failures < 10) $display("A i=%0d k=%0d dc=%0d model=%0d", i, k, dca[k], acc_a[k] >>> (EPS_A - DG));
        end
        if (longint'(dcb[k]) != (acc_b[k] >>> (EPS_B - DG))) begin
          failures++; if (failures < 10) $display("B i=%0d k=%0d dc=%0d model=%0d", i, k, dcb[k], acc_b[k] >>> (EPS_B - DG));
        end
        if (acc_b[k] == (longint'(1) <<< (FRAC + EPS_B - 2)) - 1) sat_seen++;
      end
    end
    checks++;
    if (sat_seen == 0) begin failures++; $display("saturation never reached"); end
    $display("saturated samples: %0d", sat_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
