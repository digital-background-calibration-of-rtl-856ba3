// Background estimator of the capacitor mismatches of one pipeline stage.
//
// For every sample the corrected residue is correlated with the random swap
// sign and the most significant digit,
//     V = R_hat * N * D_1,
// and the estimate of the capacitor that was under calibration is moved
// against it with step size eps = 2^-EPS_SHIFT:
//     dh_M(n+1) = dh_M(n) - eps * V.
// Because N has zero mean and is independent of the input, V averages to zero
// only when dh_M equals the true mismatch, and its mean has the sign of
// dh_M - delta_M, so the loop converges.  Samples with D_1 = 0 give V = 0 and
// leave the estimate unchanged.  This update rule and the default step size
// 2^-22 follow the calibration scheme.
//
// Implementation: each estimate is an accumulator with FRAC + EPS_SHIFT
// fraction bits, so subtracting V (FRAC fraction bits) scales it by eps
// exactly, with no shifter.  The accumulators start at zero on reset and
// saturate at +-1/4 (this design's choice).  dc[k] is the accumulator of
// C_S,(k+1) truncated to FRAC + DGUARD fraction bits.  One update per clock in
// which upd is high; the new estimate is visible on dc the clock after.
module mismatch_estimator
  import adc_cal_pkg::*;
#(
  parameter int unsigned M         = 2,
  parameter int unsigned W         = 20,
  parameter int unsigned FRAC      = 16,
  parameter int unsigned DGUARD    = 4,
  parameter int unsigned EPS_SHIFT = 22,
  localparam int unsigned K  = (1 << M) - 1,
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned DW = FRAC + DGUARD - 1,
  localparam int unsigned AW = FRAC + EPS_SHIFT - 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 upd,
  input  logic signed [W-1:0]  r_hat,
  input  digit_t               d1,
  input  logic                 n_pos,
  input  logic [SW-1:0]        sel,
  output logic signed [DW-1:0] dc    [K]
);

  localparam logic signed [AW:0] ACC_MAX = (AW+1)'({1'b0, {(AW-1){1'b1}}});
  localparam logic signed [AW:0] ACC_MIN = -ACC_MAX - 1;

  logic signed [AW-1:0] acc [K];
  logic signed [AW:0]   v_rnd;     // R_hat * N * D_1
  logic signed [AW:0]   acc_next;  // one bit wider to detect overflow

  always_comb begin
    if (d1 == 2'sd0)                 v_rnd = '0;
    else if (n_pos == (d1 == 2'sd1)) v_rnd = (AW+1)'(r_hat);
    else                             v_rnd = -(AW+1)'(r_hat);
    acc_next = (AW+1)'(acc[sel]) - v_rnd;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned k = 0; k < K; k++) acc[k] <= '0;
    end else if (upd) begin
      if (acc_next > ACC_MAX)      acc[sel] <= AW'(ACC_MAX);
      else if (acc_next < ACC_MIN) acc[sel] <= AW'(ACC_MIN);
      else                         acc[sel] <= AW'(acc_next);
    end
  end

  always_comb
    for (int unsigned k = 0; k < K; k++) dc[k] = DW'(acc[k] >>> (EPS_SHIFT - DGUARD));

  initial assert (EPS_SHIFT >= DGUARD) else $error("mismatch_estimator: EPS_SHIFT < DGUARD");

  always_ff @(posedge clk)
    if (upd) assert (int'(sel) < K) else $error("mismatch_estimator: sel %0d out of range", sel);

endmodule
