// Digital calibration logic of one calibrated pipeline stage.
//
// Combines the residue corrector and the mismatch estimator.  The back end
// supplies R (r_in), the measured residue of this stage, together with the
// stage's digits and the swap sign N and capacitor index M that were used
// when the sample was in this stage.  The stage returns the corrected
// residue r_hat (R_hat + D estimates 2^m times the stage input) and, when
// cal_en and upd are high, moves the estimate of C_S,M by -eps * R_hat*N*D_1.
// With cal_en low the correction uses zero estimates and the estimates are
// held, which is the "calibration off" mode; this mode input is this design's
// choice.  r_hat is combinational; estimates change on the clock edge.
module cal_stage
  import adc_cal_pkg::*;
#(
  parameter int unsigned M         = 2,
  parameter int unsigned W         = 20,
  parameter int unsigned FRAC      = 16,
  parameter int unsigned DGUARD    = 4,
  parameter int unsigned EPS_SHIFT = 22,
  localparam int unsigned K  = (1 << M) - 1,
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned DW = FRAC + DGUARD - 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cal_en,
  input  logic                 upd,
  input  logic signed [W-1:0]  r_in,
  input  digit_t               d     [K],
  input  logic                 n_pos,
  input  logic [SW-1:0]        sel,
  output logic signed [W-1:0]  r_hat,
  output logic signed [DW-1:0] dc    [K]
);

  logic signed [DW-1:0] dc_used [K];

  always_comb
    for (int unsigned k = 0; k < K; k++) dc_used[k] = cal_en ? dc[k] : '0;

  residue_corrector #(.M(M), .W(W), .FRAC(FRAC), .DGUARD(DGUARD)) u_corr (
    .r_in (r_in),
    .d    (d),
    .n_pos(n_pos),
    .sel  (sel),
    .dc   (dc_used),
    .r_hat(r_hat)
  );

  mismatch_estimator #(.M(M), .W(W), .FRAC(FRAC), .DGUARD(DGUARD), .EPS_SHIFT(EPS_SHIFT)) u_est (
    .clk  (clk),
    .rst_n(rst_n),
    .upd  (upd && cal_en),
    .r_hat(r_hat),
    .d1   (d[0]),
    .n_pos(n_pos),
    .sel  (sel),
    .dc   (dc)
  );

endmodule
