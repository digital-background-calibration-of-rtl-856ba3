// Digital correction of one stage's residue for capacitor mismatch.
//
// The back end of the ADC delivers R, its measurement of the residue r of this
// stage.  With all capacitors normalised to C_F (c_F = 1, c_k = 1 + delta_k),
// charge conservation gives the stage input x as
//     Ctot * x = c_fb * r + sum over the non-feedback capacitors of c_j * d_j
// where c_fb is the capacitor in feedback (C_F for N = +1, C_S,M for N = -1),
// d_j the digit routed to capacitor j, and Ctot = 2^m + sum(delta_k).  Using
// the estimates delta-hat in place of delta and dropping second-order terms,
//     Y     = R + D + [N = -1] * dh_M * R + sum_(j not in feedback) dh_j * d_j
//     R_hat = Y * (1 - sum(dh_k) / 2^m) - D
// so that R_hat + D estimates 2^m * x and R_hat is the residue the stage would
// have produced with ideal capacitors.  For a one-bit stage this reduces to
// R_hat = R - N * dh * (R - D_1) / 2, the first-order form of the corrected
// residue of the calibration scheme.  The charge-conservation formulation and
// the fixed-point formats are this design's choice.
//
// Formats: r_in and r_hat are signed W-bit words with FRAC fraction bits
// (units of Vref); dc[k] = delta-hat of C_S,(k+1), signed with FRAC+DGUARD
// fraction bits and range +-1/4.  Purely combinational; the result is rounded
// to the nearest r_hat LSB.
module residue_corrector
  import adc_cal_pkg::*;
#(
  parameter int unsigned M      = 2,
  parameter int unsigned W      = 20,
  parameter int unsigned FRAC   = 16,
  parameter int unsigned DGUARD = 4,
  localparam int unsigned K  = (1 << M) - 1,
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1,
  localparam int unsigned DF = FRAC + DGUARD,   // estimate fraction bits
  localparam int unsigned DW = DF - 1           // estimate width, range +-1/4
) (
  input  logic signed [W-1:0]  r_in,
  input  digit_t               d     [K],
  input  logic                 n_pos,
  input  logic [SW-1:0]        sel,
  input  logic signed [DW-1:0] dc    [K],
  output logic signed [W-1:0]  r_hat
);

  localparam int unsigned IW = W + DGUARD + M + 4;   // internal word, DF fraction bits
  localparam int unsigned PW = IW + DW + M + 2;      // product width

  logic signed [IW-1:0] dsum;       // D as an integer
  logic signed [IW-1:0] y_base;     // (R + D), DF fraction bits
  logic signed [IW-1:0] p_fb;       // dh_M * R when C_S,M is in feedback
  logic signed [IW-1:0] p_dig;      // sum of dh_j * d_j
  logic signed [IW-1:0] y;          // c-weighted sum, estimates Ctot * x
  logic signed [IW-1:0] s_dc;       // sum of all dh_k
  logic signed [PW-1:0] p_gain;     // y * s_dc, DF + DF fraction bits
  logic signed [IW-1:0] x_scaled;   // estimate of 2^m * x, DF fraction bits
  logic signed [IW-1:0] rh_wide;

  always_comb begin
    logic signed [PW-1:0] prod;
    digit_t dk;

    dsum = '0;
    s_dc = '0;
    p_dig = '0;
    for (int unsigned k = 0; k < K; k++) begin
      dsum = dsum + IW'(d[k]);
      s_dc = s_dc + IW'(dc[k]);
      dk = routed_digit(k, int'(sel), d[0], d[k], d[sel]);
      if (!(!n_pos && k == int'(sel))) begin
        if (dk == 2'sd1)       p_dig = p_dig + IW'(dc[k]);
        else if (dk == -2'sd1) p_dig = p_dig - IW'(dc[k]);
      end
    end

    y_base = (IW'(r_in) + (dsum <<< FRAC)) <<< DGUARD;

    prod = PW'(dc[sel]) * PW'(r_in);
    p_fb = n_pos ? '0 : IW'(prod >>> FRAC);

    y = y_base + p_fb + p_dig;

    p_gain   = PW'(y) * PW'(s_dc);
    x_scaled = y - IW'(p_gain >>> (DF + M));

    rh_wide = ((x_scaled + IW'(1 <<< (DGUARD - 1))) >>> DGUARD) - (dsum <<< FRAC);
    r_hat   = W'(rh_wide);
  end

endmodule
