// Capacitor-shuffling switch logic of one calibrated pipeline stage.
//
// The multiplying DAC of an m-bit stage has a feedback capacitor C_F and
// K = 2^m - 1 sampling capacitors C_S,1..C_S,K.  All of them sample the input
// in phase 1.  For the hold phase this block decides where each one goes:
//   * the capacitor under calibration C_S,M (sel = M-1) is driven by the most
//     significant digit D_1 and C_S,1 is driven by D_M (no change if M = 1);
//   * N = +1 (n_pos = 1): C_F is the feedback capacitor, every C_S,k is
//     connected to the reference of its routed digit;
//   * N = -1 (n_pos = 0): C_S,M is the feedback capacitor and C_F takes its
//     place, connected to the reference of D_1.
// For m = 1 (K = 1) this is the plain swap of C_F and C_S.  conn[0] is C_F,
// conn[k] is C_S,k.  The outputs are the hold-phase selections only; they are
// combinational in d, n_pos and sel and the switch drivers gate them with the
// hold clock phase.  Sending D_1, not D_M, to C_F when N = -1 follows the
// switch count and the derivation of the scheme; the encodings are this
// design's own.
module cap_shuffle
  import adc_cal_pkg::*;
#(
  parameter int unsigned M = 2,
  localparam int unsigned K  = (1 << M) - 1,
  localparam int unsigned SW = (K > 1) ? $clog2(K) : 1
) (
  input  digit_t          d     [K],
  input  logic            n_pos,
  input  logic [SW-1:0]   sel,
  output conn_t           conn  [K+1]
);

  always_comb begin
    conn[0] = n_pos ? CONN_RES : digit_conn(d[0]);
    for (int unsigned k = 0; k < K; k++) begin
      if (!n_pos && k == int'(sel)) conn[k+1] = CONN_RES;
      else conn[k+1] = digit_conn(routed_digit(k, int'(sel), d[0], d[k], d[sel]));
    end
  end

  // The selection must name an existing capacitor, otherwise no capacitor
  // would close the feedback loop when N = -1.
  always_comb
    assert (int'(sel) < K) else $error("cap_shuffle: sel %0d out of range", sel);

  initial assert (K > 0) else $error("cap_shuffle: M must be at least 1");

endmodule
