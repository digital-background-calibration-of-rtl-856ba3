// Shared types and helpers for the capacitor-mismatch background calibration
// of a pipelined ADC.
//
// A pipeline stage with an m-bit effective resolution and one redundancy bit
// produces K = 2^m - 1 ternary digits D_1..D_K (each -1, 0 or +1).  Each digit
// drives one sampling capacitor C_S,k of the stage's multiplying DAC during the
// hold phase.  The calibration swaps the capacitor under calibration C_S,M with
// the feedback capacitor C_F under control of a random sign N, and routes the
// most significant digit D_1 to the capacitor under calibration.  The routing
// rule lives here so that the switch logic and the digital correction use the
// same definition.  Digit and connection encodings are this design's choice.
package adc_cal_pkg;

  // Ternary sub-ADC digit: -1, 0 or +1 in two's complement.
  typedef logic signed [1:0] digit_t;

  // Hold-phase connection of one MDAC capacitor.
  typedef enum logic [1:0] {
    CONN_ZERO = 2'b00,  // bottom plate to 0 (digit 0)
    CONN_POS  = 2'b01,  // bottom plate to +Vref (digit +1)
    CONN_NEG  = 2'b10,  // bottom plate to -Vref (digit -1)
    CONN_RES  = 2'b11   // in the feedback path, connected to the residue output r
  } conn_t;

  // Reference connection that realises a digit.
  function automatic conn_t digit_conn(digit_t d);
    if (d == 2'sd1)       return CONN_POS;
    else if (d == -2'sd1) return CONN_NEG;
    else                  return CONN_ZERO;
  endfunction

  // Digit driving sampling capacitor C_S,(k+1) (zero-based index k) when the
  // capacitor under calibration is C_S,(sel+1): C_S,1 takes D_M, C_S,M takes
  // D_1, every other capacitor keeps its own digit.
  function automatic digit_t routed_digit(int unsigned k, int unsigned sel,
                                          digit_t d_first, digit_t d_own,
                                          digit_t d_sel);
    if (k == 0)        return d_sel;
    else if (k == sel) return d_first;
    else               return d_own;
  endfunction

endpackage
