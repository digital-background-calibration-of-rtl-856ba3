// Behavioural (real-valued) model of the analog side of a pipelined ADC
// stage, used only by the testbenches: the sub-ADC comparators with ideal
// thresholds and the switched-capacitor multiplying DAC with mismatched
// capacitors.  Capacitors are normalised to C_F = 1, C_S,k = 1 + delta_k.  In
// the hold phase, charge conservation gives the residue
//     r = (Ctot * x - sum over non-feedback capacitors c_j * v_j) / c_fb
// with Ctot = 2^m + sum(delta_k), v_j the reference (-1, 0, +1, in Vref)
// each capacitor is switched to and c_fb the feedback capacitor.  A gain
// factor (1 + dg) models a residual amplifier gain error.
package adc_model_pkg;

  // Comparator outputs of an (m+1)-bit sub-ADC: bit j compares against the
  // j-th threshold (2j - 2K + 1) / 2^(m+1), counted from the most negative.
  function automatic logic [5:0] comparators(real x, int m);
    int nk = (1 << m) - 1;
    logic [5:0] t = '0;
    for (int j = 0; j < 2 * nk; j++) t[j] = (x > real'(2 * j - 2 * nk + 1) / real'(1 << (m + 1)));
    return t;
  endfunction

  // Ideal digits D_1..D_K of an input (D_i = sign beyond the i-th threshold pair).
  function automatic int ideal_digit(real x, int m, int i);
    real t = real'(2 * i - 1) / real'(1 << (m + 1));
    return (x > t) ? 1 : (x < -t) ? -1 : 0;
  endfunction

  // Residue from the hold-phase references: v[0] for C_F, v[k] for C_S,k, and
  // fb the index of the capacitor in feedback (its v entry is ignored).
  function automatic real mdac_residue(real x, int m, real delta [4], int v [4], int fb, real dg);
    int nk = (1 << m) - 1;
    real c [4];
    real ctot, q;
    c[0] = 1.0;
    ctot = 1.0;
    for (int k = 1; k <= nk; k++) begin c[k] = 1.0 + delta[k]; ctot += c[k]; end
    q = ctot * x;
    for (int k = 0; k <= nk; k++) if (k != fb) q -= c[k] * real'(v[k]);
    return (1.0 + dg) * q / c[fb];
  endfunction

endpackage
