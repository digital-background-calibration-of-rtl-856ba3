// Behavioural model of the analog pipeline that the digital back end serves:
// NUM_STAGES switched-capacitor stages, the first with STAGE1_BITS effective
// bits, the rest 1.5-bit.  Not synthesizable (real arithmetic); used only by
// the testbenches.
//
// Each stage holds one sample (xs[k]); on every rising clock edge sample vin
// enters stage 1 and every residue moves one stage on.  After the falling
// edge the comparators of all stages resolve (comp), and 1 ns later each
// stage computes its hold-phase residue: the first NUM_CAL stages follow the
// switch connections sw_conn chosen by the digital back end, the others are
// conventional (C_F in feedback, C_S,k driven by its own digit D_k).
// Capacitor mismatches delta[k][j] (C_S,j of stage k, j = 1..K) and an
// amplifier gain error gerr[k] are set by the testbench before use.
module analog_pipeline_model
  import adc_cal_pkg::*;
  import adc_model_pkg::*;
#(
  parameter int NUM_STAGES  = 12,
  parameter int STAGE1_BITS = 2,
  parameter int NUM_CAL     = 3,
  localparam int KMAX = (1 << STAGE1_BITS) - 1
) (
  input  logic               clk,
  input  real                vin,
  input  conn_t              sw_conn [NUM_CAL][KMAX+1],
  output logic [2*KMAX-1:0]  comp    [NUM_STAGES]
);

  real delta [NUM_STAGES][4];
  real gerr  [NUM_STAGES];
  real xs    [NUM_STAGES];
  real res   [NUM_STAGES];

  initial begin
    for (int k = 0; k < NUM_STAGES; k++) begin
      xs[k] = 0.0; res[k] = 0.0; gerr[k] = 0.0;
      for (int j = 0; j < 4; j++) delta[k][j] = 0.0;
      comp[k] = comparators(0.0, (k == 0) ? STAGE1_BITS : 1);
    end
  end

  function automatic int conn_value(conn_t c);
    return (c == CONN_POS) ? 1 : (c == CONN_NEG) ? -1 : 0;
  endfunction

  always @(posedge clk) begin
    for (int k = NUM_STAGES - 1; k > 0; k--) xs[k] <= res[k-1];
    xs[0] <= vin;
  end

  always @(negedge clk) begin
    int v [4];
    int fb, m, nk;
    real dl [4];
    for (int k = 0; k < NUM_STAGES; k++) begin
      m = (k == 0) ? STAGE1_BITS : 1;
      comp[k] = comparators(xs[k], m);
    end
    #1;
    for (int k = 0; k < NUM_STAGES; k++) begin
      m = (k == 0) ? STAGE1_BITS : 1;
      nk = (1 << m) - 1;
      for (int j = 0; j < 4; j++) begin dl[j] = delta[k][j]; v[j] = 0; end
      fb = 0;
      if (k < NUM_CAL) begin
        for (int j = 0; j <= nk; j++) begin
          if (sw_conn[k][j] == CONN_RES) fb = j;
          else v[j] = conn_value(sw_conn[k][j]);
        end
      end else begin
        for (int j = 1; j <= nk; j++) v[j] = ideal_digit(xs[k], m, j);
      end
      res[k] = mdac_residue(xs[k], m, dl, v, fb, gerr[k]);
    end
  end

endmodule
