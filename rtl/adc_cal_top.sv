// Digital back end of a pipelined ADC with background calibration of
// capacitor mismatch.
//
// The analog pipeline has NUM_STAGES stages: the first resolves STAGE1_BITS
// effective bits (2.5-bit stage: six comparators, three sampling capacitors),
// the others one effective bit (1.5-bit stages).  The first NUM_CAL stages
// have the swap switches of the calibration scheme.  Every clock this block
//   1. decodes each stage's comparator outputs into ternary digits;
//   2. for each calibrated stage draws a random swap sign N and, for the
//      multibit stage, a random capacitor index M, and tells the stage's
//      switches (sw_conn) which capacitor to put in feedback and which
//      reference each other capacitor takes in the hold phase;
//   3. delays every stage's digits, N and M so that all data of one sample
//      meet (stage k is delayed NUM_STAGES-k clocks);
//   4. rebuilds the sample from the last stage forward: the residue seen by
//      stage k is the back end's value (D + R_hat)/2^m of stage k+1, the last
//      stage's residue counts as zero, and calibrated stages replace their
//      residue by the mismatch-corrected R_hat;
//   5. updates each calibrated stage's mismatch estimates with step 2^-EPS_SHIFT.
// Default sizes (13-bit ADC, 2.5-bit first stage and eleven 1.5-bit stages,
// three calibrated stages, step 2^-22) follow the calibration scheme's
// reference ADC; fixed-point formats, stage timing and alignment, the mode
// inputs and the output code format are this design's choices.
//
// Timing: comp is sampled combinationally for sw_conn (the comparators
// resolve, then the hold-phase switches close), N and M are registers that
// advance every clock.  A sample that enters stage 1 in clock t is output
// (dout, code) after the edge that ends clock t + NUM_STAGES - 1, and out_valid
// rises NUM_STAGES clocks after reset.
// swap_en = 0 forces N = +1 and M = 1 (conventional MDAC); cal_en = 0 applies
// no correction and freezes the estimates.
// sw_conn and dc_est have room for the largest stage; entries beyond the
// capacitors of a 1.5-bit stage are constant (CONN_ZERO and 0).
module adc_cal_top
  import adc_cal_pkg::*;
#(
  parameter int unsigned NUM_STAGES  = 12,
  parameter int unsigned STAGE1_BITS = 2,
  parameter int unsigned NUM_CAL     = 3,
  parameter int unsigned FRAC        = 16,
  parameter int unsigned DGUARD      = 4,
  parameter int unsigned EPS_SHIFT   = 22,
  parameter int unsigned ADC_BITS    = 13,
  localparam int unsigned KMAX  = (1 << STAGE1_BITS) - 1,
  localparam int unsigned TW    = 2 * KMAX,
  localparam int unsigned SWMAX = (KMAX > 1) ? $clog2(KMAX) : 1,
  localparam int unsigned W     = FRAC + 4,
  localparam int unsigned DW    = FRAC + DGUARD - 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   swap_en,
  input  logic                   cal_en,
  input  logic [TW-1:0]          comp    [NUM_STAGES],
  output conn_t                  sw_conn [NUM_CAL][KMAX+1],
  output logic signed [W-1:0]    dout,
  output logic [ADC_BITS-1:0]    code,
  output logic                   out_valid,
  output logic signed [DW-1:0]   dc_est  [NUM_CAL][KMAX]
);

  localparam int unsigned DLW = 2 * KMAX + 1 + SWMAX;   // digits, N, M
  localparam int unsigned CSH = FRAC + STAGE1_BITS - (ADC_BITS - 1);

  function automatic int unsigned stage_bits(int unsigned k);
    return (k == 0) ? STAGE1_BITS : 1;
  endfunction

  // Per-stage data of the sample currently in the stage, and aligned copies.
  logic [DLW-1:0]       now_word [NUM_STAGES];
  logic [DLW-1:0]       al_word  [NUM_STAGES];
  logic signed [W-1:0]  r_back   [NUM_STAGES];   // back-end residue seen by stage k
  logic signed [W-1:0]  y_stage  [NUM_STAGES];   // (D + R_hat) of stage k
  logic                 aligned_valid;

  for (genvar k = 0; k < NUM_STAGES; k++) begin : g_stage
    localparam int unsigned MK = stage_bits(k);
    localparam int unsigned KK = (1 << MK) - 1;
    localparam int unsigned SK = (KK > 1) ? $clog2(KK) : 1;

    digit_t          dig_now [KK];
    digit_t          dig_al  [KK];
    logic            n_now;
    logic [SK-1:0]   sel_now;
    logic            n_al;
    logic [SK-1:0]   sel_al;
    logic signed [W-1:0] dsum_fx;
    logic signed [W-1:0] r_hat;

    digit_encoder #(.M(MK)) u_enc (.therm(comp[k][2*KK-1:0]), .d(dig_now));

    if (k < NUM_CAL) begin : g_cal
      logic [31:0] lfsr_n;
      prbs_gen #(.WIDTH(32), .TAPS(32'h8020_0003), .SEED(32'h1357_9BDF + 32'(k) * 32'h0F0F_1234))
        u_prbs_n (.clk(clk), .rst_n(rst_n), .state(lfsr_n));
      assign n_now = swap_en ? lfsr_n[0] : 1'b1;

      if (KK > 1) begin : g_sel
        logic [15:0] lfsr_m;
        prbs_gen #(.WIDTH(16), .TAPS(16'hD008), .SEED(16'hACE1 + 16'(k)))
          u_prbs_m (.clk(clk), .rst_n(rst_n), .state(lfsr_m));
        assign sel_now = swap_en ? SK'(lfsr_m % 16'(KK)) : '0;
      end else begin : g_nosel
        assign sel_now = '0;
      end

      conn_t conn [KK+1];
      cap_shuffle #(.M(MK)) u_shuffle (.d(dig_now), .n_pos(n_now), .sel(sel_now), .conn(conn));
      always_comb
        for (int unsigned j = 0; j <= KMAX; j++) sw_conn[k][j] = (j <= KK) ? conn[j] : CONN_ZERO;
    end else begin : g_plain
      assign n_now   = 1'b1;
      assign sel_now = '0;
    end

    // pack, align, unpack
    always_comb begin
      now_word[k] = '0;
      for (int unsigned i = 0; i < KK; i++) now_word[k][2*i +: 2] = dig_now[i];
      now_word[k][2*KMAX] = n_now;
      now_word[k][2*KMAX+1 +: SK] = sel_now;
    end

    delay_line #(.WIDTH(DLW), .DEPTH(NUM_STAGES - 1 - k)) u_align (
      .clk(clk), .rst_n(rst_n), .d(now_word[k]), .q(al_word[k]));

    always_comb begin
      dsum_fx = '0;
      for (int unsigned i = 0; i < KK; i++) begin
        dig_al[i] = digit_t'(al_word[k][2*i +: 2]);
        dsum_fx   = dsum_fx + W'(dig_al[i]);
      end
      n_al   = al_word[k][2*KMAX];
      sel_al = al_word[k][2*KMAX+1 +: SK];
    end

    // residue of this stage as measured by the stages behind it
    if (k == NUM_STAGES - 1) begin : g_last
      assign r_back[k] = '0;
    end else begin : g_mid
      assign r_back[k] = y_stage[k+1] >>> stage_bits(k + 1);
    end

    if (k < NUM_CAL) begin : g_corr
      logic signed [DW-1:0] dc [KK];
      cal_stage #(.M(MK), .W(W), .FRAC(FRAC), .DGUARD(DGUARD), .EPS_SHIFT(EPS_SHIFT)) u_cal (
        .clk   (clk),
        .rst_n (rst_n),
        .cal_en(cal_en),
        .upd   (aligned_valid),
        .r_in  (r_back[k]),
        .d     (dig_al),
        .n_pos (n_al),
        .sel   (sel_al),
        .r_hat (r_hat),
        .dc    (dc)
      );
      always_comb
        for (int unsigned j = 0; j < KMAX; j++) dc_est[k][j] = (j < KK) ? dc[j] : '0;
    end else begin : g_nocorr
      assign r_hat = r_back[k];
    end

    assign y_stage[k] = r_hat + (dsum_fx <<< FRAC);
  end

  // Pipeline fill: the aligned data are complete NUM_STAGES-1 clocks after reset.
  logic [$clog2(NUM_STAGES+1)-1:0] fill;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  fill <= '0;
    else if (!aligned_valid)     fill <= fill + 1'b1;
  end
  assign aligned_valid = (fill == ($clog2(NUM_STAGES+1))'(NUM_STAGES - 1));

  // Output: x_hat = y_stage[0] / 2^STAGE1_BITS, and a rounded, saturated code.
  localparam logic signed [W-1:0] CODE_MAX = W'((1 << (ADC_BITS - 1)) - 1);
  localparam logic signed [W-1:0] CODE_MIN = -CODE_MAX - 1;
  logic signed [W-1:0] code_wide;
  always_comb code_wide = (y_stage[0] + W'(1 << (CSH - 1))) >>> CSH;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout      <= '0;
      code      <= '0;
      out_valid <= 1'b0;
    end else begin
      dout      <= y_stage[0] >>> STAGE1_BITS;
      out_valid <= aligned_valid;
      if (code_wide > CODE_MAX)      code <= ADC_BITS'(CODE_MAX);
      else if (code_wide < CODE_MIN) code <= ADC_BITS'(CODE_MIN);
      else                           code <= ADC_BITS'(code_wide);
    end
  end

  initial assert (NUM_CAL <= NUM_STAGES && CSH >= 1 && STAGE1_BITS >= 1)
    else $error("adc_cal_top: inconsistent parameters");

endmodule
