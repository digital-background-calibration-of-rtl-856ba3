// End-to-end testbench for adc_cal_top with the analog pipeline model.
// The step size is raised to 2^-STEP so that the estimates settle within the
// run; all other parameters are the defaults (12 stages, 2.5-bit first
// stage, 3 calibrated stages, 13-bit output).
//   1. Reset: out_valid must rise exactly NUM_STAGES clocks after reset.
//   2. Ideal capacitors, swapping and calibration off: every code must be the
//      rounded input of NUM_STAGES clocks earlier (checks decoding, alignment,
//      reconstruction, latency and output saturation).
//   3. Mismatched capacitors, swapping off, calibration off: error measured.
//   4. Swapping on, calibration off: error measured; swaps, every capacitor
//      index and zero MSB digits are counted on the switch outputs.
//   5. Swapping and calibration on with a full-scale sine: the estimates must
//      converge to the model's mismatches and the output error must drop
//      well below that of step 3.
// Every mechanism (swap, each capacitor selection, D_1 = 0, saturation,
// calibration off, swapping off, estimate updates) must occur at least once.
module tb_adc_cal_top;
  import adc_cal_pkg::*;
  localparam int NS = 12, M1 = 2, NC = 3, KMAX = 3, FRAC = 16, DW = FRAC + 4 - 1;
  localparam int STEP = 19;
  localparam int SETTLE = 18000000;      // calibration samples before measuring
  localparam int MEAS = 200000;
  logic clk = 0, rst_n = 0, swap_en = 0, cal_en = 0;
  logic [2*KMAX-1:0] comp [NS];
  conn_t sw_conn [NC][KMAX+1];
  logic signed [FRAC+3:0] dout;
  logic [12:0] code;
  logic out_valid;
  logic signed [DW-1:0] dc_est [NC][KMAX];
  real vin = 0.0;
  real hist [$];
  int checks = 0, failures = 0;
  int cnt_swap = 0, cnt_sel [KMAX], cnt_d1zero = 0, cnt_sat = 0, cnt_cal_off = 0, cnt_swap_off = 0, cnt_upd = 0;

  adc_cal_top #(.EPS_SHIFT(STEP)) dut (
    .clk, .rst_n, .swap_en, .cal_en, .comp, .sw_conn, .dout, .code, .out_valid, .dc_est);

  analog_pipeline_model #(.NUM_STAGES(NS), .STAGE1_BITS(M1), .NUM_CAL(NC)) model (
    .clk, .vin, .sw_conn, .comp);

  always #5 clk = ~clk;

  real true_dc [NC][KMAX] = '{'{0.012, -0.008, 0.006}, '{-0.010, 0.0, 0.0}, '{0.008, 0.0, 0.0}};

  function automatic real fabs(real v);
    return (v < 0.0) ? -v : v;
  endfunction

  function automatic int ideal_code(real x);
    int c = $rtoi(x * 4096.0 + (x >= 0 ? 0.5 : -0.5));
    return (c > 4095) ? 4095 : (c < -4096) ? -4096 : c;
  endfunction

  initial begin : watchdog
    repeat (SETTLE + 4 * MEAS + 100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters on the switch outputs (sampled mid-cycle)
  always @(negedge clk) begin
    #2;
    if (rst_n) begin
      for (int c = 0; c < NC; c++) if (sw_conn[c][0] != CONN_RES) cnt_swap++;
      for (int j = 1; j <= KMAX; j++) if (sw_conn[0][j] == CONN_RES) cnt_sel[j-1]++;
      if (comp[0][3:2] == 2'b01) cnt_d1zero++;
      if (!swap_en) cnt_swap_off++;
      if (!cal_en) cnt_cal_off++;
      if (cal_en && out_valid) cnt_upd++;
    end
  end

  // one sample: apply x, and return the output error of the sample that
  // entered NS clocks ago (0 until the pipeline has filled)
  task automatic step_sample(real x, output real err, output int cerr, output logic have);
    @(negedge clk);
    vin = x;
    @(posedge clk);
    hist.push_back(x);
    #1;
    have = 0; err = 0.0; cerr = 0;
    if (hist.size() > NS) begin
      real xo = hist.pop_front();
      have = out_valid;
      err = real'(dout) / 65536.0 - xo;
      cerr = int'($signed(code)) - ideal_code(xo);
      if (ideal_code(xo) == 4095 || ideal_code(xo) == -4096) cnt_sat++;
    end
  endtask

  task automatic measure(int n, bit sine, output real rms, output real mx);
    real e, s2;
    int ce, cnt;
    logic h;
    s2 = 0.0; mx = 0.0; cnt = 0;
    for (int i = 0; i < n; i++) begin
      step_sample(sine ? 0.98 * $sin(2.0 * 3.14159265358979 * 0.0123456789 * i)
                       : -0.99 + 1.98 * real'($urandom) / 4294967295.0, e, ce, h);
      if (h) begin s2 += e * e; cnt++; if (fabs(e) > mx) mx = fabs(e); end
    end
    rms = $sqrt(s2 / cnt);
  endtask

  initial begin
    real x, e, rms_raw, mx_raw, rms_swap, mx_swap, rms_cal, mx_cal, est;
    int ce, cyc;
    logic h;
    for (int j = 0; j < KMAX; j++) cnt_sel[j] = 0;
    for (int k = 0; k < NS; k++) comp[k] = '0;
    repeat (3) @(posedge clk);
    // 1. latency of out_valid
    @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (!out_valid && cyc < 100) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != NS) begin failures++; $display("out_valid after %0d clocks, expected %0d", cyc, NS); end
    // 2. ideal capacitors: exact codes
    for (int i = 0; i < 20000; i++) begin
      x = (i % 1000 == 0) ? 0.99995 : (i % 1000 == 500) ? -0.99995
             : -1.0 + 2.0 * real'($urandom) / 4294967295.0;
      step_sample(x, e, ce, h);
      if (h) begin
        checks++;
        if (ce > 1 || ce < -1) begin
          failures++;
          if (failures < 10) $display("ideal: code error %0d, input error %f", ce, e);
        end
      end
    end
    // 3. mismatched capacitors
    for (int c = 0; c < NC; c++) for (int j = 0; j < KMAX; j++) model.delta[c][j+1] = true_dc[c][j];
    for (int k = NC; k < NS; k++) model.delta[k][1] = ((k % 2 == 1) ? 0.0005 : -0.0005);
    measure(MEAS, 1, rms_raw, mx_raw);
    // 4. swapping on
    swap_en = 1;
    measure(MEAS, 1, rms_swap, mx_swap);
    // 5. swapping and calibration on
    cal_en = 1;
    for (int blk = 0; blk < SETTLE / 3000000; blk++) begin
      measure(3000000, 1, rms_cal, mx_cal);
      $display("after %0d x 3M samples: rms error %0.2f LSB, estimates %f %f %f | %f | %f", blk + 1,
               rms_cal * 4096.0, real'(dc_est[0][0]) / 1048576.0, real'(dc_est[0][1]) / 1048576.0,
               real'(dc_est[0][2]) / 1048576.0, real'(dc_est[1][0]) / 1048576.0, real'(dc_est[2][0]) / 1048576.0);
    end
    measure(MEAS, 1, rms_cal, mx_cal);
    $display("rms / max error in 13-bit LSB: off/off %0.2f / %0.2f, swap only %0.2f / %0.2f, swap+cal %0.2f / %0.2f",
             rms_raw * 4096.0, mx_raw * 4096.0, rms_swap * 4096.0, mx_swap * 4096.0, rms_cal * 4096.0, mx_cal * 4096.0);
    for (int c = 0; c < NC; c++)
      for (int j = 0; j < ((c == 0) ? 3 : 1); j++) begin
        est = real'(dc_est[c][j]) / 1048576.0;
        checks++;
        if (fabs(est - true_dc[c][j]) > 0.003) begin
          failures++; $display("stage %0d capacitor %0d: estimate %f, mismatch %f", c + 1, j + 1, est, true_dc[c][j]);
        end
      end
    checks += 2;
    if (rms_cal > 0.3 * rms_raw) begin failures++; $display("rms error not reduced"); end
    if (mx_cal > 0.3 * mx_raw) begin failures++; $display("max error not reduced"); end
    // mechanisms
    $display("swaps %0d, selections %0d %0d %0d, D_1=0 %0d, saturations %0d, cal off %0d, swap off %0d, updates %0d",
             cnt_swap, cnt_sel[0], cnt_sel[1], cnt_sel[2], cnt_d1zero, cnt_sat, cnt_cal_off, cnt_swap_off, cnt_upd);
    checks += 9;
    if (cnt_swap == 0)     begin failures++; $display("no swap"); end
    for (int j = 0; j < KMAX; j++) if (cnt_sel[j] == 0) begin failures++; $display("capacitor %0d never calibrated", j + 1); end
    if (cnt_d1zero == 0)   begin failures++; $display("D_1 never zero"); end
    if (cnt_sat == 0)      begin failures++; $display("no saturation"); end
    if (cnt_cal_off == 0)  begin failures++; $display("calibration never off"); end
    if (cnt_swap_off == 0) begin failures++; $display("swapping never off"); end
    if (cnt_upd == 0)      begin failures++; $display("no updates"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
