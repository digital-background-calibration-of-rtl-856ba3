// Full-size testbench for adc_cal_top: every parameter at its default,
// including the 2^-22 update step, driven by the analog pipeline model.
//   1. After reset, with ideal capacitors, every 13-bit code must equal the
//      rounded input of 12 clocks earlier.
//   2. With mismatched capacitors and swapping plus calibration on, a
//      full-scale sine is converted for SAMPLES samples.  At this step size
//      the estimates need tens of millions of samples to settle, so the test
//      checks that each estimate has moved from zero towards its
//      capacitor's mismatch without overshooting it, and that the output
//      error has dropped below the uncalibrated error.
module tb_adc_cal_top_full;
  import adc_cal_pkg::*;
  localparam int NS = 12, NC = 3, KMAX = 3, DW = 19;
  localparam int SAMPLES = 40000000;
  logic clk = 0, rst_n = 0, swap_en = 0, cal_en = 0;
  logic [2*KMAX-1:0] comp [NS];
  conn_t sw_conn [NC][KMAX+1];
  logic signed [19:0] dout;
  logic [12:0] code;
  logic out_valid;
  logic signed [DW-1:0] dc_est [NC][KMAX];
  real vin = 0.0;
  real hist [$];
  int checks = 0, failures = 0;

  adc_cal_top dut (.clk, .rst_n, .swap_en, .cal_en, .comp, .sw_conn, .dout, .code, .out_valid, .dc_est);
  analog_pipeline_model model (.clk, .vin, .sw_conn, .comp);

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
    repeat (SAMPLES + 400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

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
    end
  endtask

  task automatic measure(int n, output real rms);
    real e, s2;
    int ce, cnt;
    logic h;
    s2 = 0.0; cnt = 0;
    for (int i = 0; i < n; i++) begin
      step_sample(0.98 * $sin(2.0 * 3.14159265358979 * 0.0123456789 * i), e, ce, h);
      if (h) begin s2 += e * e; cnt++; end
    end
    rms = $sqrt(s2 / cnt);
  endtask

  initial begin
    real e, rms_raw, rms_cal, est;
    int ce;
    logic h;
    for (int k = 0; k < NS; k++) comp[k] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    // 1. ideal conversion
    for (int i = 0; i < 5000; i++) begin
      step_sample(-1.0 + 2.0 * real'($urandom) / 4294967295.0, e, ce, h);
      if (h) begin
        checks++;
        if (ce > 1 || ce < -1) begin failures++; if (failures < 10) $display("ideal: code error %0d", ce); end
      end
    end
    // 2. mismatched capacitors, background calibration
    for (int c = 0; c < NC; c++) for (int j = 0; j < KMAX; j++) model.delta[c][j+1] = true_dc[c][j];
    measure(100000, rms_raw);
    swap_en = 1;
    cal_en = 1;
    measure(SAMPLES - 100000, rms_cal);
    measure(100000, rms_cal);
    $display("rms error in 13-bit LSB: uncalibrated %0.2f, after %0d calibration samples %0.2f",
             rms_raw * 4096.0, SAMPLES, rms_cal * 4096.0);
    for (int c = 0; c < NC; c++)
      for (int j = 0; j < ((c == 0) ? 3 : 1); j++) begin
        est = real'(dc_est[c][j]) / 1048576.0;
        $display("stage %0d capacitor %0d: estimate %f, mismatch %f", c + 1, j + 1, est, true_dc[c][j]);
        checks++;
        if (est * true_dc[c][j] <= 0.0 || fabs(est) > 1.3 * fabs(true_dc[c][j])) begin
          failures++; $display("  estimate did not move towards the mismatch");
        end
      end
    checks++;
    if (rms_cal >= rms_raw) begin failures++; $display("error not reduced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
