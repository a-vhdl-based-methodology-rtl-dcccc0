// tb_enob: dynamic performance of the converter, as effective number of
// bits (ENOB) from a coherently sampled full-scale sine.
//
// Four converters run side by side on the same input and controls:
//   fs10, fs20, fs40  with input S/H, settling time per phase for 10, 20
//                     and 40 MS/s (T_HALF_NS = 50, 25, 12.5)
//   nosh              10 MS/s without the input S/H
// For each of three calibration cases (none; STG_1 calibrated; STG_1 and
// STG_2 calibrated) ENOB is measured at a low input frequency on all four,
// and at two higher input frequencies on fs10 and nosh.
// ENOB: fit a*sin + b*cos + c at the known frequency (exact for coherent
// sampling, N = 256 samples, an odd number of cycles), take the rms of the
// residual as noise+distortion, SINAD = 20*log10(rms signal / rms residual),
// ENOB = (SINAD - 1.76)/6.02.
// Checks: calibration raises ENOB; 10 MS/s with two calibrated stages gives
// at least 10 bits; shorter settling lowers ENOB; without S/H ENOB holds at
// low input frequency and falls at high input frequency, while the
// converter with S/H keeps it; the frequency where it falls doubles when
// STG_1 is programmed for 2 bits instead of 3.
module tb_enob;
  import adc_pkg::*;
  localparam int N = 256;
  localparam real AMP = 0.95;

  logic clk = 1'b0;
  always #25 clk = !clk;

  logic                    rst_n, cal_req;
  real                     vin;
  mode_e                   mode;
  logic [$clog2(NCAL):0]   cal_depth;
  logic [$clog2(NSTG)-1:0] test_stage;
  logic [NSTG-1:0]         res3;

  code_t    code [4];
  logic     vld [4], ovr [4], udr [4], busy [4], caldone [4], tstep [4];
  subcode_t sub [4][NSTG];

  pipeline_adc #(.T_HALF_NS(50.0)) fs10 (.clk, .rst_n, .vin, .mode, .cal_req, .cal_depth,
    .test_stage, .res3, .code(code[0]), .code_vld(vld[0]), .ovr(ovr[0]), .udr(udr[0]),
    .sub_al(sub[0]), .cal_busy(busy[0]), .calibrated(caldone[0]), .test_step(tstep[0]));
  pipeline_adc #(.T_HALF_NS(25.0)) fs20 (.clk, .rst_n, .vin, .mode, .cal_req, .cal_depth,
    .test_stage, .res3, .code(code[1]), .code_vld(vld[1]), .ovr(ovr[1]), .udr(udr[1]),
    .sub_al(sub[1]), .cal_busy(busy[1]), .calibrated(caldone[1]), .test_step(tstep[1]));
  pipeline_adc #(.T_HALF_NS(12.5)) fs40 (.clk, .rst_n, .vin, .mode, .cal_req, .cal_depth,
    .test_stage, .res3, .code(code[2]), .code_vld(vld[2]), .ovr(ovr[2]), .udr(udr[2]),
    .sub_al(sub[2]), .cal_busy(busy[2]), .calibrated(caldone[2]), .test_step(tstep[2]));
  pipeline_adc #(.T_HALF_NS(50.0), .USE_SH(1'b0)) nosh (.clk, .rst_n, .vin, .mode, .cal_req,
    .cal_depth, .test_stage, .res3, .code(code[3]), .code_vld(vld[3]), .ovr(ovr[3]),
    .udr(udr[3]), .sub_al(sub[3]), .cal_busy(busy[3]), .calibrated(caldone[3]),
    .test_step(tstep[3]));

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input: a sine evaluated at every clock edge (one edge per phase).
  // cyc_per_sample = M/N; the S/H samples at every second edge.
  int  m_cyc = 7;
  longint unsigned ph = 0;
  always @(negedge clk) begin
    ph  <= ph + 1;
    vin <= AMP * $sin(2.0 * 3.14159265358979 * real'(m_cyc) * real'(ph + 1) / real'(2 * N));
  end

  real samp [4][N];

  task automatic capture();
    // let the new input settle through the pipeline, then take N codes
    repeat (40) @(posedge clk);
    for (int k = 0; k < N; k++) begin
      @(posedge clk iff vld[0]);
      for (int u = 0; u < 4; u++) samp[u][k] = real'(code[u]) / 4096.0 - 1.0;
    end
  endtask

  function automatic real enob(input int u);
    real a, b, c, s, r, th, e2, sig;
    a = 0.0; b = 0.0; c = 0.0;
    for (int k = 0; k < N; k++) begin
      th = 2.0 * 3.14159265358979 * real'(m_cyc) * real'(k) / real'(N);
      a += samp[u][k] * $sin(th);
      b += samp[u][k] * $cos(th);
      c += samp[u][k];
    end
    a = 2.0 * a / real'(N); b = 2.0 * b / real'(N); c = c / real'(N);
    e2 = 0.0;
    for (int k = 0; k < N; k++) begin
      th = 2.0 * 3.14159265358979 * real'(m_cyc) * real'(k) / real'(N);
      r  = samp[u][k] - (a * $sin(th) + b * $cos(th) + c);
      e2 += r * r;
    end
    e2  = e2 / real'(N);
    sig = (a * a + b * b) / 2.0;
    s   = 10.0 * $log10(sig / e2);
    return (s - 1.76) / 6.02;
  endfunction

  task automatic calibrate(input int depth);
    cal_depth = depth[$clog2(NCAL):0];
    @(negedge clk); cal_req = 1'b1; @(negedge clk); cal_req = 1'b0;
    repeat (4) @(posedge clk);
    while (busy[0]) @(posedge clk);
    check(caldone[0] && caldone[3], "calibration run completed");
  endtask

  real e_lo [3][4];   // [case][converter] at low input frequency
  real e_hi [3][2][2];// [case][fin index][fs10, nosh]
  int  mhi [2] = '{41, 83};

  initial begin
    rst_n = 1'b0; cal_req = 1'b0; mode = MODE_NOCAL; cal_depth = 2; test_stage = 0;
    res3 = '1;
    repeat (6) @(posedge clk);
    rst_n = 1'b1;
    for (int cs = 0; cs < 3; cs++) begin
      if (cs == 0) mode = MODE_NOCAL;
      else begin
        mode = MODE_NOCAL;
        calibrate(cs);
        mode = MODE_CAL;
      end
      m_cyc = 7;
      capture();
      for (int u = 0; u < 4; u++) e_lo[cs][u] = enob(u);
      for (int f = 0; f < 2; f++) begin
        m_cyc = mhi[f];
        capture();
        e_hi[cs][f][0] = enob(0);
        e_hi[cs][f][1] = enob(3);
      end
      $display("case %0d (stages calibrated: %0d)", cs, cs);
      $display("  fin %0.2f MHz: ENOB fs=10MS/s %5.2f  20MS/s %5.2f  40MS/s %5.2f  10MS/s no S/H %5.2f",
               10.0 * 7.0 / real'(N), e_lo[cs][0], e_lo[cs][1], e_lo[cs][2], e_lo[cs][3]);
      for (int f = 0; f < 2; f++)
        $display("  fin %0.2f MHz: ENOB 10MS/s with S/H %5.2f  without S/H %5.2f",
                 10.0 * real'(mhi[f]) / real'(N), e_hi[cs][f][0], e_hi[cs][f][1]);
    end
    // onset of the S/H-less loss: 3-bit first stage fails by 0.51 MHz, a
    // 2-bit first stage (twice the redundancy margin) still holds there and
    // fails by 1.2 MHz
    mode = MODE_NOCAL;
    begin
      real e3_mid, e2_mid, e2_hi, ref2;
      m_cyc = 13; capture(); e3_mid = enob(3);
      res3 = 5'b11110;
      repeat (40) @(posedge clk);
      m_cyc = 7;  capture(); ref2 = enob(3);
      m_cyc = 13; capture(); e2_mid = enob(3);
      m_cyc = 31; capture(); e2_hi = enob(3);
      res3 = '1;
      $display("no S/H, no calibration: 3-bit STG_1 at 0.51 MHz %5.2f; 2-bit STG_1 at 0.27/0.51/1.21 MHz %5.2f %5.2f %5.2f",
               e3_mid, ref2, e2_mid, e2_hi);
      check(e3_mid < e_lo[0][3] - 1.0, "3-bit first stage without S/H fails at 0.51 MHz");
      check(e2_mid > ref2 - 0.3, "2-bit first stage without S/H holds at 0.51 MHz");
      check(e2_hi < ref2 - 1.0, "2-bit first stage without S/H fails at 1.2 MHz");
    end
    check(e_lo[2][0] >= 10.0, "10 MS/s, two stages calibrated: at least 10 bits");
    check(e_lo[1][0] > e_lo[0][0] + 0.3, "calibrating STG_1 raises ENOB");
    check(e_lo[2][0] >= e_lo[1][0] - 0.05, "calibrating STG_2 as well does not lower ENOB");
    for (int cs = 0; cs < 3; cs++) begin
      check(e_lo[cs][2] < e_lo[cs][0] - 0.5, "40 MS/s settling lowers ENOB");
      check(e_lo[cs][1] <= e_lo[cs][0] + 0.05, "20 MS/s no better than 10 MS/s");
      check(e_lo[cs][3] > e_lo[cs][0] - 0.3, "without S/H, low input frequency holds ENOB");
      check(e_hi[cs][1][1] < e_hi[cs][1][0] - 1.0, "without S/H, high input frequency loses ENOB");
      check(e_hi[cs][1][0] > e_lo[cs][0] - 0.3, "with S/H, high input frequency holds ENOB");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
