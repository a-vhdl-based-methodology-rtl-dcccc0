// tb_pipeline_adc: end-to-end test of the converter at its default
// parameters (analog model with its default, non-ideal errors).
//
// Phases: (1) 13-bit conversion without calibration: a ramp across the full
// scale, each output compared with the ideal code floor((vin+1)*2^12); the
// worst error is recorded. (2) latency: a step in vin must reach code exactly
// 4 conversion periods (8 CkM cycles) after the S/H edge that sampled it.
// (3) over- and under-range inputs must clamp and raise ovr/udr.
// (4) a calibration run of STG_1 and STG_2 (cal_busy, calibrated), then the
// same ramp in MODE_CAL: the worst error must be at most 3 LSB and less than
// half the uncalibrated one. (5) MODE_TEST on STG_1: the code read at each
// subcode step must be near the centre of that subcode's interval.
// (6) resolution switch to 2-bit stages: 8-bit codes, left-justified.
// Every mechanism is counted and must have occurred.
module tb_pipeline_adc;
  import adc_pkg::*;

  logic clk = 1'b0;
  always #25 clk = !clk;   // 20 MHz CkM -> 10 MS/s

  logic                    rst_n;
  real                     vin;
  mode_e                   mode;
  logic                    cal_req;
  logic [$clog2(NCAL):0]   cal_depth;
  logic [$clog2(NSTG)-1:0] test_stage;
  logic [NSTG-1:0]         res3;
  code_t                   code;
  logic                    code_vld, ovr, udr, cal_busy, calibrated, test_step;
  subcode_t                sub_al [NSTG];

  pipeline_adc dut (.*);

  int checks = 0, failures = 0;
  int n_ovr = 0, n_udr = 0, n_cal = 0, n_calmode = 0, n_test = 0, n_res = 0, n_lat = 0;

  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Wait for the S/H edge: the posedge that ends a phi1 cycle.
  task automatic sh_edge();
    do @(posedge clk); while (!dut.phi1);
    // at this edge phi1 was 1 before it toggled; loop exits after it
  endtask

  // Apply vin just after an S/H edge, return the code produced for it.
  task automatic convert(input real v, output int c);
    @(negedge clk);
    while (!dut.phi1) @(negedge clk);
    vin = v;
    @(posedge clk);                  // S/H samples v here (edge t0)
    repeat (8) @(posedge clk);       // code registered at t0+8
    @(negedge clk);
    c = int'(code);
  endtask

  function automatic int ideal13(input real v);
    int k;
    k = int'($floor((v + 1.0) * 4096.0));
    if (k < 0) k = 0;
    if (k > 8191) k = 8191;
    return k;
  endfunction

  // Ramp of n points over [-0.995, 0.995]; returns worst |error| in LSB.
  task automatic ramp(input int n, output int worst);
    int c, e;
    real v;
    worst = 0;
    for (int i = 0; i < n; i++) begin
      v = -0.995 + 1.99 * real'(i) / real'(n - 1);
      convert(v, c);
      e = c - ideal13(v);
      if (e < 0) e = -e;
      if (e > worst) worst = e;
    end
  endtask

  int worst_nocal, worst_cal, c, c_prev, t_edge, t_out;

  initial begin
    rst_n = 1'b0; vin = 0.0; mode = MODE_NOCAL; cal_req = 1'b0;
    cal_depth = 2; test_stage = 0; res3 = '1;
    repeat (6) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);

    // (1) uncalibrated ramp
    ramp(400, worst_nocal);
    $display("worst error without calibration: %0d LSB", worst_nocal);
    check(worst_nocal < 64, "uncalibrated error within redundancy limits");

    // (2) latency: step from -0.5 to +0.5 and count CkM cycles
    vin = -0.5;
    repeat (20) @(posedge clk);
    @(negedge clk); while (!dut.phi1) @(negedge clk);
    vin = 0.5;
    @(posedge clk); t_edge = 0;
    forever begin
      @(posedge clk); t_edge++;
      @(negedge clk);
      if (code > code_t'(6000) || t_edge > 20) break;
    end
    check(t_edge == 8, $sformatf("latency %0d CkM cycles, expected 8", t_edge));
    if (t_edge == 8) n_lat++;

    // (3) over/under range
    convert(1.3, c);
    check(c == 8191 && ovr, "over-range clamps to full scale");
    if (ovr) n_ovr++;
    convert(-1.3, c);
    check(c == 0 && udr, "under-range clamps to zero");
    if (udr) n_udr++;

    // (4) calibration of STG_2 then STG_1
    vin = 0.0;
    @(negedge clk); cal_req = 1'b1; @(negedge clk); cal_req = 1'b0;
    @(negedge clk);
    check(cal_busy, "calibration run started");
    t_out = 0;
    while (cal_busy && t_out < 20000) begin @(posedge clk); t_out++; end
    // 2 stages * 7 subcodes * (6 wait + 16 averaged) samples, 2 cycles each
    $display("calibration took %0d CkM cycles", t_out);
    check(calibrated, "calibration completed");
    check(t_out >= 2 * 7 * 22 * 2 && t_out <= 2 * 7 * 22 * 2 + 10, "calibration duration");
    if (calibrated) n_cal++;
    mode = MODE_CAL;
    n_calmode++;
    ramp(400, worst_cal);
    $display("worst error with calibration: %0d LSB", worst_cal);
    check(worst_cal <= 3, "calibrated error at most 3 LSB");
    check(worst_cal * 2 < worst_nocal, "calibration reduces the worst error");

    // (5) test mode: sweep STG_1's subcodes
    mode = MODE_TEST; test_stage = 0;
    c_prev = -1;
    for (int k = 0; k <= 6; k++) begin
      int centre, e;
      @(posedge clk iff test_step);
      @(negedge clk);
      centre = ideal13(real'(k - 3) / 4.0);
      e = int'(code) - centre;
      check(e > -48 && e < 48, $sformatf("test mode code %0d near centre %0d for bx=%0d", code, centre, k));
      check(int'(code) > c_prev, "test mode codes increase with bx");
      c_prev = int'(code);
      n_test++;
    end
    mode = MODE_NOCAL;
    repeat (40) @(posedge clk);

    // (6) all stages at 2 bits: 8-bit code, left-justified
    res3 = '0;
    n_res++;
    repeat (20) @(posedge clk);
    for (int i = 0; i < 50; i++) begin
      real v;
      int  e;
      v = -0.99 + 1.98 * real'(i) / 49.0;
      convert(v, c);
      check(c[4:0] == 0, "8-bit code left-justified");
      e = (c >> 5) - int'($floor((v + 1.0) * 128.0));
      check(e >= -1 && e <= 1, $sformatf("8-bit code %0d for vin %f", c >> 5, v));
    end

    check(n_ovr > 0 && n_udr > 0, "over/under range happened");
    check(n_cal > 0 && n_calmode > 0, "calibration happened");
    check(n_test > 0, "test mode happened");
    check(n_res > 0 && n_lat > 0, "resolution switch and latency happened");
    $display("mechanisms: ovr=%0d udr=%0d cal=%0d calmode=%0d test=%0d res=%0d",
             n_ovr, n_udr, n_cal, n_calmode, n_test, n_res);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
