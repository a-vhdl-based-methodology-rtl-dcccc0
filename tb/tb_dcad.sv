// tb_dcad: the digital part driven by a simple pipeline model written here
// (ideal sub-ADCs, stage 1 with a constant residue offset OFS1 that acts
// like a DAC error, all stages 3 bits). The model follows the analog timing:
// S/H at the end of phi1, stage i i phases later, last quantizer at phi1, and honours cal_force/bx.
// Checks: without calibration every code equals floor((vin+1)*2^12) plus
// the offset's effect OFS1*2^10 LSB (+-1); after a calibration run of depth
// 1, in MODE_CAL, every code is within 1 LSB of the ideal code; the error
// bench holds about +OFS1*2^12 quarter-LSB for each subcode of STG_1.
module tb_dcad;
  import adc_pkg::*;
  localparam real OFS1 = 0.01;   // stage-1 residue offset, volts (~10 LSB)

  logic clk = 1'b0;
  always #25 clk = !clk;

  logic rst_n, cal_req, phi1, phi2, code_vld, ovr, udr, cal_busy, calibrated, test_step;
  mode_e mode;
  logic [$clog2(NCAL):0] cal_depth;
  logic [$clog2(NSTG)-1:0] test_stage;
  logic [NSTG-1:0] res3, cal_force;
  subcode_t bx, d [NSTG], sub_al [NSTG];
  flcode_t dl;
  code_t code;

  dcad dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- pipeline model ----
  real vin;
  real v [NSTG+1];
  always @(posedge clk) begin
    if (phi1) v[0] <= vin;
    for (int i = 1; i <= NSTG; i++) begin
      if ((i % 2 == 1) ? phi2 : phi1) begin
        real x;
        int  k;
        if (cal_force[i-1]) begin
          k = int'(bx);
          x = real'(k - 3) / 4.0;
        end else begin
          x = v[i-1];
          k = 0;
          for (int j = 1; j <= 6; j++) if (x > real'(2 * j - 7) / 8.0) k = j;
        end
        v[i] <= 4.0 * x - real'(k - 3) + ((i == 1) ? OFS1 : 0.0);
        d[i-1] <= subcode_t'(k);
      end
    end
    if (phi1) begin
      int k;
      k = 0;
      for (int j = 1; j < 8; j++) if (v[NSTG] > -1.0 + real'(j) / 4.0) k = j;
      dl <= flcode_t'(k);
    end
  end

  task automatic convert(input real x, output int c);
    @(negedge clk);
    while (!phi1) @(negedge clk);
    vin = x;
    @(posedge clk);
    repeat (8) @(posedge clk);
    @(negedge clk);
    c = int'(code);
  endtask

  initial begin
    int c, id;
    rst_n = 1'b0; cal_req = 1'b0; mode = MODE_NOCAL; cal_depth = 1; test_stage = 0;
    res3 = '1; vin = 0.0;
    for (int i = 0; i <= NSTG; i++) v[i] = 0.0;
    for (int i = 0; i < NSTG; i++) d[i] = '0;
    dl = '0;
    repeat (4) @(negedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);

    for (int i = 0; i < 200; i++) begin
      real x, y;
      x = -0.97 + 1.94 * real'(i) / 199.0;
      convert(x, c);
      y = x + OFS1 / 4.0;   // stage-1 offset referred to the input
      id = int'($floor((y + 1.0) * 4096.0));
      check(c >= id - 1 && c <= id + 1, $sformatf("uncalibrated code %0d exp %0d", c, id));
    end

    @(negedge clk); cal_req = 1'b1; @(negedge clk); cal_req = 1'b0;
    @(negedge clk);
    check(cal_busy, "calibration started");
    while (cal_busy) @(posedge clk);
    check(calibrated, "calibrated");
    for (int k = 0; k < 7; k++) begin
      int e;
      e = int'(dut.u_bank.mem[0][k]);
      check(e > int'(OFS1 * 4096.0) - 3 && e < int'(OFS1 * 4096.0) + 3,
            $sformatf("STG_1 code %0d error %0d", k, e));
    end
    mode = MODE_CAL;
    for (int i = 0; i < 200; i++) begin
      real x;
      x = -0.97 + 1.94 * real'(i) / 199.0;
      convert(x, c);
      id = int'($floor((x + 1.0) * 4096.0));
      check(c >= id - 1 && c <= id + 1, $sformatf("calibrated code %0d exp %0d", c, id));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
