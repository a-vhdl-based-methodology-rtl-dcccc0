// tb_bx_gen: a calibration run of depth 2 with all stages at 3 bits must
// force STG_2 then STG_1 (one-hot), step bx through 0..6 for each, mark
// exactly 2^AVG_LOG2 accumulated samples per subcode after WAIT samples,
// and pulse done once after 2*7*(WAIT+2^AVG_LOG2) samples. A test-mode sweep
// of a 2-bit stage must cycle bx through 0,1,2 and repeat, with acc_en low.
module tb_bx_gen;
  import adc_pkg::*;
  localparam int A = 2, WT = 3;
  logic clk = 1'b0, rst_n, ckb, start, test_en;
  logic [$clog2(NCAL):0] depth;
  logic [$clog2(NSTG)-1:0] test_stage, stage;
  logic [NSTG-1:0] res3, cal_force;
  subcode_t bx;
  logic acc_en, acc_last, step, busy, done;
  always #5 clk = !clk;

  bx_gen #(.AVG_LOG2(A), .WAIT(WT)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ckb every other cycle
  always_ff @(posedge clk) ckb <= rst_n ? !ckb : 1'b0;

  initial begin
    int samples, nacc, ndone, exp_stage, exp_code, nwin;
    rst_n = 1'b0; start = 1'b0; test_en = 1'b0; depth = 2; test_stage = 3; res3 = '1;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk); start = 1'b1; @(negedge clk); start = 1'b0;
    samples = 0; nacc = 0; ndone = 0; exp_stage = 1; exp_code = 0; nwin = 0;
    while (ndone == 0 && samples < 1000) begin
      @(posedge clk);
      if (done) ndone++;
      if (ckb && busy) begin
        samples++;
        check(cal_force == (NSTG'(1) << exp_stage) && stage == exp_stage, "forced stage");
        check(bx == subcode_t'(exp_code), $sformatf("bx %0d exp %0d", bx, exp_code));
        if (acc_en) begin
          nacc++;
          if (acc_last) begin
            check(nacc == (1 << A), "samples per window");
            nacc = 0;
            nwin++;
            if (exp_code == 6) begin exp_code = 0; exp_stage--; end
            else exp_code++;
          end
        end
      end
    end
    @(posedge clk); if (done) ndone++;
    check(nwin == 14, $sformatf("windows %0d", nwin));
    check(samples == 14 * (WT + (1 << A)), $sformatf("run length %0d samples", samples));
    check(ndone == 1 && !busy && cal_force == '0, "done once, idle");

    // test mode on STG_4 programmed for 2 bits
    res3[3] = 1'b0;
    test_en = 1'b1;
    exp_code = 0; nwin = 0;
    while (nwin < 8) begin
      @(posedge clk);
      if (ckb && cal_force != '0) begin
        check(cal_force == 5'b01000 && !acc_en && !busy, "test force");
        check(bx == subcode_t'(exp_code), "test bx");
        if (step) begin nwin++; exp_code = (exp_code + 1) % 3; end
      end
    end
    test_en = 1'b0;
    repeat (4) @(posedge clk);
    check(cal_force == '0, "test mode released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
