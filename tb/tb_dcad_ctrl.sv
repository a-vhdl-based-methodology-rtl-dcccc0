// tb_dcad_ctrl: checks the glue logic's control sequence: a calibration
// request clears the bench for one cycle, then starts the generator, stays
// busy until its done and sets calibrated; requests in MODE_TEST are
// ignored; apply and test_en follow the mode and the run state.
module tb_dcad_ctrl;
  import adc_pkg::*;
  logic clk = 1'b0, rst_n, cal_req, gen_done;
  mode_e mode;
  logic bank_clr, gen_start, apply, test_en, cal_busy, calibrated;
  always #5 clk = !clk;

  dcad_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nclr, nstart;
    rst_n = 1'b0; cal_req = 1'b0; gen_done = 1'b0; mode = MODE_NOCAL;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!cal_busy && !apply && !test_en && !calibrated, "idle after reset");
    mode = MODE_CAL; #1;
    check(apply && !test_en, "MODE_CAL applies errors");
    mode = MODE_TEST; #1;
    check(!apply && test_en, "MODE_TEST enables test");
    cal_req = 1'b1; @(negedge clk); cal_req = 1'b0;
    repeat (3) @(negedge clk);
    check(!cal_busy, "request ignored in MODE_TEST");
    mode = MODE_NOCAL;
    cal_req = 1'b1; @(negedge clk); cal_req = 1'b0;
    nclr = 0; nstart = 0;
    for (int i = 0; i < 20; i++) begin
      if (bank_clr) nclr++;
      if (gen_start) begin
        nstart++;
        check(nclr == 1, "clear before start");
      end
      check(cal_busy && apply && !test_en, "busy during run");
      @(negedge clk);
    end
    check(nclr == 1 && nstart == 1, "one clear, one start");
    check(!calibrated, "not calibrated before done");
    gen_done = 1'b1; @(negedge clk); gen_done = 1'b0;
    @(negedge clk);
    check(!cal_busy && calibrated && !apply, "calibrated after done");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
