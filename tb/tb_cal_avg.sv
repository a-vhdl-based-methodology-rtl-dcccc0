// tb_cal_avg: feeds windows of 16 back-end codes with random deviations
// around the ideal mid code 2^w - 1/2 and checks the error written to the
// bench: the rounded mean deviation in quarter LSBs, at the right stage and
// subcode, one clock after the last sample; samples outside the window
// (acc_en low) must not count.
module tb_cal_avg;
  import adc_pkg::*;
  logic clk = 1'b0, rst_n, ckb, acc_en, acc_last;
  qsum_t qback;
  logic [4:0] w;
  logic [$clog2(NCAL)-1:0] stage;
  subcode_t code;
  err_wr_t wr;
  always #5 clk = !clk;

  cal_avg #(.AVG_LOG2(4)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; ckb = 1'b0; acc_en = 1'b0; acc_last = 1'b0;
    qback = '0; w = 5'd10; stage = '0; code = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int win = 0; win < 60; win++) begin
      int sum, expv, spread;
      w     = (win % 2) ? 5'd8 : 5'd10;
      stage = 1'(win % 2);
      code  = subcode_t'(win % 7);
      spread = (win < 30) ? 20 : 600;
      sum = 0;
      // a few ignored samples with garbage
      for (int k = 0; k < 3; k++) begin
        @(negedge clk); ckb = 1'b1; acc_en = 1'b0; qback = qsum_t'($urandom_range(9999, 0));
        @(negedge clk); ckb = 1'b0;
      end
      for (int k = 0; k < 16; k++) begin
        int dev;
        dev = $urandom_range(spread, 0) - spread / 2 + win;
        @(negedge clk);
        ckb = 1'b1; acc_en = 1'b1; acc_last = (k == 15);
        qback = qsum_t'(4 * (1 << int'(w)) - 2 + dev);
        sum += dev;
        @(negedge clk);
        ckb = 1'b0; acc_en = 1'b0; acc_last = 1'b0;
        checks++;
        if (wr.we != (k == 15)) begin failures++; $display("FAIL: write strobe at sample %0d", k); end
      end
      expv = $floor((real'(sum) + 8.0) / 16.0);
      if (expv > 511) expv = 511;
      if (expv < -512) expv = -512;
      checks++;
      if (int'(wr.data) != expv || wr.stage != stage || wr.code != code) begin
        failures++;
        $display("FAIL: window %0d got %0d/%0d/%0d exp %0d", win, wr.data, wr.stage, wr.code, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
