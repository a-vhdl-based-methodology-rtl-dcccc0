// tb_err_regbank: random writes into the error register bench, mirrored in
// a reference array here; every read port is checked for random subcode
// addresses, with apply low (all zero), for stages beyond NCAL (zero), and
// after a clear (zero).
module tb_err_regbank;
  import adc_pkg::*;
  logic     clk = 1'b0, rst_n, clr, apply;
  err_wr_t  wr;
  subcode_t d [NSTG];
  err_t     err [NSTG];
  always #5 clk = !clk;

  err_regbank dut (.*);

  int checks = 0, failures = 0;
  int ref_mem [NCAL][NCODES];

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_reads(input logic ap);
    for (int s = 0; s < NSTG; s++) d[s] = subcode_t'($urandom_range(NCODES - 1, 0));
    apply = ap;
    #1;
    for (int s = 0; s < NSTG; s++) begin
      int e;
      e = (ap && s < NCAL) ? ref_mem[s][d[s]] : 0;
      checks++;
      if (int'(err[s]) != e) begin
        failures++;
        $display("FAIL: stage %0d code %0d got %0d exp %0d", s, d[s], err[s], e);
      end
    end
  endtask

  initial begin
    rst_n = 1'b0; clr = 1'b0; wr = '0; apply = 1'b1;
    for (int s = 0; s < NSTG; s++) d[s] = '0;
    for (int s = 0; s < NCAL; s++) for (int c = 0; c < NCODES; c++) ref_mem[s][c] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    check_reads(1'b1);
    for (int t = 0; t < 300; t++) begin
      @(negedge clk);
      wr.we    = 1'b1;
      wr.stage = 1'($urandom_range(NCAL - 1, 0));
      wr.code  = subcode_t'($urandom_range(NCODES - 1, 0));
      wr.data  = err_t'($urandom_range(1023, 0) - 512);
      ref_mem[wr.stage][wr.code] = int'(wr.data);
      @(negedge clk);
      wr.we = 1'b0;
      check_reads(1'b1);
      if (t % 10 == 0) check_reads(1'b0);
    end
    @(negedge clk); clr = 1'b1; @(negedge clk); clr = 1'b0;
    for (int s = 0; s < NCAL; s++) for (int c = 0; c < NCODES; c++) ref_mem[s][c] = 0;
    for (int t = 0; t < 20; t++) check_reads(1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
