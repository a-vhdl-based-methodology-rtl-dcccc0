// tb_shr_array: drives the subcode inputs with the timing of the analog
// part (stage i updates its subcode i phases after the S/H edge of its
// sample, holding it for two phases) and checks that at every Ckb edge, 8
// phases after the S/H edge of sample n, the aligned outputs hold sample
// n's subcodes for all stages. Subcode values are a tag of (sample, stage).
module tb_shr_array;
  import adc_pkg::*;
  logic clk = 1'b0, rst_n, phi1;
  subcode_t d [NSTG], d_al [NSTG];
  flcode_t  dl, dl_al;
  always #5 clk = !clk;

  shr_array dut (.*);

  function automatic logic [2:0] tag(input int n, input int i);
    return 3'((n * 5 + i * 3 + n / 3) % 8);
  endfunction

  int checks = 0, failures = 0, cyc = 0;
  assign phi1 = (cyc % 2 == 0);

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    for (int i = 0; i < NSTG; i++) d[i] = '0;
    dl = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
  end

  // cycle cyc ends at a phi1 edge when cyc is even; sample n: S/H edge ends cycle 2n
  always @(posedge clk) begin
    if (rst_n) begin
      // check first (outputs still hold the values from before this edge)
      if (cyc % 2 == 0 && cyc >= 2 * 4 + 8) begin
        int n;
        n = (cyc - 8) / 2;
        for (int i = 1; i <= NSTG; i++) begin
          checks++;
          if (d_al[i-1] != tag(n, i)) begin
            failures++;
            $display("FAIL: sample %0d stage %0d got %0d exp %0d", n, i, d_al[i-1], tag(n, i));
          end
        end
        checks++;
        if (dl_al != tag(n, NSTG + 1)) begin
          failures++;
          $display("FAIL: sample %0d last got %0d", n, dl_al);
        end
      end
      for (int i = 1; i <= NSTG + 1; i++)
        if (cyc >= i && (cyc - i) % 2 == 0) begin
          if (i <= NSTG) d[i-1] <= tag((cyc - i) / 2, i);
          else           dl     <= tag((cyc - i) / 2, i);
        end
    end
    cyc <= cyc + 1;
    if (cyc > 400) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
