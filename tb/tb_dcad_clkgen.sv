// tb_dcad_clkgen: checks the phase generator: phi1 held during reset, phi1
// and phi2 alternate every CkM cycle and never overlap, ckb marks phi1.
module tb_dcad_clkgen;
  logic clk = 1'b0, rst_n;
  logic phi1, phi2, ckb;
  always #5 clk = !clk;

  dcad_clkgen dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    checks++; if (phi1 !== 1'b1) begin failures++; $display("FAIL: phi1 not held in reset"); end
    rst_n = 1'b1;
    @(negedge clk);
    for (int i = 0; i < 40; i++) begin
      logic exp1;
      exp1 = (i % 2 == 1);  // first cycle after reset is phi2
      checks++;
      if (phi1 !== exp1 || phi2 !== !exp1 || ckb !== exp1) begin
        failures++;
        $display("FAIL: cycle %0d phi1=%b phi2=%b ckb=%b", i, phi1, phi2, ckb);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
