// tb_flash_model: checks the last quantizer: code = number of thresholds
// -1 + j/4 below vin (clamped to 0..7), updated only on sampling edges.
module tb_flash_model;
  logic clk = 1'b0, samp_en;
  real vin;
  logic [2:0] code;
  always #5 clk = !clk;

  flash_model #(.BITS(3)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expc, prev;
    samp_en = 1'b0; vin = 0.0;
    @(negedge clk);
    prev = int'(code);
    for (int i = 0; i < 400; i++) begin
      vin = (real'($urandom_range(2400, 0)) - 1200.0) / 1000.0 + 0.0001;
      samp_en = (i % 4 != 3);
      @(negedge clk);
      expc = int'($floor((vin + 1.0) * 4.0));
      if (expc < 0) expc = 0;
      if (expc > 7) expc = 7;
      if (!samp_en) expc = prev;
      checks++;
      if (int'(code) != expc) begin
        failures++;
        $display("FAIL: vin %f code %0d exp %0d", vin, code, expc);
      end
      prev = int'(code);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
