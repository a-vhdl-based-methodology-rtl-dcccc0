// tb_sh_model: checks the sample-and-hold model: it holds between sampling
// edges, applies gain error and offset, and settles exponentially:
// after an edge vout = t + (vold - t)*exp(-T_HALF/TAU), t = vin*(1+g)+ofs.
module tb_sh_model;
  localparam real G = 0.01, OF = -0.003, TAU = 20.0, TH = 50.0;
  logic clk = 1'b0, samp_en;
  real vin, vout;
  always #5 clk = !clk;

  sh_model #(.GAIN_ERR(G), .OFFSET(OF), .TAU_NS(TAU), .T_HALF_NS(TH)) dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real vold, t, e;
    samp_en = 1'b0; vin = 0.0;
    @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      vold = vout;
      vin = (real'($urandom_range(2000, 0)) - 1000.0) / 1000.0;
      samp_en = (i % 3 != 2);
      @(negedge clk);
      t = vin * (1.0 + G) + OF;
      e = samp_en ? t + (vold - t) * $exp(-TH / TAU) : vold;
      checks++;
      if (vout - e > 1e-9 || e - vout > 1e-9) begin
        failures++;
        $display("FAIL: vout %f exp %f", vout, e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
