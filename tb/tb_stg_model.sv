// tb_stg_model: checks one pipeline stage in both resolutions: subcode =
// round-to-interval of vin (interval width VREF/G, G = 4 or 2), residue
// G*(1+g)*vin - ((d-c)*(1+de) + inl*(d-c)^2) + ofs with full settling, and,
// when forced, subcode bx with the calibration input (bx-c)/G. A second,
// ideal instance with EARLY_DECISION must choose its subcode from the input
// of the previous edge while its residue uses the current input.
module tb_stg_model;
  import adc_pkg::*;
  localparam real GE = 0.004, DE = -0.003, INL = 0.002, OF = 0.001;
  logic clk = 1'b0, samp_en, res3, cal_force;
  subcode_t bx, d;
  real vin, vout;
  always #5 clk = !clk;

  stg_model #(.GAIN_ERR(GE), .DAC_ERR(DE), .DAC_INL(INL), .OFFSET(OF),
              .TAU_NS(1.0), .T_HALF_NS(50.0)) dut (.*);

  // same stage with comparators deciding on the previous edge's input
  subcode_t d_e;
  real      vout_e;
  stg_model #(.TAU_NS(1.0), .T_HALF_NS(50.0), .EARLY_DECISION(1'b1)) dut_e (
    .clk, .samp_en, .res3, .cal_force, .bx, .vin, .vout(vout_e), .d(d_e));

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    samp_en = 1'b1; vin = 0.0; res3 = 1'b1; cal_force = 1'b0; bx = '0;
    @(negedge clk);
    for (int i = 0; i < 600; i++) begin
      int g, c, k;
      real x, r, dk, vin_q;
      res3      = (i % 2 == 0);
      cal_force = (i % 5 == 4);
      g = res3 ? 4 : 2;
      c = g - 1;
      bx = subcode_t'($urandom_range(2 * g - 2, 0));
      vin_q = vin;   // input at the previous sampling edge
      vin = (real'($urandom_range(1980, 0)) - 990.0) / 1000.0 + 0.00013;
      @(negedge clk);
      if (cal_force) begin
        k = int'(bx);
        x = real'(k - c) / real'(g);
      end else begin
        x = vin;
        k = int'($floor(vin * real'(g) + real'(g) - 0.5));
        if (k < 0) k = 0;
        if (k > 2 * g - 2) k = 2 * g - 2;
      end
      if (!cal_force) begin
        int ke;
        real re;
        ke = int'($floor(vin_q * real'(g) + real'(g) - 0.5));
        if (ke < 0) ke = 0;
        if (ke > 2 * g - 2) ke = 2 * g - 2;
        re = real'(g) * vin - real'(ke - c);
        if (re > 2.0) re = 2.0;      // amplifier output limit
        if (re < -2.0) re = -2.0;
        checks++;
        if (int'(d_e) != ke || vout_e - re > 1e-6 || re - vout_e > 1e-6) begin
          failures++;
          $display("FAIL: early decision d=%0d exp %0d vout=%f exp %f", d_e, ke, vout_e, re);
        end
      end
      dk = real'(k - c);
      r = real'(g) * (1.0 + GE) * x - (dk * (1.0 + DE) + INL * dk * dk) + OF;
      checks++;
      if (int'(d) != k || vout - r > 1e-6 || r - vout > 1e-6) begin
        failures++;
        $display("FAIL: res3=%b force=%b vin=%f d=%0d exp %0d vout=%f exp %f",
                 res3, cal_force, vin, d, k, vout, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
