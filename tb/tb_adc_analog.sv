// tb_adc_analog: runs the analog model with ideal parameters, clocks phi1 /
// phi2 as the digital part does, holds each input until every stage holds
// its subcodes, and rebuilds the input as
//   sum d_i*2^w_i + dl   (w_i from the stage resolutions)
// which must equal floor((vin+1)*2^(B-1)) within one LSB, for 3-bit and
// 2-bit stage settings. Also checks the phase at which each stage takes a
// new sample, and that a forced STG_1 reports bx.
module tb_adc_analog;
  import adc_pkg::*;
  logic clk = 1'b0, phi1, phi2;
  logic [NSTG-1:0] res3, cal_force;
  subcode_t bx, d [NSTG];
  flcode_t dl;
  real vin;
  always #5 clk = !clk;

  adc_analog #(.STG1_GAIN_ERR(0.0), .STG1_DAC_ERR(0.0), .STG1_DAC_INL(0.0),
               .STG1_OFFSET(0.0), .COMP_OFS(0.0)) dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign phi1 = (cyc % 2 == 0);
  assign phi2 = !phi1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    res3 = '1; cal_force = '0; bx = '0; vin = 0.0;
    for (int pass = 0; pass < 2; pass++) begin
      res3 = (pass == 0) ? '1 : '0;
      for (int i = 0; i < 150; i++) begin
        real x;
        int  sum, w, nb, ideal;
        x = (real'($urandom_range(1960, 0)) - 980.0) / 1000.0 + 0.00007;
        vin = x;
        // hold vin until every stage and the last quantizer hold its sample
        repeat (2 * NSTG + 6) @(posedge clk);
        @(negedge clk);
        sum = int'(dl);
        w   = FLASH_BITS - 1;
        nb  = FLASH_BITS;
        for (int s = NSTG; s >= 1; s--) begin
          sum += int'(d[s-1]) << w;
          w   += res3[s-1] ? 2 : 1;
          nb  += res3[s-1] ? 2 : 1;
        end
        ideal = int'($floor((x + 1.0) * real'(1 << (nb - 1))));
        checks++;
        if (sum - ideal > 1 || ideal - sum > 1) begin
          failures++;
          $display("FAIL: vin %f code %0d exp %0d", x, sum, ideal);
        end
      end
    end
    // timing: after a step applied in a phi1 cycle, the S/H takes it at the
    // end of that cycle (edge 0) and STG_i's subcode changes at edge i, the
    // last quantizer's at edge NSTG+1
    begin
      real lo [3] = '{-0.5123, -0.2171, -0.77};
      real hi [3] = '{0.3311, 0.6093, 0.123};
      int  seen [NSTG+1];
      for (int s = 0; s <= NSTG; s++) seen[s] = 0;
      for (int st = 0; st < 3; st++) begin
        int first [NSTG+1];
        subcode_t dprev [NSTG];
        flcode_t  lprev;
        vin = lo[st];
        repeat (2 * NSTG + 6) @(posedge clk);
        @(negedge clk); while (!phi1) @(negedge clk);
        vin = hi[st];
        for (int s = 0; s <= NSTG; s++) first[s] = -1;
        for (int s = 0; s < NSTG; s++) dprev[s] = d[s];
        lprev = dl;
        for (int e = 0; e <= NSTG + 3; e++) begin
          @(posedge clk); #1;
          for (int s = 0; s < NSTG; s++)
            if (first[s] < 0 && d[s] != dprev[s]) first[s] = e;
          if (first[NSTG] < 0 && dl != lprev) first[NSTG] = e;
        end
        for (int s = 0; s <= NSTG; s++)
          if (first[s] >= 0) begin
            seen[s]++;
            checks++;
            if (first[s] != s + 1) begin
              failures++;
              $display("FAIL: stage %0d code changed at edge %0d, expected %0d", s + 1, first[s], s + 1);
            end
          end
      end
      for (int s = 0; s <= NSTG; s++) begin
        checks++;
        if (seen[s] == 0) begin failures++; $display("FAIL: stage %0d never changed", s + 1); end
      end
    end

    // forced STG_1 reports bx and its calibration input gives a zero residue
    res3 = '1;
    for (int k = 0; k < 7; k++) begin
      bx = subcode_t'(k); cal_force = 5'b00001;
      repeat (2 * NSTG + 6) @(posedge clk);
      @(negedge clk);
      checks++;
      if (int'(d[0]) != k || d[1] < 2 || d[1] > 4) begin
        failures++;
        $display("FAIL: forced bx %0d d1 %0d d2 %0d", k, d[0], d[1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
