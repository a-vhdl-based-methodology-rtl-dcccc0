// tb_cfr_array: random subcodes, resolutions and error terms; the output
// code, range flags and partial sums are compared with a reference sum
// computed here from the stage weights (each 3-bit stage adds 2 bits of
// weight, each 2-bit stage 1, the last quantizer 3), in quarter LSBs.
module tb_cfr_array;
  import adc_pkg::*;
  subcode_t        d [NSTG];
  flcode_t         dl;
  logic [NSTG-1:0] res3;
  err_t            err [NSTG];
  qsum_t           q [NSTG+1];
  code_t           code;
  logic            ovr, udr;

  cfr_array dut (.*);

  int checks = 0, failures = 0;
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int w, nb, acc, r, expc, bits;
      logic eo, eu;
      int part [NSTG+1];
      res3 = NSTG'($urandom);
      if (t < 10) res3 = '1;
      for (int i = 0; i < NSTG; i++) begin
        d[i]   = subcode_t'($urandom_range(res3[i] ? 6 : 2, 0));
        err[i] = (i < 2) ? err_t'($urandom_range(200, 0) - 100) : err_t'(0);
      end
      dl = flcode_t'($urandom);
      if (t % 50 == 1) begin for (int i = 0; i < NSTG; i++) d[i] = res3[i] ? 6 : 2; dl = 7; end
      if (t % 50 == 2) begin for (int i = 0; i < NSTG; i++) d[i] = 0; dl = 0; end
      #1;
      bits = 3;
      acc  = 4 * int'(dl);
      part[NSTG] = acc;
      w = 2;
      for (int i = NSTG - 1; i >= 0; i--) begin
        acc = acc + 4 * int'(d[i]) * (1 << w) - int'(err[i]);
        part[i] = acc;
        w    += res3[i] ? 2 : 1;
        bits += res3[i] ? 2 : 1;
      end
      nb = bits;
      r  = (acc + 2) >>> 2;
      eo = 0; eu = 0;
      if (r <= 0) begin r = 0; eu = 1; end
      else if (r >= (1 << nb) - 1) begin r = (1 << nb) - 1; eo = 1; end
      expc = r << (OUT_BITS - nb);
      checks++;
      if (int'(code) != expc || ovr != eo || udr != eu) begin
        failures++;
        if (failures < 10) $display("FAIL: res3=%b code=%0d exp=%0d ovr=%b udr=%b", res3, code, expc, ovr, udr);
      end
      for (int i = 0; i <= NSTG; i++) begin
        checks++;
        if (int'(q[i]) != part[i]) begin
          failures++;
          if (failures < 10) $display("FAIL: q[%0d]=%0d exp %0d", i, q[i], part[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
