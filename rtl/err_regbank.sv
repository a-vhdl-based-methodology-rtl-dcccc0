// err_regbank: the register bench that stores the calibration error codes.
// It holds one signed error (err_t, quarter-LSB units) for every subcode of
// every calibrated stage: NCAL stages (STG_1 .. STG_NCAL) times NCODES
// subcodes. One write port (err_wr_t, from the calibration arithmetic); one
// combinational read port per calibrated stage, addressed by that stage's
// current aligned subcode, so the correction array gets each stage's error
// in the same cycle. clr (synchronous) and reset set every error to zero.
// Outputs for stages beyond NCAL, and all outputs while apply is low, are
// zero. Storing errors per stage and subcode in a register bench follows
// the converter description; the organisation is this design's choice.
module err_regbank
  import adc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     clr,          // clear all errors
  input  err_wr_t  wr,           // write port
  input  logic     apply,        // 0: read as zero
  input  subcode_t d   [NSTG],   // read addresses: aligned subcodes
  output err_t     err [NSTG]    // error of each stage's current subcode
);
  err_t mem [NCAL][NCODES];

  always_ff @(posedge clk) begin
    if (!rst_n || clr) begin
      for (int s = 0; s < NCAL; s++)
        for (int c = 0; c < NCODES; c++) mem[s][c] <= '0;
    end else if (wr.we && int'(wr.code) < NCODES) begin
      mem[wr.stage][wr.code] <= wr.data;
    end
  end

  always_comb begin
    for (int s = 0; s < NSTG; s++) begin
      err[s] = '0;
      if (apply && s < NCAL && int'(d[s]) < NCODES) err[s] = mem[s][d[s]];
    end
  end
endmodule
