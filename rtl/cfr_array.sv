// cfr_array: digital correction logic (CfR). Adds the overlapping subcodes
// of one sample into the output code and removes the stored calibration
// error of each calibrated stage.
//
// Stage i's subcode d_i (0 .. 2^m-2 for an m-bit stage) has weight 2^w_i,
// w_i = (FLASH_BITS-1) + sum of the effective bits of the stages after it,
// so neighbouring subcodes overlap by one bit and the redundancy absorbs
// comparator errors. The array is a chain of cells, one per stage, that runs
// from the last quantizer towards STG_1, each cell made of ripple-carry
// adders:
//   q[NSTG]   = 4*dl
//   q[i-1]    = q[i] + 4*d_i*2^w_i - err_i        (quarter-LSB units)
//   code      = round(q[0]/4), clamped to 0 .. 2^B-1, B = code_bits(res3)
// q[i] is the code of the back end that follows STG_i, which the calibration
// logic uses to measure STG_i's errors. The output is left-justified on
// OUT_BITS bits, so that a code read as a fraction of full scale does not
// depend on the programmed resolution. ovr/udr flag a code at (or clamped
// to) the top or bottom of the range: the input is at or beyond full scale.
//
// The ripple-carry chain and the 2/3-bit programmability follow the
// converter description; error units, rounding, clamping and justification
// are this design's choices. Purely combinational.
module cfr_array
  import adc_pkg::*;
(
  input  subcode_t        d   [NSTG],  // aligned stage subcodes, d[0] = STG_1
  input  flcode_t         dl,          // aligned last-quantizer code
  input  logic [NSTG-1:0] res3,        // per-stage resolution, 1 = 3 bits
  input  err_t            err [NSTG],  // error to remove, per stage
  output qsum_t           q   [NSTG+1],// partial sums, q[i]: stages after STG_i
  output code_t           code,
  output logic            ovr,
  output logic            udr
);
  assign q[NSTG] = qsum_t'({dl, FRAC'(0)});

  for (genvar gi = NSTG; gi >= 1; gi--) begin : g_cell
    qsum_t term, mid, nerr;
    always_comb begin
      term = qsum_t'(d[gi-1]) << (stage_weight(res3, gi) + FRAC);
      nerr = ~qsum_t'(err[gi-1]);
    end
    rca_add #(.W(QW)) u_add_d   (.a(q[gi]), .b(term), .cin(1'b0), .s(mid));
    rca_add #(.W(QW)) u_sub_err (.a(mid),   .b(nerr), .cin(1'b1), .s(q[gi-1]));
  end

  always_comb begin
    qsum_t       r;
    int unsigned nb;
    nb   = code_bits(res3);
    r    = (q[0] + qsum_t'(1 << (FRAC - 1))) >>> FRAC;
    ovr  = 1'b0;
    udr  = 1'b0;
    if (r <= 0) begin
      r   = '0;
      udr = 1'b1;
    end else if (r >= qsum_t'((1 << nb) - 1)) begin
      r   = qsum_t'((1 << nb) - 1);
      ovr = 1'b1;
    end
    code = code_t'(r) << (OUT_BITS - nb);
  end
endmodule
