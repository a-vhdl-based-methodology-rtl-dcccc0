// adc_pkg: constants, types and helper functions shared by the pipeline A/D
// converter and its digital back end (DCAD).
//
// The converter has NSTG programmable pipeline stages followed by a final
// FLASH_BITS-bit quantizer. A stage programmed for m raw bits (m = 2 or 3)
// resolves m-1 effective bits; the remaining bit is redundancy used by the
// digital correction. With all stages at 3 bits the output has
// 2*NSTG + FLASH_BITS = 13 bits, the converter's maximum. Stage count, the
// 2/3-bit choice and the 13-bit maximum follow the converter description;
// the split into five stages plus a 3-bit last quantizer, the error-code
// format and the averaging length are this design's choices.
package adc_pkg;

  // Number of programmable pipeline stages (STG_1 .. STG_NSTG).
  localparam int unsigned NSTG       = 5;
  // Resolution of the last quantizer A/D_k.
  localparam int unsigned FLASH_BITS = 3;
  // Largest raw stage resolution; subcodes are carried on MMAX bits.
  localparam int unsigned MMAX       = 3;
  // Widest output code (all stages programmed for 3 bits).
  localparam int unsigned OUT_BITS   = NSTG * (MMAX - 1) + FLASH_BITS;
  // Number of distinct subcodes of a 3-bit stage (0 .. 6).
  localparam int unsigned NCODES     = (1 << MMAX) - 1;
  // Fractional bits of calibration error codes and of the correction sums.
  localparam int unsigned FRAC       = 2;
  // Width of the signed correction sums (quarter-LSB units).
  localparam int unsigned QW         = OUT_BITS + FRAC + 3;
  // Number of stages whose errors the register bench can hold (STG_1, STG_2).
  localparam int unsigned NCAL       = 2;
  // Width of a stored error code (signed, FRAC fractional bits).
  localparam int unsigned EW         = 10;

  typedef logic [MMAX-1:0]       subcode_t;
  typedef logic [FLASH_BITS-1:0] flcode_t;
  typedef logic [OUT_BITS-1:0]   code_t;
  typedef logic signed [QW-1:0]  qsum_t;

  typedef logic signed [EW-1:0]  err_t;

  // One write into the error register bench.
  typedef struct packed {
    logic                    we;
    logic [$clog2(NCAL)-1:0] stage;  // 0 = STG_1
    subcode_t                code;   // subcode the error belongs to
    err_t                    data;
  } err_wr_t;

  // Operating modes selected by the glue logic.
  typedef enum logic [1:0] {
    MODE_NOCAL = 2'd0,  // correction only
    MODE_CAL   = 2'd1,  // correction plus stored calibration errors
    MODE_TEST  = 2'd2   // bx sweeps the DAC codes of one stage
  } mode_e;

  // Weight exponent (in LSBs of the un-justified code) of stage i's subcode,
  // i = 1 .. NSTG, for resolution selection res3 (bit i-1 set: 3-bit stage).
  function automatic int unsigned stage_weight(input logic [NSTG-1:0] res3, input int unsigned i);
    int unsigned w;
    w = FLASH_BITS - 1;
    for (int unsigned j = 1; j <= NSTG; j++)
      if (j > i) w += res3[j-1] ? 2 : 1;
    return w;
  endfunction

  // Effective output width for a resolution selection.
  function automatic int unsigned code_bits(input logic [NSTG-1:0] res3);
    int unsigned b;
    b = FLASH_BITS;
    for (int unsigned j = 0; j < NSTG; j++) b += res3[j] ? 2 : 1;
    return b;
  endfunction

endpackage
