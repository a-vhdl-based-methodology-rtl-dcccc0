// flash_model: behavioural model of the last quantizer (A/D_k) of the
// pipeline: a BITS-bit flash converter over the differential range
// [-VREF, +VREF]. Not synthesizable: it is an analog block.
//
// On a clock edge with samp_en set it compares vin with the thresholds
// -VREF + j*VREF/2^(BITS-1), j = 1 .. 2^BITS-1, each shifted by COMP_OFS,
// and outputs the number of thresholds exceeded as code, held until the next
// sampling edge. Only the block's role is given by the converter
// description; the flash structure and its thresholds are this model's choice.
module flash_model #(
  parameter int unsigned BITS     = 3,
  parameter real         VREF     = 1.0,
  parameter real         COMP_OFS = 0.0   // common comparator offset, volts
) (
  input  logic            clk,
  input  logic            samp_en,
  input  real             vin,
  output logic [BITS-1:0] code
);
  initial code = '0;

  always @(posedge clk) begin
    if (samp_en) begin
      logic [BITS-1:0] k;
      k = '0;
      for (int j = 1; j < (1 << BITS); j++)
        if (vin > -VREF + real'(j) * VREF / real'(1 << (BITS - 1)) + COMP_OFS) k = BITS'(j);
      code <= k;
    end
  end
endmodule
