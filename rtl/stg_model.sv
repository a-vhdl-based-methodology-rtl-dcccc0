// stg_model: behavioural model of one pipeline stage STG_i: a sub-ADC, a DAC
// and a residue amplifier (switched-capacitor MDAC). Not synthesizable: it is
// an analog block, modelled with real numbers.
//
// The stage is programmable for m = 2 or 3 raw bits (res3). One of the bits
// is redundancy for the digital correction, so the residue gain is
// G = 2^(m-1), the sub-ADC has 2G-2 comparators with thresholds
// (2j-2G+1)*VREF/(2G), j = 1 .. 2G-2, and the subcode d runs from 0 to 2G-2
// around the middle code c = G-1. The ideal residue is
//   vout = G*vin - (d - c)*VREF.
// Modelled errors: interstage gain error GAIN_ERR, DAC level errors
// (a linear term DAC_ERR and a quadratic term DAC_INL per level, standing for
// capacitor mismatch), amplifier offset OFFSET, a common comparator offset
// COMP_OFS and incomplete settling with time constant TAU_NS during one
// phase of T_HALF_NS.
//
// Test/calibration: when cal_force is set the stage ignores its comparators and
// uses bx as its subcode, and samples the calibration voltage
// (bx - c)*VREF/G, the centre of bx's decision interval, instead of vin.
// The ideal residue is then zero and what the following stages measure is
// the stage's error for that subcode.
//
// Timing: on a clock edge with samp_en set the stage samples its input and
// presents d and the residue until its next sampling edge. Consecutive
// stages sample on opposite clock phases. With EARLY_DECISION the
// comparators use the input of the previous clock edge: the timing skew
// between sub-ADC and MDAC that a first stage without an input S/H suffers
// on a moving input. The redundancy absorbs the resulting decision error
// while it stays below a quarter (2-bit stage) or an eighth (3-bit stage)
// of VREF.
//
// The 2/3-bit programmability, one redundant bit, static gain/offset/linearity
// errors and settling errors follow the converter's description; the MDAC
// equation, the threshold placement and the calibration input are this
// model's choices.
module stg_model
  import adc_pkg::*;
#(
  parameter real GAIN_ERR  = 0.0,
  parameter real DAC_ERR   = 0.0,
  parameter real DAC_INL   = 0.0,
  parameter real OFFSET    = 0.0,
  parameter real COMP_OFS  = 0.0,
  parameter real TAU_NS    = 5.0,
  parameter real T_HALF_NS = 50.0,
  parameter real VREF      = 1.0,
  // 1: the comparators decide on vin as it stood one phase before the
  // sampling edge (stage driven straight from a moving input, no S/H)
  parameter bit  EARLY_DECISION = 1'b0
) (
  input  logic     clk,
  input  logic     samp_en,
  input  logic     res3,     // 1: 3-bit stage, 0: 2-bit stage
  input  logic     cal_force,    // calibration/test: use bx and the calibration input
  input  subcode_t bx,       // external subcode
  input  real      vin,
  output real      vout,
  output subcode_t d
);
  real alpha;
  assign alpha = $exp(-T_HALF_NS / TAU_NS);

  real vin_prev;   // vin at the previous clock edge

  initial begin
    vout     = 0.0;
    d        = '0;
    vin_prev = 0.0;
  end

  always @(posedge clk) begin
    vin_prev <= vin;
    if (samp_en) begin
      int  g, c, k;
      real v, dk, target;
      g = res3 ? 4 : 2;
      c = g - 1;
      if (cal_force) begin
        k = (int'(bx) > 2 * g - 2) ? 2 * g - 2 : int'(bx);
        v = real'(k - c) * VREF / real'(g);
      end else begin
        real vc;
        v  = vin;
        vc = EARLY_DECISION ? vin_prev : vin;
        k  = 0;
        for (int j = 1; j <= 2 * g - 2; j++)
          if (vc > real'(2 * j - 2 * g + 1) * VREF / real'(2 * g) + COMP_OFS) k = j;
      end
      dk     = real'(k - c);
      target = real'(g) * (1.0 + GAIN_ERR) * v
             - (dk * (1.0 + DAC_ERR) + DAC_INL * dk * dk) * VREF + OFFSET;
      if (target >  2.0 * VREF) target =  2.0 * VREF;
      if (target < -2.0 * VREF) target = -2.0 * VREF;
      vout <= target + (vout - target) * alpha;
      d    <= k[MMAX-1:0];
    end
  end
endmodule
