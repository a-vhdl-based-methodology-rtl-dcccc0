// sh_model: behavioural model of the input sample-and-hold (SH) of the
// pipeline converter. Not synthesizable: it is an analog block, modelled with
// real numbers so that the whole mixed-signal converter can be simulated.
//
// On every clock edge with samp_en set (the end of phase phi1) the model
// samples vin and holds it on vout until the next sampling edge. Static
// errors are a gain error and an offset; the dynamic error is incomplete
// settling: the held value moves from its previous value towards the new
// one with time constant TAU_NS during one half period T_HALF_NS.
// Modelling static gain/offset and settling errors follows the converter's
// description; the exponential single-pole settling law is this model's choice.
module sh_model #(
  parameter real GAIN_ERR  = 0.0,   // relative gain error
  parameter real OFFSET    = 0.0,   // offset, in volts
  parameter real TAU_NS    = 5.0,   // settling time constant
  parameter real T_HALF_NS = 50.0   // duration of one clock phase
) (
  input  logic clk,
  input  logic samp_en,
  input  real  vin,
  output real  vout
);
  real alpha;
  assign alpha = $exp(-T_HALF_NS / TAU_NS);

  initial vout = 0.0;

  always @(posedge clk) begin
    if (samp_en) begin
      real target;
      target = vin * (1.0 + GAIN_ERR) + OFFSET;
      vout <= target + (vout - target) * alpha;
    end
  end
endmodule
