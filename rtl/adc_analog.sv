// adc_analog: behavioural model of the analog part (the A/D block) of the
// pipeline converter: input sample-and-hold SH, NSTG programmable stages
// STG_1 .. STG_NSTG and the last quantizer A/D_k. Not synthesizable.
//
// Clocking: each cycle of the master clock clk is one phase; phi1 is high in
// phi1 cycles, phi2 in phi2 cycles. SH samples at the end of phi1, STG_1 at
// the end of the following phi2, STG_2 at the end of the next phi1 and so on,
// so a sample moves one stage per phase and reaches the last quantizer
// NSTG+1 phases after SH took it. A stage holds its subcode for two phases.
//
// Errors: stage i gets the STG1_* error values scaled by 2^-(i-1) (later
// stages matter less and are made smaller). The default values are
// illustrative, of the size found in a switched-capacitor prototype; the
// converter description does not list them. cal_force[i-1] and bx put STG_i
// into its calibration/test configuration (see stg_model).
//
// USE_SH = 0 removes the input S/H: STG_1 then samples vin itself at the
// end of phi2 (one phase later than the S/H would), and its comparators,
// which decide on the input one phase earlier than the MDAC samples it, see
// a different value when vin moves. This reproduces the loss of resolution
// at high input frequencies of a converter without input S/H; the skew of
// one phase is this model's choice.
module adc_analog
  import adc_pkg::*;
#(
  parameter real SH_GAIN_ERR   = 0.0,
  parameter real SH_OFFSET     = 0.0,
  parameter real STG1_GAIN_ERR = -0.002,
  parameter real STG1_DAC_ERR  = 0.003,
  parameter real STG1_DAC_INL  = 0.001,
  parameter real STG1_OFFSET   = 0.002,
  parameter real COMP_OFS      = 0.02,
  parameter real TAU_NS        = 5.0,
  parameter real T_HALF_NS     = 50.0,
  parameter real VREF          = 1.0,
  parameter bit  USE_SH        = 1'b1    // 0: STG_1 takes vin directly
) (
  input  logic                clk,     // master clock CkM, one cycle per phase
  input  logic                phi1,    // 1: current cycle is phi1
  input  logic                phi2,    // 1: current cycle is phi2
  input  logic [NSTG-1:0]     res3,    // per-stage resolution: 1 = 3 bits
  input  logic [NSTG-1:0]     cal_force,   // per-stage calibration/test cal_force
  input  subcode_t            bx,      // external subcode for the forced stage
  input  real                 vin,     // differential input, [-VREF, VREF]
  output subcode_t            d [NSTG],// stage subcodes, d[0] is STG_1
  output flcode_t             dl       // last quantizer code
);
  real v [NSTG+1];   // v[0]: STG_1 input (S/H output), v[i]: residue of STG_i
  real vsh;

  sh_model #(.GAIN_ERR(SH_GAIN_ERR), .OFFSET(SH_OFFSET),
             .TAU_NS(TAU_NS), .T_HALF_NS(T_HALF_NS))
    u_sh (.clk(clk), .samp_en(phi1), .vin(vin), .vout(vsh));

  assign v[0] = USE_SH ? vsh : vin;

  for (genvar gi = 0; gi < NSTG; gi++) begin : g_stg
    localparam real SCL = 1.0 / real'(1 << gi);
    // STG_(gi+1): odd stages sample at the end of phi2, even at the end of phi1
    logic samp;
    assign samp = (gi % 2 == 0) ? phi2 : phi1;
    stg_model #(.GAIN_ERR(STG1_GAIN_ERR * SCL), .DAC_ERR(STG1_DAC_ERR * SCL),
                .DAC_INL(STG1_DAC_INL * SCL), .OFFSET(STG1_OFFSET * SCL),
                .COMP_OFS(COMP_OFS), .TAU_NS(TAU_NS), .T_HALF_NS(T_HALF_NS),
                .VREF(VREF), .EARLY_DECISION(gi == 0 && !USE_SH))
      u_stg (.clk(clk), .samp_en(samp), .res3(res3[gi]), .cal_force(cal_force[gi]),
             .bx(bx), .vin(v[gi]), .vout(v[gi+1]), .d(d[gi]));
  end

  // A/D_k has index NSTG+1: it samples on the phase opposite to STG_NSTG
  logic samp_last;
  assign samp_last = (NSTG % 2 == 0) ? phi2 : phi1;
  flash_model #(.BITS(FLASH_BITS), .VREF(VREF), .COMP_OFS(0.0))
    u_last (.clk(clk), .samp_en(samp_last), .vin(v[NSTG]), .code(dl));
endmodule
