// pipeline_adc: the complete digitally corrected and calibrated pipeline
// A/D converter: the analog part (adc_analog, a behavioural model of the S/H,
// five programmable 2/3-bit stages and the last quantizer) and the digital
// part (dcad, synthesizable), connected as in the converter's two-block
// hierarchy. The digital part clocks the analog part (phi1), forces stages
// for calibration and test (cal_force, bx) and receives their subcodes.
//
// Interface: clk is the master clock CkM, one phase per cycle, so a 20 MHz
// CkM gives 10 MS/s. vin is the differential input in volts, full scale
// [-1, +1]. code is the output, left-justified on 13 bits (all stages at 3
// bits gives 13 bits, all at 2 bits 8 bits), valid when code_vld is high,
// 8 CkM cycles after the S/H sampled it. See dcad for modes and calibration.
// The analog error parameters are passed to the model; their defaults are
// illustrative values, not measured ones. T_HALF_NS sets the settling time
// the model grants per phase (the sampling period is 2*T_HALF_NS); USE_SH
// = 0 drops the input sample-and-hold.
module pipeline_adc
  import adc_pkg::*;
#(
  parameter real         STG1_GAIN_ERR = -0.002,
  parameter real         STG1_DAC_ERR  = 0.003,
  parameter real         STG1_DAC_INL  = 0.001,
  parameter real         STG1_OFFSET   = 0.002,
  parameter real         COMP_OFS      = 0.02,
  parameter real         TAU_NS        = 5.0,
  parameter real         T_HALF_NS     = 50.0,   // phase length: 10 MS/s
  parameter bit          USE_SH        = 1'b1,
  parameter int unsigned AVG_LOG2      = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  real                     vin,
  input  mode_e                   mode,
  input  logic                    cal_req,
  input  logic [$clog2(NCAL):0]   cal_depth,
  input  logic [$clog2(NSTG)-1:0] test_stage,
  input  logic [NSTG-1:0]         res3,
  output code_t                   code,
  output logic                    code_vld,
  output logic                    ovr,
  output logic                    udr,
  output subcode_t                sub_al [NSTG],
  output logic                    cal_busy,
  output logic                    calibrated,
  output logic                    test_step
);
  logic            phi1, phi2;
  logic [NSTG-1:0] cal_force;
  subcode_t        bx;
  subcode_t        d [NSTG];
  flcode_t         dl;

  adc_analog #(.STG1_GAIN_ERR(STG1_GAIN_ERR), .STG1_DAC_ERR(STG1_DAC_ERR),
               .STG1_DAC_INL(STG1_DAC_INL), .STG1_OFFSET(STG1_OFFSET),
               .COMP_OFS(COMP_OFS), .TAU_NS(TAU_NS), .T_HALF_NS(T_HALF_NS),
               .USE_SH(USE_SH))
    u_ad (.clk(clk), .phi1(phi1), .phi2(phi2), .res3(res3), .cal_force(cal_force), .bx(bx),
          .vin(vin), .d(d), .dl(dl));

  dcad #(.AVG_LOG2(AVG_LOG2)) u_dcad (
    .clk(clk), .rst_n(rst_n), .mode(mode), .cal_req(cal_req),
    .cal_depth(cal_depth), .test_stage(test_stage), .res3(res3),
    .phi1(phi1), .phi2(phi2), .cal_force(cal_force), .bx(bx), .d(d), .dl(dl),
    .code(code), .code_vld(code_vld), .ovr(ovr), .udr(udr), .sub_al(sub_al),
    .cal_busy(cal_busy), .calibrated(calibrated), .test_step(test_step));
endmodule
