// dcad: the digital part of the pipeline converter. It takes the subcodes of
// the analog part, synchronises them, corrects and calibrates them into the
// output code, and controls the operating modes of the analog part.
//
// Structure (one CkM clock, phases as clock enables):
//   dcad_clkgen  phi1/phi2 for loading subcodes, ckb for computation
//   shr_array    aligns the subcodes of one sample
//   cfr_array    ripple-carry correction, minus stored calibration errors
//   err_regbank  calibration error codes per stage and subcode
//   cal_avg      measures and averages the errors during calibration
//   bx_gen       generates the external subcode bx and the stage forces
//   dcad_ctrl    mode selection and internal control
//
// Timing: the sample the S/H takes at the end of a phi1 cycle t0 leaves as
// code at the ckb edge t0+8, i.e. 8 CkM cycles or 4 conversion periods
// later; code_vld pulses for one CkM cycle after every ckb edge. In
// MODE_TEST the forced stage reads its calibration points, so code shows the
// swept DAC levels; sub_al gives the aligned raw subcodes for observation.
module dcad
  import adc_pkg::*;
#(
  parameter int unsigned AVG_LOG2 = 4,
  parameter int unsigned WAIT     = 6
) (
  input  logic                    clk,          // CkM
  input  logic                    rst_n,
  input  mode_e                   mode,
  input  logic                    cal_req,
  input  logic [$clog2(NCAL):0]   cal_depth,    // stages to calibrate, 1 .. NCAL
  input  logic [$clog2(NSTG)-1:0] test_stage,
  input  logic [NSTG-1:0]         res3,         // per-stage resolution, 1 = 3 bits
  // analog part
  output logic                    phi1,
  output logic                    phi2,
  output logic [NSTG-1:0]         cal_force,
  output subcode_t                bx,
  input  subcode_t                d [NSTG],
  input  flcode_t                 dl,
  // results
  output code_t                   code,
  output logic                    code_vld,
  output logic                    ovr,
  output logic                    udr,
  output subcode_t                sub_al [NSTG],
  output logic                    cal_busy,
  output logic                    calibrated,
  output logic                    test_step
);
  logic ckb;
  dcad_clkgen u_clk (.clk(clk), .rst_n(rst_n), .phi1(phi1), .phi2(phi2), .ckb(ckb));

  subcode_t d_al [NSTG];
  flcode_t  dl_al;
  shr_array u_shr (.clk(clk), .rst_n(rst_n), .phi1(phi1), .d(d), .dl(dl),
                   .d_al(d_al), .dl_al(dl_al));

  logic bank_clr, gen_start, apply, test_en, gen_done;
  dcad_ctrl u_ctrl (.clk(clk), .rst_n(rst_n), .mode(mode), .cal_req(cal_req),
                    .gen_done(gen_done), .bank_clr(bank_clr), .gen_start(gen_start),
                    .apply(apply), .test_en(test_en), .cal_busy(cal_busy),
                    .calibrated(calibrated));

  logic [$clog2(NSTG)-1:0] gstage;
  logic acc_en, acc_last, gen_busy;
  bx_gen #(.AVG_LOG2(AVG_LOG2), .WAIT(WAIT)) u_bx (
    .clk(clk), .rst_n(rst_n), .ckb(ckb), .start(gen_start), .depth(cal_depth),
    .test_en(test_en), .test_stage(test_stage), .res3(res3),
    .cal_force(cal_force), .bx(bx), .stage(gstage), .acc_en(acc_en),
    .acc_last(acc_last), .step(test_step), .busy(gen_busy), .done(gen_done));

  err_wr_t wr;
  err_t    err [NSTG];
  err_regbank u_bank (.clk(clk), .rst_n(rst_n), .clr(bank_clr), .wr(wr),
                      .apply(apply), .d(d_al), .err(err));

  qsum_t q [NSTG+1];
  code_t code_c;
  logic  ovr_c, udr_c;
  cfr_array u_cfr (.d(d_al), .dl(dl_al), .res3(res3), .err(err), .q(q),
                   .code(code_c), .ovr(ovr_c), .udr(udr_c));

  // back end code and weight of the stage under calibration
  qsum_t      qback;
  logic [4:0] wsel;
  always_comb begin
    qback = q[int'(gstage) + 1];
    wsel  = 5'(stage_weight(res3, int'(gstage) + 1));
  end

  cal_avg #(.AVG_LOG2(AVG_LOG2)) u_avg (
    .clk(clk), .rst_n(rst_n), .ckb(ckb), .acc_en(acc_en && gen_busy),
    .acc_last(acc_last), .qback(qback), .w(wsel),
    .stage(($clog2(NCAL))'(gstage)), .code(bx), .wr(wr));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      code     <= '0;
      code_vld <= 1'b0;
      ovr      <= 1'b0;
      udr      <= 1'b0;
      for (int s = 0; s < NSTG; s++) sub_al[s] <= '0;
    end else begin
      code_vld <= ckb;
      if (ckb) begin
        code   <= code_c;
        ovr    <= ovr_c;
        udr    <= udr_c;
        sub_al <= d_al;
      end
    end
  end
endmodule
