// dcad_ctrl: glue logic of the digital part. It decodes the operating mode
// and the calibration request into the internal control signals:
//   - cal_req (pulse) starts a calibration run when no run is active and the
//     mode is not MODE_TEST: one cycle in C_CLEAR clears the error register
//     bench (bank_clr), then C_RUN starts the bx generator and waits for its
//     done; calibrated is set at the end and cleared by a new run.
//   - apply: stored errors are used by the correction array in MODE_CAL and
//     during a run (so later stages, already calibrated, correct the back end
//     used to measure earlier ones).
//   - test_en: MODE_TEST with no run active.
// Mode selection by glue logic follows the converter description; the mode
// set and the sequence are this design's choices.
module dcad_ctrl
  import adc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  mode_e mode,
  input  logic  cal_req,     // request a calibration run
  input  logic  gen_done,    // bx generator finished the run
  output logic  bank_clr,
  output logic  gen_start,
  output logic  apply,
  output logic  test_en,
  output logic  cal_busy,
  output logic  calibrated
);
  typedef enum logic [1:0] {C_IDLE, C_CLEAR, C_START, C_RUN} cstate_e;
  cstate_e cs;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cs         <= C_IDLE;
      calibrated <= 1'b0;
    end else begin
      unique case (cs)
        C_IDLE:  if (cal_req && mode != MODE_TEST) cs <= C_CLEAR;
        C_CLEAR: begin
          cs         <= C_START;
          calibrated <= 1'b0;
        end
        C_START: cs <= C_RUN;
        C_RUN:   if (gen_done) begin
          cs         <= C_IDLE;
          calibrated <= 1'b1;
        end
        default: cs <= C_IDLE;
      endcase
    end
  end

  always_comb begin
    bank_clr  = (cs == C_CLEAR);
    gen_start = (cs == C_START);
    cal_busy  = (cs != C_IDLE);
    apply     = (mode == MODE_CAL) || cal_busy;
    test_en   = (mode == MODE_TEST) && !cal_busy;
  end
endmodule
