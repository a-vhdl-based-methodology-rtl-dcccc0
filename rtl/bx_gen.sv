// bx_gen: sequential generator of the external subcode bx, used for
// calibration and for testing. It forces one stage at a time (cal_force,
// one-hot) to take bx as its subcode and its calibration input, and steps bx
// through all the stage's subcodes 0 .. 2^m-2.
//
// Calibration run (start pulse): stages STG_depth down to STG_1, so every
// stage is measured by an already calibrated back end. For each subcode the
// generator waits WAIT samples for the pipeline to fill with forced samples,
// then marks 2^AVG_LOG2 samples for accumulation (acc_en, with acc_last on
// the final one) and moves on. done pulses when STG_1's last subcode is
// written. Test mode (test_en): the same sweep, repeated on stage
// test_stage for as long as test_en is held, with acc_en kept low;
// step pulses for one clock on the last sample of each subcode.
//
// All state advances on ckb (one step per sample). Generating bx in a
// sequential block for test and calibration follows the converter
// description; the order, the waiting time and the window are this design's
// choices.
module bx_gen
  import adc_pkg::*;
#(
  parameter int unsigned AVG_LOG2 = 4,
  parameter int unsigned WAIT     = 6
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ckb,
  input  logic                    start,       // begin a calibration run
  input  logic [$clog2(NCAL):0]   depth,       // stages to calibrate, 1 .. NCAL
  input  logic                    test_en,     // test mode sweep
  input  logic [$clog2(NSTG)-1:0] test_stage,  // stage swept in test mode, 0 = STG_1
  input  logic [NSTG-1:0]         res3,
  output logic [NSTG-1:0]         cal_force,
  output subcode_t                bx,
  output logic [$clog2(NSTG)-1:0] stage,       // forced stage, 0 = STG_1
  output logic                    acc_en,
  output logic                    acc_last,
  output logic                    step,        // last sample of a subcode
  output logic                    busy,        // calibration run in progress
  output logic                    done
);
  localparam int unsigned CW = (WAIT > (1 << AVG_LOG2)) ? $clog2(WAIT + 1) : AVG_LOG2 + 1;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_ACC} state_e;
  state_e        st;
  logic          testing;
  logic [CW-1:0] cnt;
  subcode_t      last_code;

  always_comb begin
    last_code = res3[stage] ? subcode_t'(6) : subcode_t'(2);
    cal_force = (st != S_IDLE) ? (NSTG'(1) << stage) : '0;
    acc_en    = (st == S_ACC) && !testing;
    acc_last  = (st == S_ACC) && (cnt == CW'((1 << AVG_LOG2) - 1));
    step      = acc_last && ckb;
    busy      = (st != S_IDLE) && !testing;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= S_IDLE;
      testing <= 1'b0;
      cnt     <= '0;
      bx      <= '0;
      stage   <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      if (st == S_IDLE) begin
        if (start && depth != 0) begin
          st      <= S_WAIT;
          testing <= 1'b0;
          stage   <= ($clog2(NSTG))'(depth - 1'b1);
          bx      <= '0;
          cnt     <= '0;
        end else if (test_en) begin
          st      <= S_WAIT;
          testing <= 1'b1;
          stage   <= test_stage;
          bx      <= '0;
          cnt     <= '0;
        end
      end else if (testing && !test_en) begin
        st <= S_IDLE;
      end else if (ckb) begin
        cnt <= cnt + 1'b1;
        if (st == S_WAIT && cnt == CW'(WAIT - 1)) begin
          st  <= S_ACC;
          cnt <= '0;
        end else if (st == S_ACC && acc_last) begin
          st  <= S_WAIT;
          cnt <= '0;
          if (bx != last_code) begin
            bx <= bx + 1'b1;
          end else if (testing) begin
            bx <= '0;
          end else if (stage != 0) begin
            bx    <= '0;
            stage <= stage - 1'b1;
          end else begin
            st   <= S_IDLE;
            done <= 1'b1;
          end
        end
      end
    end
  end

  // At most one stage is ever forced.
  a_onehot : assert property (@(posedge clk) $onehot0(cal_force));
endmodule
