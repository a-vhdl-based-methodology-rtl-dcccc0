// cal_avg: the arithmetic that calculates and averages the calibration
// errors. While STG_i is forced to subcode k with its calibration input
// (the centre of k's decision interval), its ideal residue is zero and the
// back end after it should read the mid code 2^w_i - 1/2. Every sample
// accepted (ckb && acc_en) adds the deviation
//   e = qback - 4*2^w_i + 2                  (quarter-LSB units)
// to an accumulator; on the last sample of the window (acc_last) the mean
// over 2^AVG_LOG2 samples, rounded and clamped to err_t, is written into the
// register bench at (stage, code) through wr, one cycle later.
//
// Averaging calibration errors follows the converter description; the
// measurement point, units and window length are this design's choices
// (window of 16 samples is assumed).
module cal_avg
  import adc_pkg::*;
#(
  parameter int unsigned AVG_LOG2 = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    ckb,       // sample strobe
  input  logic                    acc_en,    // this sample belongs to the window
  input  logic                    acc_last,  // last sample of the window
  input  qsum_t                   qback,     // back-end code after the stage
  input  logic [4:0]              w,         // weight exponent w_i of the stage
  input  logic [$clog2(NCAL)-1:0] stage,     // stage under calibration, 0 = STG_1
  input  subcode_t                code,      // forced subcode
  output err_wr_t                 wr
);
  localparam int unsigned AW = QW + AVG_LOG2 + 1;
  typedef logic signed [AW-1:0] acc_t;

  acc_t acc, e, sum, mean;

  always_comb begin
    e    = acc_t'(qback) - (acc_t'(1) << (int'(w) + FRAC)) + acc_t'(1 << (FRAC - 1));
    sum  = acc + e;
    mean = (sum + (acc_t'(1) << AVG_LOG2 >>> 1)) >>> AVG_LOG2;
    if (mean > acc_t'(2 ** (EW - 1) - 1)) mean = acc_t'(2 ** (EW - 1) - 1);
    if (mean < -acc_t'(2 ** (EW - 1)))    mean = -acc_t'(2 ** (EW - 1));
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      wr  <= '0;
    end else begin
      wr.we <= 1'b0;
      if (ckb && acc_en) begin
        if (acc_last) begin
          acc      <= '0;
          wr.we    <= 1'b1;
          wr.stage <= stage;
          wr.code  <= code;
          wr.data  <= err_t'(mean);
        end else begin
          acc <= sum;
        end
      end
    end
  end
endmodule
