// shr_array: the array of shift registers (SHR) that synchronises the
// subcodes of the pipeline stages. Stage i delivers the subcode of a given
// sample i phases after the sample-and-hold took it, so the subcodes of one
// sample leave the analog part spread over NSTG+1 phases. Each stage's
// subcode is loaded one phase after the stage produced it (odd stages at the
// end of phi1, even ones and the last quantizer at the end of phi2) and then
// shifted on the same phase, through floor((NSTG+1-i)/2)+1 registers. The
// tails of all chains then hold one sample during the phi1 cycle that follows
// the last quantizer's load, where the correction logic reads them (Ckb).
//
// Interface: d[i-1] is STG_i's subcode, dl the last quantizer's code; d_al
// and dl_al are the aligned subcodes. Timing: a sample taken by the S/H at
// phi1 edge t0 is aligned during cycle (t0+7, t0+8] and read at t0+8.
// Loading with phi1/phi2 follows the converter description; the chain depths
// follow from the stage timing chosen for the analog part.
module shr_array
  import adc_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     phi1,
  input  subcode_t d [NSTG],
  input  flcode_t  dl,
  output subcode_t d_al [NSTG],
  output flcode_t  dl_al
);
  localparam int unsigned L = NSTG + 1;   // index of the last quantizer

  // The load phases below assume the last quantizer loads at the end of phi2.
  if (L % 2 != 0) begin : g_bad
    $error("shr_array: NSTG must be odd");
  end

  for (genvar gi = 1; gi <= L; gi++) begin : g_chain
    localparam int unsigned DEPTH = (L - gi) / 2 + 1;
    logic     ld;
    subcode_t din;
    subcode_t sr [DEPTH];
    assign ld  = (gi % 2 == 1) ? phi1 : !phi1;
    assign din = (gi == L) ? subcode_t'(dl) : d[(gi < L) ? gi - 1 : 0];

    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int k = 0; k < DEPTH; k++) sr[k] <= '0;
      end else if (ld) begin
        sr[0] <= din;
        for (int k = 1; k < DEPTH; k++) sr[k] <= sr[k-1];
      end
    end

    if (gi == L) begin : g_last
      assign dl_al = flcode_t'(sr[DEPTH-1]);
    end else begin : g_stage
      assign d_al[gi-1] = sr[DEPTH-1];
    end
  end
endmodule
