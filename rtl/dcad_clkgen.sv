// dcad_clkgen: derives the converter's clock phases from the master clock
// CkM. Each CkM cycle is one phase: phi1 and phi2 alternate, and Ckb, the
// computation strobe of the digital part, is active in every phi1 cycle, so
// all sample-rate registers update at the end of phi1. One conversion takes
// two CkM cycles (20 MHz CkM for 10 MS/s). The three-phase scheme from a
// single master clock follows the converter description; realising the
// phases as clock enables of one clock is this design's choice.
//
// Reset (rst_n low, synchronous to clk) holds phi1; the first cycle after
// reset is phi2.
module dcad_clkgen (
  input  logic clk,     // CkM
  input  logic rst_n,
  output logic phi1,    // current cycle is phi1
  output logic phi2,    // current cycle is phi2
  output logic ckb      // computation strobe, one per sample
);
  always_ff @(posedge clk) begin
    if (!rst_n) phi1 <= 1'b1;
    else        phi1 <= !phi1;
  end

  assign phi2 = !phi1;
  assign ckb  = phi1;
endmodule
