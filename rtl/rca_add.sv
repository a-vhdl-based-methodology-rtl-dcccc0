// rca_add: W-bit ripple-carry adder, s = (a + b + cin) mod 2^W, built as a chain of
// full-adder cells so that the carry ripples from bit 0 upwards. Used by the
// correction array, which the converter description builds in a ripple
// carry configuration. Purely combinational.
module rca_add #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s
);
  logic [W-1:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    assign s[i] = a[i] ^ b[i] ^ c[i];
    if (i < W - 1) begin : g_c
      assign c[i+1] = (a[i] & b[i]) | (c[i] & (a[i] ^ b[i]));
    end
  end
endmodule
