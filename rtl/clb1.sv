// clb1: combinational logic block CLB1 of the example circuit.
//
// It combines primary input 1 (or the pattern of its generator) with the
// feedback taken from the output of CLB3, and its result is loaded into R2.
// The example only names the block and its connections; the function, a
// W-bit modular sum y = a + b, is this design's choice.
// Purely combinational.
module clb1 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,   // primary input 1
  input  logic [W-1:0] b,   // feedback from CLB3
  output logic [W-1:0] y    // to R2
);
  assign y = a + b;
endmodule
