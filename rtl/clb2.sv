// clb2: combinational logic block CLB2 of the example circuit.
//
// It combines primary input 2 (or the pattern of its generator) with the
// feedback from R3, and feeds CLB3. The example only names the block and its
// connections; the function, y = a XOR (b rotated left by one bit), is this
// design's choice. Purely combinational.
module clb2 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,   // primary input 2
  input  logic [W-1:0] b,   // feedback from R3
  output logic [W-1:0] y    // to CLB3
);
  assign y = a ^ {b[W-2:0], b[W-1]};
endmodule
