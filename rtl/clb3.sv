// clb3: combinational logic block CLB3 of the example circuit.
//
// It combines the state of R2 with the output of CLB2. Its result is loaded
// into R3 and also fed back to CLB1, so CLB3's output is the path that both
// loops of the circuit share. The example only names the block and its
// connections; the function, a W-bit modular difference y = a - b, is this
// design's choice. Purely combinational.
module clb3 #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,   // from R2
  input  logic [W-1:0] b,   // from CLB2
  output logic [W-1:0] y    // to R3 and back to CLB1
);
  assign y = a - b;
endmodule
