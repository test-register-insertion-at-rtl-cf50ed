// transparent_misr: a W-bit test register inserted on a wire of the circuit.
//
// In normal mode it is a wire: y = a. In test mode its output is the state of
// an added flip-flop row that works as a MISR on the wire's value, so the
// register both compacts what arrives on the wire and supplies the pattern the
// logic downstream sees. Per bit it adds one XOR, one flip-flop and one
// multiplexer (12 gate equivalents per bit), as the method costs it:
//   r[i] <= a[i] ^ s[i],  s = {r[W-2:0], ^(r & TAPS)}
//   y[i]  = test ? r[i] : a[i]
// The three gates and the wire/MISR behaviour follow the method. The added
// flip-flops run in both modes (the cell has no enable) and are cleared by
// the asynchronous active-low reset, so a test session that starts after reset
// is repeatable; the reset and the feedback polynomial are this design's
// choices.
//
// Timing: normal mode is combinational from a to y; in test mode y is
// registered and changes on the rising edge of clk.
module transparent_misr
  import bist_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter logic [W-1:0] TAPS = W'(lfsr_taps(W))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test,   // 1: MISR, 0: wire
  input  logic [W-1:0] a,
  output logic [W-1:0] y,
  output logic [W-1:0] sig     // state of the added flip-flops
);

  logic [W-1:0] r;
  logic         fb;

  assign fb = ^(r & TAPS);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) r <= '0;
    else        r <= a ^ {r[W-2:0], fb};
  end

  assign y   = test ? r : a;
  assign sig = r;

  initial begin
    assert (W >= 2) else $error("transparent_misr: W must be at least 2");
  end

endmodule
