// misr_ra: response analyser placed at a W-bit primary output.
//
// While en is high it compacts the output value d into a signature each clock,
//   sig <= d ^ {sig[W-2:0], ^(sig & TAPS)},
// the same MISR equation the test registers use. While en is low the
// signature holds, so it can be read after the session. The method names a
// MISR as the analyser at the primary outputs; the polynomial, the hold
// while disabled and the asynchronous active-low clear are this design's
// choices.
//
// Timing: sig updates on the rising edge of clk; the signature of a session
// of N enabled clocks is on sig after the Nth edge.
module misr_ra
  import bist_pkg::*;
#(
  parameter int unsigned  W    = 8,
  parameter logic [W-1:0] TAPS = W'(lfsr_taps(W))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  input  logic [W-1:0] d,
  output logic [W-1:0] sig
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  sig <= '0;
    else if (en) sig <= d ^ {sig[W-2:0], ^(sig & TAPS)};
  end

  initial begin
    assert (W >= 2) else $error("misr_ra: W must be at least 2");
  end

endmodule
