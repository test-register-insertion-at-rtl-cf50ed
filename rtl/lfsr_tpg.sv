// lfsr_tpg: test pattern generator placed at a W-bit primary input.
//
// In test mode the input seen by the circuit is the state of a maximal-length
// LFSR, which steps once per clock (test-per-clock); in normal mode the
// primary input passes straight through. The LFSR shifts towards the MSB and
// takes ^(state & TAPS) as its new bit 0, so it visits all 2^W-1 non-zero
// states. The method only says that an LFSR is the pattern generator at the
// primary inputs; the bypass multiplexer, the polynomial, the seed, and
// stepping only while in test mode are this design's choices.
//
// Interface: pi is the functional primary input, y what the circuit sees.
// Timing: the asynchronous active-low reset loads SEED; in test mode the
// state advances on each rising edge of clk.
module lfsr_tpg
  import bist_pkg::*;
#(
  parameter int unsigned  W    = 8,
  parameter logic [W-1:0] TAPS = W'(lfsr_taps(W)),
  parameter logic [W-1:0] SEED = {{(W-1){1'b0}}, 1'b1}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test,
  input  logic [W-1:0] pi,
  output logic [W-1:0] y
);

  logic [W-1:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= SEED;
    else if (test) state <= {state[W-2:0], ^(state & TAPS)};
  end

  assign y = test ? state : pi;

  // An LFSR that reaches all zeros stays there and stops generating patterns.
  a_never_zero: assert property (@(posedge clk) disable iff (!rst_n) state != '0)
    else $error("lfsr_tpg: LFSR state reached zero");

  initial begin
    assert (W >= 2)     else $error("lfsr_tpg: W must be at least 2");
    assert (SEED != '0) else $error("lfsr_tpg: an all-zero seed locks the LFSR");
  end

endmodule
