// misr_test_register: an existing W-bit register of the circuit converted into
// a MISR test register, built from a BILBO cell.
//
// Each bit keeps its original flip-flop and gains one AND, one NOR and one XOR
// gate in front of it, the 5-gate-equivalent-per-bit conversion the method
// costs a MISR at:
//   d[i] = (B1 & z[i]) ^ ~(B2 | ~s[i])
// where z is the functional data the register loaded before conversion and
// s[i] is the state of the neighbouring stage (q[i-1]). Bit 0's neighbour is
// the polynomial feedback ^(q & TAPS) in MISR mode and scan_in in shift mode.
// The mode word {B1,B2} (bist_pkg::tr_mode_e) selects
//   TR_NORMAL: q <= z                       (the original register)
//   TR_MISR:   q <= z ^ {q[W-2:0], fb}      (compacts z; its state is also the
//                                            test pattern the next block sees)
//   TR_SHIFT:  q <= {q[W-2:0], scan_in}     (serial scan; scan_out = q[W-1])
//   TR_CLEAR:  q <= 0
// In MISR mode the register is both pattern generator and response analyser
// in the same clock, which is what lets one register per loop make the loop
// testable. The gate list and the normal/MISR behaviour follow the method;
// the exact input of each gate, the shift/clear codes of the BILBO cell, the
// feedback polynomial (bist_pkg::lfsr_taps) and the asynchronous active-low
// reset to zero are this design's choices.
//
// Timing: one register stage, q changes on the rising edge of clk.
module misr_test_register
  import bist_pkg::*;
#(
  parameter int unsigned W    = 8,
  parameter logic [W-1:0] TAPS = W'(lfsr_taps(W))
) (
  input  logic         clk,
  input  logic         rst_n,
  input  tr_mode_e     mode,
  input  logic [W-1:0] z,        // functional data input of the original register
  input  logic         scan_in,
  output logic [W-1:0] q,
  output logic         scan_out
);

  logic         b1, b2;
  logic         fb;
  logic [W-1:0] s;   // neighbour stage feeding each NOR
  logic [W-1:0] d;

  assign {b1, b2} = mode;
  assign fb       = ^(q & TAPS);
  assign s        = {q[W-2:0], (b1 ? fb : scan_in)};

  always_comb begin
    for (int i = 0; i < W; i++) begin
      d[i] = (b1 & z[i]) ^ ~(b2 | ~s[i]);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

  assign scan_out = q[W-1];

  initial begin
    assert (W >= 2) else $error("misr_test_register: W must be at least 2");
  end

endmodule
