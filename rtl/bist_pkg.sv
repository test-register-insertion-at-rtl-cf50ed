// bist_pkg: types, constants and the feedback-polynomial table shared by the
// BIST test registers.
//
// Test-register modes follow the two-bit {B1,B2} control of a BILBO register,
// which is the register the method uses as its MISR: {1,1} normal load,
// {1,0} MISR (signature compaction that doubles as pattern generation),
// {0,0} serial shift, {0,1} synchronous clear. The shift and clear codes come
// with the BILBO cell for free; the method itself only needs normal and MISR.
//
// The area figures are the gate-equivalent costs (one unit = one 2-input NAND)
// used to choose between converting existing registers into MISRs and
// inserting a transparent MISR: 5 per bit for a MISR (AND 1 + NOR 1 + XOR 3)
// and 12 per bit for a transparent MISR (XOR 3 + MUX 3 + flip-flop 6).
//
// lfsr_taps(w) returns the feedback mask of a maximal-length polynomial of
// degree w (2..32) for the shift-towards-MSB structure used here: the new
// bit 0 is the XOR of the state bits whose mask bit is set. Bit k-1 of the
// mask stands for the term x^k of the polynomial. The table is the usual
// list of primitive trinomials and pentanomials; it is this design's choice,
// not part of the method.
package bist_pkg;

  // {B1,B2} control of a BILBO-style test register.
  typedef enum logic [1:0] {
    TR_SHIFT  = 2'b00,
    TR_CLEAR  = 2'b01,
    TR_MISR   = 2'b10,
    TR_NORMAL = 2'b11
  } tr_mode_e;

  // Which kind of test register breaks the loops of the example circuit.
  typedef enum logic [1:0] {
    DFT_AUTO        = 2'd0,  // pick the cheaper of the two below
    DFT_MISR_LOOPS  = 2'd1,  // one MISR per loop (existing registers converted)
    DFT_TRANSPARENT = 2'd2   // one transparent MISR on the shared path
  } dft_choice_e;

  // Gate-equivalent costs of the added logic.
  localparam int unsigned COST_AND  = 1;
  localparam int unsigned COST_NOR  = 1;
  localparam int unsigned COST_XOR  = 3;
  localparam int unsigned COST_MUX  = 3;
  localparam int unsigned COST_FF   = 6;
  localparam int unsigned COST_MISR_BIT        = COST_AND + COST_NOR + COST_XOR;  // 5
  localparam int unsigned COST_TRANSP_MISR_BIT = COST_XOR + COST_MUX + COST_FF;   // 12

  function automatic logic [31:0] lfsr_taps(input int unsigned w);
    case (w)
      2:  return 32'h0000_0003;  // x^2+x+1
      3:  return 32'h0000_0006;  // x^3+x^2+1
      4:  return 32'h0000_000C;
      5:  return 32'h0000_0014;
      6:  return 32'h0000_0030;
      7:  return 32'h0000_0060;
      8:  return 32'h0000_00B8;  // x^8+x^6+x^5+x^4+1
      9:  return 32'h0000_0110;
      10: return 32'h0000_0240;
      11: return 32'h0000_0500;
      12: return 32'h0000_0829;
      13: return 32'h0000_100D;
      14: return 32'h0000_2015;
      15: return 32'h0000_6000;
      16: return 32'h0000_D008;
      17: return 32'h0001_2000;
      18: return 32'h0002_0400;
      19: return 32'h0004_0023;
      20: return 32'h0009_0000;
      21: return 32'h0014_0000;
      22: return 32'h0030_0000;
      23: return 32'h0042_0000;  // x^23+x^18+1
      24: return 32'h00E1_0000;  // x^24+x^23+x^22+x^17+1
      25: return 32'h0120_0000;
      26: return 32'h0200_0023;
      27: return 32'h0400_0013;
      28: return 32'h0900_0000;
      29: return 32'h1400_0000;
      30: return 32'h2000_0029;
      31: return 32'h4800_0000;
      32: return 32'h8020_0003;  // x^32+x^22+x^2+x+1
      default: return 32'h0;
    endcase
  endfunction

endpackage
