// reduced_bist_circuit: the example circuit with two connected self-loops,
// made self-testable by the reduced BIST method.
//
// The functional circuit has two W-bit primary inputs, three combinational
// blocks and two registers:
//   R2 <= CLB1(PI1, CLB3 output)
//   R3 <= CLB3(R2, CLB2(PI2, R3))        PO = R3
// so R2 closes a loop through CLB3 and CLB1, and R3 closes a loop through
// CLB2 and CLB3; the two loops share the CLB3 output.
//
// For a test-per-clock self-test every loop must hold a register that can
// generate patterns and compact responses in the same clock. Two ways exist:
//   DFT_MISR_LOOPS   convert R2 and R3 into MISR test registers (T5, T6),
//                    cost 2 x 5 x W gate equivalents;
//   DFT_TRANSPARENT  insert one transparent MISR (T7) on the CLB3 output,
//                    ahead of the branch back to CLB1, cost 12 x W.
// DFT_AUTO (the default) takes the cheaper; for any W that is the two MISRs
// (10W < 12W), which is the configuration the method arrives at for this
// circuit. The primary inputs get LFSR pattern generators and the primary
// output a MISR response analyser in both configurations.
//
// Interface: test = 1 runs the self-test: the generators replace the inputs,
// the test registers run as MISRs and the analyser accumulates the output
// into signature. test = 0 is normal operation and the signature holds.
// A session is: reset, hold test high for N clocks, read signature.
// Timing: po and signature change on the rising edge of clk; the reset is
// asynchronous and active low and clears every register (generators load
// their seeds).
//
// The topology, the test-register kinds, their placement and the cost rule
// follow the method; the CLB functions, the width, the polynomials, the seeds
// and the test/normal control are this design's choices.
module reduced_bist_circuit
  import bist_pkg::*;
#(
  parameter int unsigned  W          = 8,
  parameter dft_choice_e  DFT_CHOICE = DFT_AUTO,
  parameter logic [W-1:0] SEED1      = {{(W-1){1'b0}}, 1'b1},
  parameter logic [W-1:0] SEED2      = {1'b1, {(W-1){1'b0}}}
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         test,
  input  logic [W-1:0] pi1,
  input  logic [W-1:0] pi2,
  output logic [W-1:0] po,
  output logic [W-1:0] signature
);

  // Area overhead of the two ways of breaking both loops, in gate equivalents.
  localparam int unsigned COST_LOOP_MISRS = 2 * COST_MISR_BIT * W;
  localparam int unsigned COST_TRANSP     = COST_TRANSP_MISR_BIT * W;
  localparam dft_choice_e SEL =
      (DFT_CHOICE != DFT_AUTO) ? DFT_CHOICE :
      (COST_LOOP_MISRS <= COST_TRANSP) ? DFT_MISR_LOOPS : DFT_TRANSPARENT;
  localparam int unsigned AREA_OVERHEAD =
      (SEL == DFT_MISR_LOOPS) ? COST_LOOP_MISRS : COST_TRANSP;

  logic [W-1:0] p1, p2;      // inputs as the circuit sees them
  logic [W-1:0] c1, c2, c3;  // CLB outputs
  logic [W-1:0] r3_d;        // data into R3, also the feedback to CLB1
  logic [W-1:0] q2, q3;      // R2 / R3 state

  lfsr_tpg #(.W(W), .SEED(SEED1)) u_tpg1 (
    .clk, .rst_n, .test, .pi(pi1), .y(p1)
  );
  lfsr_tpg #(.W(W), .SEED(SEED2)) u_tpg2 (
    .clk, .rst_n, .test, .pi(pi2), .y(p2)
  );

  clb1 #(.W(W)) u_clb1 (.a(p1), .b(r3_d), .y(c1));
  clb2 #(.W(W)) u_clb2 (.a(p2), .b(q3),   .y(c2));
  clb3 #(.W(W)) u_clb3 (.a(q2), .b(c2),   .y(c3));

  if (SEL == DFT_MISR_LOOPS) begin : g_misr_loops
    tr_mode_e tr_mode;
    assign tr_mode = test ? TR_MISR : TR_NORMAL;
    assign r3_d    = c3;

    // T5: R2 converted into a MISR.
    misr_test_register #(.W(W)) u_t5 (
      .clk, .rst_n, .mode(tr_mode), .z(c1), .scan_in(1'b0), .q(q2), .scan_out()
    );
    // T6: R3 converted into a MISR.
    misr_test_register #(.W(W)) u_t6 (
      .clk, .rst_n, .mode(tr_mode), .z(r3_d), .scan_in(1'b0), .q(q3), .scan_out()
    );
  end else begin : g_transparent
    logic [W-1:0] t7_sig;

    // T7: transparent MISR on the CLB3 output, shared by both loops.
    transparent_misr #(.W(W)) u_t7 (
      .clk, .rst_n, .test, .a(c3), .y(r3_d), .sig(t7_sig)
    );

    // R2 and R3 stay ordinary registers.
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q2 <= '0;
        q3 <= '0;
      end else begin
        q2 <= c1;
        q3 <= r3_d;
      end
    end
  end

  assign po = q3;

  misr_ra #(.W(W)) u_ra (
    .clk, .rst_n, .en(test), .d(q3), .sig(signature)
  );

endmodule
