// tb_reduced_bist_circuit: end-to-end test of the reduced BIST example circuit.
//
// Three instances run side by side on the same stimulus: the default one
// (automatic choice, which must pick one MISR per loop), one forced to one
// MISR per loop, and one forced to a single transparent MISR. Each is compared
// every clock with the reference model on po and signature through normal
// operation, test sessions, switches between them, and resets. The test also
// checks the cost figures behind the automatic choice, that a repeated
// session from reset gives the same signature, and that the two
// configurations give different signatures (their test registers sit in
// different places). Every mechanism is counted and must occur.
module tb_reduced_bist_circuit;
  import bist_pkg::*;
  import reduced_bist_ref_pkg::*;

  localparam int unsigned W = 8;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         test;
  logic [W-1:0] pi1, pi2;
  logic [W-1:0] po_a, sig_a, po_m, sig_m, po_t, sig_t;

  int checks = 0, failures = 0;
  int n_normal = 0, n_test = 0, n_to_test = 0, n_to_normal = 0, n_reset = 0, n_hold = 0;

  reduced_bist_circuit dut_auto (
    .clk, .rst_n, .test, .pi1, .pi2, .po(po_a), .signature(sig_a)
  );
  reduced_bist_circuit #(.W(W), .DFT_CHOICE(DFT_MISR_LOOPS)) dut_misr (
    .clk, .rst_n, .test, .pi1, .pi2, .po(po_m), .signature(sig_m)
  );
  reduced_bist_circuit #(.W(W), .DFT_CHOICE(DFT_TRANSPARENT)) dut_transp (
    .clk, .rst_n, .test, .pi1, .pi2, .po(po_t), .signature(sig_t)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  task automatic expect_true(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  ref_state_t m_misr, m_transp;

  task automatic compare();
    expect_eq(po_a,  m_misr.q3,    "auto po");
    expect_eq(sig_a, m_misr.sig,   "auto signature");
    expect_eq(po_m,  m_misr.q3,    "misr po");
    expect_eq(sig_m, m_misr.sig,   "misr signature");
    expect_eq(po_t,  m_transp.q3,  "transparent po");
    expect_eq(sig_t, m_transp.sig, "transparent signature");
  endtask

  task automatic do_reset();
    @(negedge clk) rst_n = 1'b0;
    m_misr = ref_reset();
    m_transp = ref_reset();
    #1 compare();
    @(negedge clk) rst_n = 1'b1;
    n_reset++;
  endtask

  // One clock with the given mode and random primary inputs.
  task automatic cycle(bit t);
    if (t && !test) n_to_test++;
    if (!t && test) n_to_normal++;
    test = t;
    pi1 = W'($urandom);
    pi2 = W'($urandom);
    if (t) n_test++; else n_normal++;
    if (!t && sig_a != '0) n_hold++;
    m_misr   = ref_step(m_misr,   1'b0, t, pi1, pi2);
    m_transp = ref_step(m_transp, 1'b1, t, pi1, pi2);
    @(posedge clk);
    @(negedge clk);
    compare();
  endtask

  initial begin
    logic [W-1:0] first_a, first_t;
    rst_n = 1'b0; test = 1'b0; pi1 = '0; pi2 = '0;

    // Cost rule: 2 x 5 x W for two MISRs against 12 x W for a transparent one.
    expect_true(dut_auto.SEL == DFT_MISR_LOOPS, "automatic choice is one MISR per loop");
    expect_true(dut_auto.AREA_OVERHEAD == 80, "MISR overhead 80 gate equivalents");
    expect_true(dut_transp.AREA_OVERHEAD == 96, "transparent overhead 96 gate equivalents");

    do_reset();
    repeat (40) cycle(1'b0);          // normal operation
    do_reset();
    repeat (300) cycle(1'b1);         // test session from reset
    first_a = sig_a;
    first_t = sig_t;
    repeat (20) cycle(1'b0);          // back to normal: signature holds
    expect_eq(sig_a, first_a, "signature held in normal mode");
    do_reset();
    repeat (300) cycle(1'b1);         // same session again
    expect_eq(sig_a, first_a, "repeatable signature (MISR per loop)");
    expect_eq(sig_t, first_t, "repeatable signature (transparent)");
    expect_true(first_a != first_t, "configurations differ in signature");
    for (int i = 0; i < 400; i++) cycle(1'($urandom_range(0, 3) == 0));  // mixed

    expect_true(n_normal > 0,    "normal operation occurred");
    expect_true(n_test > 0,      "test mode occurred");
    expect_true(n_to_test > 0,   "switch to test occurred");
    expect_true(n_to_normal > 0, "switch to normal occurred");
    expect_true(n_hold > 0,      "signature hold occurred");
    expect_true(n_reset > 0,     "reset occurred");
    $display("normal=%0d test=%0d to_test=%0d to_normal=%0d hold=%0d reset=%0d signature=%h/%h",
             n_normal, n_test, n_to_test, n_to_normal, n_hold, n_reset, first_a, first_t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
