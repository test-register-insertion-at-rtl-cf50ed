// tb_reduced_bist_full: one complete self-test of the example circuit at its
// default parameters (8 bits, automatic choice of test registers).
//
// The circuit first runs in normal mode, then is reset and runs a 7000-clock
// test session, the longest session length used for the mid-sized examples
// of the method, after which the signature is read. Output and signature are
// compared with the reference model on every clock; the session is then
// repeated and must give the same signature.
module tb_reduced_bist_full;
  import reduced_bist_ref_pkg::*;

  localparam int unsigned SESSION = 7000;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       test;
  logic [7:0] pi1, pi2, po, signature;

  int checks = 0, failures = 0;

  reduced_bist_circuit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3 * SESSION) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    ref_state_t m;
    logic [7:0] sig1;
    int cycles;
    rst_n = 1'b0; test = 1'b0; pi1 = '0; pi2 = '0;
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk) rst_n = 1'b0;
      m = ref_reset();
      @(negedge clk) rst_n = 1'b1;
      // A little normal operation, then reset and the session.
      repeat (50) begin
        pi1 = 8'($urandom); pi2 = 8'($urandom);
        m = ref_step(m, 1'b0, 1'b0, pi1, pi2);
        @(negedge clk);
        expect_eq(po, m.q3, "normal po");
      end
      @(negedge clk) rst_n = 1'b0;
      m = ref_reset();
      @(negedge clk) begin rst_n = 1'b1; test = 1'b1; end
      cycles = 0;
      repeat (SESSION) begin
        m = ref_step(m, 1'b0, 1'b1, pi1, pi2);
        @(negedge clk);
        cycles++;
        expect_eq(po, m.q3, "test po");
        expect_eq(signature, m.sig, "signature");
      end
      test = 1'b0;
      checks++;
      if (cycles != SESSION) failures++;
      if (pass == 0) sig1 = signature;
      else expect_eq(signature, sig1, "repeatable signature");
      $display("session %0d: %0d clocks, signature %h", pass, cycles, signature);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
