// tb_misr_widths: the test registers at the two sizes of the evaluated
// benchmark registers, 3 bits and 10 bits.
//
// For each width, a MISR test register in MISR mode with zero data input, a
// transparent MISR in test mode with zero input and an LFSR generator must all
// run through 2^W-1 distinct states before repeating (7 and 1023), i.e. the
// register can supply that many different patterns. In normal mode the
// converted register must load its data input unchanged.
module tb_misr_widths;
  import bist_pkg::*;

  logic clk = 1'b0;
  logic rst_n;
  tr_mode_e mode;
  logic test;

  logic [2:0] a3, z3, q3, y3t, s3t, y3g;
  logic [9:0] a10, z10, q10, y10t, s10t, y10g;

  int checks = 0, failures = 0;

  misr_test_register #(.W(3))  u_mr3  (.clk, .rst_n, .mode, .z(z3),  .scan_in(1'b1), .q(q3),  .scan_out());
  misr_test_register #(.W(10)) u_mr10 (.clk, .rst_n, .mode, .z(z10), .scan_in(1'b1), .q(q10), .scan_out());
  transparent_misr   #(.W(3))  u_tm3  (.clk, .rst_n, .test, .a(a3),  .y(y3t),  .sig(s3t));
  transparent_misr   #(.W(10)) u_tm10 (.clk, .rst_n, .test, .a(a10), .y(y10t), .sig(s10t));
  lfsr_tpg           #(.W(3))  u_tg3  (.clk, .rst_n, .test, .pi(3'd0),  .y(y3g));
  lfsr_tpg           #(.W(10)) u_tg10 (.clk, .rst_n, .test, .pi(10'd0), .y(y10g));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    bit seen3 [8], seen10 [1024], seent3 [8], seent10 [1024], seeng3 [8], seeng10 [1024];
    int rep3, rep10, rept3, rept10, repg3, repg10;
    rst_n = 1'b0; mode = TR_NORMAL; test = 1'b0; z3 = '0; z10 = '0; a3 = '0; a10 = '0;
    @(negedge clk) rst_n = 1'b1;
    // Normal mode loads data.
    for (int i = 0; i < 50; i++) begin
      z3 = 3'($urandom); z10 = 10'($urandom);
      @(negedge clk);
      expect_true(q3 == z3 && q10 == z10, "normal load");
    end
    // Seed the converted registers by one shift of a 1 and the transparent
    // MISRs by one clock of input 1; then MISR mode with zero data input.
    z3 = '0; z10 = '0;
    mode = TR_SHIFT;
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    a3 = 3'd1; a10 = 10'd1;
    @(negedge clk);
    a3 = '0; a10 = '0;
    mode = TR_MISR;
    rep3 = -1; rep10 = -1; rept3 = -1; rept10 = -1; repg3 = -1; repg10 = -1;
    test = 1'b1;
    #1;
    for (int i = 0; i < 1024; i++) begin
      if (seen3[q3]   && rep3  < 0) rep3  = i;
      if (seen10[q10] && rep10 < 0) rep10 = i;
      if (seeng3[y3g]   && repg3  < 0) repg3  = i;
      if (seeng10[y10g] && repg10 < 0) repg10 = i;
      if (seent3[y3t]   && rept3  < 0) rept3  = i;
      if (seent10[y10t] && rept10 < 0) rept10 = i;
      seen3[q3] = 1'b1; seen10[q10] = 1'b1;
      seent3[y3t] = 1'b1; seent10[y10t] = 1'b1;
      seeng3[y3g] = 1'b1; seeng10[y10g] = 1'b1;
      @(negedge clk);
      #1;
    end
    expect_true(rep3 == 7,     $sformatf("3-bit MISR period %0d", rep3));
    expect_true(rep10 == 1023, $sformatf("10-bit MISR period %0d", rep10));
    expect_true(repg3 == 7,     $sformatf("3-bit TPG period %0d", repg3));
    expect_true(repg10 == 1023, $sformatf("10-bit TPG period %0d", repg10));
    expect_true(rept3 == 7,     $sformatf("3-bit transparent MISR period %0d", rept3));
    expect_true(rept10 == 1023, $sformatf("10-bit transparent MISR period %0d", rept10));
    expect_true(y3t == s3t && y10t == s10t, "transparent MISR output is its state in test mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
