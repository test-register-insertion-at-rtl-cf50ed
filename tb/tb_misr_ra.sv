// tb_misr_ra: self-checking test of the primary-output response analyser.
//
// Random data with a random enable: the signature must follow a behavioural
// MISR model (x^8+x^6+x^5+x^4+1) while enabled and hold while disabled. A
// final check shows that a single wrong output value in a stream changes the
// signature.
module tb_misr_ra;
  localparam int unsigned W = 8;
  localparam logic [W-1:0] POLY = 8'hB8;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         en;
  logic [W-1:0] d, sig;

  int checks = 0, failures = 0;
  int n_hold = 0, n_comp = 0;

  misr_ra #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [W-1:0] s, good_sig;
    logic [W-1:0] stream [64];
    rst_n = 1'b0; en = 1'b0; d = '0;
    #12 expect_eq(sig, '0, "reset");
    @(negedge clk) rst_n = 1'b1;
    s = '0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = 1'($urandom_range(0, 3) != 0);
      d  = W'($urandom);
      if (en) begin s = d ^ {s[W-2:0], ^(s & POLY)}; n_comp++; end
      else n_hold++;
      @(posedge clk); #1 expect_eq(sig, s, en ? "compact" : "hold");
    end
    // Same stream twice, the second time with one bit flipped.
    foreach (stream[i]) stream[i] = W'($urandom);
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk) rst_n = 1'b0;
      @(negedge clk) begin rst_n = 1'b1; en = 1'b1; end
      foreach (stream[i]) begin
        d = (pass == 1 && i == 17) ? stream[i] ^ 8'h04 : stream[i];
        @(negedge clk);
      end
      en = 1'b0;
      if (pass == 0) good_sig = sig;
    end
    checks++;
    if (sig == good_sig) begin failures++; $display("FAIL error not seen in signature"); end
    checks++;
    if (n_hold == 0 || n_comp == 0) begin failures++; $display("FAIL coverage"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
