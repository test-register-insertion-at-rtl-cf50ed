// tb_lfsr_tpg: self-checking test of the primary-input pattern generator.
//
// Normal mode: the output must equal the primary input and the LFSR must not
// move. Test mode: the output must follow a behavioural model of the LFSR
// (x^8+x^6+x^5+x^4+1, seed 1) and must visit all 255 non-zero values before
// it repeats, one per clock.
module tb_lfsr_tpg;
  localparam int unsigned W = 8;
  localparam logic [W-1:0] POLY = 8'hB8;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         test;
  logic [W-1:0] pi, y;

  int checks = 0, failures = 0;

  lfsr_tpg #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
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
    logic [W-1:0] s;
    bit seen [256];
    int first_repeat;
    rst_n = 1'b0; test = 1'b0; pi = '0;
    #12;
    @(negedge clk) rst_n = 1'b1;
    s = 8'h01;
    // Normal mode, then a short test burst, then normal again: state must hold.
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      test = (i >= 200 && i < 230);
      pi = W'($urandom);
      #1 expect_eq(y, test ? s : pi, test ? "pattern" : "bypass");
      if (test) s = {s[W-2:0], ^(s & POLY)};
    end
    // Full period from the current state.
    @(negedge clk) test = 1'b1;
    first_repeat = -1;
    for (int i = 0; i < 256; i++) begin
      #1 expect_eq(y, s, "pattern");
      checks++;
      if (y == '0) begin failures++; $display("FAIL all-zero pattern"); end
      if (seen[y] && first_repeat < 0) first_repeat = i;
      seen[y] = 1'b1;
      s = {s[W-2:0], ^(s & POLY)};
      @(negedge clk);
    end
    checks++;
    if (first_repeat != 255) begin
      failures++;
      $display("FAIL first repeated pattern at step %0d, expected 255", first_repeat);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
