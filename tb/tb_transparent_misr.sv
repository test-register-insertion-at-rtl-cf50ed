// tb_transparent_misr: self-checking test of the transparent MISR.
//
// With test low the output must equal the input in the same cycle (a wire),
// whatever the added flip-flops hold. With test high the output is the added
// register, which must follow the MISR equation of a behavioural model with
// the polynomial x^8+x^6+x^5+x^4+1 written out here. Test is toggled at random
// so both modes and both switch directions occur many times.
module tb_transparent_misr;
  localparam int unsigned W = 8;
  localparam logic [W-1:0] POLY = 8'hB8;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         test;
  logic [W-1:0] a, y, sig;

  int checks = 0, failures = 0;
  int n_wire = 0, n_test = 0, n_switch = 0;

  transparent_misr #(.W(W)) dut (.*);

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
    logic [W-1:0] r;
    logic prev_test;
    rst_n = 1'b0; test = 1'b0; a = '0;
    #12 expect_eq(sig, '0, "reset");
    @(negedge clk) rst_n = 1'b1;
    r = '0; prev_test = 1'b0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      if ($urandom_range(0, 9) == 0) test = ~test;
      if (test != prev_test) n_switch++;
      prev_test = test;
      a = W'($urandom);
      #1;
      if (test) begin
        expect_eq(y, r, "test-mode output");
        n_test++;
      end else begin
        expect_eq(y, a, "wire");
        n_wire++;
      end
      r = a ^ {r[W-2:0], ^(r & POLY)};
      @(posedge clk); #1;
      expect_eq(sig, r, "added register");
    end
    checks++;
    if (n_wire == 0 || n_test == 0 || n_switch < 2) begin
      failures++;
      $display("FAIL coverage wire=%0d test=%0d switch=%0d", n_wire, n_test, n_switch);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
