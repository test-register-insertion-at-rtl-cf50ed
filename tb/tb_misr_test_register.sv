// tb_misr_test_register: self-checking test of the BILBO-style MISR register.
//
// An 8-bit register is driven with random modes, data and scan input. After
// every clock its state is compared with a behavioural model written from the
// mode table (normal load, MISR, shift, clear) with the polynomial
// x^8+x^6+x^5+x^4+1 spelled out, not taken from the package. A second phase
// holds z at zero in MISR mode and checks that the register then runs as a
// maximal-length LFSR (period 255), i.e. it can generate patterns by itself.
module tb_misr_test_register;
  import bist_pkg::*;

  localparam int unsigned W = 8;
  localparam logic [W-1:0] POLY = 8'b1011_1000;

  logic         clk = 1'b0;
  logic         rst_n;
  tr_mode_e     mode;
  logic [W-1:0] z;
  logic         scan_in;
  logic [W-1:0] q;
  logic         scan_out;

  int checks = 0, failures = 0;
  int n_mode[4];

  misr_test_register #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [W-1:0] model(tr_mode_e m, logic [W-1:0] s, logic [W-1:0] d, logic si);
    logic fb = ^(s & POLY);
    case (m)
      TR_NORMAL: return d;
      TR_MISR:   return d ^ {s[W-2:0], fb};
      TR_SHIFT:  return {s[W-2:0], si};
      default:   return '0;
    endcase
  endfunction

  task automatic check(logic [W-1:0] exp, string what);
    checks++;
    if (q !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: q=%h expected %h", what, q, exp);
    end
    checks++;
    if (scan_out !== q[W-1]) begin
      failures++;
      if (failures < 10) $display("FAIL scan_out");
    end
  endtask

  initial begin
    logic [W-1:0] exp;
    int period;
    rst_n = 1'b0; mode = TR_NORMAL; z = '0; scan_in = 1'b0;
    #12;
    check('0, "reset");
    @(negedge clk) rst_n = 1'b1;
    exp = '0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      mode    = tr_mode_e'($urandom_range(0, 3));
      z       = W'($urandom);
      scan_in = 1'($urandom);
      n_mode[mode]++;
      exp = model(mode, exp, z, scan_in);
      @(posedge clk); #1;
      check(exp, mode.name());
    end
    // Pattern generation: MISR mode with z = 0 from state 1.
    @(negedge clk) mode = TR_CLEAR;
    @(negedge clk) begin mode = TR_SHIFT; scan_in = 1'b1; end
    @(negedge clk) begin mode = TR_MISR; z = '0; end
    #1 check(8'h01, "seed");
    period = 0;
    do begin
      @(posedge clk); #1;
      period++;
    end while (q != 8'h01 && period < 300);
    checks++;
    if (period != 255) begin
      failures++;
      $display("FAIL period %0d, expected 255", period);
    end
    for (int m = 0; m < 4; m++) begin
      checks++;
      if (n_mode[m] == 0) begin failures++; $display("FAIL mode %0d never used", m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
