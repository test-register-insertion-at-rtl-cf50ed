// tb_reduced_bist_coverage: stuck-at fault detection by the self-test, as a
// function of session length, for both test-register configurations.
//
// Fault list: stuck-at-0 and stuck-at-1 on every bit of the three CLB
// outputs, 48 faults per configuration. A fault is injected by forcing the
// CLB output to its fault-free function with one bit held at 0 or 1, in the
// default instance (one MISR per loop) and in a transparent-MISR instance at
// once. Each run is: reset, hold test high for 1000 clocks, sample the
// signature after 20, 60, 255 and 1000 clocks. A fault counts as detected at a
// checkpoint when the signature differs from the fault-free one there. The
// fault-free signatures are also checked against the reference model, which
// shows the injector is neutral when no fault is selected.
//
// The testbench also counts the distinct operand pairs CLB3 receives in the
// fault-free 1000-clock session, which shows that the test registers supply
// its patterns.
//
// Checks: the fault-free runs match the model; CLB3 sees more than 255
// distinct operand pairs; every fault is detected in at
// least one of the session lengths in both configurations (a fault that is
// missed at one length and caught at another is signature aliasing, which
// an 8-bit MISR shows for about 1 in 256 faulty response streams); and at
// most 2 of the 48 faults escape at any one length.
module tb_reduced_bist_coverage;
  import bist_pkg::*;
  import reduced_bist_ref_pkg::*;

  localparam int NCP = 4;
  localparam int CP [NCP] = '{20, 60, 255, 1000};
  localparam int NFAULT = 3 * 8 * 2;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       test;
  logic [7:0] pi1, pi2;
  logic [7:0] po_m, sig_m, po_t, sig_t;

  // Stuck-at masks per CLB: and-mask clears a bit, or-mask sets it.
  logic [7:0] and_m [3];
  logic [7:0] or_m  [3];

  int checks = 0, failures = 0;

  reduced_bist_circuit dut_m (
    .clk, .rst_n, .test, .pi1, .pi2, .po(po_m), .signature(sig_m)
  );
  reduced_bist_circuit #(.DFT_CHOICE(DFT_TRANSPARENT)) dut_t (
    .clk, .rst_n, .test, .pi1, .pi2, .po(po_t), .signature(sig_t)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    force dut_m.u_clb1.y = (8'(dut_m.u_clb1.a + dut_m.u_clb1.b) & and_m[0]) | or_m[0];
    force dut_m.u_clb2.y = ((dut_m.u_clb2.a ^ {dut_m.u_clb2.b[6:0], dut_m.u_clb2.b[7]}) & and_m[1]) | or_m[1];
    force dut_m.u_clb3.y = (8'(dut_m.u_clb3.a - dut_m.u_clb3.b) & and_m[2]) | or_m[2];
    force dut_t.u_clb1.y = (8'(dut_t.u_clb1.a + dut_t.u_clb1.b) & and_m[0]) | or_m[0];
    force dut_t.u_clb2.y = ((dut_t.u_clb2.a ^ {dut_t.u_clb2.b[6:0], dut_t.u_clb2.b[7]}) & and_m[1]) | or_m[1];
    force dut_t.u_clb3.y = (8'(dut_t.u_clb3.a - dut_t.u_clb3.b) & and_m[2]) | or_m[2];
  end

  logic [7:0] cp_m [NCP];
  logic [7:0] cp_t [NCP];

  // Distinct operand pairs CLB3 receives during a session.
  bit seen_m [65536];
  bit seen_t [65536];
  int distinct_m, distinct_t;
  bit count_patterns;

  always @(posedge clk) begin
    if (count_patterns && test) begin
      if (!seen_m[{dut_m.u_clb3.a, dut_m.u_clb3.b}]) distinct_m++;
      if (!seen_t[{dut_t.u_clb3.a, dut_t.u_clb3.b}]) distinct_t++;
      seen_m[{dut_m.u_clb3.a, dut_m.u_clb3.b}] = 1'b1;
      seen_t[{dut_t.u_clb3.a, dut_t.u_clb3.b}] = 1'b1;
    end
  end

  task automatic run_session();
    int k = 0;
    @(negedge clk) begin rst_n = 1'b0; test = 1'b0; end
    @(negedge clk) begin rst_n = 1'b1; test = 1'b1; end
    for (int n = 1; n <= CP[NCP-1]; n++) begin
      pi1 = 8'($urandom); pi2 = 8'($urandom);
      @(negedge clk);
      if (n == CP[k]) begin
        cp_m[k] = sig_m;
        cp_t[k] = sig_t;
        k++;
      end
    end
    test = 1'b0;
  endtask

  task automatic expect_true(bit c, string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  initial count_patterns = 1'b0;

  initial begin
    logic [7:0] good_m [NCP];
    logic [7:0] good_t [NCP];
    int det_m [NCP];
    int det_t [NCP];
    int never_m, never_t, alias_m, alias_t;
    bit any_m, any_t;
    ref_state_t mm, mt;
    int k;

    rst_n = 1'b0; test = 1'b0; pi1 = '0; pi2 = '0;
    foreach (and_m[i]) begin and_m[i] = 8'hFF; or_m[i] = 8'h00; end
    foreach (det_m[i]) begin det_m[i] = 0; det_t[i] = 0; end
    never_m = 0; never_t = 0; alias_m = 0; alias_t = 0;

    // Fault-free session, checked against the model.
    distinct_m = 0; distinct_t = 0;
    count_patterns = 1'b1;
    run_session();
    count_patterns = 1'b0;
    $display("distinct CLB3 operand pairs in %0d clocks: %0d (MISR per loop), %0d (transparent MISR)",
             CP[NCP-1], distinct_m, distinct_t);
    // The test registers feed CLB3 far more distinct patterns than the 255 an
    // 8-bit generator alone could supply.
    expect_true(distinct_m > 255, "MISR-generated patterns at CLB3, MISR per loop");
    expect_true(distinct_t > 255, "MISR-generated patterns at CLB3, transparent MISR");
    good_m = cp_m;
    good_t = cp_t;
    mm = ref_reset();
    mt = ref_reset();
    k = 0;
    for (int n = 1; n <= CP[NCP-1]; n++) begin
      mm = ref_step(mm, 1'b0, 1'b1, 8'h00, 8'h00);
      mt = ref_step(mt, 1'b1, 1'b1, 8'h00, 8'h00);
      if (n == CP[k]) begin
        expect_true(good_m[k] == mm.sig, $sformatf("fault-free MISR-loop signature at %0d", n));
        expect_true(good_t[k] == mt.sig, $sformatf("fault-free transparent signature at %0d", n));
        k++;
      end
    end

    for (int clb = 0; clb < 3; clb++) begin
      for (int b = 0; b < 8; b++) begin
        for (int v = 0; v < 2; v++) begin
          if (v == 0) and_m[clb] = ~(8'h01 << b);
          else        or_m[clb]  =  (8'h01 << b);
          run_session();
          any_m = 1'b0;
          any_t = 1'b0;
          for (int c = 0; c < NCP; c++) begin
            if (cp_m[c] != good_m[c]) begin det_m[c]++; any_m = 1'b1; end
            if (cp_t[c] != good_t[c]) begin det_t[c]++; any_t = 1'b1; end
          end
          for (int c = 0; c < NCP; c++) begin
            if (any_m && cp_m[c] == good_m[c]) begin
              alias_m++;
              $display("CLB%0d bit %0d stuck-at-%0d aliased after %0d clocks (MISR per loop)", clb + 1, b, v, CP[c]);
            end
            if (any_t && cp_t[c] == good_t[c]) begin
              alias_t++;
              $display("CLB%0d bit %0d stuck-at-%0d aliased after %0d clocks (transparent MISR)", clb + 1, b, v, CP[c]);
            end
          end
          if (!any_m) never_m++;
          if (!any_t) never_t++;
          and_m[clb] = 8'hFF;
          or_m[clb]  = 8'h00;
        end
      end
    end

    $display("clocks  detected (MISR per loop)  detected (transparent MISR)   of %0d", NFAULT);
    for (int c = 0; c < NCP; c++)
      $display("%6d  %24d  %27d", CP[c], det_m[c], det_t[c]);
    $display("aliasing events: %0d (MISR per loop), %0d (transparent MISR)", alias_m, alias_t);
    expect_true(never_m == 0, "every fault detected at some length, MISR per loop");
    expect_true(never_t == 0, "every fault detected at some length, transparent MISR");
    for (int c = 0; c < NCP; c++) begin
      expect_true(det_m[c] >= NFAULT - 2, $sformatf("coverage after %0d clocks, MISR per loop", CP[c]));
      expect_true(det_t[c] >= NFAULT - 2, $sformatf("coverage after %0d clocks, transparent MISR", CP[c]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
