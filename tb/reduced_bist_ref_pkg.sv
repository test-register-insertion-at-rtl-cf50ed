// reduced_bist_ref_pkg: clock-by-clock reference model of the example circuit
// (8-bit), written from its equations rather than from the RTL structure.
//
// step() takes the model state and the inputs present before a rising clock
// edge and returns the state after it. The polynomial x^8+x^6+x^5+x^4+1 and
// the seeds 8'h01 / 8'h80 are written out here.
package reduced_bist_ref_pkg;

  localparam logic [7:0] POLY = 8'hB8;

  typedef struct packed {
    logic [7:0] s1, s2;  // input generators
    logic [7:0] q2, q3;  // R2/T5, R3/T6
    logic [7:0] r7;      // added register of T7
    logic [7:0] sig;     // output analyser
  } ref_state_t;

  function automatic ref_state_t ref_reset();
    ref_state_t s = '0;
    s.s1 = 8'h01;
    s.s2 = 8'h80;
    return s;
  endfunction

  function automatic logic [7:0] misr_next(logic [7:0] state, logic [7:0] din);
    return din ^ {state[6:0], ^(state & POLY)};
  endfunction

  function automatic logic [7:0] rotl1(logic [7:0] v);
    return {v[6:0], v[7]};
  endfunction

  // transparent = 0: R2/R3 are MISRs; 1: one transparent MISR after CLB3.
  function automatic ref_state_t ref_step(ref_state_t s, bit transparent, bit test,
                                          logic [7:0] pi1, logic [7:0] pi2);
    ref_state_t n = s;
    logic [7:0] p1, p2, c1, c2, c3, r3d;
    p1  = test ? s.s1 : pi1;
    p2  = test ? s.s2 : pi2;
    c2  = p2 ^ rotl1(s.q3);
    c3  = 8'(s.q2 - c2);
    r3d = (transparent && test) ? s.r7 : c3;
    c1  = 8'(p1 + r3d);
    if (test) begin
      n.s1  = {s.s1[6:0], ^(s.s1 & POLY)};
      n.s2  = {s.s2[6:0], ^(s.s2 & POLY)};
      n.sig = misr_next(s.sig, s.q3);
    end
    if (transparent) begin
      n.q2 = c1;
      n.q3 = r3d;
      n.r7 = misr_next(s.r7, c3);
    end else begin
      n.q2 = test ? misr_next(s.q2, c1)  : c1;
      n.q3 = test ? misr_next(s.q3, r3d) : r3d;
    end
    return n;
  endfunction

endpackage
