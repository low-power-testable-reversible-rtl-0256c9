// Testable reversible D latch made of two Fredkin gates.
// Gate 1 (A = E) is the storage multiplexer: its Q output is E ? D : state
// (or, with ACTIVE_LOW = 1, E ? state : D). Gate 2 (A = Qm, B = C1, C = C2)
// fans the multiplexer output out: P is the latch output Q, and with C1 = 1,
// C2 = 0 its Q output is Q' and its R output is a copy of Q that is fed back
// to gate 1 as the stored state. The storage is therefore the loop through the
// two gates, as in any gate-level latch; the loop is stable (it re-drives the
// value it holds) and is the intended combinational loop that lint tools
// report for this module.
// Testing: with C1 = C2 = 0 the feedback is forced to 0 and with C1 = C2 = 1
// to 1, so when every input is 0 (or 1) every output, the two garbage outputs
// of gate 1 included, is 0 (or 1). Both gates are conservative, so a single
// stuck-at-0 or stuck-at-1 fault breaks this pattern.
// Interface: d, e, c1, c2 in; q, qn and garbage[1:0] = {gate-1 P, gate-1 R}
// out. Level-sensitive, no clock and no reset; the output follows D without
// delay while enabled.
// The use of two Fredkin gates with test controls C1/C2 follows the testable
// latch of the design; the C1/C2 encoding and the ACTIVE_LOW variant (used by
// the flip-flops) are this design's choices.
module fredkin_d_latch #(
  parameter bit ACTIVE_LOW = 1'b0  // 1: transparent while e = 0
) (
  input  logic       d,
  input  logic       e,
  input  logic       c1,
  input  logic       c2,
  output logic       q,
  output logic       qn,
  output logic [1:0] garbage
);
  logic qm;   // multiplexer output, the latch value
  logic fb;   // copy of the latch value fed back into the multiplexer
  logic b_in, c_in;

  // Gate 1 selects C when A = 1: put D there for an active-high enable.
  assign b_in = ACTIVE_LOW ? d  : fb;
  assign c_in = ACTIVE_LOW ? fb : d;

  fredkin_gate u_mux    (.a(e),  .b(b_in), .c(c_in), .p(garbage[1]), .q(qm), .r(garbage[0]));
  fredkin_gate u_fanout (.a(qm), .b(c1),   .c(c2),   .p(q),          .q(qn), .r(fb));
endmodule
