// Testable D latch made of two MX-CQCA gates.
// Gate 1 (A = stored state, B = E, C = D) is the storage multiplexer: its Q
// output is E ? D : state. Gate 2 (A = C1, B = Qm, C = C2) fans the value out:
// with C1 = 1, C2 = 0 its P output (C1 AND Qm) is the copy fed back to gate 1,
// its Q output is Q' and its R output (Qm OR C2) is the latch output Q. The
// storage is the stable loop through the two gates, the intended
// combinational loop that lint tools report for this module.
// Testing: with C1 = C2 = 0 the feedback is forced to 0 and with C1 = C2 = 1
// the latch loads D, so when every input is 0 (or 1) every output, the two
// garbage outputs of gate 1 (fb AND E, E OR D) included, is 0 (or 1).
// Interface: d, e (active high), c1, c2 in; q, qn, garbage[1:0] =
// {gate-1 P, gate-1 R} out. Level-sensitive, no clock and no reset.
// The MX-CQCA gate and its use as a latch multiplexer follow the design; the
// arrangement of the two gates and the C1/C2 encoding are this design's own.
module mx_cqca_d_latch (
  input  logic       d,
  input  logic       e,
  input  logic       c1,
  input  logic       c2,
  output logic       q,
  output logic       qn,
  output logic [1:0] garbage
);
  logic qm;   // multiplexer output, the latch value
  logic fb;   // copy fed back into the multiplexer

  mx_cqca_gate u_mux    (.a(fb), .b(e),  .c(d),  .p(garbage[1]), .q(qm), .r(garbage[0]));
  mx_cqca_gate u_fanout (.a(c1), .b(qm), .c(c2), .p(fb),         .q(qn), .r(q));
endmodule
