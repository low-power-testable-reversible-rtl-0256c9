// MX-CQCA gate: a 3-input, 3-output conservative gate (the number of ones at
// the outputs always equals the number at the inputs) that is not reversible.
//   P = A & B          (AND)
//   Q = B ? C : A      (2:1 multiplexer, B selects) = A.B' + B.C
//   R = B | C          (OR)
// The Q output is what makes the gate useful for sequential circuits: with B
// as enable, A as the fed-back state and C as data it is a latch multiplexer.
// The gate is built, as the QCA realisation it models, from five majority
// voters in two levels (against six for a Fredkin gate):
//   P = M(A,B,0)   R = M(B,C,1)   t1 = M(A,B',0)   t2 = M(B,C,0)
//   Q = M(t1,t2,1)
// The equations and the count of five voters follow the gate's definition; the
// particular way the five voters are arranged is this design's own.
// Purely combinational; the QCA clocking zones have no counterpart here.
module mx_cqca_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  logic t1, t2;

  majority_voter u_p  (.a(a),  .b(b),  .c(1'b0), .y(p));
  majority_voter u_r  (.a(b),  .b(c),  .c(1'b1), .y(r));
  majority_voter u_t1 (.a(a),  .b(~b), .c(1'b0), .y(t1));
  majority_voter u_t2 (.a(b),  .b(c),  .c(1'b0), .y(t2));
  majority_voter u_q  (.a(t1), .b(t2), .c(1'b1), .y(q));
endmodule
