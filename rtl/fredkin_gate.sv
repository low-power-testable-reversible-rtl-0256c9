// Fredkin gate: the 3x3 reversible and conservative controlled-swap gate.
//   P = A
//   Q = A ? C : B   = A'.B + A.C
//   R = A ? B : C   = A'.C + A.B
// With A = 0 the inputs B and C pass straight through; with A = 1 they are
// swapped. Q alone is a 2:1 multiplexer with A as select, which the latches of
// this design use as their storage multiplexer; with B and C tied to control
// lines the gate also makes copies (fan-out) of A.
// The gate is built from six majority voters in two levels, the QCA
// realisation it is compared with: four first-level AND voters
// M(A',B,0), M(A,C,0), M(A',C,0), M(A,B,0) and two second-level OR voters.
// The arrangement of the six voters is this design's own.
// Purely combinational.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  logic nab, ac, nac, ab;

  majority_voter u_nab (.a(~a), .b(b), .c(1'b0), .y(nab));
  majority_voter u_ac  (.a(a),  .b(c), .c(1'b0), .y(ac));
  majority_voter u_nac (.a(~a), .b(c), .c(1'b0), .y(nac));
  majority_voter u_ab  (.a(a),  .b(b), .c(1'b0), .y(ab));
  majority_voter u_q   (.a(nab), .b(ac), .c(1'b1), .y(q));
  majority_voter u_r   (.a(nac), .b(ab), .c(1'b1), .y(r));

  assign p = a;
endmodule
