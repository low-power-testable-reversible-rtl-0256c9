// Feynman (controlled-NOT) gate, the 2x2 reversible gate P = A, Q = A ^ B.
// With B = 0 it copies A onto Q (reversible fan-out); with B = 1 it gives the
// complement of A. Purely combinational; 1-bit ports.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
