// Toffoli gate, the 3x3 reversible gate P = A, Q = B, R = (A & B) ^ C.
// With C = 0 the R output is A AND B, with C = 1 it is NAND. Purely
// combinational; 1-bit ports.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
