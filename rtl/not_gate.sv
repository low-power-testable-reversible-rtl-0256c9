// The 1x1 reversible NOT gate: y = ~a. Purely combinational.
module not_gate (
  input  logic a,
  output logic y
);
  assign y = ~a;
endmodule
