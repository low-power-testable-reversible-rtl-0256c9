// Three-input majority voter, the basic device of quantum-dot cellular
// automata (QCA): y = ab + bc + ac. Tying one input to 0 turns it into a
// two-input AND, tying it to 1 into a two-input OR. Every gate of this design
// is written as a network of these voters, so the voter count that the gate
// comparison rests on stays visible in the RTL.
// Interface: three 1-bit inputs, one 1-bit output. Purely combinational.
module majority_voter (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (b & c) | (a & c);
endmodule
