// Testable reversible double-edge-triggered (DET) D flip-flop made of Fredkin
// gates. D is fanned out to two testable latches: one transparent while
// CLK = 1, the other while CLK = 0. A Fredkin gate with CLK as its control
// selects, as output Q, whichever latch is closed: CLK ? (CLK-low latch) :
// (CLK-high latch). The closed latch holds the value D had at the last clock
// edge, so Q takes D at both the rising and the falling edge, doubling the
// data rate for a given clock frequency.
// Fan-out: D gets one Fredkin fan-out gate (A = D, B = C1, C = C2; copies on
// P and R), CLK two in a chain, giving three clock copies.
// Testing: with every input (D, CLK, C1, C2) at 0, or every input at 1, every
// output and garbage output is 0, or 1.
// Interface: d, clk, c1, c2 in; q and the eleven garbage outputs listed at
// the port out. Timing: Q changes right after each clock edge (both edges);
// D must be stable around each edge. No reset.
// That a DET flip-flop is part of the design is given; its structure is this
// design's own.
module fredkin_det_ff (
  input  logic       d,
  input  logic       clk,
  input  logic       c1,
  input  logic       c2,
  output logic       q,
  // {D fan-out Q, clk fan-out 1 Q, clk fan-out 2 Q,
  //  high latch Q', high latch gate-1 P, high latch gate-1 R,
  //  low latch Q',  low latch gate-1 P,  low latch gate-1 R,
  //  output gate P, output gate R}
  output logic [10:0] garbage
);
  logic d_hi, d_lo;               // data copies
  logic clk_a, clk_b, clk_hi, clk_lo;  // clock copies
  logic q_hi, q_lo;               // latch outputs

  fredkin_gate u_d_fanout    (.a(d),     .b(c1), .c(c2), .p(d_hi),   .q(garbage[10]), .r(d_lo));
  fredkin_gate u_clk_fanout1 (.a(clk),   .b(c1), .c(c2), .p(clk_a),  .q(garbage[9]), .r(clk_b));
  fredkin_gate u_clk_fanout2 (.a(clk_b), .b(c1), .c(c2), .p(clk_hi), .q(garbage[8]), .r(clk_lo));

  fredkin_d_latch #(.ACTIVE_LOW(1'b0)) u_latch_hi (
    .d(d_hi), .e(clk_hi), .c1(c1), .c2(c2),
    .q(q_hi), .qn(garbage[7]), .garbage(garbage[6:5])
  );
  fredkin_d_latch #(.ACTIVE_LOW(1'b1)) u_latch_lo (
    .d(d_lo), .e(clk_lo), .c1(c1), .c2(c2),
    .q(q_lo), .qn(garbage[4]), .garbage(garbage[3:2])
  );

  // Q = clk ? q_lo : q_hi ; P is the clock copy passing through.
  fredkin_gate u_out_mux (.a(clk_a), .b(q_hi), .c(q_lo), .p(garbage[1]), .q(q), .r(garbage[0]));
endmodule
