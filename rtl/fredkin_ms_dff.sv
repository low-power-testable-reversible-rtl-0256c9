// Testable reversible master-slave D flip-flop made of Fredkin gates.
// A Fredkin fan-out gate (A = CLK, B = C1, C = C2) gives two copies of the
// clock (its P and, in normal mode, its R output). The master is a testable
// Fredkin latch transparent while CLK = 0; the slave, fed by the master's Q,
// is one transparent while CLK = 1. Q therefore takes the value D had just
// before the rising clock edge and holds it for the whole cycle.
// Testing: C1 and C2 go to all three gates' controls. With every input
// (D, CLK, C1, C2) at 0, or every input at 1, every output and every garbage
// output is 0, or 1.
// Interface: d, clk, c1, c2 in; q, qn (Q' in normal mode) and garbage[5:0] =
// {clock fan-out Q, master Q', master gate-1 P and R, slave gate-1 P and R}.
// Timing: rising-edge triggered; D must be stable around the rising edge
// because the master closes as the slave opens. No reset.
// The master-slave structure from Fredkin latches follows the design; the
// edge, the clock fan-out gate and sharing C1/C2 are this design's choices.
module fredkin_ms_dff (
  input  logic       d,
  input  logic       clk,
  input  logic       c1,
  input  logic       c2,
  output logic       q,
  output logic       qn,
  output logic [5:0] garbage
);
  logic clk_m, clk_s;   // clock copies for master and slave
  logic qm;             // master output

  fredkin_gate u_clk_fanout (.a(clk), .b(c1), .c(c2), .p(clk_m), .q(garbage[5]), .r(clk_s));

  fredkin_d_latch #(.ACTIVE_LOW(1'b1)) u_master (
    .d(d), .e(clk_m), .c1(c1), .c2(c2),
    .q(qm), .qn(garbage[4]), .garbage(garbage[3:2])
  );

  fredkin_d_latch #(.ACTIVE_LOW(1'b0)) u_slave (
    .d(qm), .e(clk_s), .c1(c1), .c2(c2),
    .q(q), .qn(qn), .garbage(garbage[1:0])
  );
endmodule
