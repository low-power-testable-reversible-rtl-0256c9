// Top level of the conservative-logic testable sequential circuits.
// Side by side it holds the four sequential circuits of the design, all built
// from conservative gates so that two test vectors (all inputs 0, all inputs
// 1) detect any unidirectional stuck-at fault:
//   - a testable D latch of two Fredkin gates,
//   - a testable D latch of two MX-CQCA gates,
//   - a Fredkin master-slave D flip-flop (rising edge),
//   - a Fredkin double-edge-triggered D flip-flop,
// and, with ports of their own, the gates they and the surrounding reversible
// logic are made of: Fredkin, MX-CQCA, Feynman, Toffoli and NOT.
// The sequential circuits share D and the test controls C1/C2 so that one
// test pass covers all of them; both latches use en, both flip-flops clk.
// test_outputs carries every output of the four circuits, garbage included:
// in normal mode (C1 = 1, C2 = 0) it is informational; with every input at 0
// it must read all zeros, with every input at 1 all ones.
// Sharing D and C1/C2 here is this design's choice; the blocks follow the
// design as described in their own files. No clock domain of its own, no
// reset: the latches and flip-flops start from whatever they hold.
module testable_seq_top (
  input  logic        d,
  input  logic        en,
  input  logic        clk,
  input  logic        c1,
  input  logic        c2,
  output logic        latch_fr_q,
  output logic        latch_mx_q,
  output logic        msff_q,
  output logic        detff_q,
  // {fredkin latch q,qn,garbage[1:0]; mx-cqca latch q,qn,garbage[1:0];
  //  ms flip-flop q,qn,garbage[5:0]; det flip-flop q,garbage[10:0]}
  output logic [27:0] test_outputs,
  input  logic [2:0]  gate_in,     // {A, B, C}
  // {fredkin P,Q,R; mx-cqca P,Q,R; toffoli P,Q,R; feynman P,Q (A,B); not(C)}
  output logic [11:0] gate_out
);
  logic       fr_qn, mx_qn, ms_qn;
  logic [1:0] fr_g, mx_g;
  logic [5:0] ms_g;
  logic [10:0] det_g;

  fredkin_d_latch u_latch_fr (
    .d(d), .e(en), .c1(c1), .c2(c2), .q(latch_fr_q), .qn(fr_qn), .garbage(fr_g)
  );
  mx_cqca_d_latch u_latch_mx (
    .d(d), .e(en), .c1(c1), .c2(c2), .q(latch_mx_q), .qn(mx_qn), .garbage(mx_g)
  );
  fredkin_ms_dff u_msff (
    .d(d), .clk(clk), .c1(c1), .c2(c2), .q(msff_q), .qn(ms_qn), .garbage(ms_g)
  );
  fredkin_det_ff u_detff (
    .d(d), .clk(clk), .c1(c1), .c2(c2), .q(detff_q), .garbage(det_g)
  );

  assign test_outputs = {latch_fr_q, fr_qn, fr_g,
                         latch_mx_q, mx_qn, mx_g,
                         msff_q, ms_qn, ms_g,
                         detff_q, det_g};

  // Gate bank
  fredkin_gate u_fredkin (.a(gate_in[2]), .b(gate_in[1]), .c(gate_in[0]),
                          .p(gate_out[11]), .q(gate_out[10]), .r(gate_out[9]));
  mx_cqca_gate u_mx_cqca (.a(gate_in[2]), .b(gate_in[1]), .c(gate_in[0]),
                          .p(gate_out[8]), .q(gate_out[7]), .r(gate_out[6]));
  toffoli_gate u_toffoli (.a(gate_in[2]), .b(gate_in[1]), .c(gate_in[0]),
                          .p(gate_out[5]), .q(gate_out[4]), .r(gate_out[3]));
  feynman_gate u_feynman (.a(gate_in[2]), .b(gate_in[1]),
                          .p(gate_out[2]), .q(gate_out[1]));
  not_gate     u_not     (.a(gate_in[0]), .y(gate_out[0]));
endmodule
