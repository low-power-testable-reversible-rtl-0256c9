// Test of the testable Fredkin master-slave D flip-flop.
// Normal mode (C1 = 1, C2 = 0): over many clock cycles with D changed at
// random in both clock phases, Q must equal the value D had at the last
// rising edge, be valid 1 time unit after that edge (no extra cycle of
// latency), stay put while D moves in either phase and at the falling edge,
// and QN must be ~Q. Test mode: every output, garbage included, is 0 for the
// all-0 vector and 1 for the all-1 vector.
module tb_fredkin_ms_dff;
  import rev_pkg::*;
  logic d, clk, c1, c2, q, qn;
  logic [5:0] g;
  logic ref_q;
  int checks = 0, failures = 0;
  int n_capture_change = 0, n_hold_high = 0;

  fredkin_ms_dff dut (.d(d), .clk(clk), .c1(c1), .c2(c2), .q(q), .qn(qn), .garbage(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s at %0t: got %b expected %b", what, $time, got, exp);
    end
  endtask

  // One clock cycle: low phase 5, high phase 5, D changed inside each phase.
  task automatic cycles(input int n);
    {c1, c2} = MODE_NORMAL;
    for (int i = 0; i < n; i++) begin
      clk = 1'b0;
      #2 d = 1'($urandom);
      #3 clk = 1'b1;
      if (d != ref_q) n_capture_change++;
      ref_q = d;
      #1;
      check(q, ref_q, "q after rising edge");
      check(qn, !ref_q, "qn after rising edge");
      d = !d;           // D moves while the clock is high
      n_hold_high++;
      #2;
      check(q, ref_q, "q holds while clk high");
      #2 clk = 1'b0;
      #1;
      check(q, ref_q, "q holds after falling edge");
      clk = 1'b0;
      #1;
    end
  endtask

  task automatic two_vector_test();
    {d, clk, c1, c2} = 4'b0000;
    #1;
    check(|{q, qn, g}, 1'b0, "all-0 vector");
    {d, clk, c1, c2} = 4'b1111;
    #1;
    check(&{q, qn, g}, 1'b1, "all-1 vector");
    {d, clk, c1, c2} = 4'b0010;
    #1;
  endtask

  initial begin
    d = 1'b0;
    clk = 1'b0;
    ref_q = 1'b0;
    cycles(200);
    two_vector_test();
    cycles(50);
    two_vector_test();
    cycles(20);
    checks++;
    if (n_capture_change == 0 || n_hold_high == 0) begin
      failures++;
      $display("FAIL coverage");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
