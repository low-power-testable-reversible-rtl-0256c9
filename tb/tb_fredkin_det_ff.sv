// Test of the testable Fredkin double-edge-triggered D flip-flop.
// Normal mode (C1 = 1, C2 = 0): Q must take the value D has at every rising
// and every falling clock edge, be valid 1 time unit after the edge, and hold
// while D moves between edges, so two data bits pass per clock cycle. Test
// mode: every output, garbage included, is 0 for the all-0 vector and 1 for
// the all-1 vector.
module tb_fredkin_det_ff;
  import rev_pkg::*;
  logic d, clk, c1, c2, q;
  logic [10:0] g;
  logic ref_q;
  int checks = 0, failures = 0;
  int n_rise = 0, n_fall = 0;

  fredkin_det_ff dut (.d(d), .clk(clk), .c1(c1), .c2(c2), .q(q), .garbage(g));

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

  // One phase: set D, move the clock edge, check, then disturb D.
  task automatic half_cycle(input logic level);
    #2 d = 1'($urandom);
    #3 clk = level;
    if (d != ref_q) begin
      if (level) n_rise++; else n_fall++;
    end
    ref_q = d;
    #1;
    check(q, ref_q, level ? "q after rising edge" : "q after falling edge");
    d = !d;
    #2;
    check(q, ref_q, "q holds between edges");
  endtask

  task automatic cycles(input int n);
    {c1, c2} = MODE_NORMAL;
    for (int i = 0; i < n; i++) begin
      half_cycle(1'b1);
      half_cycle(1'b0);
    end
  endtask

  task automatic two_vector_test();
    {d, clk, c1, c2} = 4'b0000;
    #1;
    check(|{q, g}, 1'b0, "all-0 vector");
    {d, clk, c1, c2} = 4'b1111;
    #1;
    check(&{q, g}, 1'b1, "all-1 vector");
    {d, clk, c1, c2} = 4'b0010;
    #1;
  endtask

  initial begin
    d = 1'b0;
    clk = 1'b0;
    ref_q = 1'b0;
    {c1, c2} = MODE_NORMAL;
    #5;
    cycles(200);
    two_vector_test();
    cycles(50);
    two_vector_test();
    cycles(20);
    checks++;
    if (n_rise == 0 || n_fall == 0) begin
      failures++;
      $display("FAIL coverage rise=%0d fall=%0d", n_rise, n_fall);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
