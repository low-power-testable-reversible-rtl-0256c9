// Test of the testable MX-CQCA D latch.
// Normal mode (C1 = 1, C2 = 0): random D/E sequences against a reference
// latch (Q follows D while E = 1, holds while E = 0, QN = ~Q, garbage =
// {Q AND E, E OR D}). Test mode: every output 0 for the all-0 vector and 1
// for the all-1 vector, from either stored value.
module tb_mx_cqca_d_latch;
  import rev_pkg::*;
  logic d, e, c1, c2, q, qn;
  logic [1:0] g;
  logic ref_q, valid;
  int checks = 0, failures = 0;
  int n_transparent = 0, n_hold = 0;

  mx_cqca_d_latch dut (.d(d), .e(e), .c1(c1), .c2(c2), .q(q), .qn(qn), .garbage(g));

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
      $display("FAIL %s: got %b expected %b (d=%b e=%b c1c2=%b%b)", what, got, exp, d, e, c1, c2);
    end
  endtask

  task automatic normal_steps(input int n);
    {c1, c2} = MODE_NORMAL;
    for (int i = 0; i < n; i++) begin
      d = 1'($urandom);
      e = 1'($urandom);
      #1;
      if (e) begin ref_q = d; valid = 1'b1; n_transparent++; end else n_hold++;
      if (valid) begin
        check(q, ref_q, "q");
        check(qn, !ref_q, "qn");
        check(g[1], ref_q & e, "garbage P");
      end
      check(g[0], e | d, "garbage R");
    end
  endtask

  task automatic two_vector_test();
    {d, e, c1, c2} = 4'b0000;
    #1;
    check(|{q, qn, g}, 1'b0, "all-0 vector");
    {d, e, c1, c2} = 4'b1111;
    #1;
    check(&{q, qn, g}, 1'b1, "all-1 vector");
    valid = 1'b0;
  endtask

  initial begin
    valid = 1'b0;
    normal_steps(200);
    two_vector_test();
    normal_steps(50);
    {c1, c2} = MODE_NORMAL;
    d = 1'b1; e = 1'b1; #1; e = 1'b0; #1;
    check(q, 1'b1, "holds 1");
    two_vector_test();
    normal_steps(50);
    checks++;
    if (n_transparent == 0 || n_hold == 0) begin
      failures++;
      $display("FAIL coverage transparent=%0d hold=%0d", n_transparent, n_hold);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
