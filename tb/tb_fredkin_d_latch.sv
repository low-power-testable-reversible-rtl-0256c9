// Test of the testable Fredkin D latch in both enable polarities.
// Normal mode (C1 = 1, C2 = 0): random D/E sequences are checked against a
// reference latch (Q follows D while enabled and holds otherwise, QN = ~Q,
// garbage = {E, D}). Test mode: with every input 0 every output must be 0,
// with every input 1 every output must be 1, from either stored value.
module tb_fredkin_d_latch;
  import rev_pkg::*;
  logic d, e, c1, c2;
  logic q_h, qn_h, q_l, qn_l;
  logic [1:0] g_h, g_l;
  logic ref_h, ref_l, valid_h, valid_l;
  int checks = 0, failures = 0;
  int n_transparent = 0, n_hold = 0;

  fredkin_d_latch #(.ACTIVE_LOW(1'b0)) dut_h (
    .d(d), .e(e), .c1(c1), .c2(c2), .q(q_h), .qn(qn_h), .garbage(g_h));
  fredkin_d_latch #(.ACTIVE_LOW(1'b1)) dut_l (
    .d(d), .e(e), .c1(c1), .c2(c2), .q(q_l), .qn(qn_l), .garbage(g_l));

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
      if (e)  begin ref_h = d; valid_h = 1'b1; n_transparent++; end else n_hold++;
      if (!e) begin ref_l = d; valid_l = 1'b1; end
      if (valid_h) begin
        check(q_h, ref_h, "active-high q");
        check(qn_h, !ref_h, "active-high qn");
      end
      if (valid_l) begin
        check(q_l, ref_l, "active-low q");
        check(qn_l, !ref_l, "active-low qn");
      end
      check(g_h[1], e, "active-high garbage P");
      check(g_h[0], d, "active-high garbage R");
      check(g_l[1], e, "active-low garbage P");
      check(g_l[0], d, "active-low garbage R");
    end
  endtask

  task automatic two_vector_test();
    {d, e, c1, c2} = 4'b0000;
    #1;
    check(|{q_h, qn_h, g_h, q_l, qn_l, g_l}, 1'b0, "all-0 vector");
    {d, e, c1, c2} = 4'b1111;
    #1;
    check(&{q_h, qn_h, g_h, q_l, qn_l, g_l}, 1'b1, "all-1 vector");
    // stored values after the test are not relied on
    valid_h = 1'b0;
    valid_l = 1'b0;
  endtask

  initial begin
    valid_h = 1'b0;
    valid_l = 1'b0;
    d = 1'b0; e = 1'b0;
    normal_steps(200);
    two_vector_test();
    normal_steps(50);
    // force both stored values to 1, then test again
    {c1, c2} = MODE_NORMAL;
    d = 1'b1; e = 1'b1; #1; e = 1'b0; #1;
    check(q_h, 1'b1, "active-high holds 1");
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
