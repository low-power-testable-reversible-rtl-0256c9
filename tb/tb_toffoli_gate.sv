// Exhaustive test of the Toffoli gate (P = A, Q = B, R = AB xor C) and of
// its reversibility (all eight output patterns distinct).
module tb_toffoli_gate;
  logic a, b, c, p, q, r;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  toffoli_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      // R flips C only when both controls are 1
      if ({p, q, r} !== {a, b, (a && b) ? !c : c}) begin
        failures++;
        $display("FAIL abc=%b pqr=%b", 3'(v), {p, q, r});
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL not reversible");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
