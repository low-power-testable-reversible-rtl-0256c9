// Exhaustive test of the Fredkin gate: P = A and B, C swapped when A = 1,
// checked per input, plus the conservative property (equal popcount) and
// reversibility (all eight output patterns distinct). Includes the point
// a=1, b=0, c=1 -> p=1, q=1, r=0.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2:0] exp;
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      exp = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== exp) begin
        failures++;
        $display("FAIL abc=%b pqr=%b expected %b", 3'(v), {p, q, r}, exp);
      end
      checks++;
      if ($countones({p, q, r}) != $countones(3'(v))) begin
        failures++;
        $display("FAIL not conservative at abc=%b", 3'(v));
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL not reversible, outputs seen %b", seen);
    end
    {a, b, c} = 3'b101;
    #1;
    checks++;
    if ({p, q, r} !== 3'b110) begin
      failures++;
      $display("FAIL a=1 b=0 c=1 gives pqr=%b", {p, q, r});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
