// Exhaustive test of the MX-CQCA gate against its published truth table
// (written out below as {P,Q,R} per input ABC), plus the conservative
// property: as many ones at the outputs as at the inputs.
module tb_mx_cqca_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  // Truth table, index = {A,B,C}, value = {P,Q,R}
  localparam logic [2:0] TABLE [8] = '{3'b000, 3'b001, 3'b001, 3'b011,
                                       3'b010, 3'b011, 3'b101, 3'b111};

  mx_cqca_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== TABLE[v]) begin
        failures++;
        $display("FAIL abc=%b pqr=%b expected %b", 3'(v), {p, q, r}, TABLE[v]);
      end
      checks++;
      if ($countones({p, q, r}) != $countones(3'(v))) begin
        failures++;
        $display("FAIL not conservative at abc=%b", 3'(v));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
