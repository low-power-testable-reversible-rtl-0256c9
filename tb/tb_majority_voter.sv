// Exhaustive test of the majority voter against a popcount reference:
// y must be 1 exactly when at least two of the three inputs are 1.
module tb_majority_voter;
  logic a, b, c, y;
  int checks = 0, failures = 0;

  majority_voter dut (.a(a), .b(b), .c(c), .y(y));

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
      if (y !== ($countones(3'(v)) >= 2)) begin
        failures++;
        $display("FAIL abc=%b y=%b", 3'(v), y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
