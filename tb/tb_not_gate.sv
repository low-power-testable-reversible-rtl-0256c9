// Test of the NOT gate for both input values.
module tb_not_gate;
  logic a, y;
  int checks = 0, failures = 0;

  not_gate dut (.a(a), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0; #1;
    checks++; if (y !== 1'b1) begin failures++; $display("FAIL a=0 y=%b", y); end
    a = 1'b1; #1;
    checks++; if (y !== 1'b0) begin failures++; $display("FAIL a=1 y=%b", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
