// End-to-end test of the top level at its default configuration.
//  1. Normal operation (C1 = 1, C2 = 0): a random D/EN stream with a running
//     clock; both latches, the master-slave flip-flop (rising edge) and the
//     double-edge flip-flop are checked against reference models after every
//     edge and every input change.
//  2. The two-vector test: all inputs 0 must give all 28 outputs 0, all
//     inputs 1 must give all outputs 1.
//  3. Stuck-at faults are forced, one at a time, onto internal lines of each
//     circuit; the two-vector test must flag every one of them.
//  4. The gate bank is checked exhaustively against the gate equations.
// Every mechanism (latch transparent/hold, rising-edge capture, hold at the
// falling edge, double-edge capture on both edges, both test vectors, fault
// detection, Fredkin swap, MX-CQCA select) is counted; one that never
// happened counts as a failure.
module tb_testable_seq_top;
  import rev_pkg::*;
  logic d, en, clk, c1, c2;
  logic latch_fr_q, latch_mx_q, msff_q, detff_q;
  logic [27:0] test_outputs;
  logic [2:0]  gate_in;
  logic [11:0] gate_out;

  logic ref_latch, ref_ms, ref_det, latch_valid;
  int checks = 0, failures = 0;
  int n_latch_transparent = 0, n_latch_hold = 0;
  int n_ms_capture = 0, n_ms_hold = 0;
  int n_det_rise = 0, n_det_fall = 0;
  int n_test_zeros = 0, n_test_ones = 0;
  int n_faults_detected = 0;
  int n_fredkin_swap = 0, n_mx_select_c = 0;

  testable_seq_top dut (.*);

  initial begin
    #1000000;
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

  task automatic check_all();
    if (latch_valid) begin
      check(latch_fr_q, ref_latch, "fredkin latch q");
      check(latch_mx_q, ref_latch, "mx-cqca latch q");
    end
    check(msff_q, ref_ms, "master-slave q");
    check(detff_q, ref_det, "det q");
  endtask

  // One clock phase: edge with D stable, then a change of D and EN.
  task automatic half_cycle(input logic level);
    clk = level;
    if (level) begin
      if (d != ref_ms) n_ms_capture++;
      ref_ms = d;
    end else begin
      n_ms_hold++;
    end
    if (d != ref_det) begin
      if (level) n_det_rise++; else n_det_fall++;
    end
    ref_det = d;
    #1 check_all();
    d  = 1'($urandom);
    en = 1'($urandom);
    if (en) begin
      ref_latch   = d;
      latch_valid = 1'b1;
      n_latch_transparent++;
    end else begin
      n_latch_hold++;
    end
    #1 check_all();
    #3;
  endtask

  task automatic run_normal(input int cycles);
    {c1, c2} = MODE_NORMAL;
    for (int i = 0; i < cycles; i++) begin
      half_cycle(1'b1);
      half_cycle(1'b0);
    end
  endtask

  // Returns 1 when either test vector shows a wrong output.
  task automatic two_vector_test(output logic flagged);
    flagged = 1'b0;
    {d, en, clk, c1, c2} = 5'b00000;
    #1;
    if (test_outputs !== '0) flagged = 1'b1;
    {d, en, clk, c1, c2} = 5'b11111;
    #1;
    if (test_outputs !== '1) flagged = 1'b1;
  endtask

  // Leave test mode with D = 0 and the clock low; the stored values are
  // reloaded before they are checked again.
  task automatic back_to_normal();
    {c1, c2} = MODE_NORMAL;
    clk = 1'b0;
    en  = 1'b0;
    d   = 1'b0;
    #1;
    latch_valid = 1'b0;
    // one full cycle loads known values into both flip-flops
    clk = 1'b1; #5 clk = 1'b0; #5;
    ref_ms  = d;
    ref_det = d;
  endtask

  task automatic fault_case(input int idx, input string name);
    logic flagged;
    two_vector_test(flagged);
    checks++;
    if (!flagged) begin
      failures++;
      $display("FAIL fault %0d (%s) not detected", idx, name);
    end else begin
      n_faults_detected++;
    end
  endtask

  initial begin
    logic flagged;
    logic [2:0] exp_fr, exp_mx, exp_tf;
    d = 1'b0; en = 1'b0; clk = 1'b0;
    {c1, c2} = MODE_NORMAL;
    latch_valid = 1'b0;
    ref_latch = 1'b0;
    #5;
    clk = 1'b1; #5 clk = 1'b0; #5;
    ref_ms = 1'b0;
    ref_det = 1'b0;

    // 1. normal operation
    run_normal(300);

    // 2. fault-free two-vector test
    {d, en, clk, c1, c2} = 5'b00000;
    #1;
    checks++;
    if (test_outputs !== '0) begin
      failures++; $display("FAIL all-0 vector: %b", test_outputs);
    end else n_test_zeros++;
    {d, en, clk, c1, c2} = 5'b11111;
    #1;
    checks++;
    if (test_outputs !== '1) begin
      failures++; $display("FAIL all-1 vector: %b", test_outputs);
    end else n_test_ones++;
    back_to_normal();
    run_normal(50);

    // 3. single stuck-at faults on internal lines
    force dut.u_latch_fr.fb = 1'b1;
    fault_case(0, "fredkin latch feedback stuck-at-1");
    release dut.u_latch_fr.fb;
    force dut.u_latch_fr.qm = 1'b0;
    fault_case(1, "fredkin latch mux output stuck-at-0");
    release dut.u_latch_fr.qm;
    force dut.u_latch_mx.fb = 1'b1;
    fault_case(2, "mx-cqca latch feedback stuck-at-1");
    release dut.u_latch_mx.fb;
    force dut.u_latch_mx.u_mux.t1 = 1'b1;
    fault_case(3, "mx-cqca latch multiplexer AND term stuck-at-1");
    release dut.u_latch_mx.u_mux.t1;
    force dut.u_msff.qm = 1'b0;
    fault_case(4, "master output stuck-at-0");
    release dut.u_msff.qm;
    force dut.u_msff.clk_s = 1'b1;
    fault_case(5, "slave clock copy stuck-at-1");
    release dut.u_msff.clk_s;
    force dut.u_detff.clk_hi = 1'b1;
    fault_case(6, "det high-latch clock stuck-at-1");
    release dut.u_detff.clk_hi;
    force dut.u_detff.q_lo = 1'b0;
    fault_case(7, "det low-latch output stuck-at-0");
    release dut.u_detff.q_lo;
    force dut.u_detff.d_lo = 1'b1;
    fault_case(8, "det data copy stuck-at-1");
    release dut.u_detff.d_lo;
    back_to_normal();
    // fault-free again: the test must pass
    two_vector_test(flagged);
    checks++;
    if (flagged) begin
      failures++; $display("FAIL fault-free circuit flagged");
    end else begin
      n_test_zeros++;
      n_test_ones++;
    end
    back_to_normal();
    run_normal(50);

    // 4. gate bank
    for (int v = 0; v < 8; v++) begin
      gate_in = 3'(v);
      #1;
      exp_fr = gate_in[2] ? {gate_in[2], gate_in[0], gate_in[1]} : gate_in;
      exp_mx = {gate_in[2] & gate_in[1],
                gate_in[1] ? gate_in[0] : gate_in[2],
                gate_in[1] | gate_in[0]};
      exp_tf = {gate_in[2], gate_in[1], (gate_in[2] & gate_in[1]) ^ gate_in[0]};
      checks++;
      if (gate_out !== {exp_fr, exp_mx, exp_tf,
                        gate_in[2], gate_in[2] ^ gate_in[1], !gate_in[0]}) begin
        failures++;
        $display("FAIL gate bank in=%b out=%b", gate_in, gate_out);
      end
      if (gate_in[2]) n_fredkin_swap++;
      if (gate_in[1]) n_mx_select_c++;
    end

    $display("mechanisms: latch transparent %0d hold %0d, ms capture %0d hold %0d,",
             n_latch_transparent, n_latch_hold, n_ms_capture, n_ms_hold);
    $display("  det rise %0d fall %0d, test zeros %0d ones %0d, faults detected %0d,",
             n_det_rise, n_det_fall, n_test_zeros, n_test_ones, n_faults_detected);
    $display("  fredkin swap %0d, mx-cqca select %0d", n_fredkin_swap, n_mx_select_c);
    checks++;
    if (n_latch_transparent == 0 || n_latch_hold == 0 || n_ms_capture == 0 ||
        n_ms_hold == 0 || n_det_rise == 0 || n_det_fall == 0 || n_test_zeros == 0 ||
        n_test_ones == 0 || n_faults_detected == 0 || n_fredkin_swap == 0 ||
        n_mx_select_c == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
