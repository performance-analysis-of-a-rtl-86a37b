// fg_gate_tb - exhaustive self-check of the Feynman (CNOT) gate.
//
// For each of the four inputs it checks p = a and q = a xor b against a
// reference that inverts b when a is 1, then checks that the four outputs are
// all different (the gate is reversible) and that applying the gate twice
// returns the original inputs (it is its own inverse). Also checks the copy
// mode, b = 0, used for fan-out. A watchdog ends a stuck run with a failure.
module fg_gate_tb;

  logic a, b, p, q;
  logic a2, b2, p2, q2;
  int   checks = 0;
  int   failures = 0;
  bit   seen [4];

  fg_gate dut  (.a(a),  .b(b),  .p(p),  .q(q));
  fg_gate dut2 (.a(a2), .b(b2), .p(p2), .q(q2));

  always_comb begin
    a2 = p;
    b2 = q;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL fg_gate %s a=%0b b=%0b p=%0b q=%0b", what, a, b, p, q);
    end
  endtask

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 4; v++) begin
      logic exp_q;
      {a, b} = 2'(v);
      #1;
      exp_q = a ? ~b : b;
      check(p === a, "control output");
      check(q === exp_q, "target output");
      check(!seen[{p, q}], "reversibility");
      seen[{p, q}] = 1'b1;
      check({p2, q2} === {a, b}, "self inverse");
      if (!b) check(q === a, "copy mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
