// maj3_tb - exhaustive self-check of the three-input majority gate.
//
// Applies all eight input patterns and compares y with a reference that counts
// the ones among the inputs (majority means two or more), a formulation
// independent of the sum-of-products inside the module. A watchdog ends the
// run with a failure if the stimulus does not complete.
module maj3_tb;

  logic a, b, c, y;
  int   checks = 0;
  int   failures = 0;

  maj3 dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    for (int v = 0; v < 8; v++) begin
      int ones;
      {a, b, c} = 3'(v);
      #1;
      ones = int'(a) + int'(b) + int'(c);
      checks++;
      if (y !== (ones >= 2)) begin
        failures++;
        $display("FAIL maj3 a=%0b b=%0b c=%0b y=%0b", a, b, c, y);
      end
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
