// xor2_tb - exhaustive self-check of the majority-built XOR.
//
// Applies the four input patterns and compares y with a reference that is 1
// exactly when the two inputs differ. A watchdog ends the run with a failure
// if the stimulus does not complete.
module xor2_tb;

  logic a, b, y;
  int   checks = 0;
  int   failures = 0;

  xor2 dut (.a(a), .b(b), .y(y));

  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v);
      #1;
      checks++;
      if (y !== (a != b)) begin
        failures++;
        $display("FAIL xor2 a=%0b b=%0b y=%0b", a, b, y);
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
