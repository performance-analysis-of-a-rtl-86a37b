// rqg_gate_tb - exhaustive self-check of the reversible RQG gate.
//
// The expected outputs come from the gate's published truth table, stored
// here row by row as {y1, y2, y3} indexed by {x1, x2, x3}. The test also
// checks that the eight outputs are all different (the gate is reversible).
// A watchdog ends a stuck run with a failure.
module rqg_gate_tb;

  logic x1, x2, x3, y1, y2, y3;
  int   checks = 0;
  int   failures = 0;
  bit   seen [8];

  // Truth table of the RQG gate, {y1, y2, y3} for {x1, x2, x3} = 0..7.
  localparam logic [2:0] TABLE [8] = '{
    3'b000, 3'b011, 3'b010, 3'b111, 3'b001, 3'b100, 3'b101, 3'b110
  };

  rqg_gate dut (.x1(x1), .x2(x2), .x3(x3), .y1(y1), .y2(y2), .y3(y3));

  initial begin
    foreach (seen[i]) seen[i] = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {x1, x2, x3} = 3'(v);
      #1;
      checks++;
      if ({y1, y2, y3} !== TABLE[v]) begin
        failures++;
        $display("FAIL rqg x=%03b y=%0b%0b%0b expected %03b", 3'(v), y1, y2, y3, TABLE[v]);
      end
      checks++;
      if (seen[{y1, y2, y3}]) begin
        failures++;
        $display("FAIL rqg output %0b%0b%0b repeated", y1, y2, y3);
      end
      seen[{y1, y2, y3}] = 1'b1;
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
