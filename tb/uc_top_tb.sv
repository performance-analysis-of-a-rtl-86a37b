// uc_top_tb - end-to-end self-check of the reversible adder cum subtractor.
//
// Five parts, each with references computed here independently of the RTL:
//  1. the published truth table of the universal circuit (constant input 0),
//     eight rows of {cout, bout, sum_diff, gar} indexed by {a, b, c};
//  2. integer arithmetic: a + b + c must equal {cout, sum_diff}, and a - b - c
//     must leave sum_diff as its low bit and bout set when it is negative;
//  3. reversibility: all sixteen values of (a, b, o, c) must give sixteen
//     different output words;
//  4. the input sequence of the circuit's published simulation: the patterns
//     {a, b, c} = 0..7 counted twice, a slowest and c fastest;
//  5. use as an ALU bit slice: four copies chained through cout form a 4-bit
//     ripple adder, four more chained through bout form a 4-bit ripple
//     subtractor, both checked for all 256 operand pairs and both values of
//     the incoming carry or borrow.
// Counted mechanisms (each must occur at least once): a carry out, a borrow
// out, a carry rippling through all four slices, a borrow rippling through all
// four slices, and the constant input driven to 1. The circuit is
// combinational; each pattern is given 1 time unit to settle. A watchdog ends
// a stuck run with a failure.
module uc_top_tb;

  localparam int W = 4;  // width of the ripple adder/subtractor built from slices

  // single slice under test
  logic a, b, o, c;
  logic cout, bout, sum_diff, gar;

  int checks = 0;
  int failures = 0;

  int n_carry = 0;
  int n_borrow = 0;
  int n_carry_ripple = 0;
  int n_borrow_ripple = 0;
  int n_const_one = 0;

  // Universal circuit truth table, {cout, bout, sum_diff, gar} for
  // {a, b, c} = 0..7 with the constant input at 0.
  localparam logic [3:0] TABLE [8] = '{
    4'b0000, 4'b0111, 4'b0110, 4'b1101, 4'b0011, 4'b1000, 4'b1001, 4'b1110
  };

  uc_top dut (.a(a), .b(b), .o(o), .c(c),
              .cout(cout), .bout(bout), .sum_diff(sum_diff), .gar(gar));

  // 4-bit ripple adder and subtractor built from the slice
  logic [W-1:0] opa, opb;
  logic         add_cin, sub_bin;
  logic [W:0]   add_c;        // carry chain
  logic [W:0]   sub_b;        // borrow chain
  logic [W-1:0] add_s, sub_d;
  logic [W-1:0] add_bout_unused, add_gar_unused;
  logic [W-1:0] sub_cout_unused, sub_gar_unused;

  always_comb begin
    add_c[0] = add_cin;
    sub_b[0] = sub_bin;
  end

  for (genvar i = 0; i < W; i++) begin : g_slice
    uc_top u_add (.a(opa[i]), .b(opb[i]), .o(1'b0), .c(add_c[i]),
                  .cout(add_c[i+1]), .bout(add_bout_unused[i]),
                  .sum_diff(add_s[i]), .gar(add_gar_unused[i]));
    // for a - b - bin the slice input b carries the subtrahend bit and c the
    // incoming borrow
    uc_top u_sub (.a(opa[i]), .b(opb[i]), .o(1'b0), .c(sub_b[i]),
                  .cout(sub_cout_unused[i]), .bout(sub_b[i+1]),
                  .sum_diff(sub_d[i]), .gar(sub_gar_unused[i]));
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s: a=%0b b=%0b o=%0b c=%0b -> cout=%0b bout=%0b sum_diff=%0b gar=%0b",
               what, a, b, o, c, cout, bout, sum_diff, gar);
    end
  endtask

  // arithmetic check of one slice with o = 0
  task automatic check_arith(input string what);
    logic [1:0] s;
    int d;
    s = 2'(a) + 2'(b) + 2'(c);
    d = int'(a) - int'(b) - int'(c);
    check({cout, sum_diff} === s, {what, " addition"});
    check(sum_diff === d[0], {what, " difference"});
    check(bout === (d < 0), {what, " borrow"});
    check(gar === (a ^ c), {what, " garbage"});
    if (cout) n_carry++;
    if (bout) n_borrow++;
  endtask

  initial begin
    bit seen [16];
    foreach (seen[i]) seen[i] = 1'b0;

    // 1. truth table
    o = 1'b0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      check({cout, bout, sum_diff, gar} === TABLE[v], "truth table");
    end

    // 2. arithmetic, and 3. reversibility of the full 4x4 mapping
    for (int v = 0; v < 16; v++) begin
      {a, b, o, c} = 4'(v);
      #1;
      if (!o) check_arith("slice");
      else    n_const_one++;
      check(!seen[{cout, bout, sum_diff, gar}], "one-to-one mapping");
      seen[{cout, bout, sum_diff, gar}] = 1'b1;
    end

    // 4. published simulation sequence: 0..7 twice
    o = 1'b0;
    for (int step = 0; step < 16; step++) begin
      {a, b, c} = 3'(step % 8);
      #1;
      check_arith("sequence");
    end

    // 5. ripple adder and subtractor
    for (int x = 0; x < (1 << W); x++) begin
      for (int y = 0; y < (1 << W); y++) begin
        for (int k = 0; k < 2; k++) begin
          int sum, dif;
          opa = W'(x);
          opb = W'(y);
          add_cin = k[0];
          sub_bin = k[0];
          #1;
          sum = x + y + k;
          dif = x - y - k;
          checks++;
          if ({add_c[W], add_s} !== (W+1)'(sum)) begin
            failures++;
            $display("FAIL ripple add %0d + %0d + %0d = %0d, got %0d", x, y, k, sum,
                     {add_c[W], add_s});
          end
          checks++;
          if (sub_d !== W'(dif) || sub_b[W] !== (dif < 0)) begin
            failures++;
            $display("FAIL ripple sub %0d - %0d - %0d = %0d, got d=%0d borrow=%0b", x, y, k,
                     dif, sub_d, sub_b[W]);
          end
          if (&add_c) n_carry_ripple++;
          if (&sub_b) n_borrow_ripple++;
        end
      end
    end

    $display("mechanisms: carry_out=%0d borrow_out=%0d carry_ripple=%0d borrow_ripple=%0d const_one=%0d",
             n_carry, n_borrow, n_carry_ripple, n_borrow_ripple, n_const_one);
    checks++;
    if (n_carry == 0)         begin failures++; $display("FAIL no carry out seen");    end
    checks++;
    if (n_borrow == 0)        begin failures++; $display("FAIL no borrow out seen");   end
    checks++;
    if (n_carry_ripple == 0)  begin failures++; $display("FAIL no full carry ripple"); end
    checks++;
    if (n_borrow_ripple == 0) begin failures++; $display("FAIL no full borrow ripple"); end
    checks++;
    if (n_const_one == 0)     begin failures++; $display("FAIL constant input never 1"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
