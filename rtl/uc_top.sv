// uc_top - reversible universal adder cum subtractor (one bit position).
//
// A single reversible circuit computes, from the same three input bits A, B, C,
// both the full-adder result of A + B + C and the full-subtractor result of
// A - B - C:
//   cout     = MAJ(A,  B, C)       carry out of the addition
//   bout     = MAJ(~A, B, C)       borrow out of the subtraction
//   sum_diff = A ^ B ^ C           sum and difference are the same bit
//   gar      = A ^ C               garbage output, needed for reversibility
// Addition and subtraction need no mode input: both results are present at
// every evaluation, the caller picks carry or borrow.
//
// Structure (three reversible gates, one constant input, one garbage output):
//   FG #1  (B, o)      -> (B, B^o)     fans B out; o is the constant input, 0
//   RQG    (A, B, C)   -> (cout, bout, A^C)
//   FG #2  (A^C, B^o)  -> (gar = A^C, sum_diff = A^B^C^o)
// With o = 0 the four outputs are the results above. The mapping from the four
// inputs (A, B, o, C) to the four outputs is one-to-one for every value of o,
// so the circuit is reversible as a 4x4 function; o = 1 yields the inverted
// sum/difference and is not a normal operating point.
//
// Interface: 1-bit inputs a, b, o, c and 1-bit outputs cout, bout, sum_diff,
// gar. Combinational, no clock or reset; the longest path (a or c to sum_diff)
// is four majority levels. A wider adder/subtractor chains cout into the next
// bit's c for addition, or bout for subtraction.
//
// The gate network, the constant input and the output equations follow the
// published circuit. Exposing the constant input as a port, rather than tying
// it inside, is this design's choice so that the reversible 4x4 mapping can be
// exercised in full.
module uc_top (
  input  logic a,
  input  logic b,
  input  logic o,
  input  logic c,
  output logic cout,
  output logic bout,
  output logic sum_diff,
  output logic gar
);

  logic b_rqg;    // FG #1 pass-through copy of B, into the RQG
  logic b_fg2;    // FG #1 target output, B ^ o, into FG #2
  logic a_xor_c;  // RQG third output

  fg_gate  u_fg1 (.a(b),       .b(o),     .p(b_rqg), .q(b_fg2));
  rqg_gate u_rqg (.x1(a),      .x2(b_rqg), .x3(c),
                  .y1(cout),   .y2(bout), .y3(a_xor_c));
  fg_gate  u_fg2 (.a(a_xor_c), .b(b_fg2), .p(gar),   .q(sum_diff));

endmodule
