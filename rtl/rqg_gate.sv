// rqg_gate - the 3x3 reversible RQG gate.
//
// Three inputs map one-to-one onto three outputs:
//   y1 = MAJ(x1,  x2, x3)   two-of-three of the inputs
//   y2 = MAJ(~x1, x2, x3)   the same with x1 inverted
//   y3 = x1 ^ x3
// With x1 = A, x2 = B, x3 = C the first two outputs are exactly the carry of
// A + B + C and the borrow of A - B - C, which is why one RQG serves as the
// core of a combined adder and subtractor. The eight input patterns give eight
// different output patterns, so the gate loses no information.
//
// Structure: two majority gates (the second fed through an inverter on x1)
// and one majority-built XOR, as in the gate's QCA layout.
//
// Interface: 1-bit x1, x2, x3 in; 1-bit y1, y2, y3 out. Combinational, no clock
// or reset. The three output equations and the truth table are the gate's
// published definition; the CMOS inverter standing in for the QCA inverter is
// the only addition.
module rqg_gate (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  output logic y1,
  output logic y2,
  output logic y3
);

  logic x1_n;

  always_comb x1_n = ~x1;

  maj3 u_maj   (.a(x1),   .b(x2), .c(x3), .y(y1));
  maj3 u_maj_n (.a(x1_n), .b(x2), .c(x3), .y(y2));
  xor2 u_xor   (.a(x1),   .b(x3), .y(y3));

endmodule
