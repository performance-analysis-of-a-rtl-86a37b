// maj3 - three-input majority gate.
//
// The majority voter is the basic logic primitive of quantum-dot cellular
// automata: a central cell takes the polarisation held by at least two of its
// three neighbours. In CMOS it is the familiar carry function
//   y = a.b + b.c + a.c
// Holding one input at a constant turns it into a two-input AND (constant 0)
// or OR (constant 1), which is how xor2 uses it.
//
// Interface: three 1-bit inputs, one 1-bit output. Purely combinational, no
// clock or reset; the output follows the inputs after one gate delay.
// The function follows the three-input majority voter of the QCA gate set;
// the sum-of-products form written here is the textbook one.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);

  always_comb y = (a & b) | (b & c) | (a & c);

endmodule
