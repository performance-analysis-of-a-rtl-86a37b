// fg_gate - the 2x2 reversible Feynman gate (controlled NOT).
//
// The control input passes straight through (p = a) and the target input is
// inverted when the control is 1 (q = a ^ b). The mapping is its own inverse.
// With b tied to 0 the gate is the reversible way of copying a signal
// (p = q = a); with both inputs live it is a reversible XOR.
//
// Interface: 1-bit a (control), b (target) in; 1-bit p, q out. Output p is
// by definition a plain wire from a, so synthesis reports it as idle. Combinational,
// no clock or reset, two majority levels from b to q. The function is the
// standard CNOT definition; building the XOR from majority gates (xor2) keeps
// the whole circuit majority-only, as a QCA layout is, and is this design's
// choice.
module fg_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  always_comb p = a;

  xor2 u_xor (.a(a), .b(b), .y(q));

endmodule
