// xor2 - two-input exclusive OR built only from majority gates.
//
// A QCA layout has no native XOR; it is composed from majority voters whose
// third input is a fixed-polarisation cell (-1.00 reads as logic 0, +1.00 as
// logic 1). This module keeps that structure so that the gate count of the
// logic matches a majority-only realisation:
//   t0 = MAJ(a, ~b, 0)   = a.~b        (AND, fixed cell -1.00)
//   t1 = MAJ(~a, b, 0)   = ~a.b        (AND, fixed cell -1.00)
//   y  = MAJ(t0, t1, 1)  = t0 + t1     (OR,  fixed cell +1.00)
//
// Interface: two 1-bit inputs, one 1-bit output. Combinational, two majority
// levels deep, no clock or reset.
// The XOR function and the use of +/-1.00 fixed cells follow the RQG layout;
// the exact three-majority arrangement is this design's choice.
module xor2 (
  input  logic a,
  input  logic b,
  output logic y
);

  logic t0, t1;

  maj3 u_and0 (.a(a),  .b(~b), .c(1'b0), .y(t0));
  maj3 u_and1 (.a(~a), .b(b),  .c(1'b0), .y(t1));
  maj3 u_or   (.a(t0), .b(t1), .c(1'b1), .y(y));

endmodule
