// peres_gate: the 3x3 reversible Peres gate.
//
//   P = A
//   Q = A ^ B
//   R = (A & B) ^ C
//
// With C held at 0 it is a half adder: Q is the sum and R the carry, and P
// keeps a copy of A that a following gate can reuse. The mapping of (A,B,C)
// to (P,Q,R) is a bijection on the eight input vectors. Combinational.
// The equations are the standard Peres gate definition, used unchanged.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
