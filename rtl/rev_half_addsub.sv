// rev_half_addsub: reversible half adder/subtractor, one Peres gate followed
// by one TR gate.
//
// Both operations are computed at once from the same two bits A and B:
//   sum  = A ^ B        (also the difference A - B, repeated on "sub")
//   carry  = A & B
//   borrow = ~A & B     (borrow out of A - B)
// The Peres gate (A, B, c) gives p1 = A, sum = A ^ B and carry = (A & B) ^ c.
// Its copy of A, p1, goes on to the TR gate's second pin, with B on its first
// pin, so that the TR gate gives p2 = B, sub = A ^ B and
// borrow = (~A & B) ^ c. p2 and sub are the two garbage outputs; no signal
// fans out, so the cascade stays reversible.
//
// c is the constant (ancilla) input and must be tied to 0 for the outputs
// above; the same constant feeds the third pin of both gates. The gate
// choice and their wiring follow the published construction; sharing one
// constant port between the two gates is this design's choice.
// Combinational: outputs settle one Peres plus one TR delay after the inputs.
module rev_half_addsub (
  input  logic a,
  input  logic b,
  input  logic c,       // ancilla, tie to 0
  output logic p1,      // copy of A, consumed by the TR gate
  output logic p2,      // copy of B, garbage
  output logic sum,     // A ^ B: sum and difference
  output logic sub,     // A ^ B again from the TR gate, garbage
  output logic carry,   // A & B
  output logic borrow   // ~A & B
);

  peres_gate u_peres (
    .a (a),
    .b (b),
    .c (c),
    .p (p1),
    .q (sum),
    .r (carry)
  );

  tr_gate u_tr (
    .a (b),
    .b (p1),
    .c (c),
    .p (p2),
    .q (sub),
    .r (borrow)
  );

endmodule
