// tr_gate: the 3x3 reversible TR (Thapliyal-Ranganathan) gate.
//
//   P = A
//   Q = A ^ B
//   R = (A & ~B) ^ C
//
// With C held at 0 it is a half subtractor: for the difference X - Y, feed
// the subtrahend Y on pin A and the minuend X on pin B; then Q = X ^ Y is the
// difference and R = ~X & Y the borrow. The mapping is a bijection on the
// eight input vectors. Combinational.
// The equations are the standard TR gate definition, used unchanged.
module tr_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & ~b) ^ c;
endmodule
