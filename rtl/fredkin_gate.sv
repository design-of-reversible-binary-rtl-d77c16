// fredkin_gate: the 3x3 reversible Fredkin (controlled-swap) gate.
//
//   P = A
//   Q = ~A & B | A & C
//   R =  A & B | ~A & C
//
// A is the control: when it is 0, B and C pass straight through to Q and R;
// when it is 1 they are swapped. Used as a 2:1 multiplexer on output R,
// which is how the full subtractor forms its borrow. Combinational.
// The equations are the standard Fredkin definition; writing them as
// conditional assignments is only a matter of style.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
