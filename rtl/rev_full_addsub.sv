// rev_full_addsub: reversible 1-bit full adder/subtractor, a Double Peres
// Gate, a NOT gate and a Fredkin gate.
//
// Adds A + B + Cin and subtracts A - B - Cin at once:
//   sum_sub = A ^ B ^ Cin                    (sum and difference)
//   carry   = (A ^ B) & Cin | A & B
//   borrow  = ~(A ^ B) & Cin | (A ^ B) & ~A
// The DPG (pins A, B, C = d, D = cin) gives p1 = A, r = A ^ B,
// sum_sub = A ^ B ^ Cin and carry. The NOT gate turns p1 into p1_bar = ~A.
// The Fredkin gate takes r as its control, p1_bar on its second pin and Cin
// on its third: its third output is then r ? ~A : Cin, which is the borrow
// (when A ^ B = 1 the borrow is ~A, i.e. B; otherwise it is Cin). The Fredkin
// gate's other two outputs, g1 = r and g2 = r ? Cin : ~A, are garbage.
//
// d is the constant (ancilla) input, tie it to 0. Which DPG pin takes the
// constant and which the carry-in is chosen so that the DPG works as a full
// adder (constant on C, carry-in on D); the gate set and the connections
// between the gates follow the published construction. Cin fans out to the
// DPG and to the Fredkin gate, as drawn in the block diagram of the circuit.
// Combinational: the borrow settles after DPG, NOT and Fredkin in series.
module rev_full_addsub (
  input  logic a,
  input  logic b,
  input  logic cin,
  input  logic d,        // ancilla, tie to 0
  output logic sum_sub,  // A ^ B ^ Cin
  output logic carry,    // carry out of A + B + Cin
  output logic borrow,   // borrow out of A - B - Cin
  output logic p1,       // copy of A
  output logic p1_bar,   // ~A, Fredkin data input
  output logic r,        // A ^ B, Fredkin control
  output logic g1,       // garbage: A ^ B
  output logic g2        // garbage: r ? Cin : ~A
);

  dpg_gate u_dpg (
    .a (a),
    .b (b),
    .c (d),
    .d (cin),
    .p (p1),
    .q (r),
    .r (sum_sub),
    .s (carry)
  );

  not_gate u_not (
    .a (p1),
    .p (p1_bar)
  );

  fredkin_gate u_fredkin (
    .a (r),
    .b (p1_bar),
    .c (cin),
    .p (g1),
    .q (g2),
    .r (borrow)
  );

endmodule
