// dpg_gate: the 4x4 reversible Double Peres Gate (DPG).
//
//   P = A
//   Q = A ^ B
//   R = A ^ B ^ D
//   S = ((A ^ B) & D) ^ (A & B) ^ C
//
// With C held at 0 and the carry-in on D it is a full adder: R is the sum
// A^B^D and S the carry (A^B)&D | A&B, while P and Q keep A and A^B for a
// following gate. The R equation is the standard DPG one (A^B^D): the
// variant R = A^C^D would not give the sum and would not be reversible
// together with the other three outputs. P, Q and S are the published
// equations unchanged. Combinational.
module dpg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic a_xor_b;
  assign a_xor_b = a ^ b;

  assign p = a;
  assign q = a_xor_b;
  assign r = a_xor_b ^ d;
  assign s = (a_xor_b & d) ^ (a & b) ^ c;
endmodule
