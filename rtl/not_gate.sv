// not_gate: the 1x1 reversible NOT gate, P = ~A.
//
// The simplest reversible gate: one input, one output, and the mapping is its
// own inverse. In the full adder/subtractor it turns the DPG's copy of A into
// ~A for the Fredkin gate. Purely combinational, no clock.
// The function is the standard reversible NOT; nothing here is a design choice.
module not_gate (
  input  logic a,
  output logic p
);
  assign p = ~a;
endmodule
