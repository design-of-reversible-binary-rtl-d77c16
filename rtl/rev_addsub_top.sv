// rev_addsub_top: the reversible half adder/subtractor and the reversible
// full adder/subtractor, side by side.
//
// The two circuits are independent: each has its own operand inputs and its
// own ancilla input (tie both to 0), and each returns its results as an
// rev_pkg::addsub_out_t (sum/difference, carry, borrow and two garbage bits).
// The half circuit's garbage bits are {p2, sub}; the full circuit's are
// {g1, g2}. The inner wires the waveforms of each circuit show (p1 of the
// half circuit; p1, p1_bar and r of the full circuit) are brought out too.
// Everything is combinational; there is no clock or reset.
module rev_addsub_top
  import rev_pkg::*;
(
  // half adder/subtractor
  input  logic        ha_a,
  input  logic        ha_b,
  input  logic        ha_c,        // ancilla, tie to 0
  output addsub_out_t ha_out,
  output logic        ha_p1,
  // full adder/subtractor
  input  logic        fa_a,
  input  logic        fa_b,
  input  logic        fa_cin,
  input  logic        fa_d,        // ancilla, tie to 0
  output addsub_out_t fa_out,
  output logic        fa_p1,
  output logic        fa_p1_bar,
  output logic        fa_r
);

  rev_half_addsub u_half (
    .a      (ha_a),
    .b      (ha_b),
    .c      (ha_c),
    .p1     (ha_p1),
    .p2     (ha_out.garbage[1]),
    .sum    (ha_out.sum_sub),
    .sub    (ha_out.garbage[0]),
    .carry  (ha_out.carry),
    .borrow (ha_out.borrow)
  );

  rev_full_addsub u_full (
    .a       (fa_a),
    .b       (fa_b),
    .cin     (fa_cin),
    .d       (fa_d),
    .sum_sub (fa_out.sum_sub),
    .carry   (fa_out.carry),
    .borrow  (fa_out.borrow),
    .p1      (fa_p1),
    .p1_bar  (fa_p1_bar),
    .r       (fa_r),
    .g1      (fa_out.garbage[1]),
    .g2      (fa_out.garbage[0])
  );

endmodule
