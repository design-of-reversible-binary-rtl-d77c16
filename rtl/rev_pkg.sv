// rev_pkg: shared types for the reversible adder/subtractor
// circuits.
//
// addsub_out_t bundles what one adder/subtractor cell returns: the
// sum/difference bit (adding and subtracting give the same bit), carry,
// borrow, and the two garbage outputs that the reversible construction leaves
// over. The half and the full circuit return the same bundle.
package rev_pkg;

  typedef struct packed {
    logic       sum_sub;   // A^B (half) or A^B^C (full): sum and difference
    logic       carry;     // carry out of the addition
    logic       borrow;    // borrow out of the subtraction A - B (- C)
    logic [1:0] garbage;   // outputs kept only to make the mapping reversible
  } addsub_out_t;

endpackage
