// tb_rev_addsub_top: end-to-end self-checking testbench for rev_addsub_top at
// its default configuration.
//
// Both circuits are driven together with ancillas at 0: the half circuit
// walks its four operand pairs while the full circuit walks its eight
// operand triples, over every one of the 32 combinations, so that each
// circuit is checked while the other changes. Results are compared with
// integer addition and subtraction. The testbench then uses the full circuit
// as a ripple adder/subtractor: it adds and subtracts two 4-bit numbers a
// bit at a time, feeding carry (or borrow) back as the next Cin, with the
// half circuit for bit 0, and compares the 5-bit results with integer
// arithmetic for all 256 operand pairs. It counts how often each outcome
// (carry out, borrow out, neither) happened in each circuit and fails if
// one never did. A time watchdog ends a hung run.
module tb_rev_addsub_top;
  import rev_pkg::*;

  logic        ha_a, ha_b, ha_c;
  addsub_out_t ha_out;
  logic        ha_p1;
  logic        fa_a, fa_b, fa_cin, fa_d;
  addsub_out_t fa_out;
  logic        fa_p1, fa_p1_bar, fa_r;

  int checks = 0, failures = 0;
  int n_ha_carry = 0, n_ha_borrow = 0, n_ha_none = 0;
  int n_fa_carry = 0, n_fa_borrow = 0, n_fa_none = 0;
  int n_ripple_ovf = 0, n_ripple_neg = 0;

  rev_addsub_top dut (
    .ha_a(ha_a), .ha_b(ha_b), .ha_c(ha_c), .ha_out(ha_out), .ha_p1(ha_p1),
    .fa_a(fa_a), .fa_b(fa_b), .fa_cin(fa_cin), .fa_d(fa_d), .fa_out(fa_out),
    .fa_p1(fa_p1), .fa_p1_bar(fa_p1_bar), .fa_r(fa_r)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: ha %b%b -> %p | fa %b%b%b -> %p", what, ha_a, ha_b,
               ha_out, fa_a, fa_b, fa_cin, fa_out);
    end
  endtask

  task automatic count(input logic carry, input logic borrow,
                       ref int n_c, ref int n_b, ref int n_n);
    if (carry) n_c++;
    if (borrow) n_b++;
    if (!carry && !borrow) n_n++;
  endtask

  // Bit-serial add (sub = 0) or subtract (sub = 1) of two 4-bit numbers:
  // bit 0 goes through the half circuit, bits 1..3 through the full circuit
  // with the previous carry or borrow as Cin. Returns the 4 result bits and
  // the final carry or borrow in bit 4.
  task automatic ripple(input logic [3:0] x, input logic [3:0] y,
                        input bit sub, output logic [4:0] res);
    logic link;
    ha_a = x[0]; ha_b = y[0];
    #1;
    res[0] = ha_out.sum_sub;
    link   = sub ? ha_out.borrow : ha_out.carry;
    for (int i = 1; i < 4; i++) begin
      fa_a = x[i]; fa_b = y[i]; fa_cin = link;
      #1;
      res[i] = fa_out.sum_sub;
      link   = sub ? fa_out.borrow : fa_out.carry;
    end
    res[4] = link;
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int add, diff;
    logic [4:0] res;
    ha_c = 1'b0;
    fa_d = 1'b0;

    // Single-cell checks, both circuits at once.
    for (int i = 0; i < 32; i++) begin
      {ha_a, ha_b, fa_a, fa_b, fa_cin} = 5'(i);
      #1;
      add  = int'(ha_a) + int'(ha_b);
      diff = int'(ha_a) - int'(ha_b);
      check(ha_out.sum_sub === add[0] && ha_out.carry === add[1] &&
            ha_out.borrow === (diff < 0), "half circuit");
      check(ha_out.garbage === {ha_b, ha_out.sum_sub} && ha_p1 === ha_a,
            "half circuit garbage");
      add  = int'(fa_a) + int'(fa_b) + int'(fa_cin);
      diff = int'(fa_a) - int'(fa_b) - int'(fa_cin);
      check(fa_out.sum_sub === add[0] && fa_out.carry === add[1] &&
            fa_out.borrow === (diff < 0), "full circuit");
      check(fa_out.garbage[1] === fa_r && fa_r === (fa_a != fa_b) &&
            fa_p1 === fa_a && fa_p1_bar === !fa_a, "full circuit inner wires");
      count(ha_out.carry, ha_out.borrow, n_ha_carry, n_ha_borrow, n_ha_none);
      count(fa_out.carry, fa_out.borrow, n_fa_carry, n_fa_borrow, n_fa_none);
    end

    // 4-bit ripple add and subtract built from the cells.
    for (int x = 0; x < 16; x++) begin
      for (int y = 0; y < 16; y++) begin
        ripple(4'(x), 4'(y), 1'b0, res);
        check(int'(res) == x + y, "ripple add");
        if (res[4]) n_ripple_ovf++;
        ripple(4'(x), 4'(y), 1'b1, res);
        check(res[3:0] == 4'(x - y) && res[4] == (x < y), "ripple subtract");
        if (res[4]) n_ripple_neg++;
      end
    end

    $display("half: carry %0d, borrow %0d, neither %0d", n_ha_carry, n_ha_borrow, n_ha_none);
    $display("full: carry %0d, borrow %0d, neither %0d", n_fa_carry, n_fa_borrow, n_fa_none);
    $display("ripple: carry out %0d, borrow out %0d", n_ripple_ovf, n_ripple_neg);
    if (n_ha_carry == 0 || n_ha_borrow == 0 || n_ha_none == 0 ||
        n_fa_carry == 0 || n_fa_borrow == 0 || n_fa_none == 0 ||
        n_ripple_ovf == 0 || n_ripple_neg == 0) begin
      failures++;
      $display("FAIL an outcome never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
