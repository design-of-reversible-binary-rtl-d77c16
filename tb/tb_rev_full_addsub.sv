// tb_rev_full_addsub: exhaustive self-checking testbench for rev_full_addsub.
//
// With the ancilla d tied to 0 it applies all eight (A, B, Cin) and checks
// against integer arithmetic: {carry, sum_sub} = A + B + Cin, sum_sub is also
// the low bit of A - B - Cin, and borrow = (A - B - Cin < 0). It checks the
// inner wires (p1 = A, p1_bar = ~A, r = A ^ B) and the Fredkin garbage
// (g1 = r, g2 = Cin when r = 1, ~A when r = 0), and the vector
// A = B = Cin = 1 once more against sum_sub = 1, carry = 1, borrow = 1,
// p1 = 1, p1_bar = 0, r = 0, g1 = 0, g2 = 0. With d = 1 only the carry must
// come out inverted. A time watchdog ends a hung run.
module tb_rev_full_addsub;
  logic a, b, cin, d;
  logic sum_sub, carry, borrow, p1, p1_bar, r, g1, g2;
  int   checks = 0, failures = 0;
  int   add, diff;

  rev_full_addsub dut (
    .a(a), .b(b), .cin(cin), .d(d), .sum_sub(sum_sub), .carry(carry),
    .borrow(borrow), .p1(p1), .p1_bar(p1_bar), .r(r), .g1(g1), .g2(g2)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%b b=%b cin=%b d=%b -> sum_sub=%b carry=%b borrow=%b p1=%b p1_bar=%b r=%b g1=%b g2=%b",
               what, a, b, cin, d, sum_sub, carry, borrow, p1, p1_bar, r, g1, g2);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 2; k++) begin
      for (int i = 0; i < 8; i++) begin
        {a, b, cin} = 3'(i);
        d = 1'(k);
        #1;
        add  = int'(a) + int'(b) + int'(cin);
        diff = int'(a) - int'(b) - int'(cin);
        check(sum_sub === add[0] && sum_sub === diff[0], "sum/difference");
        check(carry === (add[1] ^ d), "carry");
        check(borrow === (diff < 0), "borrow");
        check(p1 === a && p1_bar === !a && r === (a != b), "inner wires");
        check(g1 === r && g2 === (r ? cin : !a), "garbage");
      end
    end
    {a, b, cin, d} = 4'b1110;
    #1;
    check({sum_sub, carry, borrow, p1, p1_bar, r, g1, g2} === 8'b11110000,
          "A=B=Cin=1 vector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
