// tb_rev_half_addsub: exhaustive self-checking testbench for rev_half_addsub.
//
// With the ancilla c tied to 0 it applies the four operand pairs (A,B) and
// checks the results against integer arithmetic: {carry, sum} = A + B and
// borrow = (A < B), with sum also the low bit of A - B. It checks the
// garbage and pass-through outputs (p1 = A, p2 = B, sub = sum) and the
// vector A = 1, B = 1 once more against the values p1 = 1, p2 = 1, sum = 0,
// sub = 0, carry = 1, borrow = 0. With c = 1 it checks that carry and
// borrow come out inverted, as the third pins of both gates XOR them.
// A time watchdog ends a hung run.
module tb_rev_half_addsub;
  logic a, b, c, p1, p2, sum, sub, carry, borrow;
  int   checks = 0, failures = 0;
  int   add, diff;

  rev_half_addsub dut (
    .a(a), .b(b), .c(c), .p1(p1), .p2(p2), .sum(sum), .sub(sub),
    .carry(carry), .borrow(borrow)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%b b=%b c=%b -> p1=%b p2=%b sum=%b sub=%b carry=%b borrow=%b",
               what, a, b, c, p1, p2, sum, sub, carry, borrow);
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
      for (int i = 0; i < 4; i++) begin
        {a, b} = 2'(i);
        c = 1'(k);
        #1;
        add  = int'(a) + int'(b);
        diff = int'(a) - int'(b);
        check(sum === add[0] && sum === diff[0], "sum/difference");
        check(carry === (add[1] ^ c), "carry");
        check(borrow === ((diff < 0) ^ c), "borrow");
        check(p1 === a && p2 === b && sub === sum, "pass-through/garbage");
      end
    end
    a = 1'b1; b = 1'b1; c = 1'b0;
    #1;
    check({p1, p2, sum, sub, carry, borrow} === 6'b110010, "A=1 B=1 vector");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
