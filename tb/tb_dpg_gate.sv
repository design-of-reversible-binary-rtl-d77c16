// tb_dpg_gate: exhaustive self-checking testbench for dpg_gate.
//
// Applies all sixteen input vectors (A,B,C,D) and checks the four outputs
// against arithmetic references: P = A, Q = A ^ B, and, with the sum
// A + B + D computed as an integer, R is its low bit and S its high bit
// XORed with C. It also checks that the sixteen output vectors all differ
// (the gate is reversible) and that with C = 0 the gate is a full adder
// with {S, R} = A + B + D. A time watchdog ends a hung run.
module tb_dpg_gate;
  logic a, b, c, d, p, q, r, s;
  int   checks = 0, failures = 0;
  int   total;
  bit   seen [16];

  dpg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      total = int'(a) + int'(b) + int'(d);
      checks++;
      if (p !== a || q !== (a != b)) begin
        failures++;
        $display("FAIL in=%04b P=%b Q=%b", 4'(i), p, q);
      end
      checks++;
      if (r !== total[0] || s !== (total[1] ^ c)) begin
        failures++;
        $display("FAIL in=%04b R=%b S=%b want %b %b", 4'(i), r, s,
                 total[0], total[1] ^ c);
      end
      if (!c) begin
        checks++;
        if (2 * int'(s) + int'(r) != total) begin
          failures++;
          $display("FAIL full-adder use: %0d+%0d+%0d gave %b%b", a, b, d, s, r);
        end
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b%b%b%b produced twice: not reversible", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
