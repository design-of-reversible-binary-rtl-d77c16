// tb_fredkin_gate: exhaustive self-checking testbench for fredkin_gate.
//
// Applies all eight input vectors (A,B,C), compares P, Q and R with the
// gate's truth table held here as three 8-bit constants, and checks that the
// gate is reversible: the eight output vectors must all differ. A time watchdog ends a run that hangs.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  int   checks = 0, failures = 0;
  bit   seen [8];

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  // Reference outputs for input index {A,B,C}: bit i of each constant is the
  // output for input vector i.
  localparam logic [7:0] REF_P = 8'b11110000;
  localparam logic [7:0] REF_Q = 8'b10101100;
  localparam logic [7:0] REF_R = 8'b11001010;

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== {REF_P[i], REF_Q[i], REF_R[i]}) begin
        failures++;
        $display("FAIL in=%03b got PQR=%b%b%b want %b%b%b", 3'(i), p, q, r,
                  REF_P[i], REF_Q[i], REF_R[i]);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b produced twice: not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
