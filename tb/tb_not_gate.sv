// tb_not_gate: self-checking testbench for not_gate.
//
// Drives both input values and checks that the output is the other value,
// and that applying the gate twice (through a second instance) restores the
// input, which is what makes it reversible. A time watchdog ends a hung run.
module tb_not_gate;
  logic a, p, pp;
  int   checks = 0, failures = 0;

  not_gate dut  (.a(a), .p(p));
  not_gate dut2 (.a(p), .p(pp));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      a = 1'(i);
      #1;
      checks++;
      if (p !== 1'(1 - i)) begin
        failures++;
        $display("FAIL a=%0d p=%b", i, p);
      end
      checks++;
      if (pp !== a) begin
        failures++;
        $display("FAIL NOT applied twice gave %b for %b", pp, a);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
