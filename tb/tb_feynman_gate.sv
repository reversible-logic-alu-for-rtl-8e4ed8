// tb_feynman_gate: exhaustive self-checking test of feynman_gate.
//
// Applies all four input patterns, compares P and Q with A and "B inverted
// when A is 1", and checks that the four output patterns differ (the gate
// is reversible). A time watchdog ends the run with a failure if it hangs.
module tb_feynman_gate;
  logic a, b, p, q;
  logic [3:0] seen;
  int checks = 0, failures = 0;

  feynman_gate dut (.a(a), .b(b), .p(p), .q(q));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if (p !== a || q !== (a ? !b : b)) begin
        failures++;
        $display("FAIL in=%b%b got=%b%b", a, b, p, q);
      end
      checks++;
      if (seen[{p, q}]) begin
        failures++;
        $display("FAIL output %b%b repeats", p, q);
      end
      seen[{p, q}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
