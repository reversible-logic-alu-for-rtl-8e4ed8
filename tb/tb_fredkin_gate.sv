// tb_fredkin_gate: exhaustive self-checking test of fredkin_gate.
//
// Applies all eight input patterns, compares P, Q and R with the controlled swap of B and C (swapped when A = 1),
// and checks that the eight output patterns are all different (the gate
// is reversible). A time watchdog ends the run with a failure if it hangs.
module tb_fredkin_gate;
  logic a, b, c, p, q, r;
  logic [2:0] exp_out;
  logic [7:0] seen;
  int checks = 0, failures = 0;

  fredkin_gate dut (.a(a), .b(b), .c(c), .p(p), .q(q), .r(r));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      exp_out = a ? {a, c, b} : {a, b, c};
      checks++;
      if ({p, q, r} !== exp_out) begin
        failures++;
        $display("FAIL in=%b%b%b got=%b%b%b exp=%b", a, b, c, p, q, r, exp_out);
      end
      checks++;
      if (seen[{p, q, r}]) begin
        failures++;
        $display("FAIL output %b%b%b repeats: not reversible", p, q, r);
      end
      seen[{p, q, r}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
