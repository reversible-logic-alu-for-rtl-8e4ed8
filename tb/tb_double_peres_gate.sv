// tb_double_peres_gate: exhaustive self-checking test of double_peres_gate.
//
// Applies all sixteen input patterns, compares P, Q, R and S with P = A, Q = A^B, R = parity(A,B,C) and S = majority(A,B,C)^D,
// and checks that the sixteen output patterns are all different (the
// gate is reversible). A time watchdog ends the run with a failure if it
// hangs.
module tb_double_peres_gate;
  logic a, b, c, d, p, q, r, s;
  logic [3:0] exp_out;
  logic [15:0] seen;
  int checks = 0, failures = 0;
  int ones;

  double_peres_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      ones = int'(a) + int'(b) + int'(c);
      // S is the majority of A, B, C flipped by D; R is the parity of A, B, C
      exp_out = {a, a ^ b, ones[0], (ones >= 2) ^ d};
      checks++;
      if ({p, q, r, s} !== exp_out) begin
        failures++;
        $display("FAIL in=%b%b%b%b got=%b%b%b%b exp=%b", a, b, c, d, p, q, r, s, exp_out);
      end
      checks++;
      if (seen[{p, q, r, s}]) begin
        failures++;
        $display("FAIL output %b%b%b%b repeats: not reversible", p, q, r, s);
      end
      seen[{p, q, r, s}] = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
