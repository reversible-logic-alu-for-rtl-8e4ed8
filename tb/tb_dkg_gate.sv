// tb_dkg_gate: exhaustive self-checking test of dkg_gate.
//
// Applies all sixteen input patterns, compares P, Q, R and S with the full-adder sum and carry (A = 0) or full-subtractor difference and borrow (A = 1) worked out by integer arithmetic,
// Unlike the other gate tests it does not check that the outputs are all
// different: with the gate's equations as specified, inputs 0001 and 0100
// both give 0001 (and three more pairs collide), so the mapping is not one
// to one. A time watchdog ends the run with a failure if it hangs.
module tb_dkg_gate;
  logic a, b, c, d, p, q, r, s;
  logic [3:0] exp_out;
  int checks = 0, failures = 0;
  int ones;

  dkg_gate dut (.a(a), .b(b), .c(c), .d(d), .p(p), .q(q), .r(r), .s(s));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      if (!a) begin
        // full adder: {R,S} = B + C + D
        ones = int'(b) + int'(c) + int'(d);
        exp_out = {a, c, ones[1], ones[0]};
      end else begin
        // full subtractor: S = B - C - D, R = borrow
        ones = int'(b) - int'(c) - int'(d);
        exp_out = {a, !d, ones < 0, ones[0]};
      end
      checks++;
      if ({p, q, r, s} !== exp_out) begin
        failures++;
        $display("FAIL in=%b%b%b%b got=%b%b%b%b exp=%b", a, b, c, d, p, q, r, s, exp_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
