// tb_not_gate: exhaustive self-checking test of not_gate.
//
// Applies both input values and checks that the output is the other one.
// A time watchdog ends the run with a failure if it hangs.
module tb_not_gate;
  logic a, p;
  int checks = 0, failures = 0;

  not_gate dut (.a(a), .p(p));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b0;
    #1;
    checks++;
    if (p !== 1'b1) begin failures++; $display("FAIL a=0 p=%b", p); end
    a = 1'b1;
    #1;
    checks++;
    if (p !== 1'b0) begin failures++; $display("FAIL a=1 p=%b", p); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
