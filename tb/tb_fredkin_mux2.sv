// tb_fredkin_mux2: exhaustive self-checking test of fredkin_mux2.
//
// Applies all eight patterns of sel, d0, d1 and checks that y is d0 for
// sel = 0 and d1 for sel = 1, that g_sel repeats sel and that g_other holds
// the input that was not selected. A time watchdog ends the run with a
// failure if it hangs.
module tb_fredkin_mux2;
  logic sel, d0, d1, y, g_sel, g_other;
  int checks = 0, failures = 0;

  fredkin_mux2 dut (.sel(sel), .d0(d0), .d1(d1), .y(y), .g_sel(g_sel), .g_other(g_other));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {sel, d0, d1} = 3'(i);
      #1;
      checks++;
      if (y !== (sel ? d1 : d0)) begin
        failures++;
        $display("FAIL sel=%b d0=%b d1=%b y=%b", sel, d0, d1, y);
      end
      checks++;
      if (g_sel !== sel || g_other !== (sel ? d0 : d1)) begin
        failures++;
        $display("FAIL garbage outputs sel=%b d0=%b d1=%b: %b %b", sel, d0, d1, g_sel, g_other);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
