// tb_alu1_first: exhaustive self-checking test of the bit-0 ALU slice.
//
// Applies every select code with every combination of a and b and compares
// out and co with an integer reference. Bit 0 has no carry input: the
// reference adds 1 for increment (1001) and 2's complement (1010) and 0 for
// every other code. A time watchdog ends the run with a failure if it hangs.
module tb_alu1_first;
  logic [3:0] s;
  logic a, b, out, co;
  logic [1:0] exp_res;   // {co, out}
  int checks = 0, failures = 0;

  alu1_first dut (.s(s), .a(a), .b(b), .out(out), .co(co));

  function automatic logic [1:0] ref_bit0(logic [3:0] op, logic x, logic y);
    int v;
    case (op)
      4'b0000: return {1'b0, x & y};
      4'b0001: return {1'b0, ~(x & y)};
      4'b0010: return {1'b0, x | y};
      4'b0011: return {1'b0, ~(x | y)};
      4'b0100: return {1'b0, x};
      4'b0101: return {1'b0, x ^ y};
      4'b0110: return {1'b0, y};
      4'b0111: return {1'b0, ~(x ^ y)};
      4'b1000: v = int'(x) + int'(y);
      4'b1001: v = int'(x) + 1;
      4'b1010: v = int'(!x) + 1;
      4'b1011: v = 1;
      4'b1100: v = int'(x) - int'(y);
      4'b1101: v = int'(x) + 1;        // lowest bit of x + all ones
      4'b1110: v = int'(!x);
      default: v = 0;
    endcase
    if (op == 4'b1100)
      return {v < 0, v[0]};
    return {v > 1, v[0]};
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {s, a, b} = 6'(i);
      #1;
      exp_res = ref_bit0(s, a, b);
      checks++;
      if ({co, out} !== exp_res) begin
        failures++;
        $display("FAIL s=%b a=%b b=%b got co=%b out=%b exp=%b", s, a, b, co, out, exp_res);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
