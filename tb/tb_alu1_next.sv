// tb_alu1_next: exhaustive self-checking test of one upper ALU bit slice.
//
// Applies every select code with every combination of a, b and carry in
// (16 x 8 patterns) and compares out and co with a reference computed by
// integer arithmetic: for logic codes the Boolean function of a and b with
// co = 0, for arithmetic codes the one-bit sum or difference of the slice's
// operands and the incoming carry or borrow. It also counts that a carry
// out and a borrow out were both produced. A time watchdog ends the run with
// a failure if it hangs.
module tb_alu1_next;
  import rev_alu_pkg::*;

  logic [3:0] s;
  logic a, b, ci, out, co;
  logic [1:0] exp_res;   // {co, out}
  int checks = 0, failures = 0;
  int carries = 0, borrows = 0;

  alu1_next dut (.s(s), .a(a), .b(b), .ci(ci), .out(out), .co(co));

  // {carry/borrow, result bit} of one slice
  function automatic logic [1:0] ref_slice(logic [3:0] op, logic x, logic y, logic cin);
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
      4'b1000: v = int'(x) + int'(y) + int'(cin);           // add
      4'b1001: v = int'(x) + int'(cin);                     // increment
      4'b1010: v = int'(!x) + int'(cin);                    // 2's complement
      4'b1011: v = 1 + int'(cin);                           // set: x + ~x
      4'b1100: v = int'(x) - int'(y) - int'(cin);           // subtract
      4'b1101: v = int'(x) + 1 + int'(cin);                 // decrement: x + all ones
      4'b1110: v = int'(!x) + int'(cin);                    // not
      default: v = -int'(cin);                              // clear: x - x
    endcase
    if (op == 4'b1100 || op == 4'b1111)
      return {v < 0, v[0]};                                 // borrow, difference
    return {v > 1, v[0]};                                   // carry, sum
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 128; i++) begin
      {s, a, b, ci} = 7'(i);
      #1;
      exp_res = ref_slice(s, a, b, ci);
      checks++;
      if ({co, out} !== exp_res) begin
        failures++;
        $display("FAIL s=%b a=%b b=%b ci=%b got co=%b out=%b exp=%b", s, a, b, ci, co, out, exp_res);
      end
      if (co && s == OP_ADD) carries++;
      if (co && s == OP_SUB) borrows++;
    end
    checks++;
    if (carries == 0 || borrows == 0) begin
      failures++;
      $display("FAIL carry or borrow never produced (%0d, %0d)", carries, borrows);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
