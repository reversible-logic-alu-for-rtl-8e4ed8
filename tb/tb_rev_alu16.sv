// tb_rev_alu16: end-to-end self-checking test of the 16-bit reversible ALU
// at its default width.
//
// Three parts:
//   1. The published operand pair A = 1100110011001100, B = 1010101010101010
//      through all sixteen select codes, compared with the published
//      result of each code (and the published carry-out where there is one).
//   2. Corner operands (0, 1, all ones, 0x8000, 0x7FFF) through every code.
//   3. 2000 random operand pairs per code.
// Parts 2 and 3 compare against an integer reference model. The bench counts
// how often each mechanism of the design occurred (every select code, a
// carry out of ADD, a borrow out of SUB, a carry rippling through all
// sixteen slices, the bit-0 carry injection of INC and 2's complement, a
// decrement with and without carry out) and counts a failure for any that
// never did. A time watchdog ends the run with a failure if it hangs.
module tb_rev_alu16;
  import rev_alu_pkg::*;

  localparam int W = 16;
  localparam int RANDOM_PER_OP = 2000;

  alu_op_e        s;
  logic [W-1:0]   a, b, out;
  logic           co;
  int checks = 0, failures = 0;

  // mechanism counters
  int op_seen [16];
  int n_add_carry = 0, n_sub_borrow = 0, n_full_ripple = 0;
  int n_inject = 0, n_dec_carry = 0, n_dec_nocarry = 0;

  rev_alu16 dut (.s(s), .a(a), .b(b), .out(out), .co(co));

  // reference: {co, out}
  function automatic logic [W:0] ref_alu(logic [3:0] op, logic [W-1:0] x, logic [W-1:0] y);
    logic [W:0] r;
    case (op)
      4'b0000: r = {1'b0, x & y};
      4'b0001: r = {1'b0, ~(x & y)};
      4'b0010: r = {1'b0, x | y};
      4'b0011: r = {1'b0, ~(x | y)};
      4'b0100: r = {1'b0, x};
      4'b0101: r = {1'b0, x ^ y};
      4'b0110: r = {1'b0, y};
      4'b0111: r = {1'b0, ~(x ^ y)};
      4'b1000: r = {1'b0, x} + {1'b0, y};
      4'b1001: r = {1'b0, x} + 17'd1;
      4'b1010: r = {x == '0, W'(-x)};             // carry of ~x + 1
      4'b1011: r = {1'b0, {W{1'b1}}};
      4'b1100: r = {x < y, W'(x - y)};            // borrow
      4'b1101: r = {x != '0, W'(x - 1'b1)};       // carry of x + all ones
      4'b1110: r = {1'b0, ~x};
      default: r = '0;
    endcase
    return r;
  endfunction

  task automatic apply(alu_op_e op, logic [W-1:0] x, logic [W-1:0] y);
    logic [W:0] e;
    s = op; a = x; b = y;
    #1;
    e = ref_alu(op, x, y);
    checks++;
    if ({co, out} !== e) begin
      failures++;
      $display("FAIL op=%s a=%h b=%h got co=%b out=%h exp co=%b out=%h",
               op.name(), x, y, co, out, e[W], e[W-1:0]);
    end
    op_seen[op]++;
    if (op == OP_ADD && co) n_add_carry++;
    if (op == OP_SUB && co) n_sub_borrow++;
    if ((op == OP_ADD || op == OP_INC) && co && out == '0) n_full_ripple++;   // carry through every slice
    if (op == OP_INC || op == OP_TWOS) n_inject++;
    if (op == OP_DEC &&  co) n_dec_carry++;
    if (op == OP_DEC && !co) n_dec_nocarry++;
  endtask

  // compare with a published value; use_co marks codes whose carry-out is published
  task automatic published(alu_op_e op, logic [W-1:0] exp_out, logic use_co, logic exp_co);
    logic [W-1:0] pa = 16'b1100110011001100;
    logic [W-1:0] pb = 16'b1010101010101010;
    s = op; a = pa; b = pb;
    #1;
    checks++;
    if (out !== exp_out || (use_co && co !== exp_co)) begin
      failures++;
      $display("FAIL published %s: got co=%b out=%b exp out=%b", op.name(), co, out, exp_out);
    end
    op_seen[op]++;
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] corner [6];
    corner = '{16'h0000, 16'h0001, 16'hFFFF, 16'h8000, 16'h7FFF, 16'hAAAA};
    foreach (op_seen[i]) op_seen[i] = 0;

    // 1. published results
    published(OP_AND,   16'b1000100010001000, 1'b0, 1'b0);
    published(OP_NAND,  16'b0111011101110111, 1'b0, 1'b0);
    published(OP_OR,    16'b1110111011101110, 1'b0, 1'b0);
    published(OP_NOR,   16'b0001000100010001, 1'b0, 1'b0);
    published(OP_BUFA,  16'b1100110011001100, 1'b0, 1'b0);
    published(OP_XOR,   16'b0110011001100110, 1'b0, 1'b0);
    published(OP_BUFB,  16'b1010101010101010, 1'b0, 1'b0);
    published(OP_XNOR,  16'b1001100110011001, 1'b0, 1'b0);
    published(OP_ADD,   16'b0111011101110110, 1'b0, 1'b0);
    published(OP_INC,   16'b1100110011001101, 1'b0, 1'b0);
    published(OP_TWOS,  16'b0011001100110100, 1'b0, 1'b0);
    published(OP_SET,   16'b1111111111111111, 1'b0, 1'b0);
    published(OP_SUB,   16'b0010001000100010, 1'b1, 1'b0);
    published(OP_DEC,   16'b1100110011001011, 1'b1, 1'b1);
    published(OP_NOT,   16'b0011001100110011, 1'b1, 1'b0);
    published(OP_CLEAR, 16'b0000000000000000, 1'b1, 1'b0);

    // 2. corners and 3. random operands, every code
    for (int k = 0; k < 16; k++) begin
      foreach (corner[i]) foreach (corner[j]) apply(alu_op_e'(k), corner[i], corner[j]);
      for (int n = 0; n < RANDOM_PER_OP; n++) apply(alu_op_e'(k), W'($urandom), W'($urandom));
    end

    // mechanisms
    for (int k = 0; k < 16; k++) begin
      checks++;
      if (op_seen[k] == 0) begin failures++; $display("FAIL code %b never applied", 4'(k)); end
    end
    checks++; if (n_add_carry   == 0) begin failures++; $display("FAIL no ADD carry out"); end
    checks++; if (n_sub_borrow  == 0) begin failures++; $display("FAIL no SUB borrow out"); end
    checks++; if (n_full_ripple == 0) begin failures++; $display("FAIL no 16-slice carry ripple"); end
    checks++; if (n_inject      == 0) begin failures++; $display("FAIL no bit-0 carry injection"); end
    checks++; if (n_dec_carry   == 0) begin failures++; $display("FAIL no DEC with carry out"); end
    checks++; if (n_dec_nocarry == 0) begin failures++; $display("FAIL no DEC without carry out"); end
    $display("mechanisms: add_carry=%0d sub_borrow=%0d full_ripple=%0d bit0_inject=%0d dec_carry=%0d dec_nocarry=%0d",
             n_add_carry, n_sub_borrow, n_full_ripple, n_inject, n_dec_carry, n_dec_nocarry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
