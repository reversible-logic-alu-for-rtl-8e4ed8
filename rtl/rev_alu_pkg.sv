// rev_alu_pkg: operation codes and operand-steering controls shared by the
// 1-bit ALU cells and the 16-bit reversible ALU.
//
// The 4-bit select word {s3,s2,s1,s0} picks one of sixteen operations. With
// s3 = 0 the Double Peres logic path produces the result, with s3 = 1 the DKG
// adder/subtractor path does. The code points are those of the operation
// table of the design; the steering controls below are this design's own
// encoding of how each arithmetic operation feeds the DKG gate.
package rev_alu_pkg;

  typedef enum logic [3:0] {
    OP_AND    = 4'b0000,
    OP_NAND   = 4'b0001,
    OP_OR     = 4'b0010,
    OP_NOR    = 4'b0011,
    OP_BUFA   = 4'b0100,
    OP_XOR    = 4'b0101,
    OP_BUFB   = 4'b0110,
    OP_XNOR   = 4'b0111,
    OP_ADD    = 4'b1000,
    OP_INC    = 4'b1001,
    OP_TWOS   = 4'b1010,
    OP_SET    = 4'b1011,
    OP_SUB    = 4'b1100,
    OP_DEC    = 4'b1101,
    OP_NOT    = 4'b1110,
    OP_CLEAR  = 4'b1111
  } alu_op_e;

  // How one bit slice drives its DKG gate (inputs A=ctrl, B=x, C=y, D=carry in).
  //   x   = a XOR x_inv
  //   y   = (b AND y_b) XOR (a AND y_a) XOR y_one
  //   ctrl = 0: full adder x + y + cin, ctrl = 1: full subtractor x - y - bin
  //   cin_first: carry injected into bit 0 only (increment, 2's complement)
  typedef struct packed {
    logic ctrl;
    logic x_inv;
    logic y_b;
    logic y_a;
    logic y_one;
    logic cin_first;
  } arith_ctrl_t;

  // Operand steering for the arithmetic half (s3 = 1). For the logic half the
  // DKG result is not selected; the controls are those of the matching
  // arithmetic code so that the carry chain stays well defined.
  function automatic arith_ctrl_t arith_decode(input logic [2:0] s);
    arith_ctrl_t c;
    c = '0;
    unique case (s)
      3'b000: c.y_b = 1'b1;                                   // ADD   a + b
      3'b001: c.cin_first = 1'b1;                             // INC   a + 0 + 1
      3'b010: begin c.x_inv = 1'b1; c.cin_first = 1'b1; end   // 2's   ~a + 0 + 1
      3'b011: begin c.y_a = 1'b1; c.y_one = 1'b1; end         // SET   a + ~a
      3'b100: begin c.ctrl = 1'b1; c.y_b = 1'b1; end          // SUB   a - b
      3'b101: c.y_one = 1'b1;                                 // DEC   a + 1...1
      3'b110: c.x_inv = 1'b1;                                 // NOT   ~a + 0
      3'b111: begin c.ctrl = 1'b1; c.y_a = 1'b1; end          // CLEAR a - a
      default: c = '0;
    endcase
    return c;
  endfunction

endpackage
