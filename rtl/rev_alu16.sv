// rev_alu16: a 16-bit ALU with sixteen operation codes built from
// reversible gates (Double Peres, DKG, Fredkin, Toffoli, Feynman, NOT).
//
// The ALU is a ripple cascade of 1-bit slices. Bit 0 is an alu1_first
// slice, which injects the +1 of increment and 2's complement; bits 1 to
// WIDTH-1 are alu1_next slices. Every slice receives the same select word
// s = {s3,s2,s1,s0}, and the carry (or borrow) out of each slice feeds the
// carry in of the next one up. co is the carry/borrow out of the top slice;
// it is 0 for every logic operation (s3 = 0).
//
//   s     op        result            s     op        result
//   0000  AND       a & b             1000  ADD       a + b        (co = carry)
//   0001  NAND      ~(a & b)          1001  INC       a + 1
//   0010  OR        a | b             1010  2's COMP  -a
//   0011  NOR       ~(a | b)          1011  SET       all ones
//   0100  BUFFER A  a                 1100  SUB       a - b        (co = borrow)
//   0101  XOR       a ^ b             1101  DEC       a - 1        (co = carry of a + 1...1)
//   0110  BUFFER B  b                 1110  NOT       ~a
//   0111  XNOR      ~(a ^ b)          1111  CLEAR     all zeros
//
// Interface: s (4 bits), a and b (WIDTH bits) in; out (WIDTH bits) and co
// out. Purely combinational: the result settles through a WIDTH-long ripple
// carry chain, with no clock and no latency in cycles.
//
// The operation table, the 16-bit width and the cascade of a distinct
// first slice with identical upper slices follow the design; the carry-out
// semantics of decrement follow its published results.
module rev_alu16
  import rev_alu_pkg::*;
#(
  parameter int WIDTH = 16
) (
  input  alu_op_e          s,
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] out,
  output logic             co
);

  logic [WIDTH:0] carry;   // carry[i] leaves slice i-1 and enters slice i

  alu1_first u_bit0 (
    .s(s), .a(a[0]), .b(b[0]),
    .out(out[0]), .co(carry[1])
  );

  for (genvar i = 1; i < WIDTH; i++) begin : g_slice
    alu1_next u_bit (
      .s(s), .a(a[i]), .b(b[i]), .ci(carry[i]),
      .out(out[i]), .co(carry[i+1])
    );
  end

  assign carry[0] = 1'b0;   // bit 0 makes its own carry in
  assign co = carry[WIDTH];

endmodule
