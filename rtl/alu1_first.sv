// alu1_first: the bit-0 slice of the reversible ALU.
//
// It is the bit slice of alu1_next with one change: its carry input is not
// taken from a neighbour but made from the select word. Increment and 2's
// complement need a 1 added at bit 0 only, so the slice injects a carry of
// 1 for those two codes (s = 1001 and 1010) and 0 for every other code. A
// Toffoli gate forms that carry as ~s2 AND (s1 XOR s0); since the slice's
// DKG result is only selected when s3 = 1, s3 need not enter the product.
//
// Interface: s, a, b in; out and co (carry or borrow into bit 1) out. Purely
// combinational.
//
// That bit 0 is a slice of its own which adds the 1 for increment and 2's
// complement follows the design; that decrement needs no bit-0 change here
// (it adds all ones, see alu1_next) is this design's own choice.
module alu1_first (
  input  logic [3:0] s,
  input  logic       a,
  input  logic       b,
  output logic       out,
  output logic       co
);

  logic n_s2, s1_x_s0, cin0;

  not_gate     u_not_s2 (.a(s[2]), .p(n_s2));
  feynman_gate u_fy_sel (.a(s[1]), .b(s[0]), .p(), .q(s1_x_s0));
  toffoli_gate u_tf_cin (.a(n_s2), .b(s1_x_s0), .c(1'b0), .p(), .q(), .r(cin0));

  alu1_next u_slice (
    .s(s), .a(a), .b(b), .ci(cin0),
    .out(out), .co(co)
  );

endmodule
