// alu1_next: one bit slice of the reversible ALU, as used for bits 1 to 15.
//
// The slice computes one of sixteen operations on the operand bits a and b,
// picked by the select word s = {s3,s2,s1,s0}:
//
//   s3 = 0, logic half, built on a Double Peres gate (DPG) fed with
//     A = a, B = b, C = s1, D = s0. Its S output is then AND (s1 s0 = 00),
//     NAND (01), OR (10) or NOR (11); its R output is a ^ b ^ s1, i.e. XOR
//     (s1 = 0) or XNOR (s1 = 1). For s2 = 1 a Fredkin multiplexer picks
//     buffer-A / buffer-B (s0 = 0, s1 choosing a or b) or XOR / XNOR (s0 = 1).
//   s3 = 1, arithmetic half, built on a DKG gate fed with A = ctrl (0 adds,
//     1 subtracts), B = x, C = y, D = ci. The operands x and y are steered
//     from a and b by Feynman and Toffoli gates according to the controls of
//     rev_alu_pkg::arith_decode (add, increment, 2's complement, set,
//     subtract, decrement, not, clear).
//
// A Fredkin multiplexer on s3 picks the result bit, and a Toffoli gate
// passes the DKG carry/borrow to co only when s3 = 1, so that logic
// operations leave the carry chain at zero.
//
// Interface: s, a, b, ci (carry or borrow from the slice below) in; out and
// co (carry or borrow to the slice above) out. Purely combinational.
//
// The gates, their equations and the use of DPG for the logic half and DKG
// for the arithmetic half follow the design; the exact wiring of the select
// lines into the gates is this design's own. Signal fan-out is by plain
// wires; the gates' garbage outputs are left open.
module alu1_next
  import rev_alu_pkg::*;
(
  input  logic [3:0] s,
  input  logic       a,
  input  logic       b,
  input  logic       ci,
  output logic       out,
  output logic       co
);

  // ---------------- logic half (s3 = 0) ----------------
  logic dpg_xor;    // a ^ b ^ s1: XOR or XNOR
  logic dpg_gate;   // AND / NAND / OR / NOR
  logic buf_bit;    // a (s1 = 0) or b (s1 = 1)
  logic xbuf_bit;   // buffer (s0 = 0) or XOR/XNOR (s0 = 1)
  logic logic_bit;  // s2 = 0: dpg_gate, s2 = 1: xbuf_bit

  double_peres_gate u_dpg (
    .a(a), .b(b), .c(s[1]), .d(s[0]),
    .p(), .q(), .r(dpg_xor), .s(dpg_gate)
  );

  fredkin_mux2 u_mux_buf  (.sel(s[1]), .d0(a),        .d1(b),        .y(buf_bit),   .g_sel(), .g_other());
  fredkin_mux2 u_mux_xbuf (.sel(s[0]), .d0(buf_bit),  .d1(dpg_xor),  .y(xbuf_bit),  .g_sel(), .g_other());
  fredkin_mux2 u_mux_log  (.sel(s[2]), .d0(dpg_gate), .d1(xbuf_bit), .y(logic_bit), .g_sel(), .g_other());

  // ---------------- arithmetic half (s3 = 1) ----------------
  arith_ctrl_t ac;
  logic x_bit, y_b_term, y_ab_term, y_bit;
  logic sum_bit, carry_bit;

  always_comb ac = arith_decode(s[2:0]);

  // x = a ^ x_inv
  feynman_gate u_fy_x (.a(ac.x_inv), .b(a), .p(), .q(x_bit));
  // y = (b & y_b) ^ (a & y_a) ^ y_one
  toffoli_gate u_tf_yb (.a(b), .b(ac.y_b), .c(1'b0),     .p(), .q(), .r(y_b_term));
  toffoli_gate u_tf_ya (.a(a), .b(ac.y_a), .c(y_b_term), .p(), .q(), .r(y_ab_term));
  feynman_gate u_fy_y  (.a(ac.y_one), .b(y_ab_term), .p(), .q(y_bit));

  dkg_gate u_dkg (
    .a(ac.ctrl), .b(x_bit), .c(y_bit), .d(ci),
    .p(), .q(), .r(carry_bit), .s(sum_bit)
  );

  // ---------------- result and carry ----------------
  fredkin_mux2 u_mux_out (.sel(s[3]), .d0(logic_bit), .d1(sum_bit), .y(out), .g_sel(), .g_other());
  toffoli_gate u_tf_co (.a(s[3]), .b(carry_bit), .c(1'b0), .p(), .q(), .r(co));

endmodule
