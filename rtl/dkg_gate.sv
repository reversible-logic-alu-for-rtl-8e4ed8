// dkg_gate: the 4x4 reversible DKG gate, a full adder / full subtractor.
//
//   P = A
//   Q = ~A C XOR A ~D
//   R = ((A XOR B) AND (C XOR D)) XOR (C AND D)
//   S = B XOR C XOR D
//
// With A = 0, S = B + C + D (sum) and R = its carry. With A = 1, S is the
// difference B - C - D and R its borrow. It is the base of the arithmetic
// half of each ALU bit slice. Purely combinational.
//
// Note: these equations, taken as specified, are not one to one. With
// A = 0, Q = C, R = majority(B,C,D) and S = parity(B,C,D), so when B != D
// and C is fixed, swapping B and D leaves all outputs unchanged (0001 and
// 0100 both map to 0001). The adder/subtractor outputs R and S, which the
// ALU uses, are correct.
module dkg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = (~a & c) ^ (a & ~d);
  assign r = ((a ^ b) & (c ^ d)) ^ (c & d);
  assign s = b ^ c ^ d;
endmodule
