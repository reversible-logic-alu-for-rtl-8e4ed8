// double_peres_gate: the 4x4 reversible Double Peres gate (DPG).
//
//   P = A
//   Q = A XOR B
//   R = A XOR B XOR C
//   S = ((A XOR B) AND C) XOR ((A AND B) XOR D)
//
// It is the base of the logic half of each ALU bit slice: with A, B the
// operand bits, C and D chosen by the select lines, S gives AND, NAND, OR or
// NOR and R gives XOR or XNOR. Purely combinational. Quantum cost six.
module double_peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic axb;
  assign axb = a ^ b;
  assign p = a;
  assign q = axb;
  assign r = axb ^ c;
  assign s = (axb & c) ^ ((a & b) ^ d);
endmodule
