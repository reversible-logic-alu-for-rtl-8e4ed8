// toffoli_gate: the 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
//   P = A
//   Q = B
//   R = (A AND B) XOR C
//
// With C tied to 0 it is a reversible AND; the bit slices use it to gate
// operands and the carry out. Purely combinational. Quantum cost five.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;
endmodule
