// fredkin_gate: the 3x3 reversible Fredkin (controlled-swap) gate.
//
//   P = A
//   Q = ~A B XOR A C
//   R = ~A C XOR A B
//
// A is the control: with A = 0 the data inputs pass straight (Q = B, R = C),
// with A = 1 they are swapped (Q = C, R = B). Purely combinational. Quantum
// cost five.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = (~a & b) ^ (a & c);
  assign r = (~a & c) ^ (a & b);
endmodule
