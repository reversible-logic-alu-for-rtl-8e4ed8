// feynman_gate: the 2x2 reversible controlled-NOT (Feynman) gate.
//
//   P = A
//   Q = A XOR B
//
// With B tied to 0 it copies A onto Q, which is how the bit slices fan a
// signal out without breaking reversibility; with B tied to 1 it gives ~A.
// Purely combinational. Quantum cost one.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
