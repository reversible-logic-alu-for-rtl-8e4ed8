// not_gate: the 1x1 reversible NOT gate, P = ~A.
//
// The simplest reversible gate: one input, one output, a one-to-one mapping.
// Purely combinational, no clock. Quantum cost zero, as for any NOT.
module not_gate (
  input  logic a,
  output logic p
);
  assign p = ~a;
endmodule
