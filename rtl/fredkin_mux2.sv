// fredkin_mux2: a 2:1 multiplexer made of one Fredkin gate.
//
// The select drives the Fredkin control input A, the two data inputs drive
// B and C, and the Q output carries B when sel = 0 and C when sel = 1. The
// other two outputs (the select and the unselected input) are the gate's
// garbage outputs and are brought out so that the mapping stays one to one.
// Purely combinational.
module fredkin_mux2 (
  input  logic sel,
  input  logic d0,
  input  logic d1,
  output logic y,
  output logic g_sel,
  output logic g_other
);
  fredkin_gate u_fg (.a(sel), .b(d0), .c(d1), .p(g_sel), .q(y), .r(g_other));
endmodule
