// fredkin_gate: the 3x3 reversible Fredkin (controlled-swap) gate.
//   P = A, Q = ~A & B | A & C, R = ~A & C | A & B
// When the control A is 1, B and C change places. Q alone is a 2:1
// multiplexer (A ? C : B), which is how the 16:1 mux and the D latch use it.
// Purely combinational; the equations are the standard definition of the gate.
module fredkin_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
