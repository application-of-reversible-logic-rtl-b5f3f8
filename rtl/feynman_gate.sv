// feynman_gate: the 2x2 reversible Feynman (controlled-NOT) gate.
//   P = A, Q = A ^ B
// With B = 0 it copies A onto two outputs (reversible fan-out); with B = 1,
// Q is the complement of A. Purely combinational; standard gate definition.
module feynman_gate (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);
  assign p = a;
  assign q = a ^ b;
endmodule
