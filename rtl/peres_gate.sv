// peres_gate: the 3x3 reversible Peres gate.
//   P = A, Q = A ^ B, R = (A & B) ^ C
// With C = 0 it is a half adder (Q = sum, R = carry) and, taking only R, a
// two-input AND; the multiplier uses it both ways. Purely combinational.
// The equations are the standard definition of the gate.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = (a & b) ^ c;
endmodule
