// tsg_gate: the 4x4 reversible TSG gate, the full-adder cell of the reversible
// Wallace tree multiplier.
//   P = A, Q = ~A & ~C ^ ~B, R = Q ^ D, S = (Q & D) ^ (A & B ^ C)
// With C = 0, Q = A ^ B, so R = A ^ B ^ D is the sum and S = (A ^ B) & D ^ A & B
// the carry of a full adder on A, B and D. Purely combinational.
// The TSG cell is the one drawn in the multiplier; the equations are the
// standard definition of the gate.
module tsg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic t;
  assign t = (~a & ~c) ^ ~b;
  assign p = a;
  assign q = t;
  assign r = t ^ d;
  assign s = (t & d) ^ ((a & b) ^ c);
endmodule
