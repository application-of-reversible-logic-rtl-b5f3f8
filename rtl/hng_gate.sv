// hng_gate: the 4x4 reversible HNG gate, the full-adder cell of the reversible
// ripple-carry adders.
//   P = A, Q = B, R = A ^ B ^ C, S = (A ^ B) & C ^ (A & B) ^ D
// With D = 0 the gate is a full adder: R is the sum and S the carry-out of A, B
// and C. P and Q pass A and B through so that the mapping stays one-to-one; in
// the adders they are unused (garbage) outputs. Purely combinational.
// The use of the HNG gate as the adder cell follows the paper; its equations
// are the standard definition of the gate.
module hng_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  logic a_x_b;
  assign a_x_b = a ^ b;
  assign p = a;
  assign q = b;
  assign r = a_x_b ^ c;
  assign s = (a_x_b & c) ^ (a & b) ^ d;
endmodule
