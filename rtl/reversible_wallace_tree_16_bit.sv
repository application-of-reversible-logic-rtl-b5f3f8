// reversible_wallace_tree_16_bit: 16x16 unsigned multiplier from four 8x8
// reversible Wallace tree multipliers and three 16-bit reversible adders.
// With a = {AH, AL} and b = {BH, BL} (8-bit halves):
//   LL = AL*BL, HL = AH*BL, LH = AL*BH, HH = AH*BH
//   product = LL + ((HL + LH) << 8) + (HH << 16)
//   r1: {c1, M}  = HL + LH
//   r2: {c2, S}  = M + {HH[7:0], LL[15:8]}      -> product[23:8]
//   r3:            {8'b0, HH[15:8]} + c1 + c2    -> product[31:24]
//   product[7:0] = LL[7:0]
// Purely combinational. The four-multiplier/three-adder structure and the ports
// follow the paper's schematic; the exact wiring shown above is this design's.
module reversible_wallace_tree_16_bit (
  input  logic [15:0] a,
  input  logic [15:0] b,
  output logic [31:0] product
);
  logic [15:0] ll, hl, lh, hh;
  reversible_wallace_tree k1 (.a(a[7:0]),  .b(b[7:0]),  .product(ll));
  reversible_wallace_tree k2 (.a(a[15:8]), .b(b[7:0]),  .product(hl));
  reversible_wallace_tree k3 (.a(a[7:0]),  .b(b[15:8]), .product(lh));
  reversible_wallace_tree k4 (.a(a[15:8]), .b(b[15:8]), .product(hh));

  logic [15:0] mid, upper;
  logic        c1, c2, c3;
  reversible_16_bit_rca r1 (.a(hl), .b(lh), .cin(1'b0), .sum(mid), .co(c1));
  reversible_16_bit_rca r2 (.a(mid), .b({hh[7:0], ll[15:8]}), .cin(1'b0),
                            .sum(product[23:8]), .co(c2));
  reversible_16_bit_rca r3 (.a({8'b0, hh[15:8]}), .b({15'b0, c1}), .cin(c2),
                            .sum(upper), .co(c3));

  assign product[7:0]   = ll[7:0];
  assign product[31:24] = upper[7:0];
  // upper[15:8] and c3 are always zero: the product fits in 32 bits.
endmodule
