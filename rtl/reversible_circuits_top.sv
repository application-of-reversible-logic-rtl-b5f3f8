// reversible_circuits_top: the reversible-logic circuits side by side, each
// with its own ports: the 16-bit HNG ripple-carry adder, the 16x16 Wallace
// tree multiplier (four 8x8 TSG/Peres trees and three 16-bit adders), the
// 16:1 Fredkin multiplexer, a Fredkin-latch D flip-flop and the 8-bit GCD
// processor whose control unit is built on such flip-flops. The adder,
// multiplier and mux are combinational; the flip-flop and the GCD processor
// use clk (rising edge); rst is the GCD processor's synchronous reset.
// Placing the circuits in one top is this design's choice.
module reversible_circuits_top (
  input  logic [15:0] add_a,
  input  logic [15:0] add_b,
  input  logic        add_cin,
  output logic [15:0] add_sum,
  output logic        add_co,
  input  logic [15:0] mul_a,
  input  logic [15:0] mul_b,
  output logic [31:0] mul_product,
  input  logic [15:0] mux_i,
  input  logic [3:0]  mux_s,
  output logic        mux_y,
  input  logic        clk,
  input  logic        dff_d,
  output logic        dff_q,
  output logic        dff_q_bar,
  input  logic        rst,
  input  logic        gcd_start,
  input  logic [7:0]  gcd_a,
  input  logic [7:0]  gcd_b,
  output logic [7:0]  gcd_result,
  output logic        gcd_done
);
  reversible_16_bit_rca u_adder (
    .a(add_a), .b(add_b), .cin(add_cin), .sum(add_sum), .co(add_co)
  );

  reversible_wallace_tree_16_bit u_mult (
    .a(mul_a), .b(mul_b), .product(mul_product)
  );

  mux_16_1_reversible_new u_mux (.i(mux_i), .s(mux_s), .y(mux_y));

  d_flip_flop u_dff (.clk(clk), .d(dff_d), .q(dff_q), .q_bar(dff_q_bar));

  gcd_processor #(.WIDTH(8)) u_gcd (
    .clk(clk), .rst(rst), .start(gcd_start), .a_in(gcd_a), .b_in(gcd_b),
    .gcd(gcd_result), .done(gcd_done)
  );
endmodule
