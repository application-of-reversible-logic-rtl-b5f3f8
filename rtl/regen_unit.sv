// regen_unit: next-state logic of the GCD control unit (Euclid's algorithm by
// repeated subtract, compare and swap), built from reversible gates.
//   IDLE --start--> LOAD --> TEST
//   TEST: y_zero -> DONE, else x_lt_y -> SWAP, else -> SUB
//   SWAP --> SUB --> TEST
//   DONE --start--> LOAD (otherwise stays in DONE)
// rst (synchronous, active high) forces IDLE; unused codes 6 and 7 go to IDLE.
// How it works: each next-state bit is one 16:1 Fredkin multiplexer
// (mux_16_1_reversible_new) selected by {rst, state}. Its upper eight inputs
// are 0, so rst yields IDLE = 000. Its lower eight inputs hold that bit's value
// for each current state, formed from start, y_zero and x_lt_y by Feynman
// gates (NOT, with B = 1) and Peres gates (AND via R with C = 0; OR as
// (a ^ b) ^ (a & b) with a Feynman gate). With IDLE=000, LOAD=001, TEST=010,
// SWAP=011, SUB=100, DONE=101:
//   bit 0: IDLE start, TEST y_zero | x_lt_y, DONE 1
//   bit 1: LOAD 1, TEST ~y_zero & x_lt_y, SUB 1
//   bit 2: TEST y_zero | ~x_lt_y, SWAP 1, DONE ~start
// Combinational. The unit's name and the use of reversible gates follow the
// paper; the states, the encoding and this gate structure are this design's.
// Signals with several loads are wired directly rather than through Feynman
// copy gates.
module regen_unit
  import gcd_pkg::*;
(
  input  logic       rst,
  input  logic       start,
  input  logic       y_zero,
  input  logic       x_lt_y,
  input  gcd_state_e state,
  output gcd_state_e next_state
);
  logic [3:0] sel;
  assign sel = {rst, 3'(state)};

  // inverters: Feynman gates with B = 1
  logic n_yz, n_lt, n_start;
  logic g_yz, g_lt, g_st;
  feynman_gate u_not_yz (.a(y_zero), .b(1'b1), .p(g_yz), .q(n_yz));
  feynman_gate u_not_lt (.a(x_lt_y), .b(1'b1), .p(g_lt), .q(n_lt));
  feynman_gate u_not_st (.a(start),  .b(1'b1), .p(g_st), .q(n_start));

  // y_zero | x_lt_y
  logic or1_x, or1_a, or1_p, or1_fp, yz_or_lt;
  peres_gate   u_or1   (.a(y_zero), .b(x_lt_y), .c(1'b0), .p(or1_p), .q(or1_x), .r(or1_a));
  feynman_gate u_or1_f (.a(or1_a), .b(or1_x), .p(or1_fp), .q(yz_or_lt));

  // y_zero | ~x_lt_y
  logic or2_x, or2_a, or2_p, or2_fp, yz_or_nlt;
  peres_gate   u_or2   (.a(y_zero), .b(n_lt), .c(1'b0), .p(or2_p), .q(or2_x), .r(or2_a));
  feynman_gate u_or2_f (.a(or2_a), .b(or2_x), .p(or2_fp), .q(yz_or_nlt));

  // ~y_zero & x_lt_y
  logic and_p, and_q, nyz_and_lt;
  peres_gate u_and (.a(n_yz), .b(x_lt_y), .c(1'b0), .p(and_p), .q(and_q), .r(nyz_and_lt));

  // per-state values of each next-state bit, index = current state code
  logic [7:0] bit0_by_state, bit1_by_state, bit2_by_state;
  //                  111   110   DONE   SUB   SWAP  TEST        LOAD  IDLE
  assign bit0_by_state = {1'b0, 1'b0, 1'b1,   1'b0, 1'b0, yz_or_lt,   1'b0, start};
  assign bit1_by_state = {1'b0, 1'b0, 1'b0,   1'b1, 1'b0, nyz_and_lt, 1'b1, 1'b0};
  assign bit2_by_state = {1'b0, 1'b0, n_start, 1'b0, 1'b1, yz_or_nlt,  1'b0, 1'b0};

  logic [2:0] next_bits;
  mux_16_1_reversible_new u_mux0 (.i({8'b0, bit0_by_state}), .s(sel), .y(next_bits[0]));
  mux_16_1_reversible_new u_mux1 (.i({8'b0, bit1_by_state}), .s(sel), .y(next_bits[1]));
  mux_16_1_reversible_new u_mux2 (.i({8'b0, bit2_by_state}), .s(sel), .y(next_bits[2]));

  assign next_state = gcd_state_e'(next_bits);
endmodule
