// op_unit: output decoder of the GCD control unit, built from reversible
// gates. It turns the current state into the datapath controls:
//   ld   (load X, Y from the operands) in LOAD = 001
//   swap (exchange X and Y)            in SWAP = 011
//   sub  (X <= X - Y)                  in SUB  = 100
//   done (result valid)                in DONE = 101
// Each output is a three-input AND of state bits or their complements, made
// of two Peres gates used as AND gates (R output, C = 0); the complements come
// from Feynman gates with B = 1. At most one output is high at a time.
// Combinational (Moore outputs). The unit's name and the use of reversible
// gates follow the paper; the signal set and structure are this design's.
module op_unit
  import gcd_pkg::*;
(
  input  gcd_state_e state,
  output logic       ld,
  output logic       swap,
  output logic       sub,
  output logic       done
);
  logic [2:0] s, s_n, s_g;
  assign s = 3'(state);

  for (genvar k = 0; k < 3; k++) begin : g_not
    feynman_gate u_not (.a(s[k]), .b(1'b1), .p(s_g[k]), .q(s_n[k]));
  end

  // and3: two Peres gates in series, first R feeds the second A
  logic [3:0] decoded;
  logic [2:0] term [4];
  assign term[0] = {s_n[2], s_n[1], s[0]};   // LOAD
  assign term[1] = {s_n[2], s[1],   s[0]};   // SWAP
  assign term[2] = {s[2],   s_n[1], s_n[0]}; // SUB
  assign term[3] = {s[2],   s_n[1], s[0]};   // DONE

  for (genvar t = 0; t < 4; t++) begin : g_and3
    logic p1, q1, r1, p2, q2;
    peres_gate u_and_a (.a(term[t][2]), .b(term[t][1]), .c(1'b0), .p(p1), .q(q1), .r(r1));
    peres_gate u_and_b (.a(r1), .b(term[t][0]), .c(1'b0), .p(p2), .q(q2), .r(decoded[t]));
  end

  assign {done, sub, swap, ld} = decoded;

  always_comb begin
    assert final ($onehot0({ld, swap, sub, done}))
      else $error("op_unit: more than one control active");
  end
endmodule
