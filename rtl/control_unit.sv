// control_unit: sequential control unit of the GCD processor, split as in the
// paper into a state register (ff_unit, u1), next-state logic (regen_unit,
// u2) and an output decoder (op_unit, u3).
// Inputs: clk, synchronous active-high rst, start, and the datapath status
// y_zero (Y == 0) and x_lt_y (X < Y). Outputs: ld, swap, sub, done (Moore,
// valid one cycle after the state changes on a rising clk edge). state is
// brought out for observation. The three-unit split follows the paper; the
// states and signals are this design's.
module control_unit
  import gcd_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       start,
  input  logic       y_zero,
  input  logic       x_lt_y,
  output logic       ld,
  output logic       swap,
  output logic       sub,
  output logic       done,
  output gcd_state_e state
);
  gcd_state_e next_state;
  logic [STATE_W-1:0] q;

  ff_unit #(.STATE_W(STATE_W)) u1 (.clk(clk), .d(next_state), .q(q));
  assign state = gcd_state_e'(q);

  regen_unit u2 (
    .rst(rst), .start(start), .y_zero(y_zero), .x_lt_y(x_lt_y),
    .state(state), .next_state(next_state)
  );

  op_unit u3 (.state(state), .ld(ld), .swap(swap), .sub(sub), .done(done));
endmodule
