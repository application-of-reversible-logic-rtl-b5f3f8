// ff_unit: state register of the GCD control unit, one reversible
// d_flip_flop per state bit. q takes d at each rising edge of clk. It has no
// reset of its own: the next-state logic forces the reset state.
// The unit's name and role follow the paper; its width is this design's.
module ff_unit #(
  parameter int unsigned STATE_W = 3
) (
  input  logic               clk,
  input  logic [STATE_W-1:0] d,
  output logic [STATE_W-1:0] q
);
  for (genvar k = 0; k < STATE_W; k++) begin : g_ff
    logic q_bar_unused;
    d_flip_flop u_ff (.clk(clk), .d(d[k]), .q(q[k]), .q_bar(q_bar_unused));
  end
endmodule
