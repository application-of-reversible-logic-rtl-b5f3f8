// gcd_datapath: WIDTH-bit datapath of the GCD processor. Two registers X and
// Y, each bit a reversible d_flip_flop; on a rising clk edge ld loads a_in/b_in, swap exchanges X and Y, sub
// replaces X by X - Y, otherwise both hold. A WIDTH-bit ripple adder of HNG
// gates computes X + ~Y + 1; its carry-out is 1 when X >= Y, so the same
// subtractor gives the compare flag x_lt_y. y_zero flags Y == 0. Flags are
// combinational from the registers. The paper describes only the operations
// (subtract, compare, swap) and the 8-bit width; this structure is this
// design's. Controls are expected one at a time, ld having priority.
module gcd_datapath #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic [WIDTH-1:0] a_in,
  input  logic [WIDTH-1:0] b_in,
  input  logic             ld,
  input  logic             swap,
  input  logic             sub,
  output logic             y_zero,
  output logic             x_lt_y,
  output logic [WIDTH-1:0] x
);
  logic [WIDTH-1:0] x_q, y_q, x_d, y_d, diff;
  logic             no_borrow;

  ripple_reversible #(.WIDTH(WIDTH)) u_sub (
    .a(x_q), .b(~y_q), .cin(1'b1), .sum(diff), .co(no_borrow)
  );

  // next-register values; ld has priority, then swap, then sub
  always_comb begin
    x_d = x_q;
    y_d = y_q;
    if (ld) begin
      x_d = a_in;
      y_d = b_in;
    end else if (swap) begin
      x_d = y_q;
      y_d = x_q;
    end else if (sub) begin
      x_d = diff;
    end
  end

  // X and Y are held in the same reversible master-slave flip-flops as the
  // control unit's state, so all storage of the processor changes on the
  // same rising edge in the same way
  for (genvar k = 0; k < WIDTH; k++) begin : g_reg
    logic x_q_bar, y_q_bar;
    d_flip_flop u_x (.clk(clk), .d(x_d[k]), .q(x_q[k]), .q_bar(x_q_bar));
    d_flip_flop u_y (.clk(clk), .d(y_d[k]), .q(y_q[k]), .q_bar(y_q_bar));
  end

  assign x_lt_y = ~no_borrow;
  assign y_zero = (y_q == '0);
  assign x      = x_q;

  // subtracting is only meaningful when X >= Y
  assert property (@(posedge clk) sub && !ld |-> !x_lt_y)
    else $error("gcd_datapath: subtract with X < Y");
endmodule
