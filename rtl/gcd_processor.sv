// gcd_processor: GCD of two WIDTH-bit unsigned numbers by subtract-compare-
// swap. control_unit drives gcd_datapath. Interface: hold rst high for one
// rising edge; then pulse (or hold) start with a_in/b_in valid. Operands are
// captured one cycle after start is seen; done goes high with gcd valid and
// stays until the next start. gcd(a, 0) = a, gcd(0, 0) = 0. Latency depends on
// the operands (one TEST plus one SUB per subtraction, one SWAP per swap).
// The 8-bit width and the algorithm follow the paper; the handshake is this
// design's.
module gcd_processor #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic [WIDTH-1:0] a_in,
  input  logic [WIDTH-1:0] b_in,
  output logic [WIDTH-1:0] gcd,
  output logic             done
);
  logic ld, swap, sub, y_zero, x_lt_y;
  gcd_pkg::gcd_state_e state;

  control_unit u_ctrl (
    .clk(clk), .rst(rst), .start(start), .y_zero(y_zero), .x_lt_y(x_lt_y),
    .ld(ld), .swap(swap), .sub(sub), .done(done), .state(state)
  );

  gcd_datapath #(.WIDTH(WIDTH)) u_dp (
    .clk(clk), .a_in(a_in), .b_in(b_in), .ld(ld), .swap(swap), .sub(sub),
    .y_zero(y_zero), .x_lt_y(x_lt_y), .x(gcd)
  );
endmodule
