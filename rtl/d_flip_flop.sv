// d_flip_flop: rising-edge D flip-flop from two Fredkin-gate D latches.
// The master latch is transparent while clk is low and the slave while clk is
// high, so q takes the value d had just before the rising edge of clk and
// keeps it for the whole cycle; q_bar is its complement (from the slave's
// Feynman inverter). No reset: a user resets through its d input.
// The ports clk, d, q, q_bar and the Fredkin latch as the storage element
// follow the paper. The paper draws a single latch; the master-slave pair,
// and hence the rising-edge behaviour, is this design's choice so that the
// cell can hold the state of a synchronous controller.
module d_flip_flop (
  input  logic clk,
  input  logic d,
  output logic q,
  output logic q_bar
);
  logic clk_n;
  logic m_q, m_q_bar;

  assign clk_n = ~clk;

  fredkin_gate_d_latch u_master (.en(clk_n), .d(d),   .q(m_q), .q_bar(m_q_bar));
  fredkin_gate_d_latch u_slave  (.en(clk),   .d(m_q), .q(q),   .q_bar(q_bar));
endmodule
