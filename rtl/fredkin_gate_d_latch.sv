// fredkin_gate_d_latch: level-sensitive D latch made of reversible gates.
// An inverter drives the Fredkin gate's control with ~en, so its Q output is
// en ? d : q; that value passes through a Feynman gate used as a copier
// (B = 0), whose second output is fed back to the Fredkin gate and so holds the
// bit while en is low. A second Feynman gate with B = 1 produces q_bar.
// Interface: transparent while en is high (q follows d), holds while en is low.
// The gate chain (inverter, Fredkin, two Feynman gates, feedback) follows the
// paper's schematic; the port names and the active-high enable are this
// design's. The storing loop is written as always_latch so that tools see a
// latch rather than a combinational loop; it holds exactly what the Fredkin
// feedback path selects.
// Lint reports the path stored -> f1 -> Fredkin -> stored as circular logic.
// It stands because it is the latch's own feedback, which the paper draws:
// the path is only open while en is low, when the latch is closed, so it never
// forms a live combinational loop.
module fredkin_gate_d_latch (
  input  logic en,
  input  logic d,
  output logic q,
  output logic q_bar
);
  logic ctrl_n;      // inverter output, Fredkin control
  logic sel_q;       // Fredkin Q = en ? d : feedback
  logic fr_p, fr_r;  // Fredkin garbage outputs
  logic stored;      // value circulating in the feedback loop
  logic copy_p, copy_q;
  logic unused_p;

  assign ctrl_n = ~en;

  fredkin_gate fg1 (
    .a(ctrl_n), .b(d), .c(copy_q),
    .p(fr_p), .q(sel_q), .r(fr_r)
  );

  always_latch begin
    if (en) stored = sel_q;
  end

  feynman_gate f1 (.a(stored), .b(1'b0), .p(copy_p), .q(copy_q));
  feynman_gate f2 (.a(copy_p), .b(1'b1), .p(unused_p), .q(q_bar));

  assign q = copy_p;
endmodule
