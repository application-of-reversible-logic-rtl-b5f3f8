// mux_16_1_reversible_new: 16:1 multiplexer built as a tree of 15 Fredkin
// gates. Each gate is a 2:1 mux on its Q output (control ? C : B). Level 0
// has eight gates selecting by s[0] between i[2k] and i[2k+1]; level 1 four
// gates on s[1]; level 2 two on s[2]; level 3 one on s[3], which drives y.
// y = i[s], purely combinational, four gates deep.
// The 8-4-2-1 tree of 15 gates and the ports follow the paper's schematic;
// which select bit drives which level is this design's choice.
module mux_16_1_reversible_new (
  input  logic [15:0] i,
  input  logic [3:0]  s,
  output logic        y
);
  // node[level] holds the 16 >> level values entering that level
  logic [15:0] node [5];
  assign node[0] = i;

  for (genvar lvl = 0; lvl < 4; lvl++) begin : g_level
    localparam int unsigned N = 16 >> (lvl + 1);
    for (genvar k = 0; k < N; k++) begin : g_gate
      logic garbage_p, garbage_r;
      fredkin_gate u_frg (
        .a(s[lvl]), .b(node[lvl][2*k]), .c(node[lvl][2*k+1]),
        .p(garbage_p), .q(node[lvl+1][k]), .r(garbage_r)
      );
    end
    assign node[lvl+1][15:N] = '0;
  end

  assign y = node[4][0];
endmodule
