// reversible_16_bit_rca: 16-bit reversible ripple-carry adder.
// Four 4-bit ripple_reversible slices (HNG full adders) chained through their
// carries: slice k adds bits 4k+3..4k and passes its carry-out to slice k+1.
//   {co, sum} = a + b + cin, purely combinational (16 HNG carry stages).
// The ports and the four-slice structure follow the paper's schematic.
module reversible_16_bit_rca (
  input  logic [15:0] a,
  input  logic [15:0] b,
  input  logic        cin,
  output logic [15:0] sum,
  output logic        co
);
  logic [4:0] carry;
  assign carry[0] = cin;

  for (genvar k = 0; k < 4; k++) begin : g_slice
    ripple_reversible #(.WIDTH(4)) u_slice (
      .a(a[4*k +: 4]), .b(b[4*k +: 4]), .cin(carry[k]),
      .sum(sum[4*k +: 4]), .co(carry[k+1])
    );
  end

  assign co = carry[4];
endmodule
