// ripple_reversible: 4-bit reversible ripple-carry adder.
// Each bit is one HNG gate used as a full adder (D input tied to 0): the R
// output gives the sum bit and the S output the carry passed to the next bit.
// The A/B pass-through outputs of each gate are unused garbage outputs.
//   sum/co = a + b + cin, combinational; the carry ripples through WIDTH gates.
// The 4-bit width and the HNG cell follow the paper; WIDTH may be changed.
module ripple_reversible #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             co
);
  logic [WIDTH:0] carry;
  assign carry[0] = cin;

  for (genvar k = 0; k < WIDTH; k++) begin : g_bit
    logic garbage_p, garbage_q;
    hng_gate u_hng (
      .a(a[k]), .b(b[k]), .c(carry[k]), .d(1'b0),
      .p(garbage_p), .q(garbage_q), .r(sum[k]), .s(carry[k+1])
    );
  end

  assign co = carry[WIDTH];
endmodule
