// Increment-by-one (IBO) circuit: {cout, y} = a + inc, W bits.
//
// A chain of W half adders: bit 0 adds inc, each later bit adds the carry
// of the bit below. Used on the upper part of each squarer and multiplier,
// where the only thing left to add is a single carry. Purely combinational.
module ibo #(
  parameter int unsigned W = 2
) (
  input  logic [W-1:0] a,
  input  logic         inc,
  output logic [W-1:0] y,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = inc;
  for (genvar i = 0; i < W; i++) begin : g_ha
    half_adder u_ha (.a(a[i]), .b(c[i]), .s(y[i]), .c(c[i+1]));
  end
  assign cout = c[W];
endmodule
