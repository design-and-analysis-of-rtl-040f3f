// Ripple carry adder: {cout, sum} = a + b + cin, W bits.
//
// W full adders in a chain; the carry ripples from bit 0 to bit W-1, so the
// delay grows linearly with W. Purely combinational.
module rca_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0] c;
  assign c[0] = cin;
  for (genvar i = 0; i < W; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .cin(c[i]), .s(sum[i]), .cout(c[i+1]));
  end
  assign cout = c[W];
endmodule
