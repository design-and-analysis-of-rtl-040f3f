// Carry look-ahead adder: {cout, sum} = a + b + cin, W bits.
//
// Each bit forms propagate p = a XOR b and generate g = a AND b, and the
// carry obeys c[i+1] = g[i] OR (p[i] AND c[i]). Instead of rippling, that
// recurrence is expanded inside groups of GRP bits into a sum of products,
// so every carry of a group depends only on the group's p, g and its carry
// in: c[i+1] = g[i] | p[i]g[i-1] | ... | p[i]..p[base]c[base]. The group
// carries ripple from group to group. sum = p XOR c. The group size of 4 is
// this design's choice. Purely combinational.
module cla_adder #(
  parameter int unsigned W   = 4,
  parameter int unsigned GRP = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W-1:0] p, g;
  logic [W:0]   c;

  assign p = a ^ b;
  assign g = a & b;

  always_comb begin
    logic [W:0] cc;
    cc    = '0;
    cc[0] = cin;
    for (int i = 0; i < W; i++) begin
      int   base;
      logic term, pprod;
      base  = (i / GRP) * GRP;
      term  = 1'b0;
      pprod = 1'b1;
      for (int j = i; j >= base; j--) begin
        term  = term | (g[j] & pprod);
        pprod = pprod & p[j];
      end
      // cc[base] is a group boundary carry, already final when it is used
      cc[i+1] = term | (pprod & cc[base]);
    end
    c = cc;
  end

  assign sum  = p ^ c[W-1:0];
  assign cout = c[W];
endmodule
