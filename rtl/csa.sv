// Three-operand carry-save adder: x + y + z = {c_save + c_out, sum}, W bits.
//
// A row of W full adders reduces the three operands to a sum vector and a
// carry vector without propagating carries. A ripple carry adder then adds
// the sum vector to the carry vector shifted one place left, giving the
// W-bit sum. Two carries of weight 2^W come out: c_save, the carry of the
// top full adder of the row, and c_out, the carry of the final adder. The
// ripple carry merge is this design's choice. Purely combinational.
module csa #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W-1:0] sum,
  output logic         c_save,
  output logic         c_out
);
  logic [W-1:0] sv, cv;  // sum and carry vectors of the carry-save row

  for (genvar i = 0; i < W; i++) begin : g_row
    full_adder u_fa (.a(x[i]), .b(y[i]), .cin(z[i]), .s(sv[i]), .cout(cv[i]));
  end

  rca_adder #(.W(W)) u_merge (
    .a(sv), .b({cv[W-2:0], 1'b0}), .cin(1'b0), .sum(sum), .cout(c_out)
  );
  assign c_save = cv[W-1];
endmodule
