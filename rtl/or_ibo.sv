// Carry merge for the upper part of a squarer or Vedic multiplier:
// y = hi + c0 + c1 (mod 2^W).
//
// Two carries of the same weight (for example the middle adder's carry out
// and the top bit of the shifted cross product) land on the lowest bit of
// the upper part. An OR gate combines them and its output drives an
// increment-by-one circuit on hi. The OR is exact only while the two
// carries are never both 1, which holds in the 4-bit squarer and the 4x4
// multiplier but not in wider ones (the 8-bit squarer fails for inputs 222
// and 223). With EXACT = 1 an AND gate detects the case where both are 1
// and a second increment-by-one adds the missing 1, since
// c0 + c1 = (c0 OR c1) + (c0 AND c1). EXACT = 0 is the bare OR-and-IBO.
// The correction is this design's addition. Purely combinational; a carry
// out of the top bit is dropped, because the full product always fits.
module or_ibo #(
  parameter int unsigned W     = 2,
  parameter bit          EXACT = 1'b1
) (
  input  logic [W-1:0] hi,
  input  logic         c0,
  input  logic         c1,
  output logic [W-1:0] y
);
  logic         inc_or;
  logic [W-1:0] y_or;
  logic         unused_cout_or;

  assign inc_or = c0 | c1;
  ibo #(.W(W)) u_ibo (.a(hi), .inc(inc_or), .y(y_or), .cout(unused_cout_or));

  if (EXACT) begin : g_exact
    logic inc_and;
    logic unused_cout_and;
    assign inc_and = c0 & c1;
    ibo #(.W(W)) u_ibo_fix (.a(y_or), .inc(inc_and), .y(y), .cout(unused_cout_and));
  end else begin : g_or_only
    assign y = y_or;
  end
endmodule
