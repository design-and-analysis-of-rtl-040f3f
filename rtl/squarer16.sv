// 16-bit squarer: m = a*a, 32-bit result. Top of the squarer hierarchy.
//
// Same recursion as the 8-bit squarer: two 8-bit squarers give
// i2 = a[15:8]^2 and i0 = a[7:0]^2, an 8x8 Vedic multiplier gives
// i1 = a[15:8]*a[7:0]. A 16-bit adder of structure TYPE (carry look-ahead
// by default) adds {i2[7:0], i0[15:8]} and {i1[14:0], 0} into m[23:8];
// its carry and i1[15] are merged by the OR gate and an 8-bit
// increment-by-one circuit on i2[15:8], giving m[31:24];
// m[7:0] = i0[7:0]. EXACT (default 1) adds the correcting AND gate and
// second incrementer wherever both merged carries can be 1; it is passed
// to the 8-bit squarers and the 8x8 multiplier. The 16-bit form follows
// the 8-bit one; the widths and the 8x8 multiplier built from four 4x4
// ones are this design's reading of how the scheme extends. Purely
// combinational; no clock or reset.
module squarer16
  import squarer_pkg::*;
#(
  parameter adder_e TYPE  = ADD_CLA,
  parameter bit     EXACT = 1'b1
) (
  input  logic [15:0] a,
  output logic [31:0] m
);
  logic [15:0] i0, i1, i2;

  squarer8    #(.TYPE(TYPE), .EXACT(EXACT)) u_sq_lo (.a(a[7:0]),  .m(i0));
  squarer8    #(.TYPE(TYPE), .EXACT(EXACT)) u_sq_hi (.a(a[15:8]), .m(i2));
  vedic_mult8 #(.EXACT(EXACT))              u_cross (.a(a[15:8]), .b(a[7:0]), .m(i1));

  square_combine #(.H(8), .TYPE(TYPE), .EXACT(EXACT)) u_comb (
    .i0(i0), .i1(i1), .i2(i2), .m(m)
  );
endmodule
