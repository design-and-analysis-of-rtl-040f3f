// 8-bit squarer: m = a*a, 16-bit result.
//
// The 4-bit scheme one level up: two 4-bit squarers give i2 = a[7:4]^2
// and i0 = a[3:0]^2, a 4x4 Vedic multiplier gives i1 = a[7:4]*a[3:0]. An
// 8-bit adder of structure TYPE adds {i2[3:0], i0[7:4]} and {i1[6:0], 0}
// into m[11:4]; its carry and i1[7] go through the OR gate into a 4-bit
// increment-by-one circuit on i2[7:4], giving m[15:12]; m[3:0] = i0[3:0].
// The bare OR is wrong for a = 222 and 223, where both carries are 1, so
// EXACT defaults to 1 and adds the correcting AND gate and incrementer
// (EXACT = 0 gives the bare structure). All five adder types are
// available; the 4-bit squarers inside use the same type. Purely
// combinational.
module squarer8
  import squarer_pkg::*;
#(
  parameter adder_e TYPE  = ADD_CLA,
  parameter bit     EXACT = 1'b1
) (
  input  logic [7:0]  a,
  output logic [15:0] m
);
  logic [7:0] i0, i1, i2;

  squarer4 #(.TYPE(TYPE)) u_sq_lo (.a(a[3:0]), .m(i0));
  squarer4 #(.TYPE(TYPE)) u_sq_hi (.a(a[7:4]), .m(i2));
  vedic_mult4             u_cross (.a(a[7:4]), .b(a[3:0]), .m(i1));

  square_combine #(.H(4), .TYPE(TYPE), .EXACT(EXACT)) u_comb (
    .i0(i0), .i1(i1), .i2(i2), .m(m)
  );
endmodule
