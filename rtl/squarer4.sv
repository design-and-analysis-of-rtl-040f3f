// 4-bit squarer: m = a*a, 8-bit result.
//
// a is split into a[3:2] and a[1:0]. Two 2-bit squarers (the inverter and
// AND form) give i2 = a[3:2]^2 and i0 = a[1:0]^2, a 2x2 multiplier gives
// i1 = a[3:2]*a[1:0]. The cross term is shifted left one place, a 4-bit
// adder of structure TYPE (carry look-ahead by default) adds
// {i2[1:0], i0[3:2]} and {i1[2:0], 0} into m[5:2], and the OR of its
// carry with i1[3] increments i2[3:2] into m[7:6] through a 2-bit
// increment-by-one circuit; m[1:0] = i0[1:0]. At 4 bits the OR is exact,
// so EXACT defaults to 0. Purely combinational; its delay is that of one
// 2x2 multiplier, the 4-bit adder and the 2-bit incrementer.
module squarer4
  import squarer_pkg::*;
#(
  parameter adder_e TYPE  = ADD_CLA,
  parameter bit     EXACT = 1'b0
) (
  input  logic [3:0] a,
  output logic [7:0] m
);
  logic [3:0] i0, i1, i2;

  squarer2 u_sq_lo (.x(a[1:0]), .s(i0));
  squarer2 u_sq_hi (.x(a[3:2]), .s(i2));
  mult2    u_cross (.x(a[3:2]), .y(a[1:0]), .m(i1));

  square_combine #(.H(2), .TYPE(TYPE), .EXACT(EXACT)) u_comb (
    .i0(i0), .i1(i1), .i2(i2), .m(m)
  );
endmodule
