// 8x8 unsigned Vedic multiplier: m = a * b.
//
// The 4x4 structure one level up: four 4x4 Vedic multipliers form
//   i0 = b[3:0]*a[3:0], i1 = b[3:0]*a[7:4], i2 = b[7:4]*a[3:0],
//   i3 = b[7:4]*a[7:4].
// m[3:0] = i0[3:0]; an 8-bit carry-save adder adds i1, i2 and
// {i3[3:0], i0[7:4]} into m[11:4]; its two carries feed the OR gate and
// the 4-bit increment-by-one circuit on i3[7:4], giving m[15:12]. At this
// width both carries can be 1 together (248 of the 65536 operand pairs),
// so EXACT defaults to 1, which adds the correcting AND gate and second
// increment. It is the cross-product multiplier of the 16-bit squarer.
// Purely combinational.
module vedic_mult8 #(
  parameter bit EXACT = 1'b1
) (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] m
);
  logic [7:0] i0, i1, i2, i3;
  logic       c_save, c_out;

  vedic_mult4 u_m0 (.a(a[3:0]), .b(b[3:0]), .m(i0));
  vedic_mult4 u_m1 (.a(a[7:4]), .b(b[3:0]), .m(i1));
  vedic_mult4 u_m2 (.a(a[3:0]), .b(b[7:4]), .m(i2));
  vedic_mult4 u_m3 (.a(a[7:4]), .b(b[7:4]), .m(i3));

  assign m[3:0] = i0[3:0];

  csa #(.W(8)) u_csa (
    .x(i1), .y(i2), .z({i3[3:0], i0[7:4]}),
    .sum(m[11:4]), .c_save(c_save), .c_out(c_out)
  );

  or_ibo #(.W(4), .EXACT(EXACT)) u_upper (
    .hi(i3[7:4]), .c0(c_save), .c1(c_out), .y(m[15:12])
  );
endmodule
