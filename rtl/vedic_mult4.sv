// 4x4 unsigned Vedic (vertical and crosswise) multiplier: m = a * b.
//
// Each operand is split into 2-bit halves and four 2x2 multipliers form
//   i0 = b[1:0]*a[1:0], i1 = b[1:0]*a[3:2], i2 = b[3:2]*a[1:0],
//   i3 = b[3:2]*a[3:2].
// m[1:0] = i0[1:0]. A 4-bit carry-save adder adds i1, i2 and
// {i3[1:0], i0[3:2]}; its sum is m[5:2]. Its two carries go through an OR
// gate that drives a 2-bit increment-by-one circuit on i3[3:2], giving
// m[7:6]. At 4 bits the two carries are never both 1, so EXACT defaults
// to 0, the bare OR-and-IBO structure. Purely combinational.
module vedic_mult4 #(
  parameter bit EXACT = 1'b0
) (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] m
);
  logic [3:0] i0, i1, i2, i3;
  logic       c_save, c_out;

  mult2 u_m0 (.x(b[1:0]), .y(a[1:0]), .m(i0));
  mult2 u_m1 (.x(b[1:0]), .y(a[3:2]), .m(i1));
  mult2 u_m2 (.x(b[3:2]), .y(a[1:0]), .m(i2));
  mult2 u_m3 (.x(b[3:2]), .y(a[3:2]), .m(i3));

  assign m[1:0] = i0[1:0];

  csa #(.W(4)) u_csa (
    .x(i1), .y(i2), .z({i3[1:0], i0[3:2]}),
    .sum(m[5:2]), .c_save(c_save), .c_out(c_out)
  );

  or_ibo #(.W(2), .EXACT(EXACT)) u_upper (
    .hi(i3[3:2]), .c0(c_save), .c1(c_out), .y(m[7:6])
  );
endmodule
