// 2x2 unsigned multiplier: m = x * y (4-bit product).
//
// Four AND gates form the partial products; two half adders sum them. The
// first half adder adds x1.y0 and x0.y1 and gives m[1]; its carry and x1.y1
// go into the second half adder, which gives m[2] (sum) and m[3] (carry).
// m[0] is x0.y0. This is the structure of the classic 2-bit multiplier the
// squarer builds on. Purely combinational, no clock.
module mult2 (
  input  logic [1:0] x,
  input  logic [1:0] y,
  output logic [3:0] m
);
  logic pp00, pp01, pp10, pp11;  // pp<i><j> = x[i] & y[j]
  logic c1;

  assign pp00 = x[0] & y[0];
  assign pp01 = x[0] & y[1];
  assign pp10 = x[1] & y[0];
  assign pp11 = x[1] & y[1];

  assign m[0] = pp00;
  half_adder u_ha1 (.a(pp10), .b(pp01), .s(m[1]), .c(c1));
  half_adder u_ha2 (.a(pp11), .b(c1),   .s(m[2]), .c(m[3]));
endmodule
