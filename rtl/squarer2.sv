// 2-bit squarer: s = x * x (4-bit result).
//
// Squaring a 2-bit number needs no adder array. s[0] = x0 (x0.x0 = x0) and
// s[1] = 0 (the two cross products cancel in the XOR). For s[3:2] two gate
// forms are given:
//   MODIFIED = 1 (default): s[2] = x1 AND (NOT x0), s[3] = x1 AND x0 -
//     one inverter and two AND gates.
//   MODIFIED = 0: an AND gate forms x1.x0 and a half adder adds it to x1,
//     giving s[2] (sum) and s[3] (carry).
// Both give the same function; the modified form is the one used inside
// the 4-bit squarer. Purely combinational.
module squarer2 #(
  parameter bit MODIFIED = 1'b1
) (
  input  logic [1:0] x,
  output logic [3:0] s
);
  assign s[0] = x[0];
  assign s[1] = 1'b0;

  if (MODIFIED) begin : g_mod
    logic x0_n;
    assign x0_n = ~x[0];
    assign s[2] = x[1] & x0_n;
    assign s[3] = x[1] & x[0];
  end else begin : g_ha
    logic x10;
    assign x10 = x[1] & x[0];
    half_adder u_ha (.a(x[1]), .b(x10), .s(s[2]), .c(s[3]));
  end
endmodule
