// Final stage of a 2H-bit squarer: combines the three partial results of
// a = {ah, al} (each half H bits) into m = a*a, 4H bits.
//
//   i0 = al*al, i2 = ah*ah (from half-width squarers),
//   i1 = ah*al (from a half-width multiplier), all 2H bits.
//   a*a = i2*2^(2H) + 2*i1*2^H + i0.
// The cross term appears twice, so instead of a three-operand adder it is
// shifted one place left and a single 2H-bit parallel adder of structure
// TYPE adds {i2[H-1:0], i0[2H-1:H]} and {i1[2H-2:0], 0}; its sum is
// m[3H-1:H]. m[H-1:0] = i0[H-1:0] passes straight down. The adder's carry
// and i1[2H-1], the bit shifted out, have the same weight: the OR gate and
// increment-by-one circuit of or_ibo add them to i2[2H-1:H], giving the
// top H bits. EXACT as in or_ibo. Purely combinational.
module square_combine
  import squarer_pkg::*;
#(
  parameter int unsigned H     = 2,
  parameter adder_e      TYPE  = ADD_CLA,
  parameter bit          EXACT = 1'b1
) (
  input  logic [2*H-1:0] i0,
  input  logic [2*H-1:0] i1,
  input  logic [2*H-1:0] i2,
  output logic [4*H-1:0] m
);
  localparam int unsigned N = 2 * H;

  logic [N-1:0] add_a, add_b;
  logic         add_cout;

  assign m[H-1:0] = i0[H-1:0];

  assign add_a = {i2[H-1:0], i0[N-1:H]};
  assign add_b = {i1[N-2:0], 1'b0};

  par_adder #(.W(N), .TYPE(TYPE)) u_add (
    .a(add_a), .b(add_b), .cin(1'b0), .sum(m[N+H-1:H]), .cout(add_cout)
  );

  or_ibo #(.W(H), .EXACT(EXACT)) u_upper (
    .hi(i2[N-1:H]), .c0(add_cout), .c1(i1[N-1]), .y(m[2*N-1:N+H])
  );
endmodule
