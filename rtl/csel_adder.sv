// Carry select adder: {cout, sum} = a + b + cin, W bits.
//
// The lowest block of BLK bits is a single ripple carry adder fed by cin.
// Every higher block holds two ripple carry adders over the same operand
// bits, one with carry in 0 and one with carry in 1, computed in parallel;
// multiplexers driven by the carry out of the block below pick the sum and
// carry of the right one. W must be a multiple of BLK. The block size is
// this design's choice. Purely combinational.
module csel_adder #(
  parameter int unsigned W   = 4,
  parameter int unsigned BLK = 2
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NB = W / BLK;

  if (W % BLK != 0) begin : g_bad
    $error("csel_adder: W must be a multiple of BLK");
  end

  logic [NB:0] bc;
  assign bc[0] = cin;

  rca_adder #(.W(BLK)) u_rca0 (
    .a(a[BLK-1:0]), .b(b[BLK-1:0]), .cin(cin), .sum(sum[BLK-1:0]), .cout(bc[1])
  );

  for (genvar k = 1; k < NB; k++) begin : g_blk
    logic [BLK-1:0] s0, s1;
    logic           c0, c1;
    rca_adder #(.W(BLK)) u_rca_c0 (
      .a(a[k*BLK +: BLK]), .b(b[k*BLK +: BLK]), .cin(1'b0), .sum(s0), .cout(c0)
    );
    rca_adder #(.W(BLK)) u_rca_c1 (
      .a(a[k*BLK +: BLK]), .b(b[k*BLK +: BLK]), .cin(1'b1), .sum(s1), .cout(c1)
    );
    assign sum[k*BLK +: BLK] = bc[k] ? s1 : s0;
    assign bc[k+1]           = bc[k] ? c1 : c0;
  end

  assign cout = bc[NB];
endmodule
