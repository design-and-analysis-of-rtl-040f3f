// Carry increment adder: {cout, sum} = a + b + cin, W bits.
//
// The adder is cut into blocks of BLK bits. Every block adds its operand
// bits with a ripple carry adder whose carry in is 0 (cin for the lowest
// block), all blocks in parallel. A chain of half adders then increments
// each block's partial sum by the carry out of the block below; the block's
// own carry out is the OR of its adder's and its incrementer's carry (the
// two are never both 1). W must be a multiple of BLK. The block size is
// this design's choice. Purely combinational.
module cia_adder #(
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
    $error("cia_adder: W must be a multiple of BLK");
  end

  logic [NB:0] bc;
  assign bc[0] = cin;

  rca_adder #(.W(BLK)) u_rca0 (
    .a(a[BLK-1:0]), .b(b[BLK-1:0]), .cin(cin), .sum(sum[BLK-1:0]), .cout(bc[1])
  );

  for (genvar k = 1; k < NB; k++) begin : g_blk
    logic [BLK-1:0] ps;   // partial sum with carry in 0
    logic           pc;   // its carry out
    logic [BLK:0]   ic;   // incrementer carry chain
    rca_adder #(.W(BLK)) u_rca (
      .a(a[k*BLK +: BLK]), .b(b[k*BLK +: BLK]), .cin(1'b0), .sum(ps), .cout(pc)
    );
    assign ic[0] = bc[k];
    for (genvar i = 0; i < BLK; i++) begin : g_inc
      half_adder u_ha (.a(ps[i]), .b(ic[i]), .s(sum[k*BLK + i]), .c(ic[i+1]));
    end
    assign bc[k+1] = pc | ic[BLK];
  end

  assign cout = bc[NB];
endmodule
