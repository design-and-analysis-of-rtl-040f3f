// Carry skip adder: {cout, sum} = a + b + cin, W bits.
//
// The adder is cut into blocks of BLK bits. Each block is a ripple chain of
// full adders (p = a XOR b, s = p XOR c, c' = (a AND b) OR (p AND c)). When
// every bit of a block propagates, the block's carry out is its carry in,
// taken through a 2:1 multiplexer that skips the ripple chain; otherwise it
// is the chain's own carry out. W must be a multiple of BLK. The block size
// (4 bits, 2 bits for adders of 4 bits) is this design's choice. Purely
// combinational.
module cska_adder #(
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
    $error("cska_adder: W must be a multiple of BLK");
  end

  logic [NB:0] bc;  // block carries
  assign bc[0] = cin;

  for (genvar k = 0; k < NB; k++) begin : g_blk
    logic rc;    // ripple carry out of the block
    logic bprop; // all bits of the block propagate
    rca_adder #(.W(BLK)) u_rca (
      .a(a[k*BLK +: BLK]), .b(b[k*BLK +: BLK]), .cin(bc[k]),
      .sum(sum[k*BLK +: BLK]), .cout(rc)
    );
    assign bprop   = &(a[k*BLK +: BLK] ^ b[k*BLK +: BLK]);
    assign bc[k+1] = bprop ? bc[k] : rc;
  end

  assign cout = bc[NB];
endmodule
