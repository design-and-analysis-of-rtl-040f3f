// Parallel adder of selectable structure: {cout, sum} = a + b + cin.
//
// TYPE picks one of the five adder structures (ripple carry, carry
// look-ahead, carry skip, carry select, carry increment); all give the same
// sum and differ only in delay and area. Carry look-ahead is the default.
// The blocked adders use 4-bit blocks, or 2-bit blocks when W is 4 or less
// (this design's choice). Purely combinational.
module par_adder
  import squarer_pkg::*;
#(
  parameter int unsigned W    = 4,
  parameter adder_e      TYPE = ADD_CLA
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned BLK = adder_block(W);

  case (TYPE)
    ADD_RCA: begin : g_rca
      rca_adder  #(.W(W))             u_add (.a, .b, .cin, .sum, .cout);
    end
    ADD_CLA: begin : g_cla
      cla_adder  #(.W(W), .GRP(4))    u_add (.a, .b, .cin, .sum, .cout);
    end
    ADD_CSKA: begin : g_cska
      cska_adder #(.W(W), .BLK(BLK))  u_add (.a, .b, .cin, .sum, .cout);
    end
    ADD_CSEL: begin : g_csel
      csel_adder #(.W(W), .BLK(BLK))  u_add (.a, .b, .cin, .sum, .cout);
    end
    default: begin : g_cia
      cia_adder  #(.W(W), .BLK(BLK))  u_add (.a, .b, .cin, .sum, .cout);
    end
  endcase
endmodule
