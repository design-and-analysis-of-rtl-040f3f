// Full adder written with propagate and generate terms:
// p = a XOR b, g = a AND b, s = p XOR cin, cout = g OR (p AND cin).
// Purely combinational; the cell of the ripple carry chains and of the
// carry-save row.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  logic p, g;
  assign p    = a ^ b;
  assign g    = a & b;
  assign s    = p ^ cin;
  assign cout = g | (p & cin);
endmodule
