// Half adder: s = a XOR b, c = a AND b.
// Purely combinational; the basic cell of the 2x2 multiplier, the 2-bit
// squarer, the increment-by-one circuit and the carry increment adder.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
