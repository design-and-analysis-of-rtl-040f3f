// End-to-end testbench for squarer16, the top of the design: all 65536
// inputs against a*a, once per middle-stage adder type (five instances).
//
// Besides the results it counts, from an independent arithmetic model of
// the partial products, how often each mechanism of the design is used, and
// fails if one never is:
//   - each of the five adder types,
//   - the top-level OR gate raising the 8-bit increment-by-one circuit,
//   - the top-level correction (adder carry and cross-product MSB both 1),
//   - the correction inside an 8-bit squarer (a byte of 222 or 223),
//   - the correction inside the 8x8 Vedic multiplier.
module tb_squarer16;
  import squarer_pkg::*;
  localparam int NT = 5;
  logic [15:0] a;
  logic [31:0] m [NT];
  int checks = 0, failures = 0;
  int n_type [NT];
  int n_inc = 0, n_fix_top = 0, n_fix_sq8 = 0, n_fix_mul8 = 0;

  squarer16 #(.TYPE(ADD_RCA))  u0 (.a, .m(m[0]));
  squarer16 #(.TYPE(ADD_CLA))  u1 (.a, .m(m[1]));
  squarer16 #(.TYPE(ADD_CSKA)) u2 (.a, .m(m[2]));
  squarer16 #(.TYPE(ADD_CSEL)) u3 (.a, .m(m[3]));
  squarer16 #(.TYPE(ADD_CIA))  u4 (.a, .m(m[4]));

  // Carries merged at the top of an N-bit squarer for input x:
  // bit 0 = middle adder carry, bit 1 = MSB of the cross product.
  function automatic logic [1:0] sq_carries(int unsigned n, longint unsigned x);
    longint unsigned h, hi, lo, i0, i1, i2, mid;
    h   = 64'(n) / 2;
    hi  = x >> h;
    lo  = x & ((64'd1 << h) - 1);
    i0  = lo * lo;
    i1  = hi * lo;
    i2  = hi * hi;
    mid = ((i2 & ((64'd1 << h) - 1)) << h) + (i0 >> h) + ((i1 << 1) & ((64'd1 << n) - 1));
    return {1'(i1 >> (64'(n) - 1)), 1'(mid >> 64'(n))};
  endfunction

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NT; t++) n_type[t] = 0;
    for (int i = 0; i < 65536; i++) begin
      logic [1:0]  c;
      int unsigned hi, lo, v0, v1, v2, v3, mid;
      a = 16'(i);
      #1;
      c = sq_carries(16, 64'(i));
      if (|c) n_inc++;
      if (&c) n_fix_top++;
      if (&sq_carries(8, 64'(i / 256)) || &sq_carries(8, 64'(i % 256))) n_fix_sq8++;
      hi  = i / 256;
      lo  = i % 256;
      v0  = (lo % 16) * (hi % 16);
      v1  = (lo % 16) * (hi / 16);
      v2  = (lo / 16) * (hi % 16);
      v3  = (lo / 16) * (hi / 16);
      mid = v1 + v2 + (v3 % 16) * 16 + v0 / 16;
      if (mid >= 512) n_fix_mul8++;
      for (int t = 0; t < NT; t++) begin
        checks++;
        n_type[t]++;
        if (m[t] !== 32'(longint'(i) * longint'(i))) begin
          failures++;
          if (failures < 10) $display("FAIL type %0d: %0d^2 = %0d", t, i, m[t]);
        end
      end
    end
    $display("inputs: OR increment %0d, top correction %0d, 8-bit squarer correction %0d, 8x8 multiplier correction %0d",
             n_inc, n_fix_top, n_fix_sq8, n_fix_mul8);
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (n_type[t] == 0) failures++;
    end
    checks += 4;
    if (n_inc == 0)      failures++;
    if (n_fix_top == 0)  failures++;
    if (n_fix_sq8 == 0)  failures++;
    if (n_fix_mul8 == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
