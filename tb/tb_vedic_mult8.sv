// Testbench for vedic_mult8: all 65536 operand pairs.
// The default (exact) form must give a*b everywhere. The bare OR form must
// give a*b except where the carry-save sum of the three middle operands
// reaches 2 * 2^8; there its top nibble lacks one, so it reads
// a*b - 2^12. That condition is computed here from the partial products.
module tb_vedic_mult8;
  logic [7:0]  a, b;
  logic [15:0] m, m_bare;
  int checks = 0, failures = 0;
  int corrected = 0;

  vedic_mult8                 dut      (.a, .b, .m);
  vedic_mult8 #(.EXACT(1'b0)) dut_bare (.a, .b, .m(m_bare));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      int unsigned i0, i1, i2, i3, mid, want, want_bare;
      {a, b} = 16'(i);
      #1;
      i0  = b[3:0] * a[3:0];
      i1  = b[3:0] * a[7:4];
      i2  = b[7:4] * a[3:0];
      i3  = b[7:4] * a[7:4];
      mid = i1 + i2 + ((i3 % 16) * 16 + i0 / 16);
      want = a * b;
      want_bare = want;
      if (mid >= 512) begin
        corrected++;
        want_bare = (want - 4096) % 65536;
      end
      checks += 2;
      if (m !== 16'(want)) begin
        failures++;
        if (failures < 10) $display("FAIL %0d*%0d = %0d", a, b, m);
      end
      if (m_bare !== 16'(want_bare)) begin
        failures++;
        if (failures < 10) $display("FAIL bare %0d*%0d = %0d want %0d", a, b, m_bare, want_bare);
      end
    end
    checks++;
    if (corrected == 0) failures++;
    $display("operand pairs needing the correction: %0d", corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
