// Testbench for squarer8: all 256 inputs against a*a with each of the five
// adder types (exact merge), plus 128 -> 16384. The bare OR form is also
// checked: it must be right everywhere except 222 and 223, where the two
// merged carries are both 1 and the top nibble lacks one (a*a - 2^12).
module tb_squarer8;
  import squarer_pkg::*;
  localparam int NT = 5;
  logic [7:0]  a;
  logic [15:0] m [NT];
  logic [15:0] m_bare;
  int checks = 0, failures = 0;
  int both_carries = 0;

  squarer8 #(.TYPE(ADD_RCA))  u0 (.a, .m(m[0]));
  squarer8                    u1 (.a, .m(m[1]));
  squarer8 #(.TYPE(ADD_CSKA)) u2 (.a, .m(m[2]));
  squarer8 #(.TYPE(ADD_CSEL)) u3 (.a, .m(m[3]));
  squarer8 #(.TYPE(ADD_CIA))  u4 (.a, .m(m[4]));
  squarer8 #(.EXACT(1'b0))    ub (.a, .m(m_bare));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      int unsigned hi, lo, i0, i1, i2, mid, want_bare;
      a = 8'(i);
      #1;
      // independent model of the merge: adder carry and i1[7] both 1?
      hi  = i / 16;
      lo  = i % 16;
      i0  = lo * lo;
      i1  = hi * lo;
      i2  = hi * hi;
      mid = (i2 % 16) * 16 + i0 / 16 + (i1 * 2) % 256;
      want_bare = i * i;
      if (mid >= 256 && i1 >= 128) begin
        both_carries++;
        want_bare = i * i - 4096;
      end
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (m[t] !== 16'(i * i)) begin
          failures++;
          $display("FAIL type %0d: %0d^2 = %0d", t, i, m[t]);
        end
      end
      checks++;
      if (m_bare !== 16'(want_bare)) begin
        failures++;
        $display("FAIL bare: %0d^2 = %0d want %0d", i, m_bare, want_bare);
      end
    end
    checks++;
    if (both_carries != 2) begin
      failures++;
      $display("FAIL expected 2 inputs with both carries set, saw %0d", both_carries);
    end
    a = 8'd128;
    #1;
    checks++;
    if (m[1] !== 16'b0100_0000_0000_0000) begin
      failures++;
      $display("FAIL 128^2 = %0d", m[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
