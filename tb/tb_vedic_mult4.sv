// Testbench for vedic_mult4: all 256 operand pairs against a*b, for the
// default (bare OR) form and the exact form.
module tb_vedic_mult4;
  logic [3:0] a, b;
  logic [7:0] m, m_exact;
  int checks = 0, failures = 0;

  vedic_mult4                  dut       (.a, .b, .m);
  vedic_mult4 #(.EXACT(1'b1))  dut_exact (.a, .b, .m(m_exact));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks += 2;
      if (m !== 8'(a * b)) begin
        failures++;
        $display("FAIL %0d*%0d = %0d", a, b, m);
      end
      if (m_exact !== 8'(a * b)) begin
        failures++;
        $display("FAIL exact %0d*%0d = %0d", a, b, m_exact);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
