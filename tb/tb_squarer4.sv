// Testbench for squarer4: all 16 inputs against a*a, with each of the five
// middle-stage adder types and with the exact merge; includes 12 -> 144.
module tb_squarer4;
  import squarer_pkg::*;
  localparam int NT = 5;
  logic [3:0] a;
  logic [7:0] m [NT];
  logic [7:0] m_exact;
  int checks = 0, failures = 0;

  squarer4 #(.TYPE(ADD_RCA))  u0 (.a, .m(m[0]));
  squarer4                    u1 (.a, .m(m[1]));
  squarer4 #(.TYPE(ADD_CSKA)) u2 (.a, .m(m[2]));
  squarer4 #(.TYPE(ADD_CSEL)) u3 (.a, .m(m[3]));
  squarer4 #(.TYPE(ADD_CIA))  u4 (.a, .m(m[4]));
  squarer4 #(.EXACT(1'b1))    ux (.a, .m(m_exact));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = 4'(i);
      #1;
      for (int t = 0; t < NT; t++) begin
        checks++;
        if (m[t] !== 8'(i * i)) begin
          failures++;
          $display("FAIL type %0d: %0d^2 = %0d", t, i, m[t]);
        end
      end
      checks++;
      if (m_exact !== 8'(i * i)) begin
        failures++;
        $display("FAIL exact: %0d^2 = %0d", i, m_exact);
      end
    end
    a = 4'b1100;
    #1;
    checks++;
    if (m[1] !== 8'b1001_0000) begin
      failures++;
      $display("FAIL 12^2 = %0d", m[1]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
