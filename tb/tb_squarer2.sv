// Testbench for squarer2: both gate forms, all four inputs, against x*x.
module tb_squarer2;
  logic [1:0] x;
  logic [3:0] s_mod, s_ha;
  int checks = 0, failures = 0;

  squarer2 #(.MODIFIED(1'b1)) dut_mod (.x, .s(s_mod));
  squarer2 #(.MODIFIED(1'b0)) dut_ha  (.x, .s(s_ha));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      x = 2'(i);
      #1;
      checks += 2;
      if (s_mod !== 4'(i * i)) begin
        failures++;
        $display("FAIL modified %0d^2 = %0d", i, s_mod);
      end
      if (s_ha !== 4'(i * i)) begin
        failures++;
        $display("FAIL half-adder form %0d^2 = %0d", i, s_ha);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
