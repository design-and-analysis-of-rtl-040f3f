// Testbench for mult2: all 16 operand pairs against x*y.
module tb_mult2;
  logic [1:0] x, y;
  logic [3:0] m;
  int checks = 0, failures = 0;

  mult2 dut (.x, .y, .m);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        x = 2'(i);
        y = 2'(j);
        #1;
        checks++;
        if (m !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d = %0d", i, j, m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
