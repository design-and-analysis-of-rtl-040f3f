// Testbench for csa: exhaustive at 4 bits, random at 8 bits. The sum and
// the two carries must satisfy x + y + z = (c_save + c_out) * 2^W + sum.
module tb_csa;
  logic [3:0] x4, y4, z4, s4;
  logic [7:0] x8, y8, z8, s8;
  logic       cs4, co4, cs8, co8;
  int checks = 0, failures = 0;

  csa #(.W(4)) dut4 (.x(x4), .y(y4), .z(z4), .sum(s4), .c_save(cs4), .c_out(co4));
  csa #(.W(8)) dut8 (.x(x8), .y(y8), .z(z8), .sum(s8), .c_save(cs8), .c_out(co8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x8 = '0; y8 = '0; z8 = '0;
    for (int i = 0; i < 4096; i++) begin
      {x4, y4, z4} = 12'(i);
      #1;
      checks++;
      if ((32'(cs4) + 32'(co4)) * 16 + 32'(s4) != 32'(x4) + 32'(y4) + 32'(z4)) begin
        failures++;
        $display("FAIL 4-bit %0d+%0d+%0d: sum %0d carries %0d %0d", x4, y4, z4, s4, cs4, co4);
      end
    end
    for (int i = 0; i < 20000; i++) begin
      x8 = 8'($urandom);
      y8 = 8'($urandom);
      z8 = 8'($urandom);
      #1;
      checks++;
      if ((32'(cs8) + 32'(co8)) * 256 + 32'(s8) != 32'(x8) + 32'(y8) + 32'(z8)) begin
        failures++;
        $display("FAIL 8-bit %0d+%0d+%0d: sum %0d carries %0d %0d", x8, y8, z8, s8, cs8, co8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
