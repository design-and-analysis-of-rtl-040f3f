// Testbench for ibo: exhaustive at 2 and 4 bits against a + inc.
module tb_ibo;
  logic [1:0] a2, y2;
  logic [3:0] a4, y4;
  logic       inc, co2, co4;
  int checks = 0, failures = 0;

  ibo #(.W(2)) dut2 (.a(a2), .inc, .y(y2), .cout(co2));
  ibo #(.W(4)) dut4 (.a(a4), .inc, .y(y4), .cout(co4));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {inc, a4} = 5'(i);
      a2 = a4[1:0];
      #1;
      checks += 2;
      if ({co4, y4} !== 5'(a4 + inc)) begin
        failures++;
        $display("FAIL 4-bit %0d+%0d = %0d", a4, inc, {co4, y4});
      end
      if ({co2, y2} !== 3'(a2 + inc)) begin
        failures++;
        $display("FAIL 2-bit %0d+%0d = %0d", a2, inc, {co2, y2});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
