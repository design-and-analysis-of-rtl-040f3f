// Testbench for or_ibo: exhaustive over hi, c0 and c1 at 4 bits. The exact
// form must give hi + c0 + c1; the bare OR form must give hi + (c0 | c1).
// The case c0 = c1 = 1, the one the two forms differ on, must be reached.
module tb_or_ibo;
  logic [3:0] hi, y_exact, y_or;
  logic [1:0] hi2, y2;
  logic       c0, c1;
  int checks = 0, failures = 0;
  int both = 0;

  or_ibo #(.W(4), .EXACT(1'b1)) dut_exact (.hi, .c0, .c1, .y(y_exact));
  or_ibo #(.W(4), .EXACT(1'b0)) dut_or    (.hi, .c0, .c1, .y(y_or));
  or_ibo #(.W(2))               dut2      (.hi(hi2), .c0, .c1, .y(y2));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {c1, c0, hi} = 6'(i);
      hi2 = hi[1:0];
      #1;
      if (c0 && c1) both++;
      checks += 3;
      if (y_exact !== 4'(hi + c0 + c1)) begin
        failures++;
        $display("FAIL exact %0d+%0d+%0d = %0d", hi, c0, c1, y_exact);
      end
      if (y_or !== 4'(hi + 4'(c0 | c1))) begin
        failures++;
        $display("FAIL or %0d+(%0d|%0d) = %0d", hi, c0, c1, y_or);
      end
      if (y2 !== 2'(hi2 + c0 + c1)) begin
        failures++;
        $display("FAIL 2-bit exact %0d+%0d+%0d = %0d", hi2, c0, c1, y2);
      end
    end
    checks++;
    if (both == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
