// Full-size testbench: squarer16 with every parameter at its default
// (carry look-ahead adders, exact carry merge). Squares all 65536 inputs
// and compares with a*a, then repeats the two reference cases 12 -> 144
// and 128 -> 16384 and the largest input 65535 -> 4294836225.
module tb_squarer16_full;
  logic [15:0] a;
  logic [31:0] m;
  int checks = 0, failures = 0;

  squarer16 dut (.a, .m);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] x, input logic [31:0] want);
    a = x;
    #1;
    checks++;
    if (m !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %0d^2 = %0d, want %0d", x, m, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 65536; i++) check(16'(i), 32'(longint'(i) * longint'(i)));
    check(16'd12, 32'd144);
    check(16'd128, 32'd16384);
    check(16'hffff, 32'd4294836225);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
