// Testbench for cia_adder: exhaustive at 4 bits (a, b and cin), random
// vectors at 8 and 16 bits, each sum and carry against a + b + cin.
module tb_cia_adder;
  logic [3:0]  a4, b4, s4;
  logic [7:0]  a8, b8, s8;
  logic [15:0] a16, b16, s16;
  logic        cin, co4, co8, co16;
  int checks = 0, failures = 0;

  cia_adder #(.W(4), .BLK(2))  dut4  (.a(a4),  .b(b4),  .cin, .sum(s4),  .cout(co4));
  cia_adder #(.W(8), .BLK(4))  dut8  (.a(a8),  .b(b8),  .cin, .sum(s8),  .cout(co8));
  cia_adder #(.W(16), .BLK(4)) dut16 (.a(a16), .b(b16), .cin, .sum(s16), .cout(co16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; a16 = '0; b16 = '0;
    for (int i = 0; i < 512; i++) begin
      {cin, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} !== 5'(a4 + b4 + cin)) begin
        failures++;
        $display("FAIL 4-bit %0d+%0d+%0d = %0d", a4, b4, cin, {co4, s4});
      end
    end
    for (int i = 0; i < 20000; i++) begin
      a8  = 8'($urandom);
      b8  = 8'($urandom);
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      cin = 1'($urandom);
      if (i == 0) begin a16 = 16'hffff; b16 = 16'h0000; cin = 1'b1; a8 = 8'hff; b8 = 8'h00; end
      if (i == 1) begin a16 = 16'h5555; b16 = 16'haaaa; cin = 1'b1; a8 = 8'h55; b8 = 8'haa; end
      #1;
      checks += 2;
      if ({co8, s8} !== 9'(a8 + b8 + cin)) begin
        failures++;
        $display("FAIL 8-bit %0d+%0d+%0d = %0d", a8, b8, cin, {co8, s8});
      end
      if ({co16, s16} !== 17'(a16 + b16 + cin)) begin
        failures++;
        $display("FAIL 16-bit %0d+%0d+%0d = %0d", a16, b16, cin, {co16, s16});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
