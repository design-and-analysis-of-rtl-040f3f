// Testbench for par_adder: one instance per adder type at 8 bits, all
// compared with a + b + cin on the same random and corner vectors; each
// type must be exercised.
module tb_par_adder;
  import squarer_pkg::*;
  localparam int NT = 5;
  logic [7:0] a, b;
  logic       cin;
  logic [7:0] s  [NT];
  logic       co [NT];
  int checks = 0, failures = 0;
  int used [NT];

  par_adder #(.W(8), .TYPE(ADD_RCA))  u0 (.a, .b, .cin, .sum(s[0]), .cout(co[0]));
  par_adder #(.W(8), .TYPE(ADD_CLA))  u1 (.a, .b, .cin, .sum(s[1]), .cout(co[1]));
  par_adder #(.W(8), .TYPE(ADD_CSKA)) u2 (.a, .b, .cin, .sum(s[2]), .cout(co[2]));
  par_adder #(.W(8), .TYPE(ADD_CSEL)) u3 (.a, .b, .cin, .sum(s[3]), .cout(co[3]));
  par_adder #(.W(8), .TYPE(ADD_CIA))  u4 (.a, .b, .cin, .sum(s[4]), .cout(co[4]));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < NT; t++) used[t] = 0;
    for (int i = 0; i < 131072; i++) begin
      {cin, a, b} = 17'(i);
      #1;
      for (int t = 0; t < NT; t++) begin
        checks++;
        used[t]++;
        if ({co[t], s[t]} !== 9'(a + b + cin)) begin
          failures++;
          if (failures < 10) $display("FAIL type %0d: %0d+%0d+%0d = %0d", t, a, b, cin, {co[t], s[t]});
        end
      end
    end
    for (int t = 0; t < NT; t++) begin
      checks++;
      if (used[t] == 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
