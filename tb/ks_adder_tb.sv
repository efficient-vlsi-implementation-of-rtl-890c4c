// ks_adder_tb: self-check of the Kogge-Stone adder at the two widths the convolution uses.
//
// The 8-bit adder is checked exhaustively (all 65536 operand pairs), the 9-bit adder on
// random operands plus the four extreme corners. The reference is the exact signed sum, so
// the extra sign bit of the result is checked as well. A watchdog ends a stalled run.
module ks_adder_tb;

  int checks = 0;
  int failures = 0;

  logic [7:0] a8, b8;
  logic [8:0] s8;
  logic [8:0] a9, b9;
  logic [9:0] s9;

  ks_adder #(.WIDTH(8)) dut8 (.a(a8), .b(b8), .s(s8));
  ks_adder #(.WIDTH(9)) dut9 (.a(a9), .b(b9), .s(s9));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check9(int x, int y);
    a9 = 9'(x);
    b9 = 9'(y);
    #1;
    checks++;
    if ($signed(s9) != x + y) begin
      failures++;
      $display("FAIL 9-bit: %0d + %0d gave %0d", x, y, $signed(s9));
    end
  endtask

  initial begin
    for (int x = -128; x < 128; x++) begin
      for (int y = -128; y < 128; y++) begin
        a8 = 8'(x);
        b8 = 8'(y);
        #1;
        checks++;
        if ($signed(s8) != x + y) begin
          failures++;
          if (failures < 10) $display("FAIL 8-bit: %0d + %0d gave %0d", x, y, $signed(s8));
        end
      end
    end
    check9(-256, -256);
    check9(255, 255);
    check9(-256, 255);
    check9(255, -256);
    for (int n = 0; n < 5000; n++)
      check9(int'($urandom_range(511)) - 256, int'($urandom_range(511)) - 256);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
