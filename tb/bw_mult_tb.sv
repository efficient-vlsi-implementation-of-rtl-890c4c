// bw_mult_tb: exhaustive self-check of the 4 x 4-bit Baugh-Wooley multiplier.
//
// Every one of the 256 operand pairs is applied and the product compared with the signed
// product computed by the simulator's own integer arithmetic. A second, 6-bit instance is
// checked on random operands to exercise the generic width. A watchdog ends the run with a
// failure if it ever stalls.
module bw_mult_tb;

  int checks = 0;
  int failures = 0;

  logic [3:0] a4, b4;
  logic [7:0] p4;
  logic [5:0] a6, b6;
  logic [11:0] p6;

  bw_mult #(.W(4)) dut4 (.a(a4), .b(b4), .p(p4));
  bw_mult #(.W(6)) dut6 (.a(a6), .b(b6), .p(p6));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -8; x < 8; x++) begin
      for (int y = -8; y < 8; y++) begin
        a4 = 4'(x);
        b4 = 4'(y);
        #1;
        checks++;
        if ($signed(p4) != x * y) begin
          failures++;
          $display("FAIL W=4: %0d * %0d gave %0d", x, y, $signed(p4));
        end
      end
    end
    for (int n = 0; n < 2000; n++) begin
      int x, y;
      x = int'($urandom_range(63)) - 32;
      y = int'($urandom_range(63)) - 32;
      a6 = 6'(x);
      b6 = 6'(y);
      #1;
      checks++;
      if ($signed(p6) != x * y) begin
        failures++;
        $display("FAIL W=6: %0d * %0d gave %0d", x, y, $signed(p6));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
