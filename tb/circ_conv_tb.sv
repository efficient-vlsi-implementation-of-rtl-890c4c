// circ_conv_tb: self-check of the 4-point circular convolution unit.
//
// Each of the four 10-bit outputs is compared with y(k) = sum_i a(i) * b((k-i) mod 4)
// computed from the definition, on the extreme inputs (all -8, all 7, mixed signs) and on
// random sequences. A watchdog ends a stalled run.
module circ_conv_tb;

  localparam int N = 4;
  localparam int W = 4;
  localparam int CW = 10;

  int checks = 0;
  int failures = 0;

  logic [N*W-1:0]  a, b;
  logic [N*CW-1:0] y;

  circ_conv dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N*W-1:0] va, logic [N*W-1:0] vb);
    a = va;
    b = vb;
    #1;
    for (int k = 0; k < N; k++) begin
      int expect_y = 0;
      for (int i = 0; i < N; i++)
        expect_y += int'($signed(a[W*i +: W])) * int'($signed(b[W*((k - i + N) % N) +: W]));
      checks++;
      if (int'($signed(y[CW*k +: CW])) != expect_y) begin
        failures++;
        $display("FAIL a=%h b=%h Y%0d=%0d expected %0d", a, b, k, $signed(y[CW*k +: CW]), expect_y);
      end
    end
  endtask

  initial begin
    apply(16'h7777, 16'h7777);   // every output 4 * 49 = 196
    apply(16'h8888, 16'h8888);   // every output 4 * 64 = 256
    apply(16'h8888, 16'h7777);   // every output -224
    apply(16'h0001, 16'h4321);   // a = delta: y equals b
    apply(16'h0010, 16'h4321);   // a = delayed delta: y is b rotated by one
    for (int n = 0; n < 3000; n++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
