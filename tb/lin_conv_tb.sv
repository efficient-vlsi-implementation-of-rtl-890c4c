// lin_conv_tb: self-check of the 4 x 4-bit linear convolution unit.
//
// The test applies the worked example (7,7,7,7) * (7,7,7,7) = (49,98,147,196,147,98,49),
// the extreme inputs (all -8, all 7, and mixed signs) and random sequences. Each Y_k is
// unpacked from its own field of the 64-bit result (P(7-0), P(16-8), P(26-17), P(36-27),
// P(46-37), P(55-47), P(63-56)) and compared with the convolution sum computed directly from
// the definition y(k) = sum_i a(i) * b(k-i). A watchdog ends a stalled run.
module lin_conv_tb;

  localparam int N = 4;
  localparam int W = 4;
  localparam int PW = 64;

  // field layout of the packed output, low bit and width of each Y_k
  localparam int LO [7] = '{0, 8, 17, 27, 37, 47, 56};
  localparam int WD [7] = '{8, 9, 10, 10, 10, 9, 8};

  int checks = 0;
  int failures = 0;

  logic [N*W-1:0] a, b;
  logic [PW-1:0]  p;

  lin_conv dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int field(int k);
    logic [63:0] v;
    v = p >> LO[k];
    v = v << (64 - WD[k]);
    return int'($signed(v) >>> (64 - WD[k]));
  endfunction

  function automatic int elem(logic [N*W-1:0] v, int i);
    return int'($signed(v[W*i +: W]));
  endfunction

  task automatic apply(logic [N*W-1:0] va, logic [N*W-1:0] vb);
    a = va;
    b = vb;
    #1;
    for (int k = 0; k < 2 * N - 1; k++) begin
      int expect_y = 0;
      for (int i = 0; i < N; i++)
        if (k - i >= 0 && k - i < N) expect_y += elem(a, i) * elem(b, k - i);
      checks++;
      if (field(k) != expect_y) begin
        failures++;
        $display("FAIL a=%h b=%h Y%0d=%0d expected %0d", a, b, k, field(k), expect_y);
      end
    end
  endtask

  initial begin
    // worked example: checked against the printed sequence, not only the reference model
    apply(16'h7777, 16'h7777);
    begin
      int ex [7] = '{49, 98, 147, 196, 147, 98, 49};
      for (int k = 0; k < 7; k++) begin
        checks++;
        if (field(k) != ex[k]) begin
          failures++;
          $display("FAIL example Y%0d=%0d expected %0d", k, field(k), ex[k]);
        end
      end
    end
    apply(16'h8888, 16'h8888);   // all -8: largest positive sums, 196 -> 256
    apply(16'h8888, 16'h7777);   // largest negative sums
    apply(16'h1234, 16'hfedc);
    for (int n = 0; n < 3000; n++) apply(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
