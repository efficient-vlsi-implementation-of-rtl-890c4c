// diag_sum_tb: self-check of the diagonal adder tree for 1 to 5 signed 8-bit terms.
//
// Each instance gets random terms and, every 16th vector, all terms at the most negative or
// most positive value, so the widest possible sums are reached. The reference is the plain
// integer sum; the output width IW + clog2(NT) is also checked. A watchdog ends a stalled run.
module diag_sum_tb;

  int checks = 0;
  int failures = 0;

  logic [4:0][7:0] t;
  logic [7:0]  s1;
  logic [8:0]  s2;
  logic [9:0]  s3;
  logic [9:0]  s4;
  logic [10:0] s5;

  diag_sum #(.NT(1), .IW(8)) dut1 (.t(t[0:0]), .s(s1));
  diag_sum #(.NT(2), .IW(8)) dut2 (.t(t[1:0]), .s(s2));
  diag_sum #(.NT(3), .IW(8)) dut3 (.t(t[2:0]), .s(s3));
  diag_sum #(.NT(4), .IW(8)) dut4 (.t(t[3:0]), .s(s4));
  diag_sum #(.NT(5), .IW(8)) dut5 (.t(t[4:0]), .s(s5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sum(int n);
    int acc = 0;
    for (int i = 0; i < n; i++) acc += int'($signed(t[i]));
    return acc;
  endfunction

  task automatic check(int n, int got);
    checks++;
    if (got != ref_sum(n)) begin
      failures++;
      $display("FAIL NT=%0d: got %0d expected %0d (t=%h)", n, got, ref_sum(n), t);
    end
  endtask

  initial begin
    if ($bits(s1) != 8 || $bits(s2) != 9 || $bits(s3) != 10 || $bits(s4) != 10 || $bits(s5) != 11) begin
      failures++;
      $display("FAIL output widths");
    end
    checks++;
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < 5; i++) begin
        if (n % 16 == 0)      t[i] = 8'h80;
        else if (n % 16 == 1) t[i] = 8'h7f;
        else                  t[i] = 8'($urandom);
      end
      #1;
      check(1, int'($signed(s1)));
      check(2, int'($signed(s2)));
      check(3, int'($signed(s3)));
      check(4, int'($signed(s4)));
      check(5, int'($signed(s5)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
