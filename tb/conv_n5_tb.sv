// conv_n5_tb: the convolution engine sized for 5-element sequences (9 linear outputs).
//
// The same top, built with N = 5 and W = 4, convolves two 5-element sequences of 4-bit signed
// numbers into 9 linear samples and computes the 5-point circular convolution. Output k of the
// linear unit sums m = min(k, 8-k) + 1 products and is 8 + clog2(m) bits wide, giving 85 bits in
// all; each circular sample sums 5 products and is 11 bits wide. Every sample is compared with
// the definition on extreme and random inputs. A watchdog ends a stalled run.
module conv_n5_tb;

  localparam int N = 5;
  localparam int W = 4;
  localparam int NY = 2 * N - 1;
  localparam int PW = 85;
  localparam int CW = 11;

  int checks = 0;
  int failures = 0;
  int lo [NY];
  int wd [NY];

  logic [N*W-1:0]  a, b;
  logic [PW-1:0]   lin_p;
  logic [N*CW-1:0] circ_y;

  conv_top #(.N(N), .W(W)) dut (.a(a), .b(b), .lin_p(lin_p), .circ_y(circ_y));

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int elem(logic [N*W-1:0] v, int i);
    return int'($signed(v[W*i +: W]));
  endfunction

  function automatic int lin_field(int k);
    logic [127:0] v;
    v = 128'(lin_p) >> lo[k];
    v = v << (128 - wd[k]);
    return int'($signed(v) >>> (128 - wd[k]));
  endfunction

  task automatic apply(logic [N*W-1:0] va, logic [N*W-1:0] vb);
    a = va;
    b = vb;
    #1;
    for (int k = 0; k < NY; k++) begin
      int want = 0;
      for (int i = 0; i < N; i++)
        if (k - i >= 0 && k - i < N) want += elem(a, i) * elem(b, k - i);
      checks++;
      if (lin_field(k) != want) begin
        failures++;
        $display("FAIL linear a=%h b=%h Y%0d=%0d expected %0d", a, b, k, lin_field(k), want);
      end
    end
    for (int k = 0; k < N; k++) begin
      int want = 0;
      for (int i = 0; i < N; i++) want += elem(a, i) * elem(b, (k - i + N) % N);
      checks++;
      if (int'($signed(circ_y[CW*k +: CW])) != want) begin
        failures++;
        $display("FAIL circular a=%h b=%h Y%0d=%0d expected %0d", a, b, k,
                 $signed(circ_y[CW*k +: CW]), want);
      end
    end
  endtask

  initial begin
    int off, m;
    off = 0;
    for (int k = 0; k < NY; k++) begin
      m = (k < N) ? k + 1 : NY - k;
      lo[k] = off;
      wd[k] = 8 + $clog2(m);
      off += wd[k];
    end
    checks++;
    if (off != PW) begin
      failures++;
      $display("FAIL packed width %0d", off);
    end
    apply(20'h77777, 20'h77777);
    apply(20'h88888, 20'h88888);
    apply(20'h88888, 20'h77777);
    for (int n = 0; n < 3000; n++) apply(20'($urandom), 20'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
