// conv_top_tb: end-to-end check of the convolution engine at its default size (N = W = 4).
//
// Both outputs of the top are checked on every vector: the seven linear-convolution samples
// unpacked from the 64-bit lin_p and the four circular-convolution samples from circ_y, each
// against a sum computed from the definition. The vectors are the worked example
// (7,7,7,7) * (7,7,7,7), extremes and random sequences.
//
// The design's mechanisms are counted and each must occur at least once:
//   - a signed result: some output sample is negative (Baugh-Wooley signed products and
//     sign extension through the Kogge-Stone tree);
//   - carry kept per output: an output sample needs its full width, i.e. it lies outside the
//     range of a field one bit narrower, so any carry lost to a neighbour would show;
//   - a carry out of a 9-bit adder: a 4-term sum outside -256..255 never occurs, so this
//     counts 4-term sums outside -128..127, which need the second adder level;
//   - a circular wrap: a circular sample differs from the matching linear sample.
// A watchdog ends a stalled run.
module conv_top_tb;

  localparam int N = 4;
  localparam int W = 4;
  localparam int LO [7] = '{0, 8, 17, 27, 37, 47, 56};
  localparam int WD [7] = '{8, 9, 10, 10, 10, 9, 8};
  localparam int CW = 10;

  int checks = 0;
  int failures = 0;
  int n_negative = 0;
  int n_full_width = 0;
  int n_two_levels = 0;
  int n_wrap = 0;

  logic [N*W-1:0] a, b;
  logic [63:0]    lin_p;
  logic [N*CW-1:0] circ_y;

  conv_top dut (.a(a), .b(b), .lin_p(lin_p), .circ_y(circ_y));

  initial begin : watchdog
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int lin_field(int k);
    logic [63:0] v;
    v = lin_p >> LO[k];
    v = v << (64 - WD[k]);
    return int'($signed(v) >>> (64 - WD[k]));
  endfunction

  function automatic int elem(logic [N*W-1:0] v, int i);
    return int'($signed(v[W*i +: W]));
  endfunction

  task automatic check(string what, int k, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s a=%h b=%h Y%0d=%0d expected %0d", what, a, b, k, got, want);
    end
  endtask

  task automatic apply(logic [N*W-1:0] va, logic [N*W-1:0] vb);
    int ylin [2*N-1];
    a = va;
    b = vb;
    #1;
    for (int k = 0; k < 2 * N - 1; k++) begin
      int want = 0;
      for (int i = 0; i < N; i++)
        if (k - i >= 0 && k - i < N) want += elem(a, i) * elem(b, k - i);
      ylin[k] = want;
      check("linear", k, lin_field(k), want);
      if (want < 0) n_negative++;
      if (want >= (1 << (WD[k] - 2)) || want < -(1 << (WD[k] - 2))) n_full_width++;
      if (k == N - 1 && (want > 127 || want < -128)) n_two_levels++;
    end
    for (int k = 0; k < N; k++) begin
      int want = 0;
      for (int i = 0; i < N; i++) want += elem(a, i) * elem(b, (k - i + N) % N);
      check("circular", k, int'($signed(circ_y[CW*k +: CW])), want);
      if (want != ylin[k]) n_wrap++;
    end
  endtask

  initial begin
    apply(16'h7777, 16'h7777);
    begin
      int ex [7] = '{49, 98, 147, 196, 147, 98, 49};
      for (int k = 0; k < 7; k++) check("example", k, lin_field(k), ex[k]);
    end
    apply(16'h8888, 16'h8888);
    apply(16'h8888, 16'h7777);
    apply(16'h7878, 16'h8787);
    for (int n = 0; n < 5000; n++) apply(16'($urandom), 16'($urandom));

    $display("mechanisms: negative=%0d full_width=%0d two_adder_levels=%0d circular_wrap=%0d",
             n_negative, n_full_width, n_two_levels, n_wrap);
    checks++;
    if (n_negative == 0)   begin failures++; $display("FAIL no negative result seen"); end
    checks++;
    if (n_full_width == 0) begin failures++; $display("FAIL no full-width result seen"); end
    checks++;
    if (n_two_levels == 0) begin failures++; $display("FAIL no second-level carry seen"); end
    checks++;
    if (n_wrap == 0)       begin failures++; $display("FAIL no circular wrap seen"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
