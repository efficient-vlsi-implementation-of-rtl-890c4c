// lin_conv: linear convolution of two short sequences of signed numbers, fully parallel.
//
// The two N-element sequences A = (A_0..A_(N-1)) and B = (B_0..B_(N-1)) arrive flattened in
// a and b, element i in bits [W*i+W-1 : W*i]. All N*N products A_i * B_j are formed at once
// by Baugh-Wooley multipliers (the cross-multiplication matrix), and every output
// Y_k = sum over i of A_i * B_(k-i), k = 0 .. 2N-2, is the sum of one diagonal of that matrix,
// added by a diag_sum tree of Kogge-Stone adders. No carry passes from one output to the
// next: each Y_k keeps its own full width and the outputs are packed side by side into p.
//
// At the default N = W = 4 this is the 16-multiplier, six 8-bit and three 9-bit adder network
// of the design, and p is 64 bits: Y_0 in p[7:0], Y_1 in p[16:8], Y_2 in p[26:17],
// Y_3 in p[36:27], Y_4 in p[46:37], Y_5 in p[55:47], Y_6 in p[63:56]. All numbers are two's
// complement; each Y_k is a signed field of its own width. Sizes other than 4 x 4 bits use
// the same construction, which is this implementation's generalisation.
//
// Timing: purely combinational; the critical path is one multiplier plus clog2(N) adders.
module lin_conv
  import conv_pkg::*;
#(
  parameter int N = 4,
  parameter int W = 4
) (
  input  logic [N*W-1:0]            a,
  input  logic [N*W-1:0]            b,
  output logic [lin_total(N, W)-1:0] p
);

  // The cross-multiplication matrix: prod[i][j] = A_i * B_j.
  logic [N-1:0][N-1:0][2*W-1:0] prod;

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_col
      bw_mult #(.W(W)) u_mult (
        .a(a[W*i +: W]),
        .b(b[W*j +: W]),
        .p(prod[i][j])
      );
    end
  end

  // One adder tree per diagonal.
  for (genvar k = 0; k < 2 * N - 1; k++) begin : g_out
    localparam int M   = conv_terms(N, k);
    localparam int I0  = conv_first(N, k);
    localparam int YW  = lin_width(N, W, k);
    localparam int OFF = lin_offset(N, W, k);

    logic [M-1:0][2*W-1:0] terms;
    for (genvar t = 0; t < M; t++) begin : g_term
      assign terms[t] = prod[I0 + t][k - I0 - t];
    end

    diag_sum #(.NT(M), .IW(2 * W)) u_sum (
      .t(terms),
      .s(p[OFF +: YW])
    );
  end

endmodule
