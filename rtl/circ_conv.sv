// circ_conv: N-point circular convolution of two sequences of signed numbers, fully parallel.
//
// Y_k = sum over i of A_i * B_((k-i) mod N), k = 0 .. N-1. Unlike linear convolution, every
// output collects exactly N products: the diagonals of the cross-multiplication matrix wrap
// around. Each output is summed on its own (no carry passes between outputs), so each Y_k is
// 2W + clog2(N) bits wide; the outputs are packed side by side, Y_0 in the low bits.
//
// The output equations follow the design. The choice of Baugh-Wooley multipliers and a
// Kogge-Stone adder tree (the same parts as the linear convolution unit) and the operand
// width W = 4 are this implementation's.
//
// Interface: a, b hold the sequences, element i in bits [W*i+W-1 : W*i]; y holds Y_k in
// bits [CW*k+CW-1 : CW*k] with CW = 2W + clog2(N) (10 bits for N = W = 4).
// Timing: purely combinational.
module circ_conv
  import conv_pkg::*;
#(
  parameter int N = 4,
  parameter int W = 4
) (
  input  logic [N*W-1:0]                   a,
  input  logic [N*W-1:0]                   b,
  output logic [N*circ_width(N, W)-1:0]    y
);

  localparam int CW = circ_width(N, W);

  for (genvar k = 0; k < N; k++) begin : g_out
    logic [N-1:0][2*W-1:0] terms;

    for (genvar i = 0; i < N; i++) begin : g_term
      bw_mult #(.W(W)) u_mult (
        .a(a[W*i +: W]),
        .b(b[W*((k - i + N) % N) +: W]),
        .p(terms[i])
      );
    end

    diag_sum #(.NT(N), .IW(2 * W)) u_sum (
      .t(terms),
      .s(y[CW*k +: CW])
    );
  end

endmodule
