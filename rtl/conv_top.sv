// conv_top: the convolution engine, linear and circular units side by side.
//
// Both units take the same two sequences A and B (N elements of W-bit two's-complement
// numbers each, element i in bits [W*i+W-1 : W*i]) and compute every output sample in one
// combinational pass: the linear unit the 2N-1 samples of A * B packed into lin_p, the
// circular unit the N samples of the N-point circular convolution packed into circ_y.
// Both are built from Baugh-Wooley multipliers and Kogge-Stone adder trees.
//
// At the default N = W = 4: lin_p is 64 bits with Y_0..Y_6 in p[7:0], p[16:8], p[26:17],
// p[36:27], p[46:37], p[55:47], p[63:56]; circ_y is 4 x 10 bits. Placing the circular unit
// next to the linear one, on shared inputs, is this implementation's choice.
//
// Timing: purely combinational; no clock or reset.
module conv_top
  import conv_pkg::*;
#(
  parameter int N = 4,
  parameter int W = 4
) (
  input  logic [N*W-1:0]                 a,
  input  logic [N*W-1:0]                 b,
  output logic [lin_total(N, W)-1:0]     lin_p,
  output logic [N*circ_width(N, W)-1:0]  circ_y
);

  lin_conv #(.N(N), .W(W)) u_lin (
    .a(a),
    .b(b),
    .p(lin_p)
  );

  circ_conv #(.N(N), .W(W)) u_circ (
    .a(a),
    .b(b),
    .y(circ_y)
  );

endmodule
