// bw_mult: W x W two's-complement multiplier using the Baugh-Wooley partial-product array.
//
// Baugh-Wooley turns a signed multiplication into an addition of positive partial products
// only. Every bit product a_i & b_j is formed as usual, but the ones that involve exactly one
// sign bit (i = W-1 xor j = W-1) are complemented, and two constant ones are added, at weight
// 2^W and 2^(2W-1). Summing the W shifted rows modulo 2^(2W) then gives the signed product
// directly, without sign-extending any row.
//
// The multiplier type (Baugh-Wooley, signed, 4-bit operands, 8-bit product) follows the
// design; how the rows are added is this implementation's choice: they are accumulated row by
// row, a plain array adder, which synthesis is free to restructure.
//
// Interface: a, b are signed W-bit operands, p is their signed 2W-bit product.
// Timing: purely combinational.
module bw_mult #(
  parameter int W = 4
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);

  // Partial-product rows, row j already shifted left by j bits.
  logic [W-1:0][2*W-1:0] row;

  always_comb begin
    for (int j = 0; j < W; j++) begin
      row[j] = '0;
      for (int i = 0; i < W; i++) begin
        // complement the bit products that pair one sign bit with one magnitude bit
        if ((i == W - 1) != (j == W - 1)) row[j][i+j] = ~(a[i] & b[j]);
        else                              row[j][i+j] = a[i] & b[j];
      end
    end
  end

  // Row accumulation plus the two Baugh-Wooley correction ones.
  logic [2*W-1:0] acc;
  always_comb begin
    acc = (2*W)'(1) << W;
    acc = acc + ((2*W)'(1) << (2*W - 1));
    for (int j = 0; j < W; j++) acc = acc + row[j];
  end

  assign p = acc;

endmodule
