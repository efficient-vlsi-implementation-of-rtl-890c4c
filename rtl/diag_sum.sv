// diag_sum: adds the products on one diagonal of the cross-multiplication matrix.
//
// In the cross-multiplication method every output sample Y_k is the sum of the products
// A_i * B_(k-i) that lie on one diagonal of the A x B matrix. This block adds NT such signed
// products of IW bits with a tree of Kogge-Stone adders, built level by level: at level l the
// values are IW + l bits wide, neighbours (0,1), (2,3), ... are added by one (IW+l)-bit
// ks_adder each, and an odd value left over is sign-extended and passed on to the next level.
// Each level adds one bit, so after clog2(NT) levels the sum is IW + clog2(NT) bits wide and
// can never overflow.
//
// For the 4 x 4-bit linear convolution this reproduces the design's adder arrangement: two
// products go through one 8-bit adder (9-bit sum); three go through an 8-bit adder and then a
// 9-bit adder that also takes the third, sign-extended, product (10-bit sum); four go through
// two 8-bit adders whose 9-bit sums meet in a 9-bit adder (10-bit sum). A single term passes
// straight through. Term counts above four use the same pairing, which is this
// implementation's generalisation.
//
// Interface: t[k] is term k (signed, IW bits); s is the signed sum, IW + clog2(NT) bits.
// Timing: purely combinational, clog2(NT) adder levels.
module diag_sum #(
  parameter int NT = 4,
  parameter int IW = 8
) (
  input  logic [NT-1:0][IW-1:0]        t,
  output logic [IW+$clog2(NT)-1:0]     s
);

  localparam int L  = $clog2(NT);   // adder levels
  localparam int MW = IW + L;       // widest value, the result width

  // node[l][j]: value j of level l, sign-extended to MW bits
  logic [L:0][NT-1:0][MW-1:0] node;

  // number of values present at level l
  function automatic int count(int l);
    return (NT + (1 << l) - 1) >> l;
  endfunction

  for (genvar j = 0; j < NT; j++) begin : g_in
    assign node[0][j] = MW'(signed'(t[j]));
  end

  for (genvar l = 0; l < L; l++) begin : g_level
    for (genvar j = 0; j < NT; j++) begin : g_val
      if (j < count(l + 1) && 2 * j + 1 < count(l)) begin : g_add
        logic [IW+l:0] sum;
        ks_adder #(.WIDTH(IW + l)) u_add (
          .a  (node[l][2*j][IW+l-1:0]),
          .b  (node[l][2*j+1][IW+l-1:0]),
          .s  (sum)
        );
        assign node[l+1][j] = MW'(signed'(sum));
      end else if (j < count(l + 1)) begin : g_pass
        // odd value out: carried to the next level unchanged
        assign node[l+1][j] = node[l][2*j];
      end else begin : g_none
        assign node[l+1][j] = '0;
      end
    end
  end

  assign s = node[L][0];

endmodule
