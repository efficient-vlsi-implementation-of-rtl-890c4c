// conv_pkg: shared size arithmetic for the convolution units.
//
// Linear convolution of two N-element sequences yields 2N-1 outputs Y_k. Output k sums
// conv_terms(k) products, each 2W bits wide, through a binary tree of adders that widens by
// one bit per level, so Y_k is 2W + clog2(conv_terms(k)) bits wide. The outputs are packed
// one after another into a single vector P, Y_0 in the least significant bits. For N = W = 4
// this gives the 64-bit layout P(7-0), P(16-8), P(26-17), P(36-27), P(46-37), P(55-47),
// P(63-56) used by the linear convolution unit.
package conv_pkg;

  // Number of products on diagonal k of the N x N cross-multiplication matrix.
  function automatic int conv_terms(int n, int k);
    int lo, hi;
    lo = (k > n - 1) ? k - (n - 1) : 0;
    hi = (k < n - 1) ? k : n - 1;
    return hi - lo + 1;
  endfunction

  // Index i of the first product A_i * B_(k-i) on diagonal k.
  function automatic int conv_first(int n, int k);
    return (k > n - 1) ? k - (n - 1) : 0;
  endfunction

  // Width of the sum of m signed products of 2w bits each.
  function automatic int sum_width(int w, int m);
    return 2 * w + $clog2(m);
  endfunction

  // Width of linear-convolution output Y_k.
  function automatic int lin_width(int n, int w, int k);
    return sum_width(w, conv_terms(n, k));
  endfunction

  // Bit offset of Y_k inside the packed output vector.
  function automatic int lin_offset(int n, int w, int k);
    int off;
    off = 0;
    for (int j = 0; j < k; j++) off += lin_width(n, w, j);
    return off;
  endfunction

  // Total width of the packed linear-convolution output (64 for N = W = 4).
  function automatic int lin_total(int n, int w);
    return lin_offset(n, w, 2 * n - 1);
  endfunction

  // Width of one circular-convolution output (every output sums N products).
  function automatic int circ_width(int n, int w);
    return sum_width(w, n);
  endfunction

endpackage
