// dsc_pkg: constants and helper functions shared by the digit-serial
// convolver.
//
// The convolver works on W-bit two's complement words cut into
// alpha = W/D digits of D bits, least significant digit first. The
// functions below give the derived sizes that several modules need:
// the depth of the pipeline adder tree, the number of A cells on a tree
// level, the initial latency Z and the largest safe coefficient length.
// The latency and coefficient-length formulas are the ones the design
// is specified by; the tree helpers are this implementation's own.
package dsc_pkg;

  // ceil(log2(n)) for n >= 1 (0 for n == 1).
  function automatic int clog2i(input int n);
    int r;
    r = 0;
    while ((1 << r) < n) r++;
    return r;
  endfunction

  // floor(log2(n)) for n >= 1.
  function automatic int flog2i(input int n);
    int r;
    r = 0;
    while ((2 << r) <= n) r++;
    return r;
  endfunction

  // Number of adder-tree levels (= t_add, clock cycles per digit through
  // the tree): floor(log2(k-1)) + 1, which equals ceil(log2(k)) for k >= 2.
  function automatic int tree_levels(input int k);
    return (k < 2) ? 0 : flog2i(k - 1) + 1;
  endfunction

  // Number of nodes on tree level l (level 0 = the k multiplier outputs).
  function automatic int tree_nodes(input int k, input int l);
    int n;
    n = k;
    for (int i = 0; i < l; i++) n = (n + 1) / 2;
    return n;
  endfunction

  // Initial latency Z = alpha*k + floor(log2(k-1)) + 2 clock cycles, from
  // the cycle the LSD of X_1 is presented to the cycle the LSD of Y_1
  // leaves the adder tree.
  function automatic int latency_z(input int alpha, input int k);
    return alpha * k + tree_levels(k) + 1;
  endfunction

  // Maximal coefficient length Amax = W - (floor(log2(k-1)) + 1): with
  // coefficients of at most Amax bits the sum of k products fits in the
  // 2W-bit result word.
  function automatic int amax(input int w, input int k);
    return w - tree_levels(k);
  endfunction

endpackage
