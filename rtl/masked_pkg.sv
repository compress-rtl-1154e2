// masked_pkg: types and helper functions shared by the masked gadgets.
//
// A Boolean value x is carried as a sharing of D bits, x = x[0] ^ x[1] ^ ... ^ x[D-1];
// share i sits at bit i of a D-bit vector. A gadget that needs one random bit r_ij per
// unordered pair {i, j} of shares takes them as a packed vector of npairs(D) bits, with
// the pair (i, j), i < j, at index pair_idx(D, i, j). The row-major pair ordering is a
// choice of this design. The randomness counts per gadget (d(d-1)/2 for HPC2/HPC2o,
// d(d-1) for HPC3/HPC3o) follow from the gadget algorithms.
package masked_pkg;

  // Operations of the sharewise gadget (Algorithm 1 with X = XOR, AND; XNOR is the
  // affine case: the inversion is applied to share 0 only).
  typedef enum logic [1:0] {
    SW_XOR  = 2'd0,
    SW_AND  = 2'd1,
    SW_XNOR = 2'd2
  } sw_op_e;

  // Number of unordered share pairs.
  function automatic int npairs(int d);
    return d * (d - 1) / 2;
  endfunction

  // Index of the unordered pair {i, j} (i != j) in a pair-indexed randomness vector.
  function automatic int pair_idx(int d, int i, int j);
    int a, b;
    a = (i < j) ? i : j;
    b = (i < j) ? j : i;
    return a * d - (a * (a + 1)) / 2 + (b - a - 1);
  endfunction

  // Share j_i into which the inner-domain term of share i is merged in HPC2o/HPC3o:
  // j_0 = 1 and j_i = 0 for i != 0.
  function automatic int merge_idx(int i);
    return (i == 0) ? 1 : 0;
  endfunction

  // Random bits per gadget, per clock cycle.
  function automatic int hpc2_rnd(int d);
    return npairs(d);
  endfunction

  function automatic int hpc3_rnd(int d);
    return 2 * npairs(d);
  endfunction

  // Kogge-Stone adder gadget counts (masked_ks_adder), for an n-bit adder with
  // clog2(n-1) levels: P gadgets and G gadgets at level l, the first randomness bit of
  // level l, and the total randomness per cycle.
  function automatic int ks_p_cnt(int n, int l);
    int m  = n - 1;
    int lv = $clog2(n - 1);
    return (l >= 1 && l <= lv - 1 && m > (1 << l)) ? m - (1 << l) : 0;
  endfunction

  function automatic int ks_g_cnt(int n, int l);
    int m = n - 1;
    return (m > (1 << (l - 1))) ? m - (1 << (l - 1)) : 0;
  endfunction

  function automatic int ks_lvl_off(int d, int n, int l);
    int off = (n - 1) * hpc3_rnd(d);
    for (int k = 1; k < l; k++)
      off += ks_p_cnt(n, k) * hpc3_rnd(d) + ks_g_cnt(n, k) * hpc2_rnd(d);
    return off;
  endfunction

  function automatic int ks_rnd(int d, int n);
    return ks_lvl_off(d, n, $clog2(n - 1) + 1);
  endfunction

endpackage
