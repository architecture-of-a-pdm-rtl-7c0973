// tb_mf_pkg: reference membership functions for the testbenches.
// A set of n triangular MFs with peaks at x = sp*j (j = 0..n-1), slopes of
// +-s per step and height sp*s; neighbours sum to the height (overlap
// degree 2). MF0 starts at its peak at x = 0, the last MF stays at its
// peak up to x = 255. The default set has n = 8, sp = 36, s = 7 (height
// 252); the 7-MF set used for the pendulum test has sp = 42, s = 6.
package tb_mf_pkg;

  function automatic int mfg_ref(int n, int sp, int s, int j, int x);
    int d, v;
    if (j == 0 && x <= 0)             return sp * s;
    if (j == n - 1 && x >= sp * j)    return sp * s;
    d = x - sp * j;
    if (d < 0) d = -d;
    v = sp * s - s * d;
    return (v < 0) ? 0 : v;
  endfunction

  // Compressed form of the even (parity 0) or odd (parity 1) block:
  // slope[k] (k = 0: start value) and pos[k]. Segment k (1 <= k < n)
  // spans (sp*(k-1), sp*k]; the even block falls on odd k. Segment n runs
  // flat to x = 255.
  function automatic int mfg_slope(int n, int sp, int s, int parity, int k);
    if (k == 0) return (parity == 0) ? sp * s : 0;
    if (k >= n) return 0;
    if ((k % 2 == 1) == (parity == 0)) return 256 - s;
    return s;
  endfunction

  function automatic int mfg_pos(int n, int sp, int k);
    if (k == 0) return 0;
    if (k >= n) return 255;
    return sp * k;
  endfunction

  // default eight-MF set
  function automatic int mf_ref(int j, int x);
    return mfg_ref(8, 36, 7, j, x);
  endfunction
  function automatic int mf_slope(int parity, int k);
    return mfg_slope(8, 36, 7, parity, k);
  endfunction
  function automatic int mf_pos(int k);
    return mfg_pos(8, 36, k);
  endfunction

  // Degree of MF j for a fuzzified input (h, even value, odd value):
  // MF j is held by the even value if j is even, and is active only for
  // j = h or j = h+1.
  function automatic int deg(int h, int we, int wo, int j);
    if (j != h && j != h + 1) return 0;
    return (j % 2 == 0) ? we : wo;
  endfunction

endpackage
