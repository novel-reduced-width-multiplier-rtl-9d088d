// tb_ref_pkg -- bit-level reference model of the 8 x 8 reduced-width
// multiplier, written independently of the RTL structure.
//
// ref_rw sums every partial product A[j]*B[k] whose column j+k is at or above
// the truncation line T = 8-W, scales by 2^-T and adds the compensation bits
// of the truncated blocks, listed explicitly: block 3 A[6], block 2 B[2],
// block 1 A[2], block 0 B[6]; block i is truncated when 2i < T.
// ref_round rounds an (8+W)-bit value to 8 bits, ties up.
package tb_ref_pkg;

  function automatic int ref_rw(int a, int b, int w, bit [3:0] en);
    int t;
    int s;
    t = 8 - w;
    s = 0;
    for (int j = 0; j < 8; j++)
      for (int k = 0; k < 8; k++)
        if (j + k >= t) s += (((a >> j) & (b >> k)) & 1) << (j + k);
    s = s >> t;
    if (en[3] && 6 < t) s += (a >> 6) & 1;
    if (en[2] && 4 < t) s += (b >> 2) & 1;
    if (en[1] && 2 < t) s += (a >> 2) & 1;
    if (en[0] && 0 < t) s += (b >> 6) & 1;
    return s;
  endfunction

  function automatic int ref_round(int p, int w);
    if (w == 0) return p;
    return (p + (1 << (w - 1))) >> w;
  endfunction

endpackage
