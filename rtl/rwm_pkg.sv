// rwm_pkg -- geometry of the reduced-width multiplier.
//
// An N x N unsigned product is split into N/2 blocks; block i multiplies
// A[2i+1:2i] by B, so its product a[0]*B[x] lands in column 2i+x. Keeping the
// product bits P[2N-1 : N-W] puts the truncation line at column T = N-W:
// every partial product of weight below 2^T is removed.
//
// A block whose lowest column 2i is below T is truncated: its lowest built
// column is T, it needs only B[N-1 : N-K] with K = N+2i+1-T, and it has a
// carry-in at column T that is fed with an operand bit. A block with 2i >= T
// is untruncated and has no compensation input.
//
// The compensation bits are taken interlacedly from the two operands: odd
// blocks use A[2i], even blocks use B[N-2-2i]. For N = 8 this gives
// A[6], B[2], A[2], B[6] for blocks 3..0, the published connection.
package rwm_pkg;

  // Column of the truncation line.
  function automatic int trunc_col(int n, int w);
    return n - w;
  endfunction

  // 1 when block i lies entirely at or above the truncation line.
  function automatic bit blk_full(int n, int w, int i);
    return (2 * i) >= trunc_col(n, w);
  endfunction

  // Width of the B slice block i uses.
  function automatic int blk_k(int n, int w, int i);
    return blk_full(n, w, i) ? n : n + 2 * i + 1 - trunc_col(n, w);
  endfunction

  // Column (weight exponent) of bit 0 of block i's partial product.
  function automatic int blk_base(int n, int w, int i);
    return blk_full(n, w, i) ? 2 * i : trunc_col(n, w);
  endfunction

  // 1 when the compensation bit of block i comes from operand A.
  function automatic bit cin_from_a(int i);
    return (i % 2) == 1;
  endfunction

  // Bit index, in A or B, of block i's compensation bit.
  function automatic int cin_idx(int n, int i);
    return cin_from_a(i) ? 2 * i : n - 2 - 2 * i;
  endfunction

endpackage
