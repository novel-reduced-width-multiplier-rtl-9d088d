// mul2xk -- truncated 2 x k-bit partial-product multiplier on a carry chain.
//
// Multiplies a 2-bit slice a = {A[m+1], A[m]} of one operand by a K-bit slice
// b of the other, whose top bit is the other operand's MSB. Each output column
// is one mult_cell adding a[0]*b[j+1] and a[1]*b[j]; the cells are chained
// through their carries and the last carry is the top output bit.
//
// FULL = 0 (truncated block): the block's lowest column, which would hold the
// single product a[0]*b[0], and everything below it lie under the truncation
// line and are not built. The lowest built column adds a[0]*b[1] + a[1]*b[0],
// so b[0] feeds only one product. cin enters the carry chain at that column;
// the reduced-width multiplier drives it with an operand bit to compensate,
// on average, for the removed products. p = a0*(b>>1) + a1*b + cin, K+1 bits.
//
// FULL = 1 (untruncated block): the lowest column a[0]*b[0] is built too and
// p = a0*b + a1*(b<<1) + cin, K+2 bits.
//
// Purely combinational. The column structure follows the published 2 x k
// block; the FULL option, used when the truncation line lies below the block,
// is this design's generalisation.
module mul2xk #(
  parameter int K    = 8,  // width of the B slice
  parameter bit FULL = 0   // 1: keep the lowest column (no truncation)
) (
  input  logic [1:0]      a,    // A[m+1:m]
  input  logic [K-1:0]    b,    // B slice, b[K-1] is the operand MSB
  input  logic            cin,  // carry-in of the lowest built column
  output logic [K+FULL:0] p     // partial product incl. final carry
);
  localparam int NC = K + int'(FULL);  // number of columns (cells)

  // b extended by a zero below (FULL) and a zero above the slice so that
  // column j always adds a[0]*bx[j+1] + a[1]*bx[j].
  logic [NC:0] bx;
  logic [NC:0] c;  // carry chain, c[0] = cin

  always_comb begin
    bx = '0;
    bx[NC-1 -: K] = b;
  end

  assign c[0] = cin;

  for (genvar j = 0; j < NC; j++) begin : g_col
    mult_cell u_cell (
      .am (a[0]),
      .am1(a[1]),
      .bn (bx[j]),
      .bn1(bx[j+1]),
      .ci (c[j]),
      .s  (p[j]),
      .co (c[j+1])
    );
  end

  assign p[NC] = c[NC];
endmodule
