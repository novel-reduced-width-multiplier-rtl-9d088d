// rw_mult -- reduced-width unsigned multiplier with carry-in error compensation.
//
// Returns the top N+W bits, P[2N-1 : N-W], of the N x N unsigned product
// A*B without building the logic for the lower product bits. The multiplier
// is N/2 2 x k carry-chain blocks (mul2xk), one per bit pair of A, followed
// by an adder (pp_adder). Every partial product below the truncation line
// T = N-W is left out, which on its own always under-estimates the product
// (direct truncation). To compensate, the otherwise unused carry-in of each
// truncated block is driven by a single operand bit: its mean, 1/2 of a unit
// in the last place (ULP, weight 2^T), stands in for the mean of the removed
// products. This costs no logic at all compared with direct truncation.
// The bits are taken interlacedly from A and B (see rwm_pkg); for N = 8,
// W = 1 they are A[6], B[2], A[2], B[6] for blocks 3..0.
//
// CIN_EN[i] enables the compensation bit of block i (0 gives direct
// truncation for that block). The default enables all four blocks as in the
// published block diagram. The published error figures are reproduced with
// CIN_EN = 4'b1110 (block 0 uncompensated), which brings the mean error to
// about 0 or +0.25 ULP; with all four enabled the mean error at W = 1 is
// -0.5 ULP.
//
// EXTRA_AND = 1 adds one more term, A[0] & B[N-1], at the last place. Its mean
// is 1/4 ULP, which cancels the remaining +0.25 ULP mean error of the
// configurations that have it. Unlike the carry-in bits it costs an AND gate
// and a wider adder, so it is off by default.
//
// W = 0 gives an N-bit result, W = N the exact 2N-bit product. N must be even.
// Purely combinational: A and B in, P out after the carry-chain and adder
// delays.
module rw_mult
  import rwm_pkg::*;
#(
  parameter int             N      = 8,        // operand width
  parameter int             W      = 1,        // extra result bits below 2^N
  parameter bit [N/2-1:0]   CIN_EN = '1,       // per-block compensation enable
  parameter bit             EXTRA_AND = 1'b0   // add the A[0] & B[N-1] term
) (
  input  logic [N-1:0]   a,   // operand A, unsigned
  input  logic [N-1:0]   b,   // operand B, unsigned
  output logic [N+W-1:0] p    // P[2N-1 : N-W]
);
  localparam int T  = trunc_col(N, W);
  localparam int NB = N / 2;
  localparam int PW = N + W + 1;  // one guard bit above the result
  localparam bit XA = EXTRA_AND && (T > 0);  // extra term only if truncated
  localparam int NT = NB + int'(XA);        // number of adder terms

  if (N % 2 != 0 || W < 0 || W > N) begin : g_bad_param
    $error("rw_mult: N must be even and 0 <= W <= N");
  end

  logic [NT-1:0][PW-1:0] pp_al;  // partial products aligned to column T
  logic [PW-1:0]         sum;

  for (genvar i = 0; i < NB; i++) begin : g_blk
    localparam bit FULL = blk_full(N, W, i);
    localparam int K    = blk_k(N, W, i);
    localparam int SH   = blk_base(N, W, i) - T;

    logic [K+int'(FULL):0] pp;
    logic                  cin;

    if (FULL || !CIN_EN[i]) begin : g_nocomp
      assign cin = 1'b0;
    end else if (cin_from_a(i)) begin : g_comp_a
      assign cin = a[cin_idx(N, i)];
    end else begin : g_comp_b
      assign cin = b[cin_idx(N, i)];
    end

    mul2xk #(.K(K), .FULL(FULL)) u_blk (
      .a  (a[2*i+1 -: 2]),
      .b  (b[N-1 -: K]),
      .cin(cin),
      .p  (pp)
    );

    assign pp_al[i] = PW'(pp) << SH;
  end

  if (XA) begin : g_extra
    assign pp_al[NB] = PW'(a[0] & b[N-1]);
  end

  pp_adder #(.NUM(NT), .WIDTH(PW)) u_add (
    .x(pp_al),
    .s(sum)
  );

  assign p = sum[N+W-1:0];

  // The compensated sum never exceeds 2^(2N) - 1; the guard bit stays 0.
  always_comb assert (sum[PW-1] == 1'b0) else $error("rw_mult: result overflow");
endmodule
