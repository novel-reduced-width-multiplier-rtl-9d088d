// fw_mult_top -- reduced-width and fixed-width N x N unsigned multiplier.
//
// Instantiates the compensated reduced-width multiplier (rw_mult) and the
// rounding stage (fw_round). p_rw is the N+W-bit reduced-width product
// P[2N-1 : N-W]; p_fw is that product rounded to N bits, the result of a
// fixed-width multiplier whose inputs and output are all N bits wide.
// Defaults N = 8, W = 1 and the compensation connections are those of the
// published block diagram; EXTRA_AND (off by default) adds the optional
// A[0] & B[N-1] correction term (see rw_mult). Purely combinational: no clock and no reset.
module fw_mult_top #(
  parameter int           N      = 8,   // operand width
  parameter int           W      = 1,   // extra result bits below 2^N
  parameter bit [N/2-1:0] CIN_EN = '1,  // per-block compensation enable
  parameter bit           EXTRA_AND = 1'b0  // extra A[0] & B[N-1] term
) (
  input  logic [N-1:0]   a,     // operand A, unsigned
  input  logic [N-1:0]   b,     // operand B, unsigned
  output logic [N+W-1:0] p_rw,  // reduced-width product
  output logic [N-1:0]   p_fw   // fixed-width (rounded) product
);
  rw_mult #(.N(N), .W(W), .CIN_EN(CIN_EN), .EXTRA_AND(EXTRA_AND)) u_rw (
    .a(a),
    .b(b),
    .p(p_rw)
  );

  fw_round #(.N(N), .W(W)) u_rnd (
    .p(p_rw),
    .y(p_fw)
  );
endmodule
