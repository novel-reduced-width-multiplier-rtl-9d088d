// fw_round -- rounding stage of the fixed-width multiplier.
//
// A fixed-width multiplier returns as many bits as each operand has. The
// reduced-width product has N+W bits, so its W lowest bits are rounded off:
// y = floor(p / 2^W + 1/2), round to nearest with ties rounded up, done by
// adding 2^(W-1) and dropping W bits. For W = 0 no rounding logic exists and
// y = p. Round-half-up is this design's choice of rounding rule; it gives the
// rounding error statistics mean 0, mean absolute 0.25, maximum 0.5 ULP for
// uniformly distributed inputs.
//
// The caller guarantees p <= 2^(N+W) - 2^(W-1) - 1 so the rounded value fits
// in N bits; the reduced-width multiplier's output satisfies this, and an
// assertion checks it. Purely combinational.
module fw_round #(
  parameter int N = 8,  // output width
  parameter int W = 1   // number of bits rounded off
) (
  input  logic [N+W-1:0] p,  // reduced-width product
  output logic [N-1:0]   y   // rounded N-bit product
);
  if (W == 0) begin : g_none
    assign y = p;
  end else begin : g_round
    logic [N+W:0] r;
    assign r = {1'b0, p} + ((N+W+1)'(1) << (W - 1));
    assign y = r[N+W-1:W];
    always_comb assert (r[N+W] == 1'b0) else $error("fw_round: rounding overflow");
  end
endmodule
