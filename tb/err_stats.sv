// err_stats -- error statistics probe for one multiplier configuration
// (testbench helper).
//
// Instantiates fw_mult_top with the given N, W, CIN_EN and EXTRA_AND and, on every
// clock edge with sample = 1, compares its outputs with the exact product
// a*b computed here. Errors e = exact - obtained are measured in units of the
// last place of each output: 2^(N-W) for the reduced-width product, 2^N for
// the rounded fixed-width product. Running sums give the mean error (me),
// mean absolute error (mae), root mean square error (rmse) and maximum
// absolute error (emax) of both outputs; the *_fw outputs belong to the
// rounded product.
module err_stats #(
  parameter int           N      = 8,
  parameter int           W      = 1,
  parameter bit [N/2-1:0] CIN_EN = '1,
  parameter bit           EXTRA_AND = 1'b0
) (
  input  logic         clk,
  input  logic         sample,
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output real          me,
  output real          mae,
  output real          rmse,
  output real          emax,
  output real          me_fw,
  output real          mae_fw,
  output real          rmse_fw,
  output real          emax_fw
);
  logic [N+W-1:0] p_rw;
  logic [N-1:0]   p_fw;
  real            s1 = 0.0, s2 = 0.0, sa = 0.0, mx = 0.0;
  real            f1 = 0.0, f2 = 0.0, fa = 0.0, fx = 0.0;
  real            cnt = 0.0;

  fw_mult_top #(.N(N), .W(W), .CIN_EN(CIN_EN), .EXTRA_AND(EXTRA_AND)) u_dut (
    .a(a), .b(b), .p_rw(p_rw), .p_fw(p_fw)
  );

  always_ff @(posedge clk) begin
    if (sample) begin
      real exact, e, ef;
      exact = real'(longint'(a) * longint'(b));
      e  = exact / (2.0 ** (N - W)) - real'(longint'(p_rw));
      ef = exact / (2.0 ** N) - real'(longint'(p_fw));
      cnt <= cnt + 1.0;
      s1 <= s1 + e;   sa <= sa + (e < 0 ? -e : e);   s2 <= s2 + e * e;
      f1 <= f1 + ef;  fa <= fa + (ef < 0 ? -ef : ef); f2 <= f2 + ef * ef;
      if ((e < 0 ? -e : e) > mx)   mx <= (e < 0 ? -e : e);
      if ((ef < 0 ? -ef : ef) > fx) fx <= (ef < 0 ? -ef : ef);
    end
  end

  always_comb begin
    real c;
    c       = (cnt > 0.0) ? cnt : 1.0;
    me      = s1 / c;
    mae     = sa / c;
    rmse    = $sqrt(s2 / c);
    emax    = mx;
    me_fw   = f1 / c;
    mae_fw  = fa / c;
    rmse_fw = $sqrt(f2 / c);
    emax_fw = fx;
  end
endmodule
