// tb_err_stats -- truncation error of the reduced-width and fixed-width
// multiplier, compared with the published error statistics.
//
// 8-bit operands: all 65536 operand pairs, for W = 0..8, each without
// compensation (CIN_EN = 0, direct truncation) and with compensation on
// blocks 3..1 (CIN_EN = 4'b1110, the configuration the published figures
// were measured with), plus W = 1 with all four compensation bits (the
// default) and, for W = 0..8, compensation with the extra A[0] & B[7]
// term, which must bring the mean error to about 0 where it was +0.25. 16-bit operands: 100000 random operand pairs for W = 0, 1, 2, 4
// and 8. The mean, mean absolute, RMS and maximum errors in ULP are printed
// for every configuration and checked against the published values: for
// N = 8 and W = 0 ME = MAE = 1.75, RMSE = 2.0 and Emax = 7.0 without
// compensation, ME = 0.25 and Emax = 4.35 with it; RMSE = 1.75 for W = 1;
// rounding alone gives ME = 0, MAE = 0.25, RMSE = 0.289, Emax = 0.5.
// Values read off the plots are checked with a wider tolerance.
module tb_err_stats;
  logic        clk = 1'b0;
  logic        sample8 = 1'b0, sample16 = 1'b0;
  logic [7:0]  a8 = '0, b8 = '0;
  logic [15:0] a16 = '0, b16 = '0;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  // ---- N = 8, exhaustive ----
  real t_me[9], t_mae[9], t_rmse[9], t_emax[9], t_mef[9], t_maef[9], t_rmsef[9], t_emaxf[9];
  real c_me[9], c_mae[9], c_rmse[9], c_emax[9], c_mef[9], c_maef[9], c_rmsef[9], c_emaxf[9];

  for (genvar w = 0; w <= 8; w++) begin : g_n8
    err_stats #(.N(8), .W(w), .CIN_EN(4'b0000)) u_t (
      .clk(clk), .sample(sample8), .a(a8), .b(b8),
      .me(t_me[w]), .mae(t_mae[w]), .rmse(t_rmse[w]), .emax(t_emax[w]),
      .me_fw(t_mef[w]), .mae_fw(t_maef[w]), .rmse_fw(t_rmsef[w]), .emax_fw(t_emaxf[w]));
    err_stats #(.N(8), .W(w), .CIN_EN(4'b1110)) u_c (
      .clk(clk), .sample(sample8), .a(a8), .b(b8),
      .me(c_me[w]), .mae(c_mae[w]), .rmse(c_rmse[w]), .emax(c_emax[w]),
      .me_fw(c_mef[w]), .mae_fw(c_maef[w]), .rmse_fw(c_rmsef[w]), .emax_fw(c_emaxf[w]));
  end

  real x_me[9], x_o[9][7];
  for (genvar w = 0; w <= 8; w++) begin : g_n8x
    err_stats #(.N(8), .W(w), .CIN_EN(4'b1110), .EXTRA_AND(1'b1)) u_x (
      .clk(clk), .sample(sample8), .a(a8), .b(b8),
      .me(x_me[w]), .mae(x_o[w][0]), .rmse(x_o[w][1]), .emax(x_o[w][2]),
      .me_fw(x_o[w][3]), .mae_fw(x_o[w][4]), .rmse_fw(x_o[w][5]), .emax_fw(x_o[w][6]));
  end

  real d_me, d_mae, d_rmse, d_emax, d_mef, d_maef, d_rmsef, d_emaxf;
  err_stats u_def (
    .clk(clk), .sample(sample8), .a(a8), .b(b8),
    .me(d_me), .mae(d_mae), .rmse(d_rmse), .emax(d_emax),
    .me_fw(d_mef), .mae_fw(d_maef), .rmse_fw(d_rmsef), .emax_fw(d_emaxf));

  // ---- N = 16, random ----
  localparam int W16[5] = '{0, 1, 2, 4, 8};
  real u_me[5], u_mae[5], u_rmse[5], u_emax[5], u_x[5][4];
  real v_me[5], v_mae[5], v_rmse[5], v_emax[5], v_x[5][4];

  for (genvar i = 0; i < 5; i++) begin : g_n16
    err_stats #(.N(16), .W(W16[i]), .CIN_EN(8'h00)) u_t (
      .clk(clk), .sample(sample16), .a(a16), .b(b16),
      .me(u_me[i]), .mae(u_mae[i]), .rmse(u_rmse[i]), .emax(u_emax[i]),
      .me_fw(u_x[i][0]), .mae_fw(u_x[i][1]), .rmse_fw(u_x[i][2]), .emax_fw(u_x[i][3]));
    err_stats #(.N(16), .W(W16[i]), .CIN_EN(8'hFE)) u_c (
      .clk(clk), .sample(sample16), .a(a16), .b(b16),
      .me(v_me[i]), .mae(v_mae[i]), .rmse(v_rmse[i]), .emax(v_emax[i]),
      .me_fw(v_x[i][0]), .mae_fw(v_x[i][1]), .rmse_fw(v_x[i][2]), .emax_fw(v_x[i][3]));
  end

  task automatic near(string nm, real got, real expv, real tol);
    checks++;
    if (got < expv - tol || got > expv + tol) begin
      failures++;
      $display("FAIL %s = %0.4f, expected %0.3f +- %0.3f", nm, got, expv, tol);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(negedge clk);
    sample8 = 1'b1;
    for (int v = 0; v < 65536; v++) begin
      {a8, b8} = 16'(v);
      @(negedge clk);
    end
    sample8 = 1'b0;
    sample16 = 1'b1;
    for (int v = 0; v < 100000; v++) begin
      a16 = 16'($urandom);
      b16 = 16'($urandom);
      @(negedge clk);
    end
    sample16 = 1'b0;
    @(negedge clk);

    $display("N=8 reduced-width product, errors in ULP (t: no compensation, c: compensated)");
    $display(" w    me    mae   rmse   emax |   mec   maec  rmsec  emaxc");
    for (int w = 8; w >= 0; w--)
      $display("%2d %6.3f %6.3f %6.3f %6.3f | %6.3f %6.3f %6.3f %6.3f", w,
               t_me[w], t_mae[w], t_rmse[w], t_emax[w], c_me[w], c_mae[w], c_rmse[w], c_emax[w]);
    $display("N=8 fixed-width (rounded) product");
    for (int w = 8; w >= 0; w--)
      $display("%2d %6.3f %6.3f %6.3f %6.3f | %6.3f %6.3f %6.3f %6.3f", w,
               t_mef[w], t_maef[w], t_rmsef[w], t_emaxf[w], c_mef[w], c_maef[w], c_rmsef[w], c_emaxf[w]);
    $display("N=8 W=1 all four compensation bits: me %6.3f mae %6.3f rmse %6.3f emax %6.3f",
             d_me, d_mae, d_rmse, d_emax);
    $display("N=8 with the extra A[0] & B[7] term: mean error per w (8..0)");
    for (int w = 8; w >= 0; w--)
      $display("%2d %6.3f  (without the term %6.3f)", w, x_me[w], c_me[w]);
    $display("N=16 reduced-width product, 100000 random operand pairs");
    for (int i = 0; i < 5; i++)
      $display("%2d %6.3f %6.3f %6.3f %6.3f | %6.3f %6.3f %6.3f %6.3f", W16[i],
               u_me[i], u_mae[i], u_rmse[i], u_emax[i], v_me[i], v_mae[i], v_rmse[i], v_emax[i]);

    // Values stated in the text (N = 8).
    near("ME w=0", t_me[0], 1.75, 0.01);
    near("MAE w=0", t_mae[0], 1.75, 0.01);
    near("RMSE w=0", t_rmse[0], 2.0, 0.01);
    near("Emax w=0", t_emax[0], 7.0, 0.01);
    near("MEc w=0", c_me[0], 0.25, 0.01);
    near("Emaxc w=0", c_emax[0], 4.35, 0.01);
    near("RMSE w=1", t_rmse[1], 1.75, 0.01);
    near("rounding ME w=8", t_mef[8], 0.0, 0.01);
    near("rounding MAE w=8", t_maef[8], 0.25, 0.01);
    near("rounding RMSE w=8", t_rmsef[8], 0.289, 0.01);
    near("rounding Emax w=8", t_emaxf[8], 0.5, 0.01);
    near("exact product w=8", t_emax[8], 0.0, 0.0);
    // Values read off the plots (N = 8).
    near("MEc w=1", c_me[1], 0.0, 0.02);
    near("Emaxc w=1", c_emax[1], 3.7, 0.1);
    near("Emax1 (rounded) w=1", t_emaxf[1], 3.0, 0.05);
    near("MEc1 (rounded) w=1", c_mef[1], -0.25, 0.03);
    for (int w = 0; w <= 8; w++) begin
      near($sformatf("MEc in [0,0.35] w=%0d", w), c_me[w], 0.175, 0.175);
      checks++;
      if (t_me[w] != t_mae[w]) begin
        failures++;
        $display("FAIL direct truncation must never over-estimate (w=%0d)", w);
      end
    end
    // The extra term shifts the mean by 1/4 ULP wherever it is built.
    for (int w = 0; w <= 7; w++)
      near($sformatf("extra term shifts ME by -0.25, w=%0d", w), x_me[w] - c_me[w], -0.25, 0.001);
    near("extra term cancels MEc=0.25, w=0", x_me[0], 0.0, 0.01);
    near("extra term absent at w=8", x_me[8], 0.0, 0.0);
    // Values read off the plots (N = 16).
    near("N16 ME w=0", u_me[0], 3.75, 0.05);
    near("N16 RMSE w=0", u_rmse[0], 4.0, 0.1);
    near("N16 MEc w=0", v_me[0], 0.25, 0.05);
    near("N16 RMSEc w=0", v_rmse[0], 1.5, 0.1);
    near("N16 MEc w=1", v_me[1], 0.0, 0.05);
    near("N16 ME w=8", u_me[4], 1.75, 0.05);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
