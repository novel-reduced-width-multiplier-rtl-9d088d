// tb_fw_round -- exhaustive test of the rounding stage for N = 8 and
// W = 0, 1, 3: y must be floor(p / 2^W + 1/2), and p itself for W = 0.
// Inputs are limited to the range the rounded value fits in.
module tb_fw_round;
  logic        clk = 1'b0;
  logic [7:0]  p0, y0, y1, y3;
  logic [8:0]  p1;
  logic [10:0] p3;
  int          checks = 0, failures = 0;
  int          n_up = 0, n_down = 0;

  always #5 clk = ~clk;

  fw_round #(.N(8), .W(0)) u0 (.p(p0), .y(y0));
  fw_round #(.N(8), .W(1)) u1 (.p(p1), .y(y1));
  fw_round #(.N(8), .W(3)) u3 (.p(p3), .y(y3));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2044; v++) begin
      p0 = 8'(v);
      p1 = 9'(v % 511);
      p3 = 11'(v);
      @(posedge clk);
      checks += 3;
      if (y0 != p0) begin failures++; $display("FAIL W0 p=%0d y=%0d", p0, y0); end
      if (int'(y1) != (int'(p1) * 2 + 2) / 4) begin
        failures++; $display("FAIL W1 p=%0d y=%0d", p1, y1);
      end
      if (int'(y3) != (int'(p3) + 4) / 8) begin
        failures++; $display("FAIL W3 p=%0d y=%0d", p3, y3);
      end
      if (p3[2]) n_up++; else n_down++;
    end
    checks++;
    if (n_up == 0 || n_down == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
