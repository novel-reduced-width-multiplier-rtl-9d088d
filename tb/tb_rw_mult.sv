// tb_rw_mult -- exhaustive test of the 8 x 8 reduced-width multiplier.
// All 65536 operand pairs are applied to six configurations: W = 1 with all
// compensation bits (the default), W = 1 with block 0 uncompensated, W = 0,
// W = 4, W = 0 without compensation (direct truncation) and W = 8, which
// must give the exact product, plus W = 0 and W = 1 with the extra
// A[0] & B[7] correction term. Each output is compared with the bit-level
// reference model of tb_ref_pkg.
module tb_rw_mult;
  import tb_ref_pkg::*;

  logic        clk = 1'b0;
  logic [7:0]  a, b;
  logic [8:0]  p_w1, p_w1m;
  logic [7:0]  p_w0, p_w0t;
  logic [11:0] p_w4;
  logic [15:0] p_w8;
  logic [7:0]  p_w0x;
  logic [8:0]  p_w1x;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  rw_mult                                 u_w1  (.a(a), .b(b), .p(p_w1));
  rw_mult #(.N(8), .W(1), .CIN_EN(4'b1110)) u_w1m (.a(a), .b(b), .p(p_w1m));
  rw_mult #(.N(8), .W(0))                 u_w0  (.a(a), .b(b), .p(p_w0));
  rw_mult #(.N(8), .W(0), .CIN_EN(4'b0000)) u_w0t (.a(a), .b(b), .p(p_w0t));
  rw_mult #(.N(8), .W(4))                 u_w4  (.a(a), .b(b), .p(p_w4));
  rw_mult #(.N(8), .W(8))                 u_w8  (.a(a), .b(b), .p(p_w8));
  rw_mult #(.N(8), .W(0), .CIN_EN(4'b1111), .EXTRA_AND(1'b1)) u_w0x (.a(a), .b(b), .p(p_w0x));
  rw_mult #(.N(8), .W(1), .CIN_EN(4'b1110), .EXTRA_AND(1'b1)) u_w1x (.a(a), .b(b), .p(p_w1x));

  task automatic chk(string nm, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%0d b=%0d got %0d expected %0d", nm, a, b, got, expv);
    end
  endtask

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      @(posedge clk);
      chk("W1",      int'(p_w1),  ref_rw(int'(a), int'(b), 1, 4'b1111));
      chk("W1m1110", int'(p_w1m), ref_rw(int'(a), int'(b), 1, 4'b1110));
      chk("W0",      int'(p_w0),  ref_rw(int'(a), int'(b), 0, 4'b1111));
      chk("W0trunc", int'(p_w0t), ref_rw(int'(a), int'(b), 0, 4'b0000));
      chk("W4",      int'(p_w4),  ref_rw(int'(a), int'(b), 4, 4'b1111));
      chk("W8",      int'(p_w8),  int'(a) * int'(b));
      chk("W0extra", int'(p_w0x), ref_rw(int'(a), int'(b), 0, 4'b1111) + int'(a[0] & b[7]));
      chk("W1extra", int'(p_w1x), ref_rw(int'(a), int'(b), 1, 4'b1110) + int'(a[0] & b[7]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
