// tb_mul2xk -- exhaustive test of the 2 x k partial-product block.
// Five instances cover the slice widths of the 8 x 8 multiplier (K = 8, 6, 4,
// 2 and 1, truncated) and an untruncated block (K = 8, FULL = 1). For every
// a (2 bits), b and cin the output is compared with the arithmetic value of
// the kept products: truncated p = a0*(b>>1) + a1*b + cin, untruncated
// p = a0*b + 2*a1*b + cin.
module tb_mul2xk;
  logic       clk = 1'b0;
  logic [1:0] a;
  logic [7:0] b;
  logic       cin;
  int         checks = 0, failures = 0;

  logic [8:0] p8;
  logic [6:0] p6;
  logic [4:0] p4;
  logic [2:0] p2;
  logic [1:0] p1;
  logic [9:0] pf;

  always #5 clk = ~clk;

  mul2xk #(.K(8), .FULL(0)) u8 (.a(a), .b(b),      .cin(cin), .p(p8));
  mul2xk #(.K(6), .FULL(0)) u6 (.a(a), .b(b[7:2]), .cin(cin), .p(p6));
  mul2xk #(.K(4), .FULL(0)) u4 (.a(a), .b(b[7:4]), .cin(cin), .p(p4));
  mul2xk #(.K(2), .FULL(0)) u2 (.a(a), .b(b[7:6]), .cin(cin), .p(p2));
  mul2xk #(.K(1), .FULL(0)) u1 (.a(a), .b(b[7:7]), .cin(cin), .p(p1));
  mul2xk #(.K(8), .FULL(1)) uf (.a(a), .b(b),      .cin(cin), .p(pf));

  function automatic int trunc_ref(int av, int bv, int c);
    return (av & 1) * (bv >> 1) + ((av >> 1) & 1) * bv + c;
  endfunction

  task automatic chk(string nm, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%0d b=%0d cin=%0d got %0d expected %0d", nm, a, b, cin, got, expv);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 2048; v++) begin
      {cin, a, b} = 11'(v);
      @(posedge clk);
      chk("K8", int'(p8), trunc_ref(int'(a), int'(b), int'(cin)));
      chk("K6", int'(p6), trunc_ref(int'(a), int'(b) >> 2, int'(cin)));
      chk("K4", int'(p4), trunc_ref(int'(a), int'(b) >> 4, int'(cin)));
      chk("K2", int'(p2), trunc_ref(int'(a), int'(b) >> 6, int'(cin)));
      chk("K1", int'(p1), trunc_ref(int'(a), int'(b) >> 7, int'(cin)));
      chk("FULL", int'(pf), int'(a[0]) * b + 2 * int'(a[1]) * b + cin);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
