// tb_pp_adder -- random test of the partial-product adder (NUM = 4,
// WIDTH = 10) against an integer sum taken modulo 2^10, including the
// all-ones corner.
module tb_pp_adder;
  logic             clk = 1'b0;
  logic [3:0][9:0]  x;
  logic [9:0]       s;
  int               checks = 0, failures = 0;

  always #5 clk = ~clk;

  pp_adder #(.NUM(4), .WIDTH(10)) dut (.x(x), .s(s));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int n = 0; n < 2001; n++) begin
      expv = 0;
      for (int i = 0; i < 4; i++) begin
        x[i] = (n == 2000) ? 10'h3ff : 10'($urandom_range(0, 1023) >> (n % 3));
        expv += int'(x[i]);
      end
      @(posedge clk);
      checks++;
      if (s != 10'(expv)) begin
        failures++;
        $display("FAIL x=%p got %0d expected %0d", x, s, expv % 1024);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
