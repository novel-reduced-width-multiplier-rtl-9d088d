// tb_mult_cell -- exhaustive test of one carry-chain multiplier column.
// All 32 input combinations; 2*co + s must equal Am*Bn+1 + Am+1*Bn + ci.
// Also counts the cases where the carry-out is the propagated carry-in and
// where it is generated by the dedicated AND gate.
module tb_mult_cell;
  logic clk = 1'b0;
  logic am, am1, bn, bn1, ci, s, co;
  int   checks = 0, failures = 0;
  int   n_prop = 0, n_gen = 0;

  always #5 clk = ~clk;

  mult_cell dut (.am(am), .am1(am1), .bn(bn), .bn1(bn1), .ci(ci), .s(s), .co(co));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expv;
    for (int v = 0; v < 32; v++) begin
      {am, am1, bn, bn1, ci} = 5'(v);
      @(posedge clk);
      expv = int'(am & bn1) + int'(am1 & bn) + int'(ci);
      checks++;
      if ({co, s} != 2'(expv)) begin
        failures++;
        $display("FAIL v=%0d got co=%0b s=%0b expected %0d", v, co, s, expv);
      end
      if (((am & bn1) ^ (am1 & bn)) == 1'b1 && ci) n_prop++;
      if ((am & bn1) == 1'b1 && (am1 & bn) == 1'b1) n_gen++;
    end
    checks++;
    if (n_prop == 0 || n_gen == 0) failures++;
    $display("carry propagated %0d times, generated %0d times", n_prop, n_gen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
