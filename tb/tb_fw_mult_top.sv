// tb_fw_mult_top -- end-to-end test of the top at its default size
// (N = 8, W = 1, all four compensation bits). Every one of the 65536 operand
// pairs is applied; the 9-bit reduced-width product and the 8-bit rounded
// product are compared with the reference model. The test also counts how
// often each mechanism acts and fails if one never does: a truncated block's
// compensation bit is 1, the compensation changes the result compared with
// direct truncation, the rounding stage rounds up and rounds down, and
// truncation loses a non-zero remainder.
module tb_fw_mult_top;
  import tb_ref_pkg::*;

  logic       clk = 1'b0;
  logic [7:0] a, b;
  logic [8:0] p_rw;
  logic [7:0] p_fw;
  int         checks = 0, failures = 0;
  int         n_comp = 0, n_comp_changes = 0, n_round_up = 0, n_round_down = 0;
  int         n_trunc_loss = 0;

  always #5 clk = ~clk;

  fw_mult_top dut (.a(a), .b(b), .p_rw(p_rw), .p_fw(p_fw));

  task automatic chk(string nm, int got, int expv);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s a=%0d b=%0d got %0d expected %0d", nm, a, b, got, expv);
    end
  endtask

  task automatic need(string nm, int cnt);
    $display("mechanism %-22s seen %0d times", nm, cnt);
    checks++;
    if (cnt == 0) failures++;
  endtask

  initial begin
    repeat (70000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int r, r0;
    for (int v = 0; v < 65536; v++) begin
      {a, b} = 16'(v);
      @(posedge clk);
      r  = ref_rw(int'(a), int'(b), 1, 4'b1111);
      r0 = ref_rw(int'(a), int'(b), 1, 4'b0000);
      chk("p_rw", int'(p_rw), r);
      chk("p_fw", int'(p_fw), ref_round(r, 1));
      if (a[6] | b[2] | a[2] | b[6]) n_comp++;
      if (r != r0) n_comp_changes++;
      if (p_rw[0]) n_round_up++; else n_round_down++;
      if ((int'(a) * int'(b)) % 128 != 0) n_trunc_loss++;
    end
    need("compensation bit set", n_comp);
    need("compensation changes P", n_comp_changes);
    need("truncation remainder", n_trunc_loss);
    need("round up", n_round_up);
    need("round down", n_round_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
