// tb_status_reg: runs verify sweeps with chosen mismatch patterns and checks the
// running and latched pass flags, the mismatch word count and the sticky fail flag.
module tb_status_reg;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic vfy_clr, vfy_cmp, vfy_miss, vfy_end, fail_set, fail_clr;
  logic vfy_pass, vfy_ok, op_fail;
  logic [8:0] miss_words;
  status_reg #(.CNT_W(9)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one sweep of n words, words listed in miss_mask are mismatching; the last word is
  // compared in the same cycle as vfy_end
  task automatic sweep(input int n, input logic [31:0] miss_mask);
    int exp_cnt = 0;
    @(negedge clk); vfy_clr = 1; @(negedge clk); vfy_clr = 0;
    for (int i = 0; i < n; i++) begin
      vfy_cmp = 1; vfy_miss = miss_mask[i]; vfy_end = (i == n - 1);
      if (miss_mask[i]) exp_cnt++;
      @(negedge clk);
      if (i < n - 1) check(vfy_ok == (exp_cnt == 0), $sformatf("running ok at word %0d", i));
    end
    vfy_cmp = 0; vfy_miss = 0; vfy_end = 0;
    check(vfy_pass == (exp_cnt == 0), $sformatf("latched pass, mask %h", miss_mask));
    check(miss_words == 9'(exp_cnt), $sformatf("miss count %0d vs %0d", miss_words, exp_cnt));
  endtask

  initial begin
    {vfy_clr, vfy_cmp, vfy_miss, vfy_end, fail_set, fail_clr} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!op_fail && !vfy_pass, "reset values");
    sweep(16, 32'h0);
    sweep(16, 32'h8000);       // only the last word misses (same cycle as vfy_end)
    sweep(16, 32'h0001);
    sweep(20, 32'h000A_5A5A);
    sweep(8, 32'h0);
    for (int n = 0; n < 20; n++) sweep(12, $urandom & 32'hFFF & (n % 3 == 0 ? 32'h0 : 32'hFFF));
    @(negedge clk); fail_set = 1; @(negedge clk); fail_set = 0;
    check(op_fail, "fail set");
    repeat (3) @(negedge clk);
    check(op_fail, "fail sticky");
    fail_clr = 1; fail_set = 1; @(negedge clk); fail_clr = 0; fail_set = 0;
    check(!op_fail, "clear wins");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
