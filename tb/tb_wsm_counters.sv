// tb_wsm_counters: checks the phase timer (length, last cycle, voltage-reset window,
// progress save and resume), the ISPP iteration counter and its limit flag, the erase
// loop counter and the column sweep counter against values computed here.
module tb_wsm_counters;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic tmr_start, tmr_resume, tmr_save, tmr_stop, tmr_run, tmr_last, tmr_in_vr;
  logic [19:0] tmr_len, t_vr, tmr_elapsed, progress;
  logic it_clr, it_inc, it_at_max, lp_clr, lp_inc, sweep_clr, sweep_act;
  logic [4:0] it_max, it_val, lp_val;
  logic [3:0] sweep_col;
  wsm_counters #(.TMR_W(20), .IT_W(5), .NWORDS(16)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // run a phase of len cycles; return the number of cycles seen and check the flags
  task automatic run_phase(input int len, input int vr, input int from);
    int n = 0;
    tmr_len = 20'(len); t_vr = 20'(vr);
    if (from == 0) tmr_start = 1; else tmr_resume = 1;
    @(negedge clk); tmr_start = 0; tmr_resume = 0;
    while (1) begin
      check(tmr_run, "running");
      check(tmr_elapsed == 20'(from + n), $sformatf("elapsed %0d", tmr_elapsed));
      check(tmr_in_vr == (from + n >= len - vr), $sformatf("vr window at %0d", from + n));
      check(tmr_last == (from + n == len - 1), $sformatf("last at %0d", from + n));
      if (tmr_last) break;
      n++;
      @(negedge clk);
    end
    tmr_stop = 1; @(negedge clk); tmr_stop = 0;
    check(!tmr_run, "stopped");
  endtask

  initial begin
    {tmr_start, tmr_resume, tmr_save, tmr_stop, it_clr, it_inc, lp_clr, lp_inc, sweep_clr} = '0;
    tmr_len = 0; t_vr = 0; it_max = 5'd5;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check(!sweep_act && !tmr_run && it_val == 0, "reset state");
    run_phase(20, 4, 0);
    run_phase(7, 2, 0);

    // save progress part way through a pulse, then resume from it
    tmr_len = 20'd50; t_vr = 20'd4; tmr_start = 1; @(negedge clk); tmr_start = 0;
    repeat (17) @(negedge clk);
    check(tmr_elapsed == 17, "elapsed before save");
    tmr_save = 1; tmr_stop = 1; @(negedge clk); tmr_save = 0; tmr_stop = 0;
    check(progress == 18, "progress counts the saving cycle");
    repeat (5) @(negedge clk);
    check(!tmr_run && progress == 18, "progress held while stopped");
    run_phase(50, 4, 18);

    // iteration counter
    it_clr = 1; @(negedge clk); it_clr = 0;
    for (int i = 0; i < 5; i++) begin
      check(it_val == 5'(i) && !it_at_max, $sformatf("iteration %0d", i));
      it_inc = 1; @(negedge clk); it_inc = 0;
    end
    check(it_at_max, "limit reached after 5");
    it_clr = 1; it_inc = 1; @(negedge clk); it_clr = 0; it_inc = 0;
    check(it_val == 0, "clear wins");
    lp_inc = 1; repeat (3) @(negedge clk); lp_inc = 0;
    check(lp_val == 3, "loop count");
    lp_clr = 1; @(negedge clk); lp_clr = 0;
    check(lp_val == 0, "loop clear");

    // sweep
    sweep_clr = 1; @(negedge clk); sweep_clr = 0;
    for (int i = 0; i < 16; i++) begin
      check(sweep_act && sweep_col == 4'(i), $sformatf("sweep col %0d", i));
      @(negedge clk);
    end
    check(!sweep_act, "sweep stops after 16 words");
    repeat (3) @(negedge clk);
    check(!sweep_act, "sweep stays stopped");
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
