// tb_nand_pes_chip: self-checking test of one flash chip's control logic with a
// behavioural cell array, at reduced page size and phase lengths.
//
// Covers: program and read-back; the exact ISPP program time (n_w_cycle iterations of
// program + verify when a page holds "0" cells); read sense time; program suspension
// by Intra Phase Cancelation (cancel within t_voltage_reset) and by Inter Phase
// Suspension (at the end of the phase), a suspension request that lands in a phase's
// voltage-reset window, a cancelled verify, a re-done program phase, erase suspension
// with the exact accumulated pulse time, reads serviced while suspended, page-buffer
// restore from the shadow buffer, and rejection of illegal commands.
module tb_nand_pes_chip;
  import pes_pkg::*;

  localparam int unsigned PAGE  = 256;
  localparam int unsigned WB    = 16;
  localparam int unsigned NW    = PAGE / WB;
  localparam int unsigned TVR   = 4;
  localparam flash_timing_t T = '{
    t_r_phy: 30, t_w_program: 40, t_verify: 30, t_erase: 400,
    t_voltage_reset: TVR, t_buffer: 20, n_w_cycle: 6, n_erase_max: 4};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  susp_mode_e susp_mode;
  logic       cmd_valid, cmd_ready, cmd_err;
  cmd_op_e    cmd_op;
  logic [19:0] cmd_row;
  logic       din_valid, din_ready, dout_valid, dout_ready;
  logic [7:0] din, dout;
  logic       pe_active, pe_is_ers, pe_suspended, pe_done, op_fail;
  arr_op_e    arr_op;
  logic [19:0] arr_row;
  logic [4:0] arr_level;
  logic [$clog2(NW)-1:0] arr_col;
  logic       arr_we;
  logic [8*WB-1:0] arr_wdata, arr_rdata;
  logic       ev_cancel, ev_susp_end, ev_redo, ev_resume;

  nand_pes_chip #(.TIMING(T), .PAGE_BYTES(PAGE), .WORD_BYTES(WB)) dut (.*);

  flash_array_model #(.NROWS(4), .NWORDS(NW), .DW(8*WB), .N_W_CYCLE(T.n_w_cycle),
                      .ERS_NEED(T.t_erase - TVR)) arr (
    .clk, .arr_op, .arr_row, .arr_level, .arr_col, .arr_we, .arr_wdata, .arr_rdata);

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_cancel = 0, n_susp_end = 0, n_redo = 0, n_resume = 0, n_err = 0;
  logic [7:0] exp_page [4][PAGE];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ev_cancel)   n_cancel++;
    if (ev_susp_end) n_susp_end++;
    if (ev_redo)     n_redo++;
    if (ev_resume)   n_resume++;
    if (cmd_err)     n_err++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (cycle %0d)", what, cyc);
    end
  endtask

  task automatic send(input cmd_op_e op, input int row);
    cmd_op = op; cmd_row = 20'(row); cmd_valid = 1'b1;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 1'b0;
  endtask

  // Page pattern: every other byte has a "0" cell so the page needs all iterations.
  function automatic logic [7:0] pat(int row, int i, int seed);
    logic [7:0] b;
    b = 8'((i * 37 + row * 11 + seed * 101) ^ (i >> 3));
    if (i % 2 == 0) b[1:0] = 2'b00;
    return b;
  endfunction

  task automatic program_page(input int row, input int seed);
    send(CMD_PROGRAM, row);
    for (int i = 0; i < PAGE; i++) begin
      din = pat(row, i, seed); din_valid = 1'b1;
      exp_page[row][i] = din;
      while (!din_ready) @(negedge clk);
      @(negedge clk);
    end
    din_valid = 1'b0;
  endtask

  task automatic wait_pe_done();
    while (pe_active) @(negedge clk);
  endtask

  task automatic read_check(input int row, input string what);
    int bad = 0;
    send(CMD_READ, row);
    dout_ready = 1'b1;
    for (int i = 0; i < PAGE; i++) begin
      while (!dout_valid) @(negedge clk);
      if (dout !== exp_page[row][i]) bad++;
      @(negedge clk);
    end
    dout_ready = 1'b0;
    check(bad == 0, what);
  endtask

  // write state machine state codes, in the order of its state enum
  localparam logic [3:0] ST_PGM = 4'd2, ST_PVFY = 4'd3, ST_EVFY = 4'd5;
  int t0, t1, c0, e0;

  initial begin
    cmd_valid = 0; din_valid = 0; dout_ready = 0; din = 0; cmd_op = CMD_READ; cmd_row = 0;
    susp_mode = SUSP_IPC;
    for (int r = 0; r < 4; r++) for (int i = 0; i < PAGE; i++) exp_page[r][i] = 8'hFF;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // 1. plain program: exact ISPP time, then read back with exact sense time
    program_page(0, 1);
    t0 = cyc;
    wait_pe_done();
    t1 = cyc;
    check(t1 - t0 == int'(T.n_w_cycle * (T.t_w_program + T.t_verify)),
          $sformatf("program time %0d", t1 - t0));
    check(!op_fail, "program passes");
    check(arr.max_level == T.n_w_cycle - 1, "ISPP step levels 0..n-1 used");
    send(CMD_READ, 0);
    t0 = cyc;
    while (!dout_valid) @(negedge clk);
    check(cyc - t0 == int'(T.t_r_phy), $sformatf("read sense time %0d", cyc - t0));
    dout_ready = 1'b1;
    for (int i = 0; i < PAGE; i++) begin
      check(dout == exp_page[0][i], $sformatf("read byte %0d", i));
      @(negedge clk);
    end
    dout_ready = 1'b0;

    // 2. illegal commands
    c0 = n_err;
    send(CMD_PGM_RESUME, 0);
    send(CMD_ERS_SUSPEND, 0);
    check(n_err == c0 + 2, "resume/suspend without an operation rejected");

    // 3. IPC: cancel a program phase mid-way, read while suspended, resume
    susp_mode = SUSP_IPC;
    program_page(1, 2);
    c0 = n_err;
    send(CMD_READ, 0);                   // read while P/E runs: illegal
    check(n_err == c0 + 1, "read during running program rejected");
    repeat (100) @(negedge clk);         // into the 2nd iteration
    while (!(dut.u_wsm.state == ST_PGM && dut.u_wsm.u_cnt.tmr_elapsed == 25))
      @(negedge clk);
    c0 = n_cancel;
    send(CMD_PGM_SUSPEND, 1);
    t0 = cyc;
    while (!pe_suspended) @(negedge clk);
    check(cyc - t0 <= int'(TVR) + 1, $sformatf("IPC suspend latency %0d", cyc - t0));
    check(n_cancel == c0 + 1, "IPC cancelled the program phase");
    read_check(0, "IPC: read row 0 while program suspended");
    e0 = n_err;
    send(CMD_PGM_SUSPEND, 1);
    check(n_err == e0 + 1, "second suspend while suspended rejected");
    e0 = n_redo;
    send(CMD_PGM_RESUME, 1);
    wait_pe_done();
    check(!op_fail, "IPC: resumed program passes");
    check(n_redo == e0 + 1, "IPC: cancelled program phase re-done after verify");
    read_check(1, "IPC: program data intact after restore from shadow buffer");

    // 4. IPC: cancel a verify phase
    program_page(2, 3);
    while (dut.u_wsm.state != ST_PVFY) @(negedge clk);
    repeat (5) @(negedge clk);
    c0 = n_cancel;
    send(CMD_PGM_SUSPEND, 2);
    while (!pe_suspended) @(negedge clk);
    check(n_cancel == c0 + 1, "IPC cancelled the verify phase");
    check(dut.u_wsm.rp_vfy == 1'b1, "resume point is the verify");
    send(CMD_PGM_RESUME, 2);
    wait_pe_done();
    read_check(2, "cancelled verify: page programmed");

    // 5. suspension request inside the voltage-reset window: taken at phase end
    program_page(3, 4);
    while (!(dut.u_wsm.state == ST_PGM &&
             dut.u_wsm.u_cnt.tmr_elapsed == T.t_w_program - TVR - 1)) @(negedge clk);
    c0 = n_cancel; e0 = n_susp_end;
    send(CMD_PGM_SUSPEND, 3);
    while (!pe_suspended) @(negedge clk);
    check(n_cancel == c0 && n_susp_end == e0 + 1, "request in reset window waits for phase end");
    send(CMD_PGM_RESUME, 3);
    wait_pe_done();
    read_check(3, "reset-window suspension: page programmed");

    // 6. IPS: suspend at the phase boundary
    susp_mode = SUSP_IPS;
    exp_page[1] = '{default: 8'hFF};
    send(CMD_ERASE, 1);
    wait_pe_done();
    program_page(1, 5);
    while (!(dut.u_wsm.state == ST_PGM && dut.u_wsm.u_cnt.tmr_elapsed == 5))
      @(negedge clk);
    c0 = n_cancel; e0 = n_susp_end;
    send(CMD_PGM_SUSPEND, 1);
    t0 = cyc;
    while (!pe_suspended) @(negedge clk);
    // the request is seen at elapsed 7; the phase still has t_w_program-7 cycles to go
    check(cyc - t0 == int'(T.t_w_program) - 6, $sformatf("IPS suspend at phase end (%0d)", cyc - t0));
    check(n_cancel == c0 && n_susp_end == e0 + 1, "IPS did not cancel");
    read_check(0, "IPS: read row 0 while suspended");
    read_check(3, "IPS: second read while suspended");
    send(CMD_PGM_RESUME, 1);
    t0 = cyc;
    while (dut.u_wsm.state != ST_PVFY) @(negedge clk);
    check(cyc - t0 == int'(T.t_buffer), $sformatf("IPS resume: buffer restore then verify (%0d)", cyc - t0));
    wait_pe_done();
    read_check(1, "IPS: program data intact");

    // 7. erase suspension: pulse progress kept, total pulse time exact
    susp_mode = SUSP_IPC;
    e0 = arr.ers_cnt[2];
    send(CMD_ERASE, 2);
    repeat (150) @(negedge clk);
    send(CMD_ERS_SUSPEND, 2);
    t0 = cyc;
    while (!pe_suspended) @(negedge clk);
    check(cyc - t0 <= int'(TVR) + 1, $sformatf("erase suspend latency %0d", cyc - t0));
    read_check(0, "read row 0 while erase suspended");
    send(CMD_ERS_RESUME, 2);
    wait_pe_done();
    check(!op_fail, "suspended erase passes");
    check(arr.ers_cnt[2] - e0 == int'(T.t_erase - TVR),
          $sformatf("erase pulse time with suspension %0d", arr.ers_cnt[2] - e0));
    exp_page[2] = '{default: 8'hFF};
    read_check(2, "erased page reads all ones");

    // 8. erase verify cancelled and re-done
    e0 = arr.ers_cnt[3];
    send(CMD_ERASE, 3);
    while (dut.u_wsm.state != ST_EVFY) @(negedge clk);
    c0 = n_cancel;
    send(CMD_ERS_SUSPEND, 3);
    while (!pe_suspended) @(negedge clk);
    check(n_cancel == c0 + 1, "erase verify cancelled");
    send(CMD_ERS_RESUME, 3);
    while (dut.u_wsm.state != ST_EVFY) @(negedge clk);
    check(1'b1, "erase verify re-done");
    wait_pe_done();
    check(!op_fail && arr.ers_cnt[3] - e0 == int'(T.t_erase - TVR), "erase with verify cancel");

    check(n_resume == 6, $sformatf("resumes %0d", n_resume));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
