// tb_write_state_machine: self-checking test of the write state machine (algorithm
// controller with its counters and status register), driven directly at its command
// inputs, with a page buffer, a shadow buffer and a behavioural cell array.
//
// Checks: exact erase time (pulse + verify); erase retried n_erase_max times and
// reported failed when the cells never erase; program failure after n_w_cycle
// iterations when the cells need more; exact program time; the array operation
// sequence around an erase suspension (AOP_VRST right after the request, AOP_VSET for
// t_voltage_reset before the resumed pulse); IPS versus IPC suspension points; a
// request during the bias set of a resumed erase (voltage reset, progress kept) and
// during the page-buffer restore of a resumed program (suspended at once, the restore
// is repeated in full on the next resume).
module tb_write_state_machine;
  import pes_pkg::*;

  localparam int unsigned PAGE = 128;
  localparam int unsigned WB   = 16;
  localparam int unsigned NW   = PAGE / WB;
  localparam int unsigned TVR  = 3;
  // state codes of the write state machine (its enum order)
  localparam int ST_SUSP = 7, ST_RESTORE = 8;
  localparam flash_timing_t T = '{
    t_r_phy: 20, t_w_program: 24, t_verify: 16, t_erase: 200,
    t_voltage_reset: TVR, t_buffer: 10, n_w_cycle: 4, n_erase_max: 3};

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start_rd, start_pgm, start_ers, susp_req, resume;
  logic [19:0] row;
  susp_mode_e susp_mode;
  logic busy, suspended, susp_is_ers, rd_done, pe_done, op_fail;
  arr_op_e arr_op;
  logic [19:0] arr_row;
  logic [4:0] arr_level;
  logic [$clog2(NW)-1:0] arr_col, pb_addr, sb_addr;
  logic arr_we, pb_we;
  logic [8*WB-1:0] arr_wdata, arr_rdata, pb_wdata, pb_rdata, sb_rdata;
  logic ev_cancel, ev_susp_end, ev_redo, ev_resume;
  logic b_we;
  logic [$clog2(PAGE)-1:0] b_addr;
  logic [7:0] b_wdata, b_rdata;

  write_state_machine #(.TIMING(T), .PAGE_BYTES(PAGE), .WORD_BYTES(WB)) dut (.*);
  page_buffer   #(.PAGE_BYTES(PAGE), .WORD_BYTES(WB)) pb (.clk, .b_we, .b_addr, .b_wdata,
    .b_rdata, .w_we(pb_we), .w_addr(pb_addr), .w_wdata(pb_wdata), .w_rdata(pb_rdata));
  shadow_buffer #(.PAGE_BYTES(PAGE), .WORD_BYTES(WB)) sb (.clk, .b_we, .b_addr, .b_wdata,
    .w_addr(sb_addr), .w_rdata(sb_rdata));

  // rows 0,1: normal cells; rows 2,3: cells that never finish programming or erasing
  logic [8*WB-1:0] rd_good, rd_bad;
  flash_array_model #(.NROWS(2), .NWORDS(NW), .DW(8*WB), .N_W_CYCLE(T.n_w_cycle),
                      .ERS_NEED(T.t_erase - TVR)) good (
    .clk, .arr_op(arr_row < 2 ? arr_op : AOP_IDLE), .arr_row, .arr_level, .arr_col,
    .arr_we(arr_we && arr_row < 2),
    .arr_wdata, .arr_rdata(rd_good));
  flash_array_model #(.NROWS(2), .NWORDS(NW), .DW(8*WB), .N_W_CYCLE(T.n_w_cycle + 3),
                      .ERS_NEED(100000)) bad (
    .clk, .arr_op(arr_row >= 2 ? arr_op : AOP_IDLE), .arr_row, .arr_level, .arr_col,
    .arr_we(arr_we && arr_row >= 2), .arr_wdata, .arr_rdata(rd_bad));
  assign arr_rdata = (arr_row >= 2) ? rd_bad : rd_good;

  int checks = 0, failures = 0, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (cycle %0d)", what, cyc); end
  endtask

  task automatic pulse(ref logic s);
    s = 1'b1; @(negedge clk); s = 1'b0;
  endtask

  task automatic load_page(input int seed);
    for (int i = 0; i < PAGE; i++) begin
      b_we = 1'b1; b_addr = 7'(i); b_wdata = 8'(i * 7 + seed) & 8'hFC; // all cells "0" in bits 1:0
      @(negedge clk);
    end
    b_we = 1'b0;
  endtask

  int t0, n_vrst, n_vset;

  initial begin
    {start_rd, start_pgm, start_ers, susp_req, resume, b_we} = '0;
    b_addr = '0; b_wdata = '0; row = '0; susp_mode = SUSP_IPC;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // erase, exact time
    row = 20'd0;
    t0 = cyc;
    pulse(start_ers);
    while (!pe_done) @(negedge clk);
    check(cyc - t0 == int'(T.t_erase + T.t_verify), $sformatf("erase time %0d", cyc - t0));
    check(!op_fail, "erase passes");
    @(negedge clk);

    // program, exact time
    load_page(1);
    row = 20'd0;
    t0 = cyc;
    pulse(start_pgm);
    while (!pe_done) @(negedge clk);
    check(cyc - t0 == int'(T.n_w_cycle * (T.t_w_program + T.t_verify)),
          $sformatf("program time %0d", cyc - t0));
    @(negedge clk);
    check(!op_fail, "program passes (fail flag cleared)");

    // program that needs more iterations than allowed
    row = 20'd3;
    t0 = cyc;
    pulse(start_pgm);
    while (!pe_done) @(negedge clk);
    check(cyc - t0 == int'(T.n_w_cycle * (T.t_w_program + T.t_verify)),
          $sformatf("failing program time %0d", cyc - t0));
    @(negedge clk);
    check(op_fail, "program failure after n_w_cycle iterations");

    // erase that never succeeds: n_erase_max loops, then failure
    row = 20'd3;  // partly programmed by the failing program above
    t0 = cyc;
    pulse(start_ers);
    while (!pe_done) @(negedge clk);
    check(cyc - t0 == int'(T.n_erase_max * (T.t_erase + T.t_verify)),
          $sformatf("failing erase time %0d", cyc - t0));
    @(negedge clk);
    check(op_fail, "failing erase reported");

    // erase suspension: array sequence
    row = 20'd1;
    pulse(start_ers);
    repeat (50) @(negedge clk);
    susp_req = 1'b1;
    @(negedge clk);
    check(arr_op == AOP_VRST, "voltage reset right after the request");
    n_vrst = 0;
    while (!suspended) begin n_vrst++; @(negedge clk); end
    susp_req = 1'b0;
    check(n_vrst == int'(TVR), $sformatf("voltage reset lasts %0d", n_vrst));
    check(!busy && susp_is_ers, "erase suspended");
    repeat (7) @(negedge clk);
    // a request while the bias is re-applied: voltage reset, suspended again
    pulse(resume);
    repeat (1) @(negedge clk);
    check(arr_op == AOP_VSET, "bias re-applied on resume");
    susp_req = 1'b1;
    @(negedge clk);
    check(arr_op == AOP_VRST, "request during bias set: voltage reset");
    n_vrst = 0;
    while (!suspended) begin n_vrst++; @(negedge clk); end
    susp_req = 1'b0;
    check(n_vrst == int'(TVR), $sformatf("voltage reset after bias set lasts %0d", n_vrst));
    repeat (3) @(negedge clk);
    pulse(resume);
    n_vset = 0;
    while (arr_op == AOP_VSET) begin n_vset++; @(negedge clk); end
    check(n_vset == int'(TVR), $sformatf("bias re-applied for %0d", n_vset));
    check(arr_op == AOP_ERS && dut.u_cnt.tmr_elapsed == 51, "pulse resumes at its progress");
    while (!pe_done) @(negedge clk);
    check(good.ers_cnt[1] == T.t_erase - TVR, "erase pulse total exact");

    // IPS: request in program phase -> suspended exactly at phase end, no cancel
    load_page(2);
    row = 20'd0;
    susp_mode = SUSP_IPS;
    // erase row 0 first so it can be programmed again
    pulse(start_ers);
    while (!pe_done) @(negedge clk);
    @(negedge clk);
    pulse(start_pgm);
    repeat (4) @(negedge clk);
    susp_req = 1'b1;
    t0 = cyc;
    while (!suspended) begin
      check(!ev_cancel, "IPS never cancels");
      @(negedge clk);
    end
    susp_req = 1'b0;
    check(cyc - t0 == int'(T.t_w_program) - 4, $sformatf("IPS suspension point %0d", cyc - t0));
    check(dut.rp_vfy, "IPS after program phase resumes at verify");
    // read while suspended overwrites the page buffer
    row = 20'd1;
    pulse(start_rd);
    while (!rd_done) @(negedge clk);
    @(negedge clk);
    check(suspended && !busy, "back to suspended after the read");
    check(pb.mem[0] == '1, "page buffer holds the read page (erased row)");
    // a request during the restore ends it at once; the next resume restores again
    pulse(resume);
    repeat (3) @(negedge clk);
    check(dut.state == ST_RESTORE, "resume starts with the restore");
    susp_req = 1'b1;
    @(negedge clk);
    check(suspended, "request during the restore suspends at once");
    susp_req = 1'b0;
    repeat (2) @(negedge clk);
    t0 = cyc;
    pulse(resume);
    while (dut.state == ST_RESTORE || dut.state == ST_SUSP) @(negedge clk);
    check(cyc - t0 == int'(T.t_buffer) + 1, $sformatf("restore after a second resume lasts %0d", cyc - t0 - 1));
    while (!pe_done) @(negedge clk);
    @(negedge clk);
    check(!op_fail, "resumed IPS program passes");
    check(pb.mem[0] == sb.mem[0] && good.tgt[0][0] == sb.mem[0], "page buffer restored from shadow");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
