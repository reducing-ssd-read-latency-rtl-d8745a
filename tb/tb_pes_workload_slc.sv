// tb_pes_workload_slc: the channel in its SLC configuration (SLC timing at 100 MHz,
// 2 KB page) with the largest write queue of interest (512 entries), under a read-heavy
// burst workload, run once with Intra Phase Cancelation and once with Inter Phase
// Suspension.
//
// Each half erases one block, then queues 24 page writes at once (more than a 16-entry
// queue holds, so the queue depth matters) and keeps issuing reads at random gaps until
// the writes have completed. Every page read is compared with the expected content of
// its row. For every suspend command the time until the chip reports itself suspended
// is measured. Checks: all data correct, no failure, no rejected command, the whole
// burst accepted without back-pressure; with cancelation no program suspension takes
// longer than t_voltage_reset (plus the command transfer); at phase boundaries no
// program suspension takes longer than the longer phase; erase suspensions are bounded
// by t_voltage_reset in both modes; phase-boundary suspension waits longer on average
// than cancelation. The mean wait is printed next to the uniform-arrival estimate
// (t_p^2 + t_v^2) / (2 (t_p + t_v)) for phase-boundary suspension.
module tb_pes_workload_slc;
  import pes_pkg::*;

  localparam flash_timing_t T = SLC_TIMING;
  localparam int unsigned PAGE   = SLC_PAGE_BYTES;
  localparam int unsigned NW     = PAGE / 16;
  localparam int unsigned NROWS  = 50;
  localparam int unsigned NWRITE = 24;
  localparam int unsigned CMD_SLACK = 8;   // cycles to pass a suspend command to the chip

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  susp_mode_e susp_mode;
  logic req_valid, req_ready;
  req_op_e req_op;
  logic [19:0] req_row;
  logic [7:0] req_tag;
  logic wd_req, wd_valid, wd_ready;
  logic [7:0] wd_tag, wd_data;
  logic rd_valid, rd_ready, rd_last;
  logic [7:0] rd_data, rd_tag;
  logic cpl_valid, cpl_fail;
  logic [7:0] cpl_tag;
  arr_op_e arr_op;
  logic [19:0] arr_row;
  logic [4:0] arr_level;
  logic [$clog2(NW)-1:0] arr_col;
  logic arr_we;
  logic [127:0] arr_wdata, arr_rdata;
  logic cmd_err, ev_suspend_cmd, ev_resume_cmd, ev_cancel, ev_susp_end, ev_redo;

  pes_top #(.TIMING(T), .PAGE_BYTES(PAGE), .WQ_DEPTH(512)) dut (.*);

  flash_array_model #(.NROWS(NROWS), .NWORDS(NW), .DW(128), .N_W_CYCLE(T.n_w_cycle),
                      .ERS_NEED(T.t_erase - T.t_voltage_reset)) arr (
    .clk, .arr_op, .arr_row, .arr_level, .arr_col, .arr_we, .arr_wdata, .arr_rdata);

  function automatic logic [7:0] pat(int tag, int i);
    logic [7:0] b;
    b = 8'(tag * 41 + i * 5 + (i >> 5));
    if (i % 5 == 0) b[1:0] = 2'b00;
    return b;
  endfunction

  logic [7:0] exp_page [NROWS][PAGE];
  int         pending  [NROWS];
  int         tag_row  [256];
  req_op_e    tag_op   [256];

  int checks = 0, failures = 0, cyc = 0, wd_i = 0, rd_i = 0, rd_bad = 0;
  int n_rd = 0, n_cpl = 0, n_err = 0, n_fail = 0, n_stall = 0;
  // suspend-latency statistics, [mode][0 = program, 1 = erase]
  int  n_lat [2][2], max_lat [2][2];
  longint sum_lat [2][2];
  bit  waiting = 1'b0, wait_ers = 1'b0;
  int  t_susp = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign wd_valid = wd_req;
  assign wd_data  = pat(int'(wd_tag), wd_i);
  assign rd_ready = 1'b1;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (wd_valid && wd_ready) wd_i <= (wd_i == PAGE - 1) ? 0 : wd_i + 1;
    if (cmd_err) n_err++;
    if (rd_valid) begin
      if (rd_data != exp_page[tag_row[rd_tag]][rd_i]) rd_bad++;
      rd_i <= rd_last ? 0 : rd_i + 1;
      if (rd_last) n_rd++;
    end
    if (cpl_valid) begin
      n_cpl++;
      if (cpl_fail) n_fail++;
      pending[tag_row[cpl_tag]]--;
      for (int i = 0; i < PAGE; i++)
        exp_page[tag_row[cpl_tag]][i] = (tag_op[cpl_tag] == REQ_ERASE) ? 8'hFF : pat(int'(cpl_tag), i);
    end
    if (ev_suspend_cmd) begin
      waiting <= 1'b1; wait_ers <= dut.pe_is_ers; t_susp <= cyc;
    end else if (waiting && dut.pe_suspended) begin
      automatic int m = int'(susp_mode), k = int'(wait_ers), d = cyc - t_susp;
      waiting <= 1'b0;
      n_lat[m][k]++; sum_lat[m][k] += d;
      if (d > max_lat[m][k]) max_lat[m][k] = d;
    end else if (waiting && !dut.pe_active) begin
      waiting <= 1'b0;   // the operation ended before it could be suspended
    end
  end

  int tag = 0;

  task automatic request(input req_op_e op, input int row);
    tag_row[tag] = row; tag_op[tag] = op;
    if (op != REQ_READ) pending[row]++;
    req_op = op; req_row = 20'(row); req_tag = 8'(tag); req_valid = 1'b1;
    @(posedge clk);
    if (!req_ready) n_stall++;
    @(negedge clk);
    while (!req_ready) @(negedge clk);
    req_valid = 1'b0;
    tag = (tag + 1) % 256;
  endtask

  // random reads of rows that have no write or erase outstanding
  task automatic read_random();
    int row;
    do row = $urandom_range(0, NROWS - 1); while (pending[row] != 0);
    request(REQ_READ, row);
  endtask

  task automatic run_half(input int base);
    int target;
    // erase one block (a row outside the burst) with reads arriving during the pulse
    target = n_cpl + 1;
    request(REQ_ERASE, NROWS - 1);
    while (n_cpl < target) begin
      repeat ($urandom_range(20000, 60000)) @(negedge clk);
      if (n_cpl < target) read_random();
    end
    // burst of writes, all queued back to back, then reads until they are done
    target = n_cpl + NWRITE;
    for (int w = 0; w < NWRITE; w++) request(REQ_WRITE, base + w);
    while (n_cpl < target) begin
      repeat ($urandom_range(2000, 20000)) @(negedge clk);
      read_random();
    end
    repeat (2 * PAGE + 2000) @(negedge clk);
  endtask

  initial begin
    req_valid = 0; req_op = REQ_READ; req_row = 0; req_tag = 0; susp_mode = SUSP_IPC;
    for (int m = 0; m < 2; m++) for (int k = 0; k < 2; k++) begin
      n_lat[m][k] = 0; sum_lat[m][k] = 0; max_lat[m][k] = 0;
    end
    for (int r = 0; r < NROWS; r++) begin
      pending[r] = 0;
      for (int i = 0; i < PAGE; i++) exp_page[r][i] = 8'hFF;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    run_half(0);
    susp_mode = SUSP_IPS;
    run_half(NWRITE);

    for (int m = 0; m < 2; m++)
      $display("%s: program suspends %0d (mean %0d, max %0d cycles), erase suspends %0d (mean %0d, max %0d)",
               m == 0 ? "IPC" : "IPS",
               n_lat[m][0], n_lat[m][0] ? int'(sum_lat[m][0] / n_lat[m][0]) : 0, max_lat[m][0],
               n_lat[m][1], n_lat[m][1] ? int'(sum_lat[m][1] / n_lat[m][1]) : 0, max_lat[m][1]);
    $display("uniform-arrival estimate of the phase-boundary wait: %0d cycles",
             (T.t_w_program * T.t_w_program + T.t_verify * T.t_verify) /
             (2 * (T.t_w_program + T.t_verify)));
    $display("reads %0d, writes+erases %0d", n_rd, n_cpl);

    check(rd_bad == 0, $sformatf("read data errors %0d", rd_bad));
    check(n_fail == 0, "no program or erase failed");
    check(n_err == 0, "no command rejected by the chip");
    check(n_stall == 0, $sformatf("write burst accepted without back-pressure (%0d stalls)", n_stall));
    check(n_lat[0][0] > 0 && n_lat[1][0] > 0, "program suspended in both modes");
    check(n_lat[0][1] > 0 && n_lat[1][1] > 0, "erase suspended in both modes");
    check(max_lat[0][0] <= int'(T.t_voltage_reset + CMD_SLACK),
          $sformatf("cancelation bounds the program suspend wait (%0d)", max_lat[0][0]));
    check(max_lat[1][0] <= int'((T.t_w_program > T.t_verify ? T.t_w_program : T.t_verify) + CMD_SLACK),
          $sformatf("phase-boundary wait bounded by a phase (%0d)", max_lat[1][0]));
    check(max_lat[0][1] <= int'(T.t_voltage_reset + CMD_SLACK) &&
          max_lat[1][1] <= int'(T.t_voltage_reset + CMD_SLACK),
          "erase suspend wait bounded by t_voltage_reset");
    check(n_lat[0][0] > 0 && n_lat[1][0] > 0 &&
          sum_lat[1][0] * n_lat[0][0] > sum_lat[0][0] * n_lat[1][0],
          "phase-boundary suspension waits longer on average than cancelation");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
