// tb_pes_top_full: one complete operation sequence through the channel at its default
// sizes (4 KB page, MLC timing at 100 MHz: 3.3 ms erase pulse, 15 ISPP iterations of
// 20 us program + 24 us verify). An erase of row 0 is suspended by a read of row 1;
// the page is then written and the program is suspended (Intra Phase Cancelation) by
// another read; finally row 0 is read back and compared. Checks the data, the total
// erase pulse time, the suspend latency bound of t_voltage_reset and the program time.
module tb_pes_top_full;
  import pes_pkg::*;

  localparam flash_timing_t T = MLC_TIMING;
  localparam int unsigned PAGE = MLC_PAGE_BYTES;
  localparam int unsigned NW = PAGE / 16;

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
  logic [7:0] arr_col;
  logic arr_we;
  logic [127:0] arr_wdata, arr_rdata;
  logic cmd_err, ev_suspend_cmd, ev_resume_cmd, ev_cancel, ev_susp_end, ev_redo;

  pes_top dut (.*);

  flash_array_model #(.NROWS(2), .NWORDS(NW), .DW(128), .N_W_CYCLE(T.n_w_cycle),
                      .ERS_NEED(T.t_erase - T.t_voltage_reset)) arr (
    .clk, .arr_op, .arr_row, .arr_level, .arr_col, .arr_we, .arr_wdata, .arr_rdata);

  function automatic logic [7:0] pat(int i);
    logic [7:0] b;
    b = 8'(i * 7 + (i >> 8));
    if (i % 4 == 0) b[1:0] = 2'b00;
    return b;
  endfunction

  int checks = 0, failures = 0, cyc = 0, wd_i = 0, rd_i = 0, rd_bad = 0, n_rd = 0, n_cpl = 0;
  int n_susp = 0, n_cancel = 0;
  logic [7:0] exp_row [2][PAGE];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  assign wd_valid = wd_req;
  assign wd_data  = pat(wd_i);
  assign rd_ready = 1'b1;

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (wd_valid && wd_ready) wd_i <= wd_i + 1;
    if (rd_valid) begin
      if (rd_data != exp_row[rd_tag[0]][rd_i]) rd_bad++;
      rd_i <= rd_last ? 0 : rd_i + 1;
      if (rd_last) n_rd++;
    end
    if (cpl_valid) begin n_cpl++; if (cpl_fail) failures++; end
    if (ev_suspend_cmd) n_susp++;
    if (ev_cancel) n_cancel++;
  end

  task automatic request(input req_op_e op, input int row);
    req_op = op; req_row = 20'(row); req_tag = 8'(row); req_valid = 1'b1;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  int t0;

  initial begin
    req_valid = 0; req_op = REQ_READ; req_row = 0; req_tag = 0; susp_mode = SUSP_IPC;
    for (int i = 0; i < PAGE; i++) begin exp_row[0][i] = 8'hFF; exp_row[1][i] = 8'hFF; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    // erase row 0, suspended by a read of row 1 after 1 ms
    request(REQ_ERASE, 0);
    repeat (100000) @(negedge clk);
    t0 = cyc;
    request(REQ_READ, 1);
    while (!dut.pe_suspended) @(negedge clk);
    check(cyc - t0 <= int'(T.t_voltage_reset) + 4, $sformatf("erase suspend latency %0d", cyc - t0));
    while (n_cpl < 1) @(negedge clk);
    check(arr.ers_cnt[0] == T.t_erase - T.t_voltage_reset,
          $sformatf("erase pulse total %0d", arr.ers_cnt[0]));
    check(n_rd == 1, "read served during erase");

    // program row 0, suspended by a read of row 1 in its 3rd iteration
    request(REQ_WRITE, 0);
    while (!dut.u_chip.pe_active) @(negedge clk);
    t0 = cyc;
    for (int i = 0; i < PAGE; i++) exp_row[0][i] = pat(i);
    repeat (2 * (T.t_w_program + T.t_verify) + 700) @(negedge clk);
    request(REQ_READ, 1);
    while (n_cpl < 2) @(negedge clk);
    check(n_rd == 2 && n_cancel == 2 && n_susp == 2, "program suspended by cancelation for the read");
    check(cyc - t0 > int'(T.n_w_cycle * (T.t_w_program + T.t_verify)), "program time includes the suspension");
    check(cyc - t0 < int'(T.n_w_cycle * (T.t_w_program + T.t_verify) + 3 * T.t_w_program + 2 * T.t_verify + 4096 + 2000),
          $sformatf("program time bounded (%0d)", cyc - t0));

    request(REQ_READ, 0);
    while (n_rd < 3) @(negedge clk);
    check(rd_bad == 0, $sformatf("read data errors %0d", rd_bad));
    check(cmd_err == 1'b0, "no rejected command");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
