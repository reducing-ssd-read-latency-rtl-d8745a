// tb_pes_top: end-to-end test of one flash channel (scheduler + chip control logic)
// with a behavioural cell array, at reduced page size and phase lengths.
//
// A host process issues a random mix of page reads, block erases and page writes
// (each write preceded by an erase of its row) with random gaps, supplies write data
// on request and checks every page read against the expected content of its row.
// The first half of the workload runs with Intra Phase Cancelation, the second half
// with Inter Phase Suspension. The test counts each mechanism of the design and fails
// if one never happened: program suspension, erase suspension, resume, phase
// cancellation, suspension at a phase boundary, re-done program phase, reads served
// while a program or erase was suspended. It also reports the mean read latency.
module tb_pes_top;
  import pes_pkg::*;

  localparam int unsigned PAGE  = 256;
  localparam int unsigned WB    = 16;
  localparam int unsigned NW    = PAGE / WB;
  localparam int unsigned NROWS = 8;
  localparam int unsigned NOPS  = 400;
  localparam int unsigned TVR   = 4;
  localparam flash_timing_t T = '{
    t_r_phy: 30, t_w_program: 40, t_verify: 30, t_erase: 600,
    t_voltage_reset: TVR, t_buffer: 20, n_w_cycle: 6, n_erase_max: 4};

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
  logic [8*WB-1:0] arr_wdata, arr_rdata;
  logic cmd_err, ev_suspend_cmd, ev_resume_cmd, ev_cancel, ev_susp_end, ev_redo;

  pes_top #(.TIMING(T), .PAGE_BYTES(PAGE), .WORD_BYTES(WB)) dut (.*);

  flash_array_model #(.NROWS(NROWS), .NWORDS(NW), .DW(8*WB), .N_W_CYCLE(T.n_w_cycle),
                      .ERS_NEED(T.t_erase - TVR)) arr (
    .clk, .arr_op, .arr_row, .arr_level, .arr_col, .arr_we, .arr_wdata, .arr_rdata);

  function automatic logic [7:0] pat(int tag, int i);
    logic [7:0] b;
    b = 8'(tag * 29 + i * 13 + (i >> 4));
    if (i % 3 == 0) b[1:0] = 2'b00;
    return b;
  endfunction

  // host bookkeeping
  logic [7:0] exp_page [NROWS][PAGE];
  int         pending  [NROWS];     // queued or running erases/writes per row
  int         rd_pend  [NROWS];     // queued reads per row
  int         tag_row  [256];
  req_op_e    tag_op   [256];
  longint     tag_t0   [256];

  int checks = 0, failures = 0, cyc = 0;
  int n_pgm_susp = 0, n_ers_susp = 0, n_resume = 0, n_cancel = 0, n_susp_end = 0, n_redo = 0;
  int n_rd_in_susp = 0, n_err = 0, n_fail = 0, n_cpl = 0, n_rd = 0, rd_bad = 0, rd_i = 0;
  int wd_i = 0;
  longint rd_lat_sum = 0;

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
    if (ev_suspend_cmd) begin
      if (dut.pe_is_ers) n_ers_susp++; else n_pgm_susp++;
    end
    if (ev_resume_cmd) n_resume++;
    if (ev_cancel)     n_cancel++;
    if (ev_susp_end)   n_susp_end++;
    if (ev_redo)       n_redo++;
    if (cmd_err)       n_err++;
    if (rd_valid) begin
      if (rd_data != exp_page[tag_row[rd_tag]][rd_i]) rd_bad++;
      rd_i <= rd_last ? 0 : rd_i + 1;
      if (rd_last) begin
        n_rd++;
        rd_pend[tag_row[rd_tag]]--;
        rd_lat_sum += cyc - tag_t0[rd_tag];
        if (dut.pe_suspended) n_rd_in_susp++;
      end
    end
    if (cpl_valid) begin
      n_cpl++;
      if (cpl_fail) n_fail++;
      pending[tag_row[cpl_tag]]--;
      for (int i = 0; i < PAGE; i++)
        exp_page[tag_row[cpl_tag]][i] = (tag_op[cpl_tag] == REQ_ERASE) ? 8'hFF : pat(int'(cpl_tag), i);
    end
  end

  task automatic request(input req_op_e op, input int row, input int tag);
    tag_row[tag] = row; tag_op[tag] = op; tag_t0[tag] = cyc;
    if (op == REQ_READ) rd_pend[row]++; else pending[row]++;
    req_op = op; req_row = 20'(row); req_tag = 8'(tag); req_valid = 1'b1;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 1'b0;
  endtask

  int tag = 0, n_issued_pe = 0;

  initial begin
    req_valid = 0; req_op = REQ_READ; req_row = 0; req_tag = 0; susp_mode = SUSP_IPC;
    for (int r = 0; r < NROWS; r++) begin
      pending[r] = 0; rd_pend[r] = 0;
      for (int i = 0; i < PAGE; i++) exp_page[r][i] = 8'hFF;
    end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);

    for (int n = 0; n < NOPS; n++) begin
      int row, kind;
      if (n == NOPS / 2) susp_mode = SUSP_IPS;
      repeat ($urandom_range(0, 200)) @(negedge clk);
      row  = $urandom_range(0, NROWS - 1);
      kind = $urandom_range(0, 9);
      if (kind < 6 && pending[row] == 0) begin
        request(REQ_READ, row, tag); tag = (tag + 1) % 256;
      end else if (kind >= 6 && pending[row] == 0 && rd_pend[row] == 0) begin
        request(REQ_ERASE, row, tag); tag = (tag + 1) % 256;
        if (kind >= 7) begin
          request(REQ_WRITE, row, tag); tag = (tag + 1) % 256;
          n_issued_pe++;
        end
        n_issued_pe++;
      end
    end
    // drain
    while (n_cpl < n_issued_pe || (n_rd < tag - n_issued_pe)) @(negedge clk);
    repeat (20) @(negedge clk);

    $display("reads %0d (mean latency %0d cycles), writes+erases %0d", n_rd,
             n_rd ? int'(rd_lat_sum / n_rd) : 0, n_cpl);
    $display("program suspends %0d, erase suspends %0d, resumes %0d, cancels %0d, phase-end suspends %0d, redo %0d, reads while suspended %0d",
             n_pgm_susp, n_ers_susp, n_resume, n_cancel, n_susp_end, n_redo, n_rd_in_susp);
    check(rd_bad == 0, $sformatf("read data errors %0d", rd_bad));
    check(n_err == 0, "no command rejected by the chip");
    check(n_fail == 0, "no program or erase failed");
    check(n_pgm_susp > 0, "program suspension happened");
    check(n_ers_susp > 0, "erase suspension happened");
    check(n_resume > 0 && n_resume <= n_pgm_susp + n_ers_susp, "resumes happened, never more than suspends");
    check(n_cancel > 0, "IPC phase cancellation happened");
    check(n_susp_end > 0, "suspension at a phase boundary happened");
    check(n_redo > 0, "re-done program phase happened");
    check(n_rd_in_susp > 0, "reads served while suspended");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
