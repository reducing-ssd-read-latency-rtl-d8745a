// tb_pes_sched: checks the controller-side scheduler against a behavioural chip
// written here. The chip model accepts commands, takes program data, runs program and
// erase for fixed times, suspends a few cycles after a suspend command, resumes,
// streams read data derived from the row, and flags any command that a real chip
// would reject. Checked: reads are served before queued writes, a read arriving during
// a program or erase makes the scheduler suspend it, all waiting reads are served
// before the resume, write data is fetched for the right tag, read data and
// completions carry the right tags, and the command sequence is as expected.
module tb_pes_sched;
  import pes_pkg::*;
  localparam int unsigned PAGE = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

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
  logic cmd_valid, cmd_ready;
  cmd_op_e cmd_op;
  logic [19:0] cmd_row;
  logic din_valid, din_ready, dout_valid, dout_ready;
  logic [7:0] din, dout;
  logic pe_active, pe_is_ers, pe_suspended, pe_done, op_fail;
  logic ev_suspend_cmd, ev_resume_cmd;

  pes_sched #(.PAGE_BYTES(PAGE), .RQ_DEPTH(4), .WQ_DEPTH(4)) dut (.*);

  // ---------------- behavioural chip ----------------
  int chip_err = 0;
  int pe_left = 0, din_left = 0, dout_left = 0, rd_wait = 0, susp_wait = 0, dout_i = 0;
  logic [19:0] rd_row;
  logic running;
  string log_s = "";

  assign cmd_ready  = (din_left == 0) && (dout_left == 0) && (rd_wait == 0);
  assign din_ready  = (din_left > 0);
  assign dout_valid = (dout_left > 0);
  assign dout       = 8'(rd_row) + 8'(dout_i);
  assign op_fail    = 1'b0;

  always @(posedge clk) begin
    pe_done <= 1'b0;
    if (rst_n && cmd_valid && cmd_ready) begin
      case (cmd_op)
        CMD_READ: begin
          if (pe_active && !pe_suspended) chip_err++;
          rd_wait <= 3; rd_row <= cmd_row; log_s = {log_s, "R"};
        end
        CMD_PROGRAM: begin
          if (pe_active) chip_err++;
          din_left <= PAGE; pe_is_ers <= 1'b0; log_s = {log_s, "P"};
        end
        CMD_ERASE: begin
          if (pe_active) chip_err++;
          pe_active <= 1'b1; running <= 1'b1; pe_left <= 60; pe_is_ers <= 1'b1;
          log_s = {log_s, "E"};
        end
        CMD_PGM_SUSPEND, CMD_ERS_SUSPEND: begin
          if (!running || (cmd_op == CMD_ERS_SUSPEND) != pe_is_ers) chip_err++;
          susp_wait <= 2; log_s = {log_s, "S"};
        end
        default: begin
          if (!pe_suspended || (cmd_op == CMD_ERS_RESUME) != pe_is_ers) chip_err++;
          pe_suspended <= 1'b0; running <= 1'b1; log_s = {log_s, "U"};
        end
      endcase
    end
    if (din_valid && din_ready) begin
      if (din != 8'(wd_tag) + 8'(PAGE - din_left)) chip_err++;
      din_left <= din_left - 1;
      if (din_left == 1) begin pe_active <= 1'b1; running <= 1'b1; pe_left <= 40; end
    end
    if (rd_wait > 0) begin
      rd_wait <= rd_wait - 1;
      if (rd_wait == 1) begin dout_left <= PAGE; dout_i <= 0; end
    end
    if (dout_valid && dout_ready) begin dout_left <= dout_left - 1; dout_i <= dout_i + 1; end
    if (susp_wait > 0) begin
      susp_wait <= susp_wait - 1;
      if (susp_wait == 1) begin running <= 1'b0; pe_suspended <= 1'b1; end
    end
    if (running && susp_wait == 0 && pe_left > 0) begin
      pe_left <= pe_left - 1;
      if (pe_left == 1) begin running <= 1'b0; pe_active <= 1'b0; pe_done <= 1'b1; end
    end
    if (!rst_n) begin
      pe_active <= 0; pe_suspended <= 0; running <= 0; din_left <= 0; dout_left <= 0;
      rd_wait <= 0; susp_wait <= 0; pe_left <= 0; pe_is_ers <= 0;
    end
  end

  // ---------------- host ----------------
  int checks = 0, failures = 0, n_rd_pages = 0, rd_bytes = 0, n_cpl = 0, n_susp = 0, n_res = 0;
  int rd_bad = 0, wd_i = 0;
  logic [7:0] cpl_tags [8];
  logic [7:0] rd_tags [8];

  assign wd_valid = wd_req;
  assign wd_data  = 8'(wd_tag) + 8'(wd_i);
  assign rd_ready = 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (wd_valid && wd_ready) wd_i <= (wd_i == PAGE - 1) ? 0 : wd_i + 1;
    if (rd_valid) begin
      if (rd_data != 8'(rd_tag) + 8'(rd_bytes)) rd_bad++;   // row == tag in this test
      rd_bytes <= rd_last ? 0 : rd_bytes + 1;
      if (rd_last) begin rd_tags[n_rd_pages] <= rd_tag; n_rd_pages++; end
    end
    if (cpl_valid) begin cpl_tags[n_cpl] <= cpl_tag; n_cpl++; end
    if (ev_suspend_cmd) n_susp++;
    if (ev_resume_cmd) n_res++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic request(input req_op_e op, input int tag);
    req_op = op; req_row = 20'(tag); req_tag = 8'(tag); req_valid = 1;
    while (!req_ready) @(negedge clk);
    @(negedge clk);
    req_valid = 0;
  endtask

  initial begin
    req_valid = 0; req_op = REQ_READ; req_row = 0; req_tag = 0;
    repeat (2) @(negedge clk);
    rst_n = 1; @(negedge clk);

    // two writes queued, then reads arrive while the first program runs
    request(REQ_WRITE, 10);
    request(REQ_WRITE, 11);
    while (!pe_active) @(negedge clk);
    repeat (5) @(negedge clk);
    request(REQ_READ, 20);
    request(REQ_READ, 21);
    while (n_cpl < 2) @(negedge clk);
    check(n_rd_pages == 2, "both reads served");
    check(rd_tags[0] == 20 && rd_tags[1] == 21, "reads in order with tags");
    check(cpl_tags[0] == 10 && cpl_tags[1] == 11, "writes completed in order with tags");
    check(n_susp >= 1 && n_res == n_susp, "program suspended and resumed for the reads");

    // a read arriving during an erase suspends the erase
    repeat (3) @(negedge clk);
    log_s = "";
    request(REQ_ERASE, 30);
    while (!pe_active) @(negedge clk);
    repeat (10) @(negedge clk);
    request(REQ_READ, 31);
    while (n_cpl < 3) @(negedge clk);
    check(cpl_tags[2] == 30, "erase completed");
    check(n_rd_pages == 3, "read during the erase served");
    check(log_s == "ESRU", $sformatf("erase command order %s", log_s));

    // read priority: a write and a read queued while a read streams; the read goes first
    repeat (3) @(negedge clk);
    log_s = "";
    request(REQ_READ, 42);
    while (!rd_valid) @(negedge clk);
    request(REQ_WRITE, 40);
    request(REQ_READ, 41);
    while (n_cpl < 4) @(negedge clk);
    check(log_s == "RRP", $sformatf("read priority order %s", log_s));
    check(rd_tags[3] == 42 && rd_tags[4] == 41, "read tags");
    check(cpl_tags[3] == 40, "write completed");
    check(chip_err == 0, "chip never got an illegal command");
    check(rd_bad == 0, "read data correct");
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
