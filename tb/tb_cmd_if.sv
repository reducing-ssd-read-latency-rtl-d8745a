// tb_cmd_if: checks the command interface alone. The testbench plays the write state
// machine (busy / suspended / rd_done / pe_done) and the page buffer byte port, and
// checks the legality of every command in each situation, the data-in addressing and
// the start of the program after the last byte, the read data-out stream, the row
// handed over with each start, and the suspension request being held and released.
module tb_cmd_if;
  import pes_pkg::*;
  localparam int unsigned PAGE = 64;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic cmd_valid, cmd_ready, cmd_err;
  cmd_op_e cmd_op;
  logic [19:0] cmd_row, row;
  logic din_valid, din_ready, dout_valid, dout_ready;
  logic [7:0] din, dout;
  logic pe_active, pe_is_ers, pe_suspended, pe_done, op_fail;
  logic start_rd, start_pgm, start_ers, susp_req, resume;
  logic wsm_busy, wsm_suspended, wsm_rd_done, wsm_pe_done, wsm_op_fail;
  logic b_we;
  logic [5:0] b_addr;
  logic [7:0] b_wdata, b_rdata;

  cmd_if #(.PAGE_BYTES(PAGE)) dut (.*);

  logic [7:0] mem [PAGE];
  always @(posedge clk) if (b_we) mem[b_addr] <= b_wdata;
  assign b_rdata = mem[b_addr];

  int checks = 0, failures = 0, n_err = 0, n_start_pgm = 0, n_start_ers = 0, n_start_rd = 0;
  int n_resume = 0;
  logic [19:0] last_row;
  always @(posedge clk) begin
    if (cmd_err)   n_err++;
    if (start_pgm) begin n_start_pgm++; last_row <= row; end
    if (start_ers) begin n_start_ers++; last_row <= row; end
    if (start_rd)  begin n_start_rd++;  last_row <= row; end
    if (resume)    n_resume++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input cmd_op_e op, input int r);
    cmd_op = op; cmd_row = 20'(r); cmd_valid = 1;
    while (!cmd_ready) @(negedge clk);
    @(negedge clk);
    cmd_valid = 0;
  endtask

  task automatic expect_err(input cmd_op_e op, input bit err, input string what);
    int e0 = n_err;
    send(op, 0);
    check((n_err == e0 + 1) == err, what);
  endtask

  initial begin
    cmd_valid = 0; cmd_op = CMD_READ; cmd_row = 0; din_valid = 0; din = 0; dout_ready = 0;
    {wsm_busy, wsm_suspended, wsm_rd_done, wsm_pe_done, wsm_op_fail} = '0;
    repeat (2) @(negedge clk);
    rst_n = 1; @(negedge clk);

    // idle: suspend and resume are illegal
    expect_err(CMD_PGM_SUSPEND, 1, "program suspend while idle");
    expect_err(CMD_ERS_RESUME,  1, "erase resume while idle");

    // program: PAGE bytes in, start after the last one
    send(CMD_PROGRAM, 77);
    check(!cmd_ready && din_ready, "taking data");
    for (int i = 0; i < PAGE; i++) begin
      din_valid = 1; din = 8'(i ^ 8'h5A); #1;
      check(b_addr == 6'(i) && b_we, $sformatf("data byte %0d address", i));
      check(start_pgm == (i == PAGE - 1), "start on last byte only");
      @(negedge clk);
    end
    din_valid = 0;
    check(n_start_pgm == 1 && last_row == 77, "program started on row 77");
    check(pe_active && !pe_is_ers && cmd_ready, "program in flight");
    wsm_busy = 1;
    expect_err(CMD_READ,        1, "read while program runs");
    expect_err(CMD_PROGRAM,     1, "program while program runs");
    expect_err(CMD_ERS_SUSPEND, 1, "erase suspend during program");
    expect_err(CMD_PGM_RESUME,  1, "resume of a running program");
    expect_err(CMD_PGM_SUSPEND, 0, "program suspend");
    check(susp_req, "suspension requested");
    expect_err(CMD_PGM_SUSPEND, 1, "second suspend while pending");
    repeat (3) @(negedge clk);
    check(susp_req, "request held until suspended");
    wsm_busy = 0; wsm_suspended = 1;
    @(negedge clk);
    check(!susp_req, "request released once suspended");
    check(pe_suspended, "suspended reported");

    // read while suspended, then stream out
    for (int i = 0; i < PAGE; i++) mem[i] = 8'(i * 3);
    send(CMD_READ, 5);
    check(n_start_rd == 1 && last_row == 5, "read started on row 5");
    wsm_busy = 1;
    repeat (4) @(negedge clk);
    check(!dout_valid && !cmd_ready, "no data before sense done");
    wsm_rd_done = 1; @(negedge clk); wsm_rd_done = 0; wsm_busy = 0;
    dout_ready = 1;
    for (int i = 0; i < PAGE; i++) begin
      check(dout_valid && dout == 8'(i * 3), $sformatf("read byte %0d", i));
      @(negedge clk);
    end
    dout_ready = 0;
    check(!dout_valid && cmd_ready, "back to commands");
    expect_err(CMD_ERS_RESUME, 1, "erase resume of a program");
    expect_err(CMD_PGM_RESUME, 0, "program resume");
    check(n_resume == 1, "resume issued once");
    wsm_suspended = 0; wsm_busy = 1;
    repeat (3) @(negedge clk);
    wsm_pe_done = 1; wsm_op_fail = 1; @(negedge clk); wsm_pe_done = 0; wsm_busy = 0;
    check(!pe_active && op_fail, "program finished, failure passed on");

    // erase, suspend request that the end of the operation overtakes
    send(CMD_ERASE, 1234);
    check(n_start_ers == 1 && last_row == 1234 && pe_is_ers, "erase started on row 1234");
    wsm_busy = 1;
    expect_err(CMD_ERS_SUSPEND, 0, "erase suspend");
    wsm_pe_done = 1; @(negedge clk); wsm_pe_done = 0; wsm_busy = 0;
    check(!susp_req && !pe_active, "request dropped when the erase ends");
    expect_err(CMD_READ, 0, "read when idle");
    wsm_rd_done = 1; @(negedge clk); wsm_rd_done = 0;
    dout_ready = 1;
    repeat (PAGE) @(negedge clk);
    dout_ready = 0;
    check(cmd_ready, "idle again");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
