// pes_sched: flash-controller scheduler for one chip channel, with read priority and
// program/erase suspension.
//
// Host requests (read, write, erase of one page/block, each with a tag) go into a read
// queue and a write queue (writes and erases, in order). Whenever the chip can take a
// command, the scheduler decides:
//   * no program/erase in flight: serve the oldest read if any, else start the oldest
//     write or erase;
//   * a program/erase is running and a read is waiting: issue program suspend or erase
//     suspend and wait until the chip reports it suspended (or the operation ended);
//   * the program/erase is suspended: serve waiting reads one by one, then resume.
// For a write it asks the host for the page data (wd_*) and streams it to the chip;
// for a read it streams the chip's page to the host (rd_*, rd_last on the final
// byte). A finished write or erase is reported on cpl_* with its tag and fail flag.
// Read priority over queued writes and the controller issuing suspend/resume follow
// the document; queue depths, the tag scheme and the handshakes are this design's own
// (the document studies maximum write-queue sizes from 16 to 512; 16 is the default).
// Asynchronous active-low reset.
// Data bytes pass between host and chip without a register (wd_data to din, dout to
// rd_data), so one byte moves per clock in each direction.
module pes_sched
  import pes_pkg::*;
#(
  parameter int unsigned PAGE_BYTES = MLC_PAGE_BYTES,
  parameter int unsigned ROW_W      = 20,
  parameter int unsigned TAG_W      = 8,
  parameter int unsigned RQ_DEPTH   = 16,
  parameter int unsigned WQ_DEPTH   = 16,
  localparam int unsigned BA_W      = $clog2(PAGE_BYTES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // host requests
  input  logic             req_valid,
  output logic             req_ready,
  input  req_op_e          req_op,
  input  logic [ROW_W-1:0] req_row,
  input  logic [TAG_W-1:0] req_tag,
  // write data from the host
  output logic             wd_req,
  output logic [TAG_W-1:0] wd_tag,
  input  logic             wd_valid,
  output logic             wd_ready,
  input  logic [7:0]       wd_data,
  // read data to the host
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [7:0]       rd_data,
  output logic [TAG_W-1:0] rd_tag,
  output logic             rd_last,
  // write / erase completions
  output logic             cpl_valid,
  output logic [TAG_W-1:0] cpl_tag,
  output logic             cpl_fail,
  // chip interface
  output logic             cmd_valid,
  input  logic             cmd_ready,
  output cmd_op_e          cmd_op,
  output logic [ROW_W-1:0] cmd_row,
  output logic             din_valid,
  input  logic             din_ready,
  output logic [7:0]       din,
  input  logic             dout_valid,
  output logic             dout_ready,
  input  logic [7:0]       dout,
  input  logic             pe_active,
  input  logic             pe_is_ers,
  input  logic             pe_suspended,
  input  logic             pe_done,
  input  logic             op_fail,
  // activity counters for observation
  output logic             ev_suspend_cmd,
  output logic             ev_resume_cmd
);
  localparam int unsigned EW = 2 + ROW_W + TAG_W;

  typedef enum logic [2:0] {SC_DECIDE, SC_CMD, SC_WDATA, SC_RDATA, SC_WAIT_SUSP} sc_state_e;

  sc_state_e        st;
  logic [BA_W-1:0]  cnt;
  logic [TAG_W-1:0] cur_rtag, cur_wtag;

  // queues
  logic          rq_push, rq_pop, rq_empty, rq_full;
  logic          wq_push, wq_pop, wq_empty, wq_full;
  logic [EW-1:0] rq_dout, wq_dout;
  logic [$clog2(RQ_DEPTH):0] rq_count;
  logic [$clog2(WQ_DEPTH):0] wq_count;

  assign req_ready = (req_op == REQ_READ) ? !rq_full : !wq_full;
  assign rq_push   = req_valid && req_ready && req_op == REQ_READ;
  assign wq_push   = req_valid && req_ready && req_op != REQ_READ;

  sync_fifo #(.WIDTH(EW), .DEPTH(RQ_DEPTH)) u_rq (
    .clk, .rst_n, .push(rq_push), .din({req_op, req_row, req_tag}), .pop(rq_pop),
    .dout(rq_dout), .empty(rq_empty), .full(rq_full), .count(rq_count));
  sync_fifo #(.WIDTH(EW), .DEPTH(WQ_DEPTH)) u_wq (
    .clk, .rst_n, .push(wq_push), .din({req_op, req_row, req_tag}), .pop(wq_pop),
    .dout(wq_dout), .empty(wq_empty), .full(wq_full), .count(wq_count));

  req_op_e          wq_op;
  logic [ROW_W-1:0] rq_row, wq_row;
  logic [TAG_W-1:0] rq_tag, wq_tag;
  assign rq_row = rq_dout[TAG_W +: ROW_W];
  assign rq_tag = rq_dout[TAG_W-1:0];
  assign wq_op  = req_op_e'(wq_dout[EW-1 -: 2]);
  assign wq_row = wq_dout[TAG_W +: ROW_W];
  assign wq_tag = wq_dout[TAG_W-1:0];

  // decision, taken in SC_DECIDE
  logic    go;
  cmd_op_e go_op;
  always_comb begin
    go = 1'b0; go_op = CMD_READ; rq_pop = 1'b0; wq_pop = 1'b0;
    if (st == SC_DECIDE) begin
      if (!pe_active || pe_suspended) begin
        if (!rq_empty) begin
          go = 1'b1; go_op = CMD_READ; rq_pop = 1'b1;
        end else if (pe_active) begin
          go = 1'b1; go_op = pe_is_ers ? CMD_ERS_RESUME : CMD_PGM_RESUME;
        end else if (!wq_empty) begin
          go = 1'b1; go_op = (wq_op == REQ_ERASE) ? CMD_ERASE : CMD_PROGRAM; wq_pop = 1'b1;
        end
      end else if (!rq_empty) begin
        go = 1'b1; go_op = pe_is_ers ? CMD_ERS_SUSPEND : CMD_PGM_SUSPEND;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= SC_DECIDE; cnt <= '0; cur_rtag <= '0; cur_wtag <= '0;
      cmd_op <= CMD_READ; cmd_row <= '0;
    end else begin
      unique case (st)
        SC_DECIDE: if (go) begin
          st     <= SC_CMD;
          cmd_op <= go_op;
          if (go_op == CMD_READ) begin
            cmd_row <= rq_row; cur_rtag <= rq_tag;
          end else if (go_op == CMD_PROGRAM || go_op == CMD_ERASE) begin
            cmd_row <= wq_row; cur_wtag <= wq_tag;
          end
        end
        SC_CMD: if (cmd_ready) begin
          cnt <= '0;
          unique case (cmd_op)
            CMD_READ:        st <= SC_RDATA;
            CMD_PROGRAM:     st <= SC_WDATA;
            CMD_PGM_SUSPEND,
            CMD_ERS_SUSPEND: st <= SC_WAIT_SUSP;
            default:         st <= SC_DECIDE;
          endcase
        end
        SC_WDATA: if (wd_valid && din_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == BA_W'(PAGE_BYTES-1)) st <= SC_DECIDE;
        end
        SC_RDATA: if (dout_valid && rd_ready) begin
          cnt <= cnt + 1'b1;
          if (cnt == BA_W'(PAGE_BYTES-1)) st <= SC_DECIDE;
        end
        SC_WAIT_SUSP: if (pe_suspended || !pe_active) st <= SC_DECIDE;
        default: st <= SC_DECIDE;
      endcase
    end
  end

  assign cmd_valid  = (st == SC_CMD);
  assign wd_req     = (st == SC_WDATA);
  assign wd_tag     = cur_wtag;
  assign wd_ready   = (st == SC_WDATA) && din_ready;
  assign din_valid  = (st == SC_WDATA) && wd_valid;
  assign din        = wd_data;
  assign rd_valid   = (st == SC_RDATA) && dout_valid;
  assign dout_ready = (st == SC_RDATA) && rd_ready;
  assign rd_data    = dout;
  assign rd_tag     = cur_rtag;
  assign rd_last    = rd_valid && cnt == BA_W'(PAGE_BYTES-1);
  assign cpl_valid  = pe_done;
  assign cpl_tag    = cur_wtag;
  assign cpl_fail   = op_fail;

  assign ev_suspend_cmd = cmd_valid && cmd_ready &&
                          (cmd_op == CMD_PGM_SUSPEND || cmd_op == CMD_ERS_SUSPEND);
  assign ev_resume_cmd  = cmd_valid && cmd_ready &&
                          (cmd_op == CMD_PGM_RESUME || cmd_op == CMD_ERS_RESUME);
endmodule
