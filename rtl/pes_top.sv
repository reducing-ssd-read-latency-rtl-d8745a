// pes_top: one flash channel with program/erase suspension: the controller-side
// scheduler driving one NAND chip's control logic.
//
// The host side takes tagged read/write/erase requests, supplies write data on demand
// and receives read data and write/erase completions (see pes_sched). The chip's
// analog block and cell array are not part of the RTL; their interface is brought out
// (arr_*): the array must return the addressed page word on arr_rdata in the same
// cycle. Observation outputs pulse on each suspend and resume command, each cancelled
// phase, each suspension taken at a phase boundary and each re-done program phase.
// The document's SSD has 16 such channels, each with one chip of four planes; this top
// is one channel with one page-wide plane, its MLC timing and 4 KB page by default.
module pes_top
  import pes_pkg::*;
#(
  parameter flash_timing_t TIMING     = MLC_TIMING,
  parameter int unsigned   PAGE_BYTES = MLC_PAGE_BYTES,
  parameter int unsigned   WORD_BYTES = 16,
  parameter int unsigned   ROW_W      = 20,
  parameter int unsigned   TAG_W      = 8,
  parameter int unsigned   RQ_DEPTH   = 16,
  parameter int unsigned   WQ_DEPTH   = 16,
  localparam int unsigned  NWORDS     = PAGE_BYTES / WORD_BYTES,
  localparam int unsigned  WA_W       = $clog2(NWORDS),
  localparam int unsigned  DW         = 8 * WORD_BYTES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  susp_mode_e       susp_mode,
  // host
  input  logic             req_valid,
  output logic             req_ready,
  input  req_op_e          req_op,
  input  logic [ROW_W-1:0] req_row,
  input  logic [TAG_W-1:0] req_tag,
  output logic             wd_req,
  output logic [TAG_W-1:0] wd_tag,
  input  logic             wd_valid,
  output logic             wd_ready,
  input  logic [7:0]       wd_data,
  output logic             rd_valid,
  input  logic             rd_ready,
  output logic [7:0]       rd_data,
  output logic [TAG_W-1:0] rd_tag,
  output logic             rd_last,
  output logic             cpl_valid,
  output logic [TAG_W-1:0] cpl_tag,
  output logic             cpl_fail,
  // analog block and cell array
  output arr_op_e          arr_op,
  output logic [ROW_W-1:0] arr_row,
  output logic [4:0]       arr_level,
  output logic [WA_W-1:0]  arr_col,
  output logic             arr_we,
  output logic [DW-1:0]    arr_wdata,
  input  logic [DW-1:0]    arr_rdata,
  // observation
  output logic             cmd_err,
  output logic             ev_suspend_cmd,
  output logic             ev_resume_cmd,
  output logic             ev_cancel,
  output logic             ev_susp_end,
  output logic             ev_redo
);
  logic             cmd_valid, cmd_ready;
  cmd_op_e          cmd_op;
  logic [ROW_W-1:0] cmd_row;
  logic             din_valid, din_ready, dout_valid, dout_ready;
  logic [7:0]       din, dout;
  logic             pe_active, pe_is_ers, pe_suspended, pe_done, op_fail;
  logic             ev_resume;

  pes_sched #(.PAGE_BYTES(PAGE_BYTES), .ROW_W(ROW_W), .TAG_W(TAG_W),
              .RQ_DEPTH(RQ_DEPTH), .WQ_DEPTH(WQ_DEPTH)) u_sched (
    .clk, .rst_n,
    .req_valid, .req_ready, .req_op, .req_row, .req_tag,
    .wd_req, .wd_tag, .wd_valid, .wd_ready, .wd_data,
    .rd_valid, .rd_ready, .rd_data, .rd_tag, .rd_last,
    .cpl_valid, .cpl_tag, .cpl_fail,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_row,
    .din_valid, .din_ready, .din, .dout_valid, .dout_ready, .dout,
    .pe_active, .pe_is_ers, .pe_suspended, .pe_done, .op_fail,
    .ev_suspend_cmd, .ev_resume_cmd
  );

  nand_pes_chip #(.TIMING(TIMING), .PAGE_BYTES(PAGE_BYTES), .WORD_BYTES(WORD_BYTES),
                  .ROW_W(ROW_W)) u_chip (
    .clk, .rst_n, .susp_mode,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_row, .cmd_err,
    .din_valid, .din_ready, .din, .dout_valid, .dout_ready, .dout,
    .pe_active, .pe_is_ers, .pe_suspended, .pe_done, .op_fail,
    .arr_op, .arr_row, .arr_level, .arr_col, .arr_we, .arr_wdata, .arr_rdata,
    .ev_cancel, .ev_susp_end, .ev_redo, .ev_resume
  );

  // Every resume the chip accepts was issued by the scheduler.
  a_resume_from_sched: assert property (@(posedge clk) disable iff (!rst_n)
    ev_resume |-> ev_resume_cmd);
endmodule
