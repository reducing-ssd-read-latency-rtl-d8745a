// nand_pes_chip: control logic of one NAND flash chip with program/erase suspension.
//
// Joins the command interface, the write state machine (algorithm controller,
// counters, status register), the page buffer and the shadow buffer. The analog block
// (charge pumps, regulators) and the cell array stay outside: the chip drives them
// through arr_op / arr_row / arr_level / arr_col / arr_we / arr_wdata and reads the
// sensed page word on arr_rdata in the same cycle (see write_state_machine).
//
// Controller side: a command channel (valid/ready, cmd_op and cmd_row) and byte-wide
// din/dout channels with valid/ready, one byte per clock. Status: pe_active,
// pe_suspended, pe_done, op_fail, cmd_err. susp_mode selects Intra Phase Cancelation
// (SUSP_IPC) or Inter Phase Suspension (SUSP_IPS) for suspending a program.
// The structure (command interface in front of a write state machine of algorithm
// controller, counters and status register; page buffer plus shadow buffer) follows
// the document; the port shapes are this design's own. Default sizes are the MLC ones.
module nand_pes_chip
  import pes_pkg::*;
#(
  parameter flash_timing_t TIMING     = MLC_TIMING,
  parameter int unsigned   PAGE_BYTES = MLC_PAGE_BYTES,
  parameter int unsigned   WORD_BYTES = 16,
  parameter int unsigned   ROW_W      = 20,
  localparam int unsigned  NWORDS     = PAGE_BYTES / WORD_BYTES,
  localparam int unsigned  WA_W       = $clog2(NWORDS),
  localparam int unsigned  BA_W       = $clog2(PAGE_BYTES),
  localparam int unsigned  DW         = 8 * WORD_BYTES
) (
  input  logic             clk,
  input  logic             rst_n,
  input  susp_mode_e       susp_mode,
  // controller-chip interface
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  cmd_op_e          cmd_op,
  input  logic [ROW_W-1:0] cmd_row,
  output logic             cmd_err,
  input  logic             din_valid,
  output logic             din_ready,
  input  logic [7:0]       din,
  output logic             dout_valid,
  input  logic             dout_ready,
  output logic [7:0]       dout,
  output logic             pe_active,
  output logic             pe_is_ers,
  output logic             pe_suspended,
  output logic             pe_done,
  output logic             op_fail,
  // analog block and cell array
  output arr_op_e          arr_op,
  output logic [ROW_W-1:0] arr_row,
  output logic [4:0]       arr_level,
  output logic [WA_W-1:0]  arr_col,
  output logic             arr_we,
  output logic [DW-1:0]    arr_wdata,
  input  logic [DW-1:0]    arr_rdata,
  // suspension events, one-cycle pulses
  output logic             ev_cancel,
  output logic             ev_susp_end,
  output logic             ev_redo,
  output logic             ev_resume
);
  logic             start_rd, start_pgm, start_ers, susp_req, resume;
  logic [ROW_W-1:0] row;
  logic             wsm_busy, wsm_suspended, wsm_susp_is_ers, wsm_rd_done, wsm_pe_done, wsm_op_fail;
  logic             b_we;
  logic [BA_W-1:0]  b_addr;
  logic [7:0]       b_wdata, b_rdata;
  logic             pb_we;
  logic [WA_W-1:0]  pb_addr, sb_addr;
  logic [DW-1:0]    pb_wdata, pb_rdata, sb_rdata;

  cmd_if #(.PAGE_BYTES(PAGE_BYTES), .ROW_W(ROW_W)) u_cmd (
    .clk, .rst_n,
    .cmd_valid, .cmd_ready, .cmd_op, .cmd_row, .cmd_err,
    .din_valid, .din_ready, .din, .dout_valid, .dout_ready, .dout,
    .pe_active, .pe_is_ers, .pe_suspended, .pe_done, .op_fail,
    .start_rd, .start_pgm, .start_ers, .row, .susp_req, .resume,
    .wsm_busy, .wsm_suspended, .wsm_rd_done, .wsm_pe_done, .wsm_op_fail,
    .b_we, .b_addr, .b_wdata, .b_rdata
  );

  write_state_machine #(.TIMING(TIMING), .PAGE_BYTES(PAGE_BYTES), .WORD_BYTES(WORD_BYTES),
                        .ROW_W(ROW_W)) u_wsm (
    .clk, .rst_n,
    .start_rd, .start_pgm, .start_ers, .row, .susp_req, .resume, .susp_mode,
    .busy(wsm_busy), .suspended(wsm_suspended), .susp_is_ers(wsm_susp_is_ers),
    .rd_done(wsm_rd_done), .pe_done(wsm_pe_done), .op_fail(wsm_op_fail),
    .arr_op, .arr_row, .arr_level, .arr_col, .arr_we, .arr_wdata, .arr_rdata,
    .pb_we, .pb_addr, .pb_wdata, .pb_rdata,
    .sb_addr, .sb_rdata,
    .ev_cancel, .ev_susp_end, .ev_redo, .ev_resume
  );

  page_buffer #(.PAGE_BYTES(PAGE_BYTES), .WORD_BYTES(WORD_BYTES)) u_pb (
    .clk,
    .b_we, .b_addr, .b_wdata, .b_rdata,
    .w_we(pb_we), .w_addr(pb_addr), .w_wdata(pb_wdata), .w_rdata(pb_rdata)
  );

  shadow_buffer #(.PAGE_BYTES(PAGE_BYTES), .WORD_BYTES(WORD_BYTES)) u_sb (
    .clk,
    .b_we, .b_addr, .b_wdata,
    .w_addr(sb_addr), .w_rdata(sb_rdata)
  );

  // The erase/program kind is tracked by both the command interface and the state
  // machine; they must agree while an operation is suspended.
  a_kind_agrees: assert property (@(posedge clk) disable iff (!rst_n)
    (pe_active && wsm_suspended) |-> (wsm_susp_is_ers == pe_is_ers));
endmodule
