// cmd_if: command interface of the flash chip.
//
// Interprets the commands of the controller-chip interface and moves page data over
// the byte-wide bus. Besides read, program and erase, the command set has the four
// commands that program/erase suspension adds: program suspend, program resume,
// erase suspend and erase resume.
//
//   READ        legal when no program/erase is in flight, or when one is suspended.
//               Starts a sense; afterwards the page is streamed out on dout, one byte
//               per accepted dout_ready, PAGE_BYTES bytes.
//   PROGRAM     legal when no program/erase is in flight. Takes PAGE_BYTES bytes on
//               din (each byte goes to the page buffer and its shadow copy), then
//               starts the ISPP program.
//   ERASE       legal when no program/erase is in flight; starts the erase of the
//               block addressed by cmd_row.
//   *_SUSPEND   legal while a program (resp. erase) runs and is not yet suspended.
//               Raises the suspension request, held until the write state machine is
//               suspended or the operation ends.
//   *_RESUME    legal while a program (resp. erase) is suspended and no read is being
//               serviced.
// An illegal command is dropped and flagged with a one-cycle cmd_err pulse.
// cmd_ready is high when a new command may be given (not while page data moves).
// The command set follows the document; the handshakes, the legality rules and the
// status signals are this design's own choices. Asynchronous active-low reset.
// The data bytes (din to the buffers, page buffer to dout) and the status of the write
// state machine pass through without a register, by design.
module cmd_if
  import pes_pkg::*;
#(
  parameter int unsigned PAGE_BYTES = MLC_PAGE_BYTES,
  parameter int unsigned ROW_W      = 20,
  localparam int unsigned BA_W      = $clog2(PAGE_BYTES)
) (
  input  logic             clk,
  input  logic             rst_n,
  // command channel from the flash controller
  input  logic             cmd_valid,
  output logic             cmd_ready,
  input  cmd_op_e          cmd_op,
  input  logic [ROW_W-1:0] cmd_row,
  output logic             cmd_err,
  // data channels
  input  logic             din_valid,
  output logic             din_ready,
  input  logic [7:0]       din,
  output logic             dout_valid,
  input  logic             dout_ready,
  output logic [7:0]       dout,
  // status towards the controller
  output logic             pe_active,    // program or erase in flight (running or suspended)
  output logic             pe_is_ers,
  output logic             pe_suspended,
  output logic             pe_done,
  output logic             op_fail,
  // write state machine
  output logic             start_rd,
  output logic             start_pgm,
  output logic             start_ers,
  output logic [ROW_W-1:0] row,       // valid with start_rd / start_pgm / start_ers
  output logic             susp_req,
  output logic             resume,
  input  logic             wsm_busy,
  input  logic             wsm_suspended,
  input  logic             wsm_rd_done,
  input  logic             wsm_pe_done,
  input  logic             wsm_op_fail,
  // page buffer and shadow buffer byte ports
  output logic             b_we,
  output logic [BA_W-1:0]  b_addr,
  output logic [7:0]       b_wdata,
  input  logic [7:0]       b_rdata
);
  typedef enum logic [1:0] {CI_CMD, CI_DIN, CI_RD, CI_DOUT} ci_state_e;

  ci_state_e        ci;
  logic [BA_W-1:0]  col;
  logic [ROW_W-1:0] row_q;
  logic             susp_pend;
  logic             cmd_fire, legal;
  logic             pe_start;

  assign cmd_ready = (ci == CI_CMD);
  assign cmd_fire  = cmd_valid && cmd_ready;

  always_comb begin
    legal = 1'b0;
    unique case (cmd_op)
      CMD_READ:        legal = !pe_active || (wsm_suspended && !wsm_busy);
      CMD_PROGRAM,
      CMD_ERASE:       legal = !pe_active;
      CMD_PGM_SUSPEND: legal = pe_active && !pe_is_ers && !wsm_suspended && !susp_pend;
      CMD_ERS_SUSPEND: legal = pe_active &&  pe_is_ers && !wsm_suspended && !susp_pend;
      CMD_PGM_RESUME:  legal = pe_active && !pe_is_ers && wsm_suspended && !wsm_busy;
      CMD_ERS_RESUME:  legal = pe_active &&  pe_is_ers && wsm_suspended && !wsm_busy;
      default:         legal = 1'b0;
    endcase
  end

  assign cmd_err   = cmd_fire && !legal;
  assign start_rd  = cmd_fire && legal && cmd_op == CMD_READ;
  assign start_ers = cmd_fire && legal && cmd_op == CMD_ERASE;
  assign resume    = cmd_fire && legal && (cmd_op == CMD_PGM_RESUME || cmd_op == CMD_ERS_RESUME);
  assign din_ready = (ci == CI_DIN);
  assign start_pgm = (ci == CI_DIN) && din_valid && col == BA_W'(PAGE_BYTES-1);
  assign pe_start  = start_pgm || start_ers;
  assign susp_req  = susp_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ci        <= CI_CMD;
      col       <= '0;
      row_q     <= '0;
      susp_pend <= 1'b0;
      pe_active <= 1'b0;
      pe_is_ers <= 1'b0;
    end else begin
      unique case (ci)
        CI_CMD: if (cmd_fire && legal) begin
          unique case (cmd_op)
            CMD_READ:        ci <= CI_RD;
            CMD_PROGRAM:     begin ci <= CI_DIN; row_q <= cmd_row; col <= '0; end
            CMD_PGM_SUSPEND,
            CMD_ERS_SUSPEND: susp_pend <= 1'b1;
            default: ;
          endcase
        end
        CI_DIN: if (din_valid) begin
          col <= col + 1'b1;
          if (start_pgm) ci <= CI_CMD;
        end
        CI_RD: if (wsm_rd_done) begin
          ci <= CI_DOUT; col <= '0;
        end
        CI_DOUT: if (dout_ready) begin
          col <= col + 1'b1;
          if (col == BA_W'(PAGE_BYTES-1)) ci <= CI_CMD;
        end
        default: ci <= CI_CMD;
      endcase

      if (pe_start) begin
        pe_active <= 1'b1;
        pe_is_ers <= start_ers;
      end else if (wsm_pe_done) begin
        pe_active <= 1'b0;
      end
      if (wsm_pe_done || (wsm_suspended && !wsm_busy)) susp_pend <= 1'b0;
    end
  end

  assign b_we       = (ci == CI_DIN) && din_valid;
  assign b_addr     = col;
  assign b_wdata    = din;
  assign dout_valid = (ci == CI_DOUT);
  assign dout       = b_rdata;
  // Row seen by the write state machine, which latches it when an operation starts:
  // the command's row for read and erase, the stored row when the program starts.
  assign row = cmd_fire ? cmd_row : row_q;

  assign pe_suspended = wsm_suspended;
  assign pe_done      = wsm_pe_done;
  assign op_fail      = wsm_op_fail;

  a_susp_only_in_pe: assert property (@(posedge clk) disable iff (!rst_n)
    susp_pend |-> pe_active);
endmodule
