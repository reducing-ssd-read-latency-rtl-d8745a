// write_state_machine: algorithm controller of the flash chip, with its counters and
// status register, extended with program/erase suspension and resumption.
//
// Operations
//   Read     one sense phase of t_r_phy: the page is swept from the array into the
//            page buffer.
//   Program  ISPP: program phase (t_w_program, the page buffer is swept onto the
//            bit lines at step level it_val) then verify phase (t_verify, the cells
//            are swept and compared with the page buffer). It stops when a verify
//            passes, or fails after n_w_cycle iterations.
//   Erase    erase pulse (t_erase) then erase verify (t_verify: every cell must read
//            erased); repeated up to n_erase_max times.
// Every phase ends with a window of t_voltage_reset cycles in which the bias is
// discharged (Op_voltage_reset); during it the array op reads AOP_VRST.
//
// Suspension (susp_req, held by the command interface until suspended or done)
//   * A request that arrives in a phase's closing reset window is honoured at the end
//     of that phase.
//   * Erase pulse: cancelled at once; the elapsed pulse time is kept in the pulse
//     timer; a voltage reset of t_voltage_reset follows. Resume re-applies the bias
//     for t_voltage_reset (AOP_VSET) and runs only the pulse time still missing.
//   * Erase verify: cancelled at once, re-done from the start on resume.
//   * Program, IPS (susp_mode = SUSP_IPS): the running program or verify phase is
//     completed and the chip suspends at the phase boundary.
//   * Program, IPC (SUSP_IPC): the running phase is cancelled and a voltage reset
//     follows at once. On resume a cancelled verify is re-done; a cancelled program
//     phase is followed by a verify that decides whether it must be re-done at the
//     same step level (the iteration counter only counts completed program phases).
//   * Program resume always starts by restoring the page buffer from the shadow
//     buffer for t_buffer cycles, one word per cycle.
//   * A request that arrives while a resume is still restoring the page buffer ends
//     the restore at once (no bias to discharge); one that arrives while the erase
//     bias is re-applied is followed by a voltage reset. Both are this design's
//     choice: the document does not treat a suspension during a resume.
// While suspended, start_rd runs a read sense and returns to the suspended state.
//
// All of this follows the document. Its own choices: the one-clock-per-word sweeps,
// the zero-latency array word port (arr_rdata belongs to arr_col of the same cycle),
// the pulse/done/event signalling, and n_erase_max. Timing: every phase lasts exactly
// its parameter in clock cycles; state changes on the rising edge; asynchronous
// active-low reset.
// arr_wdata is the page-buffer word port wired straight to the bit lines: in a
// program phase the page buffer itself drives the cells, as in a conventional chip.
module write_state_machine
  import pes_pkg::*;
#(
  parameter flash_timing_t TIMING     = MLC_TIMING,
  parameter int unsigned   PAGE_BYTES = MLC_PAGE_BYTES,
  parameter int unsigned   WORD_BYTES = 16,
  parameter int unsigned   ROW_W      = 20,
  localparam int unsigned  NWORDS     = PAGE_BYTES / WORD_BYTES,
  localparam int unsigned  WA_W       = $clog2(NWORDS),
  localparam int unsigned  DW         = 8 * WORD_BYTES,
  localparam int unsigned  TMR_W      = 20,
  localparam int unsigned  IT_W       = 5
) (
  input  logic             clk,
  input  logic             rst_n,
  // from the command interface
  input  logic             start_rd,
  input  logic             start_pgm,
  input  logic             start_ers,
  input  logic [ROW_W-1:0] row,
  input  logic             susp_req,
  input  logic             resume,
  input  susp_mode_e       susp_mode,
  // to the command interface
  output logic             busy,        // an operation is running (not idle, not suspended)
  output logic             suspended,   // a program or erase is suspended, reads allowed
  output logic             susp_is_ers, // the suspended / running P/E is an erase
  output logic             rd_done,     // pulse: read data is in the page buffer
  output logic             pe_done,     // pulse: program or erase finished
  output logic             op_fail,
  // analog block and cell array
  output arr_op_e          arr_op,
  output logic [ROW_W-1:0] arr_row,
  output logic [IT_W-1:0]  arr_level,   // ISPP step: Vpp = Vstart + arr_level * dVpp
  output logic [WA_W-1:0]  arr_col,
  output logic             arr_we,
  output logic [DW-1:0]    arr_wdata,
  input  logic [DW-1:0]    arr_rdata,
  // page buffer word port
  output logic             pb_we,
  output logic [WA_W-1:0]  pb_addr,
  output logic [DW-1:0]    pb_wdata,
  input  logic [DW-1:0]    pb_rdata,
  // shadow buffer word port
  output logic [WA_W-1:0]  sb_addr,
  input  logic [DW-1:0]    sb_rdata,
  // events, one-cycle pulses
  output logic             ev_cancel,     // a phase was cancelled for a suspension
  output logic             ev_susp_end,   // a suspension taken at the end of a phase
  output logic             ev_redo,       // a cancelled program phase must be re-done
  output logic             ev_resume
);

  if (TIMING.t_w_program < NWORDS + TIMING.t_voltage_reset + 1 ||
      TIMING.t_verify    < NWORDS + TIMING.t_voltage_reset + 1 ||
      TIMING.t_r_phy     < NWORDS + TIMING.t_voltage_reset + 1 ||
      TIMING.t_buffer    < NWORDS ||
      TIMING.t_erase     < TIMING.t_voltage_reset + 2 ||
      TIMING.n_w_cycle   >= 2**IT_W || TIMING.t_erase >= 2**TMR_W) begin : g_bad_timing
    $error("write_state_machine: phase lengths too short for a page sweep");
  end

  typedef enum logic [3:0] {
    S_IDLE, S_RD, S_PGM, S_PVFY, S_ERS, S_EVFY, S_VRST, S_SUSP, S_RESTORE, S_VSET
  } state_e;

  state_e     state, state_n;
  logic       rd_from_susp, rd_from_susp_n;
  logic       op_ers, op_ers_n;          // current P/E is an erase
  logic       rp_vfy, rp_vfy_n;          // resume point: verify (1) or pulse (0)
  logic       ers_saved, ers_saved_n;    // erase pulse progress held in the timer
  logic       post_cancel, post_cancel_n;// running verify follows a cancelled program phase
  logic [ROW_W-1:0] row_q, rd_row_q;

  // counters
  logic             tmr_start, tmr_resume, tmr_save, tmr_stop, tmr_run, tmr_last, tmr_in_vr;
  logic [TMR_W-1:0] tmr_len, tmr_elapsed, progress;
  logic             it_clr, it_inc, it_at_max, lp_clr, lp_inc, sweep_clr, sweep_act;
  logic [IT_W-1:0]  it_val, lp_val;
  logic [WA_W-1:0]  sweep_col;

  wsm_counters #(.TMR_W(TMR_W), .IT_W(IT_W), .NWORDS(NWORDS)) u_cnt (
    .clk, .rst_n,
    .tmr_start, .tmr_resume, .tmr_len, .t_vr(TMR_W'(TIMING.t_voltage_reset)),
    .tmr_save, .tmr_stop, .tmr_run, .tmr_elapsed, .tmr_last, .tmr_in_vr, .progress,
    .it_clr, .it_inc, .it_max(IT_W'(TIMING.n_w_cycle)), .it_val, .it_at_max,
    .lp_clr, .lp_inc, .lp_val,
    .sweep_clr, .sweep_act, .sweep_col
  );

  // status register
  logic vfy_clr, vfy_cmp, vfy_miss, vfy_end, vfy_ok, vfy_pass, fail_set, fail_clr;
  logic [WA_W:0] miss_words;
  status_reg #(.CNT_W(WA_W+1)) u_sr (
    .clk, .rst_n, .vfy_clr, .vfy_cmp, .vfy_miss, .vfy_end, .fail_set, .fail_clr,
    .vfy_pass, .vfy_ok, .op_fail, .miss_words
  );

  function automatic logic [TMR_W-1:0] phase_len(state_e s);
    case (s)
      S_RD:      return TMR_W'(TIMING.t_r_phy);
      S_PGM:     return TMR_W'(TIMING.t_w_program);
      S_PVFY,
      S_EVFY:    return TMR_W'(TIMING.t_verify);
      S_ERS:     return TMR_W'(TIMING.t_erase);
      S_VRST,
      S_VSET:    return TMR_W'(TIMING.t_voltage_reset);
      S_RESTORE: return TMR_W'(TIMING.t_buffer);
      default:   return '0;
    endcase
  endfunction

  logic cancel_ok;   // a suspension request may cancel the running phase now
  always_comb begin
    cancel_ok = 1'b0;
    if (susp_req && !tmr_in_vr)
      case (state)
        S_ERS, S_EVFY:  cancel_ok = 1'b1;
        S_PGM, S_PVFY:  cancel_ok = (susp_mode == SUSP_IPC);
        default:        cancel_ok = 1'b0;
      endcase
  end

  // next state
  always_comb begin
    state_n        = state;
    rd_from_susp_n = rd_from_susp;
    op_ers_n       = op_ers;
    rp_vfy_n       = rp_vfy;
    ers_saved_n    = ers_saved;
    post_cancel_n  = post_cancel;
    tmr_resume     = 1'b0;
    tmr_save       = 1'b0;
    it_clr = 1'b0; it_inc = 1'b0; lp_clr = 1'b0; lp_inc = 1'b0;
    fail_set = 1'b0; fail_clr = 1'b0;
    rd_done = 1'b0; pe_done = 1'b0;
    ev_cancel = 1'b0; ev_susp_end = 1'b0; ev_redo = 1'b0; ev_resume = 1'b0;

    unique case (state)
      S_IDLE: begin
        if (start_rd) begin
          state_n = S_RD; rd_from_susp_n = 1'b0;
        end else if (start_pgm) begin
          state_n = S_PGM; op_ers_n = 1'b0; it_clr = 1'b1; fail_clr = 1'b1;
          post_cancel_n = 1'b0;
        end else if (start_ers) begin
          state_n = S_ERS; op_ers_n = 1'b1; lp_clr = 1'b1; fail_clr = 1'b1;
          ers_saved_n = 1'b0;
        end
      end

      S_RD: if (tmr_last) begin
        rd_done = 1'b1;
        state_n = rd_from_susp ? S_SUSP : S_IDLE;
      end

      S_PGM: begin
        if (cancel_ok) begin
          ev_cancel = 1'b1; rp_vfy_n = 1'b1; post_cancel_n = 1'b1; state_n = S_VRST;
        end else if (tmr_last) begin
          it_inc = 1'b1;
          post_cancel_n = 1'b0;
          if (susp_req) begin
            ev_susp_end = 1'b1; rp_vfy_n = 1'b1; state_n = S_SUSP;
          end else
            state_n = S_PVFY;
        end
      end

      S_PVFY: begin
        if (cancel_ok) begin
          ev_cancel = 1'b1; rp_vfy_n = 1'b1; state_n = S_VRST;
        end else if (tmr_last) begin
          if (vfy_ok) begin
            pe_done = 1'b1; state_n = S_IDLE;
          end else if (it_at_max) begin
            fail_set = 1'b1; pe_done = 1'b1; state_n = S_IDLE;
          end else begin
            ev_redo = post_cancel;
            post_cancel_n = 1'b0;
            if (susp_req) begin
              ev_susp_end = 1'b1; rp_vfy_n = 1'b0; state_n = S_SUSP;
            end else
              state_n = S_PGM;
          end
        end
      end

      S_ERS: begin
        if (cancel_ok) begin
          ev_cancel = 1'b1; tmr_save = 1'b1; ers_saved_n = 1'b1; rp_vfy_n = 1'b0;
          state_n = S_VRST;
        end else if (tmr_last) begin
          ers_saved_n = 1'b0;
          if (susp_req) begin
            ev_susp_end = 1'b1; rp_vfy_n = 1'b1; state_n = S_SUSP;
          end else
            state_n = S_EVFY;
        end
      end

      S_EVFY: begin
        if (cancel_ok) begin
          ev_cancel = 1'b1; rp_vfy_n = 1'b1; state_n = S_VRST;
        end else if (tmr_last) begin
          if (vfy_ok) begin
            pe_done = 1'b1; state_n = S_IDLE;
          end else if (32'(lp_val) + 1 >= TIMING.n_erase_max) begin
            fail_set = 1'b1; pe_done = 1'b1; state_n = S_IDLE;
          end else begin
            lp_inc = 1'b1;
            if (susp_req) begin
              ev_susp_end = 1'b1; rp_vfy_n = 1'b0; state_n = S_SUSP;
            end else
              state_n = S_ERS;
          end
        end
      end

      S_VRST: if (tmr_last) state_n = S_SUSP;

      S_SUSP: begin
        if (start_rd) begin
          state_n = S_RD; rd_from_susp_n = 1'b1;
        end else if (resume) begin
          ev_resume = 1'b1;
          if (!op_ers)                state_n = S_RESTORE;
          else if (rp_vfy)            state_n = S_EVFY;
          else if (ers_saved)         state_n = S_VSET;
          else                        state_n = S_ERS;
        end
      end

      // a request during the restore abandons it (no bias is applied yet); the next
      // resume restores the page again
      S_RESTORE: begin
        if (susp_req)      state_n = S_SUSP;
        else if (tmr_last) state_n = rp_vfy ? S_PVFY : S_PGM;
      end

      // a request while the erase bias is re-applied discharges it again; the saved
      // pulse progress is kept
      S_VSET: begin
        if (susp_req) begin
          ev_cancel = 1'b1; state_n = S_VRST;
        end else if (tmr_last) begin
          state_n = S_ERS; tmr_resume = 1'b1;
        end
      end

      default: state_n = S_IDLE;
    endcase
  end

  // phase timer and sweep control on state entry
  always_comb begin
    tmr_start = (state_n != state) && !tmr_resume && phase_len(state_n) != '0;
    tmr_stop  = (state_n != state) && phase_len(state_n) == '0;
    tmr_len   = phase_len(state_n);
    sweep_clr = (state_n != state) &&
                (state_n inside {S_RD, S_PGM, S_PVFY, S_EVFY, S_RESTORE});
    vfy_clr   = sweep_clr;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      rd_from_susp <= 1'b0;
      op_ers       <= 1'b0;
      rp_vfy       <= 1'b0;
      ers_saved    <= 1'b0;
      post_cancel  <= 1'b0;
      row_q        <= '0;
      rd_row_q     <= '0;
    end else begin
      state        <= state_n;
      rd_from_susp <= rd_from_susp_n;
      op_ers       <= op_ers_n;
      rp_vfy       <= rp_vfy_n;
      ers_saved    <= ers_saved_n;
      post_cancel  <= post_cancel_n;
      if (state == S_IDLE && (start_pgm || start_ers)) row_q <= row;
      if ((state == S_IDLE || state == S_SUSP) && start_rd) rd_row_q <= row;
    end
  end

  // datapath
  logic in_phase;
  assign in_phase = (state inside {S_RD, S_PGM, S_PVFY, S_ERS, S_EVFY});

  always_comb begin
    arr_op = AOP_IDLE;
    unique case (state)
      S_RD:    arr_op = AOP_READ;
      S_PGM:   arr_op = AOP_PGM;
      S_PVFY:  arr_op = AOP_PVFY;
      S_ERS:   arr_op = AOP_ERS;
      S_EVFY:  arr_op = AOP_EVFY;
      S_VRST:  arr_op = AOP_VRST;
      S_VSET:  arr_op = AOP_VSET;
      default: arr_op = AOP_IDLE;
    endcase
    if (in_phase && tmr_in_vr) arr_op = AOP_VRST;
  end

  assign arr_row   = (state == S_RD) ? rd_row_q : row_q;
  assign arr_level = it_val;
  assign arr_col   = sweep_col;
  assign arr_we    = (state == S_PGM) && sweep_act && !tmr_in_vr;
  assign arr_wdata = pb_rdata;

  assign pb_addr  = sweep_col;
  assign sb_addr  = sweep_col;
  assign pb_we    = sweep_act && (state == S_RD || state == S_RESTORE);
  assign pb_wdata = (state == S_RESTORE) ? sb_rdata : arr_rdata;

  assign vfy_cmp  = sweep_act && (state == S_PVFY || state == S_EVFY);
  assign vfy_miss = (state == S_EVFY) ? (arr_rdata != '1) : (arr_rdata != pb_rdata);
  assign vfy_end  = tmr_last && (state == S_PVFY || state == S_EVFY);

  assign busy        = !(state inside {S_IDLE, S_SUSP});
  assign suspended   = (state == S_SUSP) || (state == S_RD && rd_from_susp);
  assign susp_is_ers = op_ers;

  // A phase's own timer must be running whenever the controller is in a timed state.
  a_timer_runs: assert property (@(posedge clk) disable iff (!rst_n)
    (state inside {S_RD, S_PGM, S_PVFY, S_ERS, S_EVFY, S_VRST, S_RESTORE, S_VSET}) |-> tmr_run);
  // The page must be fully swept before a verify result is taken.
  a_sweep_done: assert property (@(posedge clk) disable iff (!rst_n)
    vfy_end |-> !sweep_act);
endmodule
