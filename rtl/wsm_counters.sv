// wsm_counters: the counters of the write state machine.
//
// * Phase timer (the pulse-width generator). Started with a phase length, it counts
//   clock cycles while the phase runs. It flags the last cycle of the phase and the
//   closing window of T_VR cycles in which the phase discharges its bias
//   (Op_voltage_reset). On a suspension the elapsed count, including the cycle in
//   which the save happens, can be kept as the progress of an erase pulse and later reloaded, so a resumed pulse only runs for
//   the time it still lacks. This follows the document's note that the pulse width
//   generator is counter-like logic that already tracks the progress of the pulse.
// * ISPP iteration counter: number of completed program phases; at_max marks the
//   configured maximum N_w_cycle.
// * Erase loop counter: number of failed erase verifies.
// * Column sweep counter: walks the page buffer words 0..NWORDS-1 at one per clock
//   after sweep_clr; sweep_act is high while a word is being addressed.
// All registers reset asynchronously (active low) to zero; all updates happen on the
// rising clock edge. Widths and the exact control encoding are this design's choice.
module wsm_counters #(
  parameter int unsigned TMR_W  = 20,
  parameter int unsigned IT_W   = 5,
  parameter int unsigned NWORDS = 256,
  localparam int unsigned WA_W  = $clog2(NWORDS)
) (
  input  logic             clk,
  input  logic             rst_n,
  // phase timer
  input  logic             tmr_start,    // begin a phase of tmr_len cycles from 0
  input  logic             tmr_resume,   // begin a phase of tmr_len cycles from the saved progress
  input  logic [TMR_W-1:0] tmr_len,
  input  logic [TMR_W-1:0] t_vr,         // length of the closing voltage-reset window
  input  logic             tmr_save,     // store the elapsed count as progress
  input  logic             tmr_stop,     // phase ends (completed or cancelled)
  output logic             tmr_run,
  output logic [TMR_W-1:0] tmr_elapsed,
  output logic             tmr_last,     // final cycle of the running phase
  output logic             tmr_in_vr,    // running phase is in its voltage-reset window
  output logic [TMR_W-1:0] progress,
  // ISPP iteration counter
  input  logic             it_clr,
  input  logic             it_inc,
  input  logic [IT_W-1:0]  it_max,
  output logic [IT_W-1:0]  it_val,
  output logic             it_at_max,
  // erase loop counter
  input  logic             lp_clr,
  input  logic             lp_inc,
  output logic [IT_W-1:0]  lp_val,
  // column sweep counter
  input  logic             sweep_clr,
  output logic             sweep_act,
  output logic [WA_W-1:0]  sweep_col
);
  logic [TMR_W-1:0] len_q;
  logic [WA_W:0]    sweep_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tmr_run     <= 1'b0;
      tmr_elapsed <= '0;
      len_q       <= '0;
      progress    <= '0;
    end else begin
      if (tmr_save) progress <= tmr_elapsed + 1'b1;
      if (tmr_start || tmr_resume) begin
        tmr_run     <= 1'b1;
        tmr_elapsed <= tmr_resume ? progress : '0;
        len_q       <= tmr_len;
      end else if (tmr_stop) begin
        tmr_run     <= 1'b0;
      end else if (tmr_run) begin
        tmr_elapsed <= tmr_elapsed + 1'b1;
      end
    end
  end

  assign tmr_last  = tmr_run && (tmr_elapsed + 1'b1 >= len_q);
  assign tmr_in_vr = tmr_run && (tmr_elapsed + t_vr >= len_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      it_val <= '0;
      lp_val <= '0;
    end else begin
      if (it_clr)      it_val <= '0;
      else if (it_inc) it_val <= it_val + 1'b1;
      if (lp_clr)      lp_val <= '0;
      else if (lp_inc) lp_val <= lp_val + 1'b1;
    end
  end
  assign it_at_max = (it_val >= it_max);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)         sweep_q <= (WA_W+1)'(NWORDS);
    else if (sweep_clr) sweep_q <= '0;
    else if (sweep_act) sweep_q <= sweep_q + 1'b1;
  end
  assign sweep_act = (sweep_q < (WA_W+1)'(NWORDS));
  assign sweep_col = sweep_q[WA_W-1:0];
endmodule
