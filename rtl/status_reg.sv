// status_reg: the status register of the write state machine.
//
// Records the result of verify operations. A verify sweep clears the mismatch flag
// (vfy_clr), then reports each compared page-buffer word (vfy_cmp) with whether any of
// its cells is still off target (vfy_miss). At the end of the sweep (vfy_end) the
// accumulated result is latched as vfy_pass. The register also holds the sticky
// operation-failed flag (set when program or erase runs out of iterations, cleared
// when the next operation starts) and the count of mismatching words of the last
// verify, useful when debugging. The document names the status register and its job;
// the fields and the clear/latch protocol are this design's choice. Asynchronous
// active-low reset; updates on the rising edge.
module status_reg #(
  parameter int unsigned CNT_W = 9
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             vfy_clr,
  input  logic             vfy_cmp,
  input  logic             vfy_miss,
  input  logic             vfy_end,
  input  logic             fail_set,
  input  logic             fail_clr,
  output logic             vfy_pass,
  output logic             vfy_ok,       // no mismatch so far in the running verify
  output logic             op_fail,
  output logic [CNT_W-1:0] miss_words
);
  logic             miss_acc;
  logic [CNT_W-1:0] miss_cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      miss_acc   <= 1'b0;
      miss_cnt   <= '0;
      vfy_pass   <= 1'b0;
      op_fail    <= 1'b0;
      miss_words <= '0;
    end else begin
      if (vfy_clr) begin
        miss_acc <= 1'b0;
        miss_cnt <= '0;
      end else if (vfy_cmp && vfy_miss) begin
        miss_acc <= 1'b1;
        miss_cnt <= miss_cnt + 1'b1;
      end
      if (vfy_end) begin
        vfy_pass   <= !miss_acc && !(vfy_cmp && vfy_miss);
        miss_words <= miss_cnt + CNT_W'(vfy_cmp && vfy_miss);
      end
      if (fail_clr)      op_fail <= 1'b0;
      else if (fail_set) op_fail <= 1'b1;
    end
  end
  assign vfy_ok = !miss_acc;
endmodule
