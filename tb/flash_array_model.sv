// flash_array_model: behavioural model of the NAND cell array and analog block, for
// simulation only (not synthesizable intent, no timing of its own).
//
// Each row holds one page of NWORDS words of DW bits, seen as 2-bit MLC cells.
// * Program phase (AOP_PGM with arr_we): the word presented is the target data; the
//   word receives one ISPP pulse. A cell with value v needs ceil((3-v)*N_W_CYCLE/3)
//   pulses: "0" needs the most, "3" (erased) none. Until a cell has had its pulses it
//   reads back as 3.
// * Erase pulse (AOP_ERS): each cycle adds to the row's accumulated erase time; once
//   it reaches ERS_NEED the row is erased (all ones, pulse counts cleared).
// * Any read (AOP_READ, AOP_PVFY, AOP_EVFY) returns the addressed word in the same
//   cycle.
// Counters of pulses and erase cycles are visible for testbench checks.
module flash_array_model
  import pes_pkg::*;
#(
  parameter int unsigned NROWS     = 4,
  parameter int unsigned NWORDS    = 16,
  parameter int unsigned DW        = 128,
  parameter int unsigned N_W_CYCLE = 15,
  parameter int unsigned ERS_NEED  = 100,
  parameter int unsigned ROW_W     = 20,
  localparam int unsigned WA_W     = $clog2(NWORDS)
) (
  input  logic             clk,
  input  arr_op_e          arr_op,
  input  logic [ROW_W-1:0] arr_row,
  input  logic [4:0]       arr_level,
  input  logic [WA_W-1:0]  arr_col,
  input  logic             arr_we,
  input  logic [DW-1:0]    arr_wdata,
  output logic [DW-1:0]    arr_rdata
);
  logic [DW-1:0] tgt    [NROWS][NWORDS];
  int unsigned   pulses [NROWS][NWORDS];
  int unsigned   ers_cnt[NROWS];
  int unsigned   pgm_words;     // word pulses applied in total
  int unsigned   max_level;     // highest ISPP level seen
  int unsigned   r;

  assign r = 32'(arr_row) % NROWS;

  function automatic int unsigned need(logic [1:0] v);
    return ((3 - int'(v)) * N_W_CYCLE + 2) / 3;
  endfunction

  initial begin
    for (int i = 0; i < NROWS; i++) begin
      ers_cnt[i] = 0;
      for (int j = 0; j < NWORDS; j++) begin
        tgt[i][j] = '1; pulses[i][j] = 0;
      end
    end
    pgm_words = 0; max_level = 0;
  end

  always_comb begin
    for (int c = 0; c < DW/2; c++) begin
      logic [1:0] v;
      v = tgt[r][arr_col][2*c +: 2];
      arr_rdata[2*c +: 2] = (pulses[r][arr_col] >= need(v)) ? v : 2'b11;
    end
  end

  always @(posedge clk) begin
    if (arr_we && arr_op == AOP_PGM) begin
      tgt[r][arr_col]    <= arr_wdata;
      pulses[r][arr_col] <= pulses[r][arr_col] + 1;
      pgm_words          <= pgm_words + 1;
      if (32'(arr_level) > max_level) max_level <= 32'(arr_level);
    end
    if (arr_op == AOP_ERS) begin
      if (ers_cnt[r] + 1 >= ERS_NEED) begin
        for (int j = 0; j < NWORDS; j++) begin
          tgt[r][j] <= '1; pulses[r][j] <= 0;
        end
      end
      ers_cnt[r] <= ers_cnt[r] + 1;
    end
  end

  // The array is only written during a program phase.
  a_we_only_pgm: assert property (@(posedge clk) arr_we |-> arr_op == AOP_PGM);
endmodule
