// page_buffer: the flash chip's page buffer.
//
// Holds one page: the data to be written during a program, or the data sensed from
// the cells during a read. It has two ports on the same storage:
//   * a byte port towards the controller-chip bus (one byte per clock), and
//   * a word port, WORD_BYTES wide, towards the cell array (program, verify and read
//     sweeps) and towards the shadow buffer (restore after a suspended program).
// Both ports read combinationally and write on the rising clock edge. A word write
// takes precedence over a byte write to the same word in the same cycle. The page
// size follows the MLC geometry (4 KB); the word width and the port shapes are this
// design's own choices. The storage is not reset: its content is data.
module page_buffer #(
  parameter int unsigned PAGE_BYTES = 4096,
  parameter int unsigned WORD_BYTES = 16,
  localparam int unsigned NWORDS = PAGE_BYTES / WORD_BYTES,
  localparam int unsigned BA_W   = $clog2(PAGE_BYTES),
  localparam int unsigned WA_W   = $clog2(NWORDS),
  localparam int unsigned SEL_W  = $clog2(WORD_BYTES)
) (
  input  logic                    clk,
  // byte port (bus side)
  input  logic                    b_we,
  input  logic [BA_W-1:0]         b_addr,
  input  logic [7:0]              b_wdata,
  output logic [7:0]              b_rdata,
  // word port (array / shadow side)
  input  logic                    w_we,
  input  logic [WA_W-1:0]         w_addr,
  input  logic [8*WORD_BYTES-1:0] w_wdata,
  output logic [8*WORD_BYTES-1:0] w_rdata
);
  logic [8*WORD_BYTES-1:0] mem [NWORDS];

  logic [WA_W-1:0]  b_word;
  logic [SEL_W-1:0] b_sel;
  assign b_word = b_addr[BA_W-1:SEL_W];
  assign b_sel  = b_addr[SEL_W-1:0];

  always_ff @(posedge clk) begin
    if (w_we)
      mem[w_addr] <= w_wdata;
    if (b_we && !(w_we && b_word == w_addr))
      mem[b_word][8*b_sel +: 8] <= b_wdata;
  end

  always_comb begin
    w_rdata = mem[w_addr];
    b_rdata = mem[b_word][8*b_sel +: 8];
  end
endmodule
