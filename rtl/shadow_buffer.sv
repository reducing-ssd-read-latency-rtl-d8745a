// shadow_buffer: replica of the page buffer for program suspension.
//
// While the page data of a program arrives over the bus, every byte written into the
// page buffer is written here too, so the shadow copy is complete when the program
// starts and costs no time of its own. A read serviced during a suspended program
// overwrites the page buffer; on resumption the write state machine copies this buffer
// back, one WORD_BYTES-wide word per clock over a parallel path, which fits in the
// 3 us load time (256 words of 16 bytes at 100 MHz). The shadow buffer itself is the
// document's proposal; loading it by mirroring bus writes, and the word-wide restore
// path, are this design's choices. Byte writes land on the rising edge; the word read
// is combinational. Not reset: its content is data.
module shadow_buffer #(
  parameter int unsigned PAGE_BYTES = 4096,
  parameter int unsigned WORD_BYTES = 16,
  localparam int unsigned NWORDS = PAGE_BYTES / WORD_BYTES,
  localparam int unsigned BA_W   = $clog2(PAGE_BYTES),
  localparam int unsigned WA_W   = $clog2(NWORDS),
  localparam int unsigned SEL_W  = $clog2(WORD_BYTES)
) (
  input  logic                    clk,
  input  logic                    b_we,
  input  logic [BA_W-1:0]         b_addr,
  input  logic [7:0]              b_wdata,
  input  logic [WA_W-1:0]         w_addr,
  output logic [8*WORD_BYTES-1:0] w_rdata
);
  logic [8*WORD_BYTES-1:0] mem [NWORDS];

  always_ff @(posedge clk)
    if (b_we) mem[b_addr[BA_W-1:SEL_W]][8*b_addr[SEL_W-1:0] +: 8] <= b_wdata;

  assign w_rdata = mem[w_addr];
endmodule
