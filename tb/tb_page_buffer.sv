// tb_page_buffer: random byte-port and word-port writes against a reference byte
// array kept in the testbench; checks both read ports after every write, including
// same-cycle writes to one word from both ports (the word write wins).
module tb_page_buffer;
  localparam int unsigned PAGE = 256, WB = 16, NW = PAGE / WB;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic b_we, w_we;
  logic [7:0] b_addr, b_wdata, b_rdata;
  logic [3:0] w_addr;
  logic [127:0] w_wdata, w_rdata;
  page_buffer #(.PAGE_BYTES(PAGE), .WORD_BYTES(WB)) dut (.*);

  logic [7:0] ref_mem [PAGE];
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    b_we = 0; w_we = 0; b_addr = 0; b_wdata = 0; w_addr = 0; w_wdata = 0;
    // fill through the word port
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      w_we = 1; w_addr = 4'(w);
      for (int k = 0; k < WB; k++) begin
        w_wdata[8*k +: 8] = 8'(w * 16 + k + 3);
        ref_mem[w*WB + k] = 8'(w * 16 + k + 3);
      end
    end
    @(negedge clk); w_we = 0;
    for (int n = 0; n < 600; n++) begin
      int bw, ww;
      logic [7:0] ba;
      b_we = 1'($urandom); w_we = 1'($urandom_range(0, 3) == 0);
      ba = 8'($urandom); b_addr = ba; b_wdata = 8'($urandom);
      w_addr = 4'($urandom); w_wdata = {$urandom, $urandom, $urandom, $urandom};
      bw = b_we; ww = w_we;
      @(negedge clk);
      if (ww) for (int k = 0; k < WB; k++) ref_mem[int'(w_addr)*WB + k] = w_wdata[8*k +: 8];
      if (bw && !(ww && ba[7:4] == w_addr)) ref_mem[ba] = b_wdata;
      b_we = 0; w_we = 0;
      b_addr = 8'($urandom); w_addr = 4'($urandom);
      #1;
      check(b_rdata == ref_mem[b_addr], $sformatf("byte read %0d", b_addr));
      for (int k = 0; k < WB; k++)
        check(w_rdata[8*k +: 8] == ref_mem[int'(w_addr)*WB + k], $sformatf("word read %0d.%0d", w_addr, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
