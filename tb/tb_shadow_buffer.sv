// tb_shadow_buffer: writes a page byte by byte in random order and checks every word
// read back on the wide port against a reference copy.
module tb_shadow_buffer;
  localparam int unsigned PAGE = 256, WB = 16, NW = PAGE / WB;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic b_we;
  logic [7:0] b_addr, b_wdata;
  logic [3:0] w_addr;
  logic [127:0] w_rdata;
  shadow_buffer #(.PAGE_BYTES(PAGE), .WORD_BYTES(WB)) dut (.*);

  logic [7:0] ref_mem [PAGE];
  int checks = 0, failures = 0;

  initial begin
    b_we = 0; b_addr = 0; b_wdata = 0; w_addr = 0;
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < PAGE; i++) begin
        int a;
        a = (i * 97 + pass * 13) % PAGE;
        @(negedge clk);
        b_we = 1; b_addr = 8'(a); b_wdata = 8'($urandom); ref_mem[a] = b_wdata;
      end
      @(negedge clk); b_we = 0;
      for (int w = 0; w < NW; w++) begin
        w_addr = 4'(w); #1;
        for (int k = 0; k < WB; k++) begin
          checks++;
          if (w_rdata[8*k +: 8] != ref_mem[w*WB + k]) begin
            failures++; $display("FAIL: word %0d byte %0d", w, k);
          end
        end
      end
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
