// Testbench for np_ingress_buffer at its default 16 KB: random aligned
// word writes, then random word and double-word reads at every alignment,
// compared with a byte-array model; one result per cycle.
module tb_np_ingress_buffer;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int BYTES = 16384;
  logic wr_en, rd_en, rd_dword;
  logic [11:0] wr_addr;
  logic [31:0] wr_data, rd_data;
  logic [13:0] rd_addr;
  np_ingress_buffer dut (.*);

  byte unsigned mem [BYTES];
  int align_seen [4];
  initial begin
    wr_en = 0; rd_en = 0; rd_dword = 0; wr_addr = 0; wr_data = 0; rd_addr = 0;
    for (int w = 0; w < BYTES / 4; w++) begin
      @(negedge clk); wr_en = 1; wr_addr = 12'(w); wr_data = $urandom;
      for (int k = 0; k < 4; k++) mem[4*w + k] = wr_data[31-8*k -: 8];
    end
    @(negedge clk); wr_en = 0;
    // back-to-back reads: request at one edge, check after the next
    for (int n = 0; n < 4000; n++) begin
      int a;
      bit dw;
      logic [31:0] exp;
      a = (n < 8) ? BYTES - 1 - n : $urandom_range(0, BYTES - 1);
      dw = 1'($urandom);
      @(negedge clk); rd_en = 1; rd_addr = 14'(a); rd_dword = dw;
      @(posedge clk); #1;
      exp = {mem[a], mem[(a+1) % BYTES], dw ? mem[(a+2) % BYTES] : 8'h0, dw ? mem[(a+3) % BYTES] : 8'h0};
      checks++;
      if (rd_data !== exp) begin
        failures++;
        if (failures < 5) $display("FAIL addr %0d dw %0d got %h exp %h", a, dw, rd_data, exp);
      end
      align_seen[a % 4]++;
    end
    checks++; if (align_seen[1] == 0 || align_seen[3] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
