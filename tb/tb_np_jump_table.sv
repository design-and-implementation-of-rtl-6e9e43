// Testbench for np_jump_table: all 256 entries written with random routine
// addresses, then read back in random order and rewritten during use.
module tb_np_jump_table;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [7:0] class_id, wr_class;
  logic [11:0] jump_addr, wr_addr;
  logic wr_en;
  np_jump_table dut (.*);
  logic [11:0] m [256];
  initial begin
    wr_en = 0; class_id = 0; wr_class = 0; wr_addr = 0;
    for (int c = 0; c < 256; c++) begin
      @(negedge clk); wr_en = 1; wr_class = 8'(c); wr_addr = 12'($urandom); m[c] = wr_addr;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      class_id = 8'($urandom);
      wr_en = ($urandom_range(0, 7) == 0); wr_class = 8'($urandom); wr_addr = 12'($urandom);
      #1; checks++;
      if (jump_addr !== m[class_id]) begin failures++; $display("FAIL class %0d", class_id); end
      @(posedge clk); if (wr_en) m[wr_class] = wr_addr;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
