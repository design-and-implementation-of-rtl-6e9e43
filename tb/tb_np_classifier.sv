// Testbench for np_classifier: random ternary rules (with wide don't-care
// fields and a catch-all last rule) and random keys, some
// built to hit chosen rules; the class and hit flag one cycle later are
// compared with a first-match reference.
module tb_np_classifier;
  import np_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  localparam int NR = 32;
  logic key_valid, res_valid, hit, wr_en;
  key_t key, wr_value, wr_care;
  logic [CW-1:0] class_id, wr_class;
  logic [4:0] wr_idx;
  np_classifier dut (.*);

  key_t mv [NR], mc [NR];
  logic [CW-1:0] mcl [NR];
  int nhit = 0, nmiss = 0;
  initial begin
    key_valid = 0; key = '0; wr_en = 0; wr_idx = 0; wr_value = '0; wr_care = '0; wr_class = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < NR; r++) begin
      @(negedge clk);
      wr_en = 1; wr_idx = 5'(r);
      wr_value = key_t'({$urandom, $urandom, $urandom, $urandom});
      wr_care = '0;
      wr_care.sip[7:0] = '1;
      if (r % 2) wr_care.proto = '1;
      if (r % 3 == 0) wr_care.dport = '1;
      if (r % 5 == 0) wr_care.dip[31:24] = '1;
      if (r == NR - 1) wr_care = '0;     // catch-all at the lowest priority
      wr_class = CW'($urandom);
      mv[r] = wr_value; mc[r] = wr_care; mcl[r] = wr_class;
    end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < 3000; n++) begin
      int e;
      @(negedge clk);
      key = key_t'({$urandom, $urandom, $urandom, $urandom});
      if (n % 2) begin int r; r = $urandom_range(0, NR - 1); key = (key & ~mc[r]) | (mv[r] & mc[r]); end
      key_valid = 1;
      e = -1;
      for (int r = 0; r < NR; r++) if (e < 0 && ((key ^ mv[r]) & mc[r]) == '0) e = r;
      @(posedge clk); #1;
      checks++;
      if (!res_valid || class_id !== mcl[e] || hit !== 1'b1) begin
        failures++; if (failures < 5) $display("FAIL key %h exp rule %0d", key, e);
      end
      if (e == NR - 1) nmiss++; else nhit++;
    end
    @(negedge clk); key_valid = 0;
    @(posedge clk); #1; checks++; if (res_valid) failures++;
    checks++; if (nhit == 0 || nmiss == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
