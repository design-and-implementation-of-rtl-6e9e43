// Testbench for np_decision_logic: packets with random numbers of rule
// matches (in random order) and a class arriving before, with or after the
// packet end; the summary must carry the class and the lowest matched rule
// number, and hit only when a rule matched.  A class arriving after the
// end delays the summary by that time.
module tb_np_decision_logic;
  import np_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic pkt_start, match_valid, class_valid, pkt_end, dec_valid;
  logic [9:0] match_rule;
  logic [CW-1:0] class_id;
  decision_t dec;
  np_decision_logic dut (.*);

  decision_t expq [$];
  int nlate = 0, nmulti = 0;
  always @(posedge clk) if (rst_n && dec_valid) begin
    decision_t e;
    e = expq.pop_front();
    checks++;
    if (dec !== e) begin failures++; if (failures < 5) $display("FAIL got %p exp %p", dec, e); end
  end

  task automatic idle();
    pkt_start = 0; match_valid = 0; class_valid = 0; pkt_end = 0;
  endtask

  initial begin
    idle(); match_rule = 0; class_id = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 500; n++) begin
      int len, nm, cls_at, best;
      decision_t e;
      len = $urandom_range(3, 20); nm = $urandom_range(0, 4);
      cls_at = $urandom_range(0, len);   // len: one cycle after the end
      e = '0; e.class_id = CW'($urandom); best = 1024;
      if (nm > 1) nmulti++;
      if (cls_at > len - 1) nlate++;
      for (int c = 0; c <= len; c++) begin
        @(negedge clk); idle();
        if (c == 0) pkt_start = 1;
        if (c == len - 1) pkt_end = 1;
        if (c == cls_at) begin class_valid = 1; class_id = e.class_id; end
        if (c < len && nm > 0 && $urandom_range(0, len / nm) == 0) begin
          match_valid = 1; match_rule = 10'($urandom);
          if (match_rule < best) best = match_rule;
        end
      end
      if (best < 1024) begin e.hit = 1; e.rule = 10'(best); end
      expq.push_back(e);
      @(negedge clk); idle();
      @(negedge clk);
    end
    repeat (5) @(posedge clk);
    checks++; if (expq.size() != 0) begin failures++; $display("FAIL %0d summaries missing", expq.size()); end
    checks++; if (nlate == 0 || nmulti == 0) failures++;
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
