// Testbench for np_wfq_sched: random valid masks and finish times (with
// wrap-around) against a reference that finds the earliest finish time,
// ties to the higher queue.
module tb_np_wfq_sched;
  int checks = 0, failures = 0;
  logic [7:0] q_valid, grant;
  logic [15:0] q_ts [8];
  np_wfq_sched dut (.*);
  initial begin
    for (int n = 0; n < 20000; n++) begin
      int best;
      logic [15:0] base;
      logic [7:0] exp;
      base = 16'($urandom);
      q_valid = 8'($urandom);
      for (int q = 0; q < 8; q++) q_ts[q] = base + 16'($urandom_range(0, (n % 2) ? 3 : 20000));
      #1;
      best = -1;
      for (int q = 7; q >= 0; q--)
        if (q_valid[q] && (best < 0 || $signed(q_ts[q] - q_ts[best]) < 0)) best = q;
      exp = best < 0 ? 8'h0 : 8'(1 << best);
      checks++;
      if (grant !== exp) begin failures++; if (failures < 5) $display("FAIL v=%b g=%b exp=%b", q_valid, grant, exp); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
