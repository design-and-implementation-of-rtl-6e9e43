// Testbench for np_traffic_manager.  Descriptors with random priorities,
// finish times and flows are enqueued; a descriptor with no drop flag two
// edges later joins the testbench's own per-priority FIFOs.  Every dequeue
// must return the head with the earliest finish time (WFQ); full drops
// must occur exactly at 16 queued, and WRED must drop at or above its
// maximum and never at or below its minimum (checked against the model's
// depths while nothing is being dequeued).  Directed phases make each drop reason happen: a flow far above
// its allocation (bandwidth filter), a congested priority with early-drop
// thresholds (WRED) and a queue filled to its depth (full).
module tb_np_traffic_manager;
  import np_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  logic enq_valid, deq_valid, deq_ready, drop_bw, drop_wred, drop_full;
  desc_t enq_desc, deq_desc;
  logic [4:0] win_shift;
  logic [4:0] wred_min [NQ], wred_max [NQ];
  logic [3:0] wred_shift [NQ];
  np_traffic_manager dut (.*);

  desc_t mq [NQ][$];
  int n_bw = 0, n_wred = 0, n_full = 0, n_deq = 0;

  // Each enqueued descriptor's outcome is visible on the drop flags two
  // clock edges after it was sampled; without a drop it joins the model
  // queue of its priority.  Drop reasons are checked against the model's
  // own depth whenever no dequeue happened in the last two cycles.
  desc_t pipe1, pipe2;
  bit    pv1 = 0, pv2 = 0;
  int    last_pop = -10, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    n_bw += drop_bw; n_wred += drop_wred; n_full += drop_full;
    if (pv2) begin
      int dep;
      dep = mq[pipe2.prio].size();
      chk(int'(drop_bw) + int'(drop_wred) + int'(drop_full) <= 1, "one drop reason at a time");
      if (cyc - last_pop > 2) begin
        chk(drop_full == (!drop_bw && !drop_wred && dep == 16), "full drop exactly at 16 queued");
        if (!drop_bw) begin
          if (dep >= wred_max[pipe2.prio] && dep < 16) chk(drop_wred, "WRED drops at or above max");
          if (dep <= wred_min[pipe2.prio]) chk(!drop_wred, "no WRED drop at or below min");
        end
      end
      if (!drop_bw && !drop_wred && !drop_full) mq[pipe2.prio].push_back(pipe2);
    end
    if (deq_valid && deq_ready) begin
      int best;
      best = -1;
      for (int q = NQ - 1; q >= 0; q--)
        if (mq[q].size() != 0 && (best < 0 || $signed(mq[q][0].ts - mq[best][0].ts) < 0)) best = q;
      chk(best >= 0 && deq_desc == mq[best][0], "dequeue is the earliest finish time");
      if (best >= 0) void'(mq[best].pop_front());
      n_deq++;
      last_pop = cyc;
    end
    pv2 = pv1; pipe2 = pipe1;
    pv1 = enq_valid; pipe1 = enq_desc;
  end

  task automatic enq(desc_t d);
    @(negedge clk); enq_valid = 1; enq_desc = d;
    @(negedge clk); enq_valid = 0;
  endtask

  int tbase = 60000;
  function automatic desc_t rd(int prio, int flow, int alloc);
    desc_t d;
    d.prio = 3'(prio); d.flow = 8'(flow); d.len = 14'($urandom_range(64, 1500));
    // finish times advance with time and stay within half the 16-bit range
    d.alloc = 20'(alloc); d.ts = 16'(tbase + $urandom_range(0, 3000)); d.ptr = 16'($urandom);
    tbase += 150;
    return d;
  endfunction

  initial begin
    enq_valid = 0; enq_desc = '0; deq_ready = 0; win_shift = 12;
    for (int q = 0; q < NQ; q++) begin wred_min[q] = 5'd16; wred_max[q] = 5'd17; wred_shift[q] = 0; end
    wred_min[2] = 5'd2; wred_max[2] = 5'd10; wred_shift[2] = 4'd13;
    repeat (2) @(posedge clk); rst_n = 1;
    // random traffic with back-pressure
    for (int n = 0; n < 600; n++) begin
      deq_ready = ($urandom_range(0, 2) == 0);
      enq(rd($urandom_range(3, 7), $urandom_range(0, 50), 1000000));
    end
    deq_ready = 1; repeat (100) @(posedge clk); deq_ready = 0;
    // bandwidth filter: flow 200 allowed 3000 bytes per window
    for (int n = 0; n < 20; n++) enq(rd(4, 200, 3000));
    // WRED on priority 2
    for (int n = 0; n < 30; n++) enq(rd(2, 201, 1000000));
    // full queue on priority 5
    for (int n = 0; n < 20; n++) enq(rd(5, 202, 1000000));
    deq_ready = 1; repeat (200) @(posedge clk);
    for (int q = 0; q < NQ; q++) chk(mq[q].size() == 0, "all accepted descriptors left");
    $display("COUNT deq=%0d bw=%0d wred=%0d full=%0d", n_deq, n_bw, n_wred, n_full);
    chk(n_bw > 0 && n_wred > 0 && n_full > 0, "each drop reason happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
