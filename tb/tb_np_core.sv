// End-to-end testbench of np_core at its default sizes.
// Configures the classifier (three rules and a catch-all), the jump table
// and the content rules (tb_pm_rules.svh), then streams packets into
// ingress-buffer slots as an ingress controller would: bytes go to the
// matcher while aligned words are written into the slot, and the 5-tuple
// key is presented with byte 20 (where an IPv4 header would have been
// parsed; it must come at least PM_LAT-1 cycles after the first byte).
// Four modelled packet processors take jobs, check slot, decision (class,
// hit, lowest matched rule) and jump-table start address, read random
// unaligned words/double words of their packet and compare them with the
// bytes sent, then enqueue a descriptor into the traffic manager.  A phase
// with all processors stalled forces job-scheduler overflow, a phase with
// the egress stopped forces WRED and full drops, and small allocations
// force bandwidth-filter drops.  Bytes arrive back to back at one per
// cycle (2 Gbps at 250 MHz) and every decision must leave 9 cycles after
// its packet's last byte.  Traffic-manager conservation
// (enqueued = dequeued + dropped, each descriptor dequeued once) is checked.
// Every mechanism is counted and must happen at least once.
module tb_np_core;
  import np_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  localparam int SW = 11;
  logic           in_valid, in_sop, in_eop, key_valid, ib_wr_en, ib_rd_en, ib_rd_dword;
  logic [7:0]     in_byte;
  logic [3:0]     in_slot;
  key_t           key;
  logic [11:0]    ib_wr_addr;
  logic [31:0]    ib_wr_data, ib_rd_data;
  logic [NPP-1:0] pp_idle, pp_start;
  job_t           pp_job;
  logic [PCW-1:0] pp_pc;
  logic [13:0]    ib_rd_addr;
  logic           tm_enq_valid, tm_deq_valid, tm_deq_ready;
  desc_t          tm_enq_desc, tm_deq_desc;
  logic           cls_wr_en, pm_wr_en, jt_we;
  logic [4:0]     cls_wr_idx;
  key_t           cls_wr_value, cls_wr_care;
  logic [CW-1:0]  cls_wr_class, jt_class;
  logic [1:0]     pm_wr_sel;
  logic [SW+2:0]  pm_wr_addr;
  logic [SW+19:0] pm_wr_data;
  logic [PCW-1:0] jt_addr;
  logic [4:0]     tm_win_shift;
  logic [4:0]     tm_wred_min [NQ], tm_wred_max [NQ];
  logic [3:0]     tm_wred_shift [NQ];
  logic           ev_match, ev_job_full, ev_drop_bw, ev_drop_wred, ev_drop_full;
  np_core dut (.*);

  task automatic pm_w(int sel, int addr, logic [SW+19:0] d);
    @(negedge clk); pm_wr_en = 1; pm_wr_sel = 2'(sel); pm_wr_addr = (SW+3)'(addr); pm_wr_data = d;
    @(negedge clk); pm_wr_en = 0;
  endtask
  `include "tb_pm_rules.svh"

  // classifier model: rule 0 TCP port 80, rule 1 UDP, rule 2 dst 10.0.0.0/8, 31 catch-all
  key_t cv [4], cc [4];
  int   ccls [4] = '{10, 20, 30, 1};
  int   cidx [4] = '{0, 1, 2, 31};
  function automatic int cls_of(key_t k);
    for (int r = 0; r < 4; r++) if (((k ^ cv[r]) & cc[r]) == '0) return ccls[r];
    return 0;
  endfunction
  function automatic int pc_of(int c); return 12'(c * 37 + 5); endfunction

  // scoreboard
  byte unsigned pkt_bytes [16][$];
  bit           slot_busy [16];
  decision_t    exp_dec [$];
  int           exp_slot [$];
  job_t         exp_job [$];
  int n_pkt = 0, n_dec = 0, n_hit = 0, n_job_full = 0, n_dispatch = 0, n_unaligned = 0, n_reads = 0;
  int n_enq = 0, n_deq = 0, n_bw = 0, n_wred = 0, n_full = 0, n_match = 0;
  bit stall_pp = 0, stop_egress = 0, all_sent = 0;

  // decisions leaving the decision logic, in packet order; each must leave
  // PM_LAT+1 = 9 cycles after its packet's last byte (well inside the
  // about 40 cycles allowed for the whole L7 path)
  int cyc = 0, eop_cyc [$];
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && dut.dec_valid) begin
    decision_t e;
    int s, lat;
    e = exp_dec.pop_front(); s = exp_slot.pop_front();
    lat = cyc - eop_cyc.pop_front();
    chk(lat == 9, $sformatf("decision latency %0d cycles", lat));
    n_dec++;
    chk(dut.dec == e, $sformatf("decision %0d: %h vs %h", n_dec, dut.dec, e));
    chk(dut.job.slot == 4'(s), "decision slot");
    if (e.hit) n_hit++;
    if (dut.job_ready) exp_job.push_back('{slot: 4'(s), dec: e});
    else begin n_job_full++; slot_busy[s] = 0; end
  end
  always @(posedge clk) if (rst_n && ev_match) n_match++;

  // packet processors
  typedef struct { int addr; bit dw; } rd_t;
  rd_t   rdq [$];
  desc_t enqq [$];
  int    busy [NPP];
  int    pslot [NPP];
  int    ptr_id = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NPP; i++) if (pp_start[i]) begin
      job_t e;
      e = exp_job.pop_front();
      n_dispatch++;
      chk(busy[i] == 0, "start on idle processor");
      chk(pp_job == e, $sformatf("job %h vs %h", pp_job, e));
      chk(pp_pc == 12'(pc_of(e.dec.class_id)), "jump table address");
      pslot[i] = e.slot;
      busy[i] = stall_pp ? 3000 : $urandom_range(10, 150);
      for (int k = 0; k < 3; k++) begin
        rd_t r;
        r.dw = $urandom_range(0, 1);
        r.addr = e.slot * 1024 + $urandom_range(0, pkt_bytes[e.slot].size() - 4);
        rdq.push_back(r);
      end
    end
    for (int i = 0; i < NPP; i++) if (busy[i] > 0) begin
      busy[i]--;
      if (busy[i] == 0) begin
        desc_t d;
        d.prio  = stop_egress ? 3'($urandom_range(0, 1)) : 3'($urandom_range(0, 7));
        d.flow  = 8'($urandom_range(0, 255));
        d.len   = 14'(pkt_bytes[pslot[i]].size());
        d.alloc = d.flow >= 200 ? 20'd100 : 20'd1000000;
        d.ts    = 16'(n_enq * 8 + $urandom_range(0, 64));
        d.ptr   = 16'(ptr_id++);
        enqq.push_back(d);
        slot_busy[pslot[i]] = 0;
      end
    end
  end
  always @(negedge clk) begin
    for (int i = 0; i < NPP; i++) pp_idle[i] = rst_n && busy[i] == 0 && !pp_start[i];
  end

  // unaligned reads of the ingress buffer, one per cycle, data one cycle later
  rd_t rd_prev;
  bit  rd_pend = 0;
  always @(posedge clk) begin
    if (rd_pend) begin
      int s, o;
      logic [31:0] x;
      s = rd_prev.addr / 1024; o = rd_prev.addr % 1024;
      x = {pkt_bytes[s][o], pkt_bytes[s][o+1], rd_prev.dw ? pkt_bytes[s][o+2] : 8'h0,
           rd_prev.dw ? pkt_bytes[s][o+3] : 8'h0};
      chk(ib_rd_data == x, $sformatf("ingress read at %0d: %h vs %h", rd_prev.addr, ib_rd_data, x));
      n_reads++;
      if (rd_prev.addr % 4 != 0) n_unaligned++;
    end
    rd_pend <= ib_rd_en;
    if (ib_rd_en) rd_prev <= '{ib_rd_addr, ib_rd_dword};
  end
  always @(negedge clk) begin
    ib_rd_en = 0;
    if (rdq.size() > 0) begin
      rd_t r;
      r = rdq.pop_front();
      ib_rd_en = 1; ib_rd_addr = 14'(r.addr); ib_rd_dword = r.dw;
    end
    tm_enq_valid = 0;
    if (enqq.size() > 0) begin
      tm_enq_valid = 1; tm_enq_desc = enqq.pop_front(); n_enq++;
      live[tm_enq_desc.ptr] = 1;
    end
    tm_deq_ready = !stop_egress && $urandom_range(0, 3) != 0;
  end

  // traffic manager
  bit live [int];
  always @(posedge clk) if (rst_n) begin
    if (tm_deq_valid && tm_deq_ready) begin
      chk(live.exists(tm_deq_desc.ptr), "dequeued descriptor was enqueued once");
      live.delete(tm_deq_desc.ptr);
      n_deq++;
    end
    if (ev_drop_bw)   begin n_bw++;   end
    if (ev_drop_wred) begin n_wred++; end
    if (ev_drop_full) begin n_full++; end
  end

  initial begin
    in_valid = 0; in_sop = 0; in_eop = 0; in_byte = 0; in_slot = 0; key_valid = 0; key = '0;
    ib_wr_en = 0; ib_wr_addr = 0; ib_wr_data = 0; ib_rd_en = 0; ib_rd_addr = 0; ib_rd_dword = 0;
    tm_enq_valid = 0; tm_enq_desc = '0; tm_deq_ready = 0;
    cls_wr_en = 0; cls_wr_idx = 0; cls_wr_value = '0; cls_wr_care = '0; cls_wr_class = 0;
    pm_wr_en = 0; pm_wr_sel = 0; pm_wr_addr = 0; pm_wr_data = 0; jt_we = 0; jt_class = 0; jt_addr = 0;
    tm_win_shift = 10;
    for (int q = 0; q < NQ; q++) begin tm_wred_min[q] = 6; tm_wred_max[q] = 14; tm_wred_shift[q] = 12; end
    tm_wred_min[1] = 31; tm_wred_max[1] = 31;  // priority 1: no early drop, only full
    for (int i = 0; i < NPP; i++) busy[i] = 0;
    pp_idle = '0;
    cv[0] = '{sip: 0, dip: 0, sport: 0, dport: 80, proto: 6};   cc[0] = '{0, 0, 0, 16'hFFFF, 8'hFF};
    cv[1] = '{sip: 0, dip: 0, sport: 0, dport: 0, proto: 17};   cc[1] = '{0, 0, 0, 0, 8'hFF};
    cv[2] = '{sip: 0, dip: 32'h0A000000, sport: 0, dport: 0, proto: 0}; cc[2] = '{0, 32'hFF000000, 0, 0, 0};
    cv[3] = '0; cc[3] = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int r = 0; r < 4; r++) begin
      @(negedge clk); cls_wr_en = 1; cls_wr_idx = 5'(cidx[r]); cls_wr_value = cv[r];
      cls_wr_care = cc[r]; cls_wr_class = 8'(ccls[r]);
    end
    for (int r = 0; r < 4; r++) begin
      @(negedge clk); cls_wr_en = 0; jt_we = 1; jt_class = 8'(ccls[r]); jt_addr = 12'(pc_of(ccls[r]));
    end
    @(negedge clk); jt_we = 0;
    pm_compile();
    for (int k = 0; k < 400; k++) begin
      int s, len;
      byte unsigned p [$];
      int found [$];
      key_t kk;
      decision_t e;
      stall_pp = k >= 60 && k < 80;
      stop_egress = k >= 150 && k < 260;
      // free slot
      s = -1;
      while (s < 0) begin
        for (int i = 0; i < 16; i++) if (!slot_busy[(i + k) % 16] && s < 0) s = (i + k) % 16;
        if (s < 0) @(negedge clk);
      end
      slot_busy[s] = 1;
      len = $urandom_range(24, 120);
      pm_packet(len, p);
      pm_model(p, found);
      kk = '{sip: $urandom, dip: $urandom_range(0, 1) ? {8'h0A, 24'($urandom)} : $urandom,
             sport: 16'($urandom), dport: $urandom_range(0, 1) ? 16'd80 : 16'($urandom),
             proto: $urandom_range(0, 2) == 0 ? 8'd17 : 8'd6};
      e = '0;
      e.class_id = 8'(cls_of(kk));
      foreach (found[i]) if (!e.hit || found[i] < e.rule) begin e.hit = 1; e.rule = 10'(found[i]); end
      exp_dec.push_back(e); exp_slot.push_back(s);
      pkt_bytes[s] = p;
      n_pkt++;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        in_valid = 1; in_byte = p[i]; in_sop = i == 0; in_eop = i == len - 1; in_slot = 4'(s);
        key_valid = i == 20; key = kk;
        if (i == len - 1) eop_cyc.push_back(cyc + 1);
        ib_wr_en = i % 4 == 3 || i == len - 1;
        ib_wr_addr = 12'((s * 1024 + i) / 4);
        ib_wr_data = {p[i - i % 4], i % 4 >= 1 ? p[i - i % 4 + 1] : 8'h0,
                      i % 4 >= 2 ? p[i - i % 4 + 2] : 8'h0, i % 4 >= 3 ? p[i - i % 4 + 3] : 8'h0};
      end
      @(negedge clk); in_valid = 0; in_sop = 0; in_eop = 0; key_valid = 0; ib_wr_en = 0;
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    stall_pp = 0; stop_egress = 0;
    repeat (6000) @(posedge clk);
    chk(exp_dec.size() == 0, "every packet got a decision");
    chk(exp_job.size() == 0, "every job dispatched");
    chk(live.num() == n_bw + n_wred + n_full && n_enq == n_deq + n_bw + n_wred + n_full,
        $sformatf("traffic manager conservation enq=%0d deq=%0d drops=%0d/%0d/%0d left=%0d",
                  n_enq, n_deq, n_bw, n_wred, n_full, live.num()));
    $display("COUNT pkts=%0d decisions=%0d hits=%0d matches=%0d dispatch=%0d job_full=%0d reads=%0d unaligned=%0d enq=%0d deq=%0d bw=%0d wred=%0d full=%0d",
             n_pkt, n_dec, n_hit, n_match, n_dispatch, n_job_full, n_reads, n_unaligned, n_enq, n_deq, n_bw, n_wred, n_full);
    chk(n_hit > 0, "content match decided");
    chk(n_dispatch > 0, "job dispatched");
    chk(n_job_full > 0, "job scheduler full");
    chk(n_unaligned > 0, "unaligned ingress read");
    chk(n_bw > 0, "bandwidth-filter drop");
    chk(n_wred > 0, "WRED drop");
    chk(n_full > 0, "queue-full drop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
