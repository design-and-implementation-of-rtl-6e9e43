// End-to-end testbench of csnp_top at its default (full) size.
// Both halves run at once on the shared clock.
// Network processor: the classifier (three rules and a catch-all), the jump
// table and the content rules (tb_pm_rules.svh) are configured; packets are
// streamed into ingress-buffer slots with their 5-tuple key presented with
// byte 20; four modelled packet processors take jobs, check slot, decision
// (class, hit, lowest matched rule) and start address, make random
// unaligned ingress-buffer reads and enqueue descriptors into the traffic
// manager.  Bytes arrive at one per cycle and each decision must leave 9
// cycles after its packet's last byte.  Phases stall the processors (job-scheduler overflow) and the
// egress (WRED and full drops); small allocations cause bandwidth drops.
// Switch fabric: 16 senders and receivers move packets carrying a fabric
// header, an id and an id-derived payload; received packets are checked
// byte by byte and against the ports their destination allows.  Phases:
// mixed unicast/multicast/trunk/alternative-path traffic, WRED congestion
// on one port, jumbo frames that exhaust the shared memory.  Afterwards
// lost packets must equal reported drops and traffic-manager descriptors
// must be conserved.
// Every mechanism of both halves is counted and must occur at least once.
module tb_csnp_top;
  import np_pkg::*;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask
  bit np_done = 0;

  localparam int SW = 11;
  logic           np_in_valid, np_in_sop, np_in_eop, np_key_valid, np_ib_wr_en, np_ib_rd_en, np_ib_rd_dword;
  logic [7:0]     np_in_byte;
  logic [3:0]     np_in_slot;
  key_t           np_key;
  logic [11:0]    np_ib_wr_addr;
  logic [31:0]    np_ib_wr_data, np_ib_rd_data;
  logic [NPP-1:0] np_pp_idle, np_pp_start;
  job_t           np_pp_job;
  logic [PCW-1:0] np_pp_pc;
  logic [13:0]    np_ib_rd_addr;
  logic           np_tm_enq_valid, np_tm_deq_valid, np_tm_deq_ready;
  desc_t          np_tm_enq_desc, np_tm_deq_desc;
  logic           np_cls_wr_en, np_pm_wr_en, np_jt_we;
  logic [4:0]     np_cls_wr_idx;
  key_t           np_cls_wr_value, np_cls_wr_care;
  logic [CW-1:0]  np_cls_wr_class, np_jt_class;
  logic [1:0]     np_pm_wr_sel;
  logic [SW+2:0]  np_pm_wr_addr;
  logic [SW+19:0] np_pm_wr_data;
  logic [PCW-1:0] np_jt_addr;
  logic [4:0]     np_tm_win_shift;
  logic [4:0]     np_tm_wred_min [NQ], np_tm_wred_max [NQ];
  logic [3:0]     np_tm_wred_shift [NQ];
  logic           np_ev_match, np_ev_job_full, np_ev_drop_bw, np_ev_drop_wred, np_ev_drop_full;
  logic [NPORTS-1:0] sf_rx_valid, sf_rx_sop, sf_rx_eop, sf_rx_pause, sf_tx_valid, sf_tx_sop, sf_tx_eop;
  logic [7:0] sf_rx_data [NPORTS], sf_tx_data [NPORTS];
  pmsg_t sf_bwd_in [NPORTS], sf_bwd_out;
  logic sf_tbl_we;
  tbl_sel_e sf_tbl_sel;
  logic [DW-1:0] sf_tbl_addr;
  logic [15:0] sf_tbl_wdata;
  logic sf_ev_drop_wred, sf_ev_drop_noroute, sf_ev_drop_full, sf_ev_stall_nocell, sf_ev_overflow, sf_ev_mcast,
        sf_ev_path_diff, sf_ev_path_refresh;
  csnp_top dut (.*);

  // ======== network processor ========
  task automatic pm_w(int sel, int addr, logic [SW+19:0] d);
    @(negedge clk); np_pm_wr_en = 1; np_pm_wr_sel = 2'(sel); np_pm_wr_addr = (SW+3)'(addr); np_pm_wr_data = d;
    @(negedge clk); np_pm_wr_en = 0;
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
  int np_n_pkt = 0, np_n_dec = 0, np_n_hit = 0, np_n_job_full = 0, np_n_dispatch = 0, np_n_unaligned = 0, np_n_reads = 0;
  int np_n_enq = 0, np_n_deq = 0, np_n_bw = 0, np_n_wred = 0, np_n_full = 0, np_n_match = 0;
  bit stall_pp = 0, stop_egress = 0, all_sent = 0;

  // decisions leaving the decision logic, in packet order; each must leave
  // PM_LAT+1 = 9 cycles after its packet's last byte (well inside the
  // about 40 cycles allowed for the whole L7 path)
  int cyc = 0, eop_cyc [$];
  always @(posedge clk) cyc++;
  always @(posedge clk) if (rst_n && dut.u_np.dec_valid) begin
    decision_t e;
    int s, lat;
    e = exp_dec.pop_front(); s = exp_slot.pop_front();
    lat = cyc - eop_cyc.pop_front();
    chk(lat == 9, $sformatf("decision latency %0d cycles", lat));
    np_n_dec++;
    chk(dut.u_np.dec == e, $sformatf("decision %0d: %h vs %h", np_n_dec, dut.u_np.dec, e));
    chk(dut.u_np.job.slot == 4'(s), "decision slot");
    if (e.hit) np_n_hit++;
    if (dut.u_np.job_ready) exp_job.push_back('{slot: 4'(s), dec: e});
    else begin np_n_job_full++; slot_busy[s] = 0; end
  end
  always @(posedge clk) if (rst_n && np_ev_match) np_n_match++;

  // packet processors
  typedef struct { int addr; bit dw; } rd_t;
  rd_t   rdq [$];
  desc_t enqq [$];
  int    np_busy [NPP];
  int    pslot [NPP];
  int    ptr_id = 0;
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < NPP; i++) if (np_pp_start[i]) begin
      job_t e;
      e = exp_job.pop_front();
      np_n_dispatch++;
      chk(np_busy[i] == 0, "start on idle processor");
      chk(np_pp_job == e, $sformatf("job %h vs %h", np_pp_job, e));
      chk(np_pp_pc == 12'(pc_of(e.dec.class_id)), "jump table address");
      pslot[i] = e.slot;
      np_busy[i] = stall_pp ? 3000 : $urandom_range(10, 150);
      for (int k = 0; k < 3; k++) begin
        rd_t r;
        r.dw = $urandom_range(0, 1);
        r.addr = e.slot * 1024 + $urandom_range(0, pkt_bytes[e.slot].size() - 4);
        rdq.push_back(r);
      end
    end
    for (int i = 0; i < NPP; i++) if (np_busy[i] > 0) begin
      np_busy[i]--;
      if (np_busy[i] == 0) begin
        desc_t d;
        d.prio  = stop_egress ? 3'($urandom_range(0, 1)) : 3'($urandom_range(0, 7));
        d.flow  = 8'($urandom_range(0, 255));
        d.len   = 14'(pkt_bytes[pslot[i]].size());
        d.alloc = d.flow >= 200 ? 20'd100 : 20'd1000000;
        d.ts    = 16'(np_n_enq * 8 + $urandom_range(0, 64));
        d.ptr   = 16'(ptr_id++);
        enqq.push_back(d);
        slot_busy[pslot[i]] = 0;
      end
    end
  end
  always @(negedge clk) begin
    for (int i = 0; i < NPP; i++) np_pp_idle[i] = rst_n && np_busy[i] == 0 && !np_pp_start[i];
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
      chk(np_ib_rd_data == x, $sformatf("ingress read at %0d: %h vs %h", rd_prev.addr, np_ib_rd_data, x));
      np_n_reads++;
      if (rd_prev.addr % 4 != 0) np_n_unaligned++;
    end
    rd_pend <= np_ib_rd_en;
    if (np_ib_rd_en) rd_prev <= '{np_ib_rd_addr, np_ib_rd_dword};
  end
  always @(negedge clk) begin
    np_ib_rd_en = 0;
    if (rdq.size() > 0) begin
      rd_t r;
      r = rdq.pop_front();
      np_ib_rd_en = 1; np_ib_rd_addr = 14'(r.addr); np_ib_rd_dword = r.dw;
    end
    np_tm_enq_valid = 0;
    if (enqq.size() > 0) begin
      np_tm_enq_valid = 1; np_tm_enq_desc = enqq.pop_front(); np_n_enq++;
      np_live[np_tm_enq_desc.ptr] = 1;
    end
    np_tm_deq_ready = !stop_egress && $urandom_range(0, 3) != 0;
  end

  // traffic manager
  bit np_live [int];
  always @(posedge clk) if (rst_n) begin
    if (np_tm_deq_valid && np_tm_deq_ready) begin
      chk(np_live.exists(np_tm_deq_desc.ptr), "dequeued descriptor was enqueued once");
      np_live.delete(np_tm_deq_desc.ptr);
      np_n_deq++;
    end
    if (np_ev_drop_bw)   begin np_n_bw++;   end
    if (np_ev_drop_wred) begin np_n_wred++; end
    if (np_ev_drop_full) begin np_n_full++; end
  end

  initial begin
    np_in_valid = 0; np_in_sop = 0; np_in_eop = 0; np_in_byte = 0; np_in_slot = 0; np_key_valid = 0; np_key = '0;
    np_ib_wr_en = 0; np_ib_wr_addr = 0; np_ib_wr_data = 0; np_ib_rd_en = 0; np_ib_rd_addr = 0; np_ib_rd_dword = 0;
    np_tm_enq_valid = 0; np_tm_enq_desc = '0; np_tm_deq_ready = 0;
    np_cls_wr_en = 0; np_cls_wr_idx = 0; np_cls_wr_value = '0; np_cls_wr_care = '0; np_cls_wr_class = 0;
    np_pm_wr_en = 0; np_pm_wr_sel = 0; np_pm_wr_addr = 0; np_pm_wr_data = 0; np_jt_we = 0; np_jt_class = 0; np_jt_addr = 0;
    np_tm_win_shift = 10;
    for (int q = 0; q < NQ; q++) begin np_tm_wred_min[q] = 6; np_tm_wred_max[q] = 14; np_tm_wred_shift[q] = 12; end
    np_tm_wred_min[1] = 31; np_tm_wred_max[1] = 31;  // priority 1: no early drop, only full
    for (int i = 0; i < NPP; i++) np_busy[i] = 0;
    np_pp_idle = '0;
    cv[0] = '{sip: 0, dip: 0, sport: 0, dport: 80, proto: 6};   cc[0] = '{0, 0, 0, 16'hFFFF, 8'hFF};
    cv[1] = '{sip: 0, dip: 0, sport: 0, dport: 0, proto: 17};   cc[1] = '{0, 0, 0, 0, 8'hFF};
    cv[2] = '{sip: 0, dip: 32'h0A000000, sport: 0, dport: 0, proto: 0}; cc[2] = '{0, 32'hFF000000, 0, 0, 0};
    cv[3] = '0; cc[3] = '0;
    wait (rst_n);
    for (int r = 0; r < 4; r++) begin
      @(negedge clk); np_cls_wr_en = 1; np_cls_wr_idx = 5'(cidx[r]); np_cls_wr_value = cv[r];
      np_cls_wr_care = cc[r]; np_cls_wr_class = 8'(ccls[r]);
    end
    for (int r = 0; r < 4; r++) begin
      @(negedge clk); np_cls_wr_en = 0; np_jt_we = 1; np_jt_class = 8'(ccls[r]); np_jt_addr = 12'(pc_of(ccls[r]));
    end
    @(negedge clk); np_jt_we = 0;
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
      np_n_pkt++;
      for (int i = 0; i < len; i++) begin
        @(negedge clk);
        np_in_valid = 1; np_in_byte = p[i]; np_in_sop = i == 0; np_in_eop = i == len - 1; np_in_slot = 4'(s);
        np_key_valid = i == 20; np_key = kk;
        if (i == len - 1) eop_cyc.push_back(cyc + 1);
        np_ib_wr_en = i % 4 == 3 || i == len - 1;
        np_ib_wr_addr = 12'((s * 1024 + i) / 4);
        np_ib_wr_data = {p[i - i % 4], i % 4 >= 1 ? p[i - i % 4 + 1] : 8'h0,
                      i % 4 >= 2 ? p[i - i % 4 + 2] : 8'h0, i % 4 >= 3 ? p[i - i % 4 + 3] : 8'h0};
      end
      @(negedge clk); np_in_valid = 0; np_in_sop = 0; np_in_eop = 0; np_key_valid = 0; np_ib_wr_en = 0;
      repeat ($urandom_range(0, 4)) @(negedge clk);
    end
    stall_pp = 0; stop_egress = 0;
    repeat (6000) @(posedge clk);
    np_done = 1;
  end

  task automatic np_final();
    chk(exp_dec.size() == 0, "every packet got a decision");
    chk(exp_job.size() == 0, "every job dispatched");
    chk(np_live.num() == np_n_bw + np_n_wred + np_n_full && np_n_enq == np_n_deq + np_n_bw + np_n_wred + np_n_full,
        $sformatf("traffic manager conservation enq=%0d deq=%0d drops=%0d/%0d/%0d left=%0d",
                  np_n_enq, np_n_deq, np_n_bw, np_n_wred, np_n_full, np_live.num()));
    $display("COUNT np pkts=%0d decisions=%0d hits=%0d matches=%0d dispatch=%0d job_full=%0d reads=%0d unaligned=%0d enq=%0d deq=%0d bw=%0d wred=%0d full=%0d",
             np_n_pkt, np_n_dec, np_n_hit, np_n_match, np_n_dispatch, np_n_job_full, np_n_reads, np_n_unaligned, np_n_enq, np_n_deq, np_n_bw, np_n_wred, np_n_full);
    chk(np_n_hit > 0, "content match decided");
    chk(np_n_dispatch > 0, "job dispatched");
    chk(np_n_job_full > 0, "job scheduler full");
    chk(np_n_unaligned > 0, "unaligned ingress read");
    chk(np_n_bw > 0, "bandwidth-filter drop");
    chk(np_n_wred > 0, "WRED drop");
    chk(np_n_full > 0, "queue-full drop");
  endtask

  // ======== switch fabric ========
  // ---------------- configuration ----------------
  localparam int D_MC = 100, D_ALT = 200, D_TRUNK = 300, D_NONE = 400;
  logic [15:0] dmask [NDEST];
  int flow_m [256];
  task automatic wr(tbl_sel_e s, int a, int d);
    @(negedge clk); sf_tbl_we = 1; sf_tbl_sel = s; sf_tbl_addr = DW'(a); sf_tbl_wdata = 16'(d);
    @(negedge clk); sf_tbl_we = 0;
  endtask

  // ---------------- packets ----------------
  typedef struct { int dest; bit mc; int prio; int flow; int len; } pkt_t;
  pkt_t pk [int];
  logic [15:0] expmask [int];
  int next_id = 1;
  int got [int];          // id -> bitmask of ports where it arrived
  int npkt_sent = 0;

  function automatic byte unsigned pbyte(int id, int i);
    pkt_t p = pk[id];
    case (i)
      0: return {p.mc, 3'(p.prio), 3'b000, 1'(p.dest >> 8)};
      1: return 8'(p.dest);
      2: return 8'(p.flow >> 8);
      3: return 8'(p.flow);
      4, 5, 6, 7: return 8'(id >> (8 * (7 - i)));
      default: return 8'(id * 7 + i);
    endcase
  endfunction

  // one sender per port
  int txq [NPORTS][$];
  bit sending [NPORTS];
  for (genvar i = 0; i < NPORTS; i++) begin : g_tx
    initial begin
      sf_rx_valid[i] = 0; sf_rx_sop[i] = 0; sf_rx_eop[i] = 0; sf_rx_data[i] = 0; sending[i] = 0;
      forever begin
        @(negedge clk);
        if (txq[i].size() != 0) begin
          int id, n;
          id = txq[i].pop_front(); n = pk[id].len; sending[i] = 1;
          for (int b = 0; b < n; b++) begin
            while (sf_rx_pause[i]) begin sf_rx_valid[i] = 0; @(negedge clk); end
            sf_rx_valid[i] = 1; sf_rx_data[i] = pbyte(id, b); sf_rx_sop[i] = (b == 0); sf_rx_eop[i] = (b == n - 1);
            @(negedge clk);
          end
          sf_rx_valid[i] = 0; sf_rx_sop[i] = 0; sf_rx_eop[i] = 0; sending[i] = 0;
        end
      end
    end
  end

  // one receiver per port
  byte unsigned rxb [NPORTS][$];
  int nrx = 0, n_alt10 = 0, n_alt11 = 0, n_trunk13 = 0, n_trunk12 = 0;
  always @(posedge clk) if (rst_n)
    for (int o = 0; o < NPORTS; o++) if (sf_tx_valid[o]) begin
      if (sf_tx_sop[o]) rxb[o] = {};
      rxb[o].push_back(sf_tx_data[o]);
      if (sf_tx_eop[o]) begin
        int id;
        bit ok;
        id = (rxb[o].size() >= 8) ? {rxb[o][4], rxb[o][5], rxb[o][6], rxb[o][7]} : -1;
        ok = pk.exists(id) && rxb[o].size() == pk[id].len;
        if (ok) for (int b = 0; b < rxb[o].size(); b++) if (rxb[o][b] != pbyte(id, b)) ok = 0;
        chk(ok, $sformatf("packet intact on port %0d (id %0d)", o, id));
        if (ok) begin
          chk(expmask[id][o], $sformatf("id %0d on allowed port %0d dest %0d mc %0d exp %h flow %h m %0d", id, o, pk[id].dest, pk[id].mc, expmask[id], pk[id].flow, flow_m[(pk[id].flow & 255) ^ (pk[id].flow >> 8)]));
          chk(((got[id] >> o) & 1) == 0, "no duplicate");
          got[id] |= 1 << o;
          nrx++;
          if (pk[id].dest == D_ALT) begin if (o == 10) n_alt10++; else n_alt11++; end
          if (pk[id].dest == D_TRUNK) begin if (o == 13) n_trunk13++; else n_trunk12++; end
        end
      end
    end

  int n_wred = 0, n_noroute = 0, n_full = 0, n_stall = 0, n_ovf = 0, n_mc = 0, n_diff = 0, n_ref = 0;
  always @(posedge clk) if (rst_n) begin
    n_wred += sf_ev_drop_wred; n_noroute += sf_ev_drop_noroute; n_full += sf_ev_drop_full;
    n_stall += sf_ev_stall_nocell; n_ovf += sf_ev_overflow; n_mc += sf_ev_mcast;
    n_diff += sf_ev_path_diff; n_ref += sf_ev_path_refresh;
  end

  task automatic add(int src, int dest, bit mc, int prio, int len);
    int id = next_id++;
    int h;
    pk[id] = '{dest, mc, prio, $urandom_range(0, 65535), len};
    h = (pk[id].flow & 255) ^ (pk[id].flow >> 8);
    if (mc) expmask[id] = dmask[dest] & ~(16'(1) << src);
    else if (dest == D_ALT) expmask[id] = 16'h0800;                 // port 11 is cheaper
    else if (dest == D_TRUNK) expmask[id] = 16'(1) << (12 + flow_m[h] % 2);
    else if (dmask[dest] & 16'h3000) expmask[id] = 16'(1) << (12 + flow_m[h] % 2);  // trunk 12-13
    else expmask[id] = dmask[dest];
    got[id] = 0;
    txq[src].push_back(id);
    npkt_sent++;
  endtask

  task automatic drain(int maxc);
    int c = 0;
    while (c < maxc) begin
      bit busy = 0;
      for (int i = 0; i < NPORTS; i++) if (txq[i].size() != 0 || sending[i]) busy = 1;
      if (!busy) break;
      @(posedge clk); c++;
    end
    repeat (40000) @(posedge clk);
  endtask

  initial begin
    int sendable;
    sf_tbl_we = 0; sf_tbl_sel = TBL_DEST; sf_tbl_addr = 0; sf_tbl_wdata = 0;
    foreach (sf_bwd_in[p]) sf_bwd_in[p] = '0;
    foreach (dmask[d]) dmask[d] = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int d = 0; d < 16; d++) begin dmask[d] = 16'(1) << d; wr(TBL_DEST, d, dmask[d]); end
    dmask[D_MC] = 16'h00F0;    wr(TBL_DEST, D_MC, dmask[D_MC]);
    dmask[D_ALT] = 16'h0C00;   wr(TBL_DEST, D_ALT, dmask[D_ALT]);
    dmask[D_TRUNK] = 16'h1000; wr(TBL_DEST, D_TRUNK, dmask[D_TRUNK]);
    wr(TBL_DEST, D_NONE, 0);
    for (int i = 0; i < NPORTS; i++) wr(TBL_LOOP, i, ~(1 << i));
    wr(TBL_TRUNK, 12, 1); wr(TBL_TRUNK, 13, 1);   // ports 12 and 13 form a trunk
    for (int f = 0; f < 256; f++) begin flow_m[f] = $urandom_range(0, 7); wr(TBL_FLOW, f, flow_m[f]); end
    // prio 0: early drop between 8 and 64 cells; others: only near full memory
    wr(TBL_WRED, 0, 8); wr(TBL_WRED, 8, 64); wr(TBL_WRED, 16, 10);
    for (int q = 1; q < NPRIO; q++) begin wr(TBL_WRED, q, 16000); wr(TBL_WRED, 8 + q, 16383); end
    // downstream of port 10 reports congestion for D_ALT, port 11 reports none
    @(negedge clk);
    sf_bwd_in[10] = '{valid: 1'b1, idx: DW'(D_ALT), cost: 4'd15};
    sf_bwd_in[11] = '{valid: 1'b1, idx: DW'(D_ALT), cost: 4'd0};
    @(negedge clk); sf_bwd_in[10].valid = 0; sf_bwd_in[11].valid = 0;

    // phase 1: mixed traffic, each output loaded below its rate
    for (int k = 0; k < 30; k++)
      for (int i = 0; i < NPORTS; i++) begin
        int r, len;
        r = $urandom_range(0, 9);
        len = $urandom_range(8, 200);
        if (r < 5)       add(i, $urandom_range(0, 15), 0, $urandom_range(1, 7), len);
        else if (r == 5) add(i, D_MC, 1, 3, len);
        else if (r == 6) add(i, D_ALT, 0, 2, len);
        else if (r == 7) add(i, D_TRUNK, 0, 5, len);
        else if (r == 8 && k % 5 == 0) add(i, D_NONE, 0, 1, len);
        else add(i, (i + 1) % 16, 0, 4, len);
      end
    drain(400000);
    // phase 2: eight ports into port 0 at priority 0
    for (int k = 0; k < 25; k++) for (int i = 1; i <= 8; i++) add(i, 0, 0, 0, 200);
    drain(400000);
    // phase 3: jumbo frames from 15 ports into port 1
    for (int i = 2; i < NPORTS; i++) add(i, 1, 0, 7, 9000);
    repeat (8000) @(posedge clk);
    add(0, 1, 0, 7, 9000); add(1, 1, 0, 7, 9000);    // admitted, then run out of cells
    repeat (1300) @(posedge clk);
    for (int i = 2; i < NPORTS; i++) add(i, 1, 0, 7, 9000);   // refused
    drain(400000);
    repeat (150000) @(posedge clk);

    wait (np_done);
    // accounting
    begin
      int none = 0, partial = 0;
      foreach (pk[id]) begin
        if (got[id] == 0) none++;
        else if (16'(got[id]) != expmask[id]) partial++;
      end
      chk(partial == 0, $sformatf("%0d packets reached only part of their ports", partial));
      chk(none == n_wred + n_noroute + n_full, $sformatf("lost %0d, reported drops %0d", none, n_wred + n_noroute + n_full));
    end
    $display("COUNT sent=%0d delivered=%0d wred=%0d noroute=%0d full=%0d stall=%0d overflow=%0d mcast=%0d alt10=%0d alt11=%0d trunk12=%0d trunk13=%0d diff=%0d refresh=%0d",
             npkt_sent, nrx, n_wred, n_noroute, n_full, n_stall, n_ovf, n_mc, n_alt10, n_alt11, n_trunk12, n_trunk13, n_diff, n_ref);
    chk(n_wred > 0, "WRED drop happened");
    chk(n_noroute > 0, "no-route drop happened");
    chk(n_full > 0, "memory-full refusal happened");
    chk(n_stall > 0, "cell stall happened");
    chk(n_ovf == 0, "no input overflow with pausing senders");
    chk(n_mc > 0, "multicast happened");
    chk(n_alt11 > 0 && n_alt10 == 0, "least-cost path chosen");
    chk(n_trunk12 > 0 && n_trunk13 > 0, "trunk spread flows over both members");
    chk(n_diff > 0 && n_ref > 0, "path differences and refreshes sent");
    np_final();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
