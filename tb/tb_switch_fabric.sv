// End-to-end testbench of switch_fabric at its default size.
// Senders on all 16 ports transmit packets that carry a fabric header, a
// 32-bit packet id and a payload derived from the id; receivers on all 16
// ports rebuild the packets and check header, id and payload, and that
// each packet leaves on a port its destination allows.  Afterwards every
// packet must have arrived on all its expected ports or on none, and the
// packets that arrived nowhere must equal the drops the fabric reported.
// Phases: mixed unicast/multicast/trunk/alternative-path traffic; WRED
// congestion on one port; jumbo frames from 15 ports into one port that
// fill the shared memory (admission refusals and stalls with rx_pause).
// Every mechanism is counted and must occur at least once.
module tb_switch_fabric;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  logic [NPORTS-1:0] rx_valid, rx_sop, rx_eop, rx_pause, tx_valid, tx_sop, tx_eop;
  logic [7:0] rx_data [NPORTS], tx_data [NPORTS];
  pmsg_t bwd_in [NPORTS], bwd_out;
  logic tbl_we;
  tbl_sel_e tbl_sel;
  logic [DW-1:0] tbl_addr;
  logic [15:0] tbl_wdata;
  logic ev_drop_wred, ev_drop_noroute, ev_drop_full, ev_stall_nocell, ev_overflow, ev_mcast,
        ev_path_diff, ev_path_refresh;
  switch_fabric dut (.*);

  // ---------------- configuration ----------------
  localparam int D_MC = 100, D_ALT = 200, D_TRUNK = 300, D_NONE = 400;
  logic [15:0] dmask [NDEST];
  int flow_m [256];
  task automatic wr(tbl_sel_e s, int a, int d);
    @(negedge clk); tbl_we = 1; tbl_sel = s; tbl_addr = DW'(a); tbl_wdata = 16'(d);
    @(negedge clk); tbl_we = 0;
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
      rx_valid[i] = 0; rx_sop[i] = 0; rx_eop[i] = 0; rx_data[i] = 0; sending[i] = 0;
      forever begin
        @(negedge clk);
        if (txq[i].size() != 0) begin
          int id, n;
          id = txq[i].pop_front(); n = pk[id].len; sending[i] = 1;
          for (int b = 0; b < n; b++) begin
            while (rx_pause[i]) begin rx_valid[i] = 0; @(negedge clk); end
            rx_valid[i] = 1; rx_data[i] = pbyte(id, b); rx_sop[i] = (b == 0); rx_eop[i] = (b == n - 1);
            @(negedge clk);
          end
          rx_valid[i] = 0; rx_sop[i] = 0; rx_eop[i] = 0; sending[i] = 0;
        end
      end
    end
  end

  // one receiver per port
  byte unsigned rxb [NPORTS][$];
  int nrx = 0, n_alt10 = 0, n_alt11 = 0, n_trunk13 = 0, n_trunk12 = 0;
  always @(posedge clk) if (rst_n)
    for (int o = 0; o < NPORTS; o++) if (tx_valid[o]) begin
      if (tx_sop[o]) rxb[o] = {};
      rxb[o].push_back(tx_data[o]);
      if (tx_eop[o]) begin
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
    n_wred += ev_drop_wred; n_noroute += ev_drop_noroute; n_full += ev_drop_full;
    n_stall += ev_stall_nocell; n_ovf += ev_overflow; n_mc += ev_mcast;
    n_diff += ev_path_diff; n_ref += ev_path_refresh;
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
    tbl_we = 0; tbl_sel = TBL_DEST; tbl_addr = 0; tbl_wdata = 0;
    foreach (bwd_in[p]) bwd_in[p] = '0;
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
    bwd_in[10] = '{valid: 1'b1, idx: DW'(D_ALT), cost: 4'd15};
    bwd_in[11] = '{valid: 1'b1, idx: DW'(D_ALT), cost: 4'd0};
    @(negedge clk); bwd_in[10].valid = 0; bwd_in[11].valid = 0;

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
