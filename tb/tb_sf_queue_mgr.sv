// Testbench for sf_queue_mgr.
// Directed part: three packets from three inputs, one of them multicast,
// are stored while no output has room; the per-priority depths are
// checked, then the outputs open and the read order (strict priority, cells
// of a packet in order) and the release of every cell exactly once (the
// multicast cell after its second read) are checked.
// Random part: interleaved packets from all inputs with random
// destination masks at one priority; every output must read its packets
// whole and in enqueue order, and every cell must be released once.
module tb_sf_queue_mgr;
  import sf_pkg::*;
  localparam int N = 256;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  logic wr_en, wr_sop, wr_eop;
  logic [PW-1:0] wr_port, rd_port;
  logic [7:0] wr_idx, rd_idx, free_idx;
  logic [NPORTS-1:0] wr_mask, out_room;
  logic [PRW-1:0] wr_prio;
  logic rd_en, free_en;
  logic [QDW-1:0] qdepth [NPORTS][NPRIO];
  sf_queue_mgr #(.NCELLS(N)) dut (.*);

  int rdq [NPORTS][$];    // cells read per output
  int freed [N];
  int nfree = 0;
  always @(posedge clk) if (rst_n) begin
    if (rd_en) begin
      chk(out_room[rd_port], "read only with room");
      rdq[rd_port].push_back(rd_idx);
    end
    if (free_en) begin freed[free_idx]++; nfree++; end
  end

  task automatic wcell(int port, int idx, bit s, bit e, logic [15:0] m, int pr);
    @(negedge clk);
    wr_en = 1; wr_port = PW'(port); wr_idx = 8'(idx); wr_sop = s; wr_eop = e; wr_mask = m; wr_prio = PRW'(pr);
    @(negedge clk); wr_en = 0;
  endtask

  int expq [NPORTS][$];
  initial begin
    wr_en = 0; wr_sop = 0; wr_eop = 0; wr_port = 0; wr_idx = 0; wr_mask = 0; wr_prio = 0; out_room = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    wcell(0, 10, 1, 0, 16'h0004, 1);
    wcell(1, 20, 1, 1, 16'h0024, 7);
    wcell(0, 11, 0, 0, 0, 0);
    wcell(3, 30, 1, 0, 16'h0020, 0);
    wcell(0, 12, 0, 1, 0, 0);
    wcell(3, 31, 0, 1, 0, 0);
    @(negedge clk);
    chk(qdepth[2][1] == 3 && qdepth[2][7] == 1 && qdepth[5][7] == 1 && qdepth[5][0] == 2, "depths");
    chk(!rd_en, "no read without room");
    out_room = '1;
    repeat (20) @(negedge clk);
    chk(rdq[2].size() == 4 && rdq[2][0] == 20 && rdq[2][1] == 10 && rdq[2][2] == 11 && rdq[2][3] == 12, "output 2 order");
    chk(rdq[5].size() == 3 && rdq[5][0] == 20 && rdq[5][1] == 30 && rdq[5][2] == 31, "output 5 order");
    chk(nfree == 6 && freed[20] == 1 && freed[10] == 1 && freed[31] == 1, "releases");
    chk(qdepth[2][1] == 0 && qdepth[5][0] == 0 && qdepth[2][7] == 0, "depths drained");
    // ---------------- random part ----------------
    foreach (rdq[o]) rdq[o] = {};
    foreach (freed[c]) freed[c] = 0;
    nfree = 0;
    begin
      int pool [$];
      int pc [NPORTS][$];      // cells of the packet being written per input
      logic [15:0] pm [NPORTS];
      int plen [NPORTS];
      int total = 0;
      for (int c = 0; c < N; c++) pool.push_back(c);
      foreach (plen[i]) plen[i] = 0;
      for (int k = 0; k < 3000; k++) begin
        int i;
        out_room = 16'($urandom);
        i = $urandom_range(0, NPORTS - 1);
        if (pool.size() > 0) begin
          int c;
          bit s, e;
          c = pool.pop_front();
          s = plen[i] == 0;
          if (s) begin plen[i] = $urandom_range(1, 5); pm[i] = 16'($urandom) & 16'($urandom); if (pm[i] == 0) pm[i] = 16'h1; end
          pc[i].push_back(c);
          e = pc[i].size() == plen[i];
          wcell(i, c, s, e, pm[i], 4);
          total++;
          if (e) begin
            for (int o = 0; o < NPORTS; o++) if (pm[i][o]) foreach (pc[i][j]) expq[o].push_back(pc[i][j]);
            pc[i] = {}; plen[i] = 0;
          end
        end else @(negedge clk);
        // recycle released cells
        for (int c = 0; c < N; c++) if (freed[c] == 1) begin freed[c] = 0; pool.push_back(c); end
      end
      // finish open packets, then drain
      for (int i = 0; i < NPORTS; i++)
        while (plen[i] != 0) begin
          int c;
          bit e;
          c = pool.size() > 0 ? pool.pop_front() : -1;
          if (c < 0) begin out_room = '1; @(negedge clk); for (int x = 0; x < N; x++) if (freed[x] == 1) begin freed[x] = 0; pool.push_back(x); end continue; end
          pc[i].push_back(c);
          e = pc[i].size() == plen[i];
          wcell(i, c, 0, e, 0, 0);
          if (e) begin
            for (int o = 0; o < NPORTS; o++) if (pm[i][o]) foreach (pc[i][j]) expq[o].push_back(pc[i][j]);
            pc[i] = {}; plen[i] = 0;
          end
        end
      out_room = '1;
      repeat (N * 17) @(negedge clk);
      for (int o = 0; o < NPORTS; o++) chk(rdq[o] == expq[o], $sformatf("random: output %0d order (%0d vs %0d)", o, rdq[o].size(), expq[o].size()));
      chk(nfree > 0, "random: cells released");
      for (int c = 0; c < N; c++) chk(freed[c] <= 1, "no double release");
      for (int o = 0; o < NPORTS; o++) chk(qdepth[o][4] == 0, "random: depth back to zero");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
