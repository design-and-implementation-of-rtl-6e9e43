// Testbench for np_pattern_match at its default sizes.  A small rule
// compiler in the testbench builds a trie of the rule strings and loads
// it: the two-byte prefixes become ranges of the prefix table (sorted
// lower bounds, gaps mapped to "no start"), states with one successor go
// to the non-branching memory and states with several to the branching
// memory.  Packets made from a small alphabet with rule strings planted in
// them are streamed; the reported rule numbers, in order, must equal those
// of a byte-level reference that follows the same one-attempt-at-a-time
// search.  Also checks that a two-byte rule, a branching state and a
// failed attempt all occur.
module tb_np_pattern_match;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  localparam int SW = 11;
  logic in_valid, in_sop, match_valid, wr_en;
  logic [7:0] in_byte;
  logic [9:0] match_rule;
  logic [1:0] wr_sel;
  logic [SW+2:0] wr_addr;
  logic [SW+19:0] wr_data;
  np_pattern_match dut (.*);

  string rules [7] = '{"GET /index", "GET /img", "GEX", "Cookie: id", "cgi-bin", "ab", "Host"};

  // trie
  int child [int][byte];
  int acc [int];
  int depth [int];
  int nnodes = 1;
  int st [int];           // node -> state number
  int nb_next = 0, br_next = 0;

  function automatic logic [SW+19:0] tr(bit v, byte c, int nxt, bit a, int r);
    return {v, 8'(c), SW'(nxt), a, 10'(r)};
  endfunction

  task automatic w(int sel, int addr, logic [SW+19:0] d);
    @(negedge clk); wr_en = 1; wr_sel = 2'(sel); wr_addr = (SW+3)'(addr); wr_data = d;
    @(negedge clk); wr_en = 0;
  endtask

  int n_branch_states = 0;
  task automatic compile();
    int keys [$];
    int knode [int];
    depth[0] = 0; acc[0] = -1;
    foreach (rules[r]) begin
      int n = 0;
      for (int i = 0; i < rules[r].len(); i++) begin
        byte c = rules[r][i];
        if (!child.exists(n) || !child[n].exists(c)) begin
          child[n][c] = nnodes; acc[nnodes] = -1; depth[nnodes] = depth[n] + 1; nnodes++;
        end
        n = child[n][c];
      end
      acc[n] = r;
    end
    // states for nodes of depth >= 2 that have successors
    for (int n = 0; n < nnodes; n++) if (depth[n] >= 2 && child.exists(n)) begin
      if (child[n].num() > 1) begin st[n] = (1 << (SW - 1)) | br_next; br_next++; n_branch_states++; end
      else begin st[n] = nb_next; nb_next++; end
    end
    for (int n = 0; n < nnodes; n++) if (st.exists(n)) begin
      int k = 0;
      foreach (child[n][c]) begin
        int m = child[n][c];
        logic [SW+19:0] d;
        d = tr(1, c, st.exists(m) ? st[m] : 0, acc[m] >= 0, acc[m] >= 0 ? acc[m] : 0);
        if (st[n] >> (SW - 1)) w(3, (st[n] & ((1 << (SW - 1)) - 1)) * 4 + k, d);
        else w(2, st[n], d);
        k++;
      end
    end
    // prefix table ranges
    for (int n = 0; n < nnodes; n++) if (depth[n] == 2) begin
      foreach (child[0][a]) foreach (child[child[0][a]][b]) if (child[child[0][a]][b] == n) begin
        keys.push_back({a, b}); knode[{a, b}] = n;
      end
    end
    keys.sort();
    begin
      int e = 0;
      w(0, e, 0); w(1, e, 0); e++;
      foreach (keys[i]) begin
        int n = knode[keys[i]];
        w(0, e, keys[i]);
        w(1, e, tr(1, 0, st.exists(n) ? st[n] : 0, acc[n] >= 0, acc[n] >= 0 ? acc[n] : 0)); e++;
        if (i == keys.size() - 1 || keys[i+1] != keys[i] + 1) begin w(0, e, keys[i] + 1); w(1, e, 0); e++; end
      end
      while (e < 64) begin w(0, e, 16'hFFFF); w(1, e, 0); e++; end
    end
  endtask

  // reference search over one packet
  int exp_rules [$];
  int n_fail_attempt = 0, n_two = 0;
  task automatic model(byte unsigned p [$]);
    bit run = 0;
    int node = 0;
    for (int j = 0; j < p.size(); j++) begin
      if (run) begin
        if (child.exists(node) && child[node].exists(byte'(p[j]))) begin
          int m = child[node][byte'(p[j])];
          if (acc[m] >= 0) begin exp_rules.push_back(acc[m]); run = 0; end
          else node = m;
        end else begin run = 0; n_fail_attempt++; end
      end else if (j >= 1 && child[0].exists(byte'(p[j-1])) && child[child[0][byte'(p[j-1])]].exists(byte'(p[j]))) begin
        int n = child[child[0][byte'(p[j-1])]][byte'(p[j])];
        if (acc[n] >= 0) begin exp_rules.push_back(acc[n]); n_two++; end
        else begin run = 1; node = n; end
      end
    end
  endtask

  int got_rules [$];
  always @(posedge clk) if (rst_n && match_valid) got_rules.push_back(match_rule);

  initial begin
    string alpha = "GETab /Hoickx:";
    in_valid = 0; in_sop = 0; in_byte = 0; wr_en = 0; wr_sel = 0; wr_addr = 0; wr_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    compile(); $display("compiled nodes=%0d nb=%0d br=%0d", nnodes, nb_next, br_next);
    for (int k = 0; k < 300; k++) begin
      byte unsigned p [$];
      int len;
      p.delete(); len = $urandom_range(4, 80);
      for (int i = 0; i < len; i++) p.push_back(alpha[$urandom_range(0, alpha.len() - 1)]);
      if ($urandom_range(0, 1)) begin
        string r;
        int at;
        r = rules[$urandom_range(0, 6)];
        at = $urandom_range(0, len);
        for (int i = r.len() - 1; i >= 0; i--) p.insert(at, r[i]);
      end
      model(p);
      foreach (p[i]) begin
        @(negedge clk); in_valid = 1; in_sop = (i == 0); in_byte = p[i];
      end
      @(negedge clk); in_valid = 0; in_sop = 0;
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (30) @(posedge clk);
    chk(got_rules.size() == exp_rules.size(), $sformatf("number of matches %0d vs %0d", got_rules.size(), exp_rules.size()));
    for (int i = 0; i < exp_rules.size() && i < got_rules.size(); i++)
      chk(got_rules[i] == exp_rules[i], $sformatf("match %0d: rule %0d vs %0d", i, got_rules[i], exp_rules[i]));
    chk(n_two > 0 && n_branch_states > 0 && n_fail_attempt > 0, "two-byte rule, branching state and failed attempt seen");
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
