// tb_pm_rules.svh - shared testbench code for the content rules of the
// pattern matching engine (included inside a testbench module).
// Holds a fixed set of rule strings, compiles them into a trie and loads
// it through the including module's task pm_w(sel, addr, data): two-byte
// prefixes become sorted prefix-table ranges (gaps map to "no start"),
// states with one successor go to the non-branching memory, states with
// several to the branching memory.  pm_model() is the byte-level reference
// search (one attempt at a time, restart only when no attempt runs) and
// returns the rule numbers found in a packet in order.  The including
// module must define SW (state field width) and pm_w.
string pm_rules [7] = '{"GET /index", "GET /img", "GEX", "Cookie: id", "cgi-bin", "ab", "Host"};
int pm_child [int][byte];
int pm_acc [int];
int pm_depth [int];
int pm_nnodes = 1;
int pm_st [int];
int pm_nb = 0, pm_br = 0;

function automatic logic [SW+19:0] pm_tr(bit v, byte c, int nxt, bit a, int r);
  return {v, 8'(c), SW'(nxt), a, 10'(r)};
endfunction

task automatic pm_compile();
  int keys [$];
  int knode [int];
  pm_depth[0] = 0; pm_acc[0] = -1;
  foreach (pm_rules[r]) begin
    int n;
    n = 0;
    for (int i = 0; i < pm_rules[r].len(); i++) begin
      byte c;
      c = pm_rules[r][i];
      if (!pm_child.exists(n) || !pm_child[n].exists(c)) begin
        pm_child[n][c] = pm_nnodes; pm_acc[pm_nnodes] = -1; pm_depth[pm_nnodes] = pm_depth[n] + 1;
        pm_nnodes++;
      end
      n = pm_child[n][c];
    end
    pm_acc[n] = r;
  end
  for (int n = 0; n < pm_nnodes; n++) if (pm_depth[n] >= 2 && pm_child.exists(n)) begin
    if (pm_child[n].num() > 1) begin pm_st[n] = (1 << (SW - 1)) | pm_br; pm_br++; end
    else begin pm_st[n] = pm_nb; pm_nb++; end
  end
  for (int n = 0; n < pm_nnodes; n++) if (pm_st.exists(n)) begin
    int k;
    k = 0;
    foreach (pm_child[n][c]) begin
      int m;
      logic [SW+19:0] d;
      m = pm_child[n][c];
      d = pm_tr(1, c, pm_st.exists(m) ? pm_st[m] : 0, pm_acc[m] >= 0, pm_acc[m] >= 0 ? pm_acc[m] : 0);
      if ((pm_st[n] >> (SW - 1)) != 0) pm_w(3, (pm_st[n] & ((1 << (SW - 1)) - 1)) * 4 + k, d);
      else pm_w(2, pm_st[n], d);
      k++;
    end
  end
  for (int n = 0; n < pm_nnodes; n++) if (pm_depth[n] == 2)
    foreach (pm_child[0][a]) foreach (pm_child[pm_child[0][a]][b])
      if (pm_child[pm_child[0][a]][b] == n) begin
        keys.push_back(int'({a, b})); knode[int'({a, b})] = n;
      end
  keys.sort();
  begin
    int e;
    e = 0;
    pm_w(0, e, 0); pm_w(1, e, 0); e++;
    foreach (keys[i]) begin
      int n;
      n = knode[keys[i]];
      pm_w(0, e, keys[i]);
      pm_w(1, e, pm_tr(1, 0, pm_st.exists(n) ? pm_st[n] : 0, pm_acc[n] >= 0, pm_acc[n] >= 0 ? pm_acc[n] : 0));
      e++;
      if (i == keys.size() - 1 || keys[i+1] != keys[i] + 1) begin pm_w(0, e, keys[i] + 1); pm_w(1, e, 0); e++; end
    end
    while (e < 64) begin pm_w(0, e, 16'hFFFF); pm_w(1, e, 0); e++; end
  end
endtask

task automatic pm_model(input byte unsigned p [$], ref int found [$]);
  bit run;
  int node;
  run = 0; node = 0; found.delete();
  for (int j = 0; j < p.size(); j++) begin
    if (run) begin
      if (pm_child.exists(node) && pm_child[node].exists(byte'(p[j]))) begin
        int m;
        m = pm_child[node][byte'(p[j])];
        if (pm_acc[m] >= 0) begin found.push_back(pm_acc[m]); run = 0; end
        else node = m;
      end else run = 0;
    end else if (j >= 1 && pm_child[0].exists(byte'(p[j-1])) &&
                 pm_child[pm_child[0][byte'(p[j-1])]].exists(byte'(p[j]))) begin
      int n;
      n = pm_child[pm_child[0][byte'(p[j-1])]][byte'(p[j])];
      if (pm_acc[n] >= 0) found.push_back(pm_acc[n]);
      else begin run = 1; node = n; end
    end
  end
endtask

// random packet bytes with, half of the time, one rule string planted
task automatic pm_packet(int len, ref byte unsigned p [$]);
  string alpha;
  alpha = "GETab /Hoickx:";
  p.delete();
  for (int i = 0; i < len; i++) p.push_back(alpha[$urandom_range(0, alpha.len() - 1)]);
  if ($urandom_range(0, 1) != 0) begin
    string r;
    int at;
    r = pm_rules[$urandom_range(0, 6)];
    at = $urandom_range(0, len - r.len());
    for (int i = 0; i < r.len(); i++) p[at + i] = r[i];
  end
endtask
