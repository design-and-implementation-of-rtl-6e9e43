// Testbench for sf_path_analyzer.  The testbench plays the downstream
// devices (messages on the TX backward channels), supplies queue lengths
// and the route mask of each destination, and keeps its own model of the
// cost table.  Checks: every difference message carries the model's cost;
// refresh messages do too once a sweep has passed since the change; once
// the inputs are stable only refresh messages flow and they visit every
// destination; a change of one remote entry or one queue length produces
// difference messages for exactly the affected destinations; port_cost
// answers for a queried destination.
module tb_sf_path_analyzer;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  pmsg_t bwd_in [NPORTS];
  logic [QDW-1:0] qlen [NPORTS];
  logic [DW-1:0] sweep_idx, query_dest;
  logic [NPORTS-1:0] sweep_mask;
  logic [COSTW-1:0] port_cost [NPORTS];
  pmsg_t bwd_out;
  logic sent_diff, sent_refresh;
  sf_path_analyzer dut (.*);

  int remote [NPORTS][NDEST];
  function automatic logic [15:0] route(int d);
    return (d % 7 == 0) ? 16'h0 : 16'((d * 40503) >> 3) | 16'(1 << (d % 16));
  endfunction
  assign sweep_mask = route(sweep_idx);

  function automatic int lvl(int p);
    int l = qlen[p] >> 5;
    return l > 15 ? 15 : l;
  endfunction
  function automatic int model(int d);
    int c = 15;
    logic [15:0] m = route(d);
    for (int p = 0; p < NPORTS; p++) if (m[p]) begin
      int v = remote[p][d] > lvl(p) ? remote[p][d] : lvl(p);
      if (v < c) c = v;
    end
    return c;
  endfunction

  int ndiff, nref, bad, badr;
  bit seen [NDEST];
  bit diffat [NDEST];
  bit checking = 0;
  always @(posedge clk) if (rst_n && checking) begin
    if (bwd_out.valid) begin
      if (model(bwd_out.idx) != bwd_out.cost) begin if (sent_diff) bad++; else badr++; end
      seen[bwd_out.idx] = 1;
      if (sent_diff) begin ndiff++; diffat[bwd_out.idx] = 1; end
      if (sent_refresh) nref++;
    end
  end

  task automatic send_remote(int p, int d, int c);
    @(negedge clk); bwd_in[p] = '{valid: 1'b1, idx: DW'(d), cost: COSTW'(c)}; remote[p][d] = c;
    @(negedge clk); bwd_in[p].valid = 0;
  endtask
  task automatic window(int n);
    ndiff = 0; nref = 0; bad = 0; badr = 0;
    foreach (seen[d]) begin seen[d] = 0; diffat[d] = 0; end
    checking = 1; repeat (n) @(posedge clk); checking = 0;
  endtask

  initial begin
    foreach (bwd_in[p]) bwd_in[p] = '0;
    foreach (qlen[p]) qlen[p] = QDW'(p * 40);
    query_dest = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (remote[p, d]) remote[p][d] = 0;
    // the PI tables start unknown: fill them all
    for (int d = 0; d < NDEST; d++)
      for (int p = 0; p < NPORTS; p++) begin
        @(negedge clk); bwd_in[p] = '{valid: 1'b1, idx: DW'(d), cost: COSTW'($urandom)}; remote[p][d] = bwd_in[p].cost;
      end
    @(negedge clk); foreach (bwd_in[p]) bwd_in[p].valid = 0;
    repeat (2 * NDEST + 10) @(posedge clk);
    // steady state
    window(4 * NDEST);
    chk(bad == 0 && badr == 0, $sformatf("steady: %0d wrong costs", bad + badr));
    chk(ndiff == 0, "steady: no differences");
    chk(nref > 3 * NDEST, "steady: refresh flows");
    begin int ns = 0; foreach (seen[d]) ns += seen[d]; chk(ns == NDEST, "refresh visits every destination"); end
    // one remote entry drops to 0 where the route has port 3
    begin
      int d0 = 3 + 16 * 5, prevc;
      prevc = model(d0);
      send_remote(3, d0, 0);
      window(2 * NDEST);
      chk(bad == 0, "after remote change: costs");
      if (model(d0) != prevc) chk(diffat[d0] && ndiff == 1, $sformatf("exactly one difference (%0d)", ndiff));
      else chk(ndiff == 0, "no difference when cost unchanged");
    end
    // a queue fills up: destinations routed via that port may change
    begin
      int changed = 0, expd = 0;
      int old [NDEST];
      for (int d = 0; d < NDEST; d++) old[d] = model(d);
      @(negedge clk); qlen[0] = 14'd2000; qlen[1] = 0;
      for (int d = 0; d < NDEST; d++) if (model(d) != old[d]) expd++;
      window(2 * NDEST);
      chk(bad == 0, "after queue change: costs");
      chk(ndiff == expd && expd > 0, $sformatf("differences %0d expected %0d", ndiff, expd));
    end
    // after one more sweep refreshes carry the new costs too
    window(2 * NDEST);
    chk(bad == 0 && badr == 0 && ndiff == 0, "steady again");
    // router query
    for (int k = 0; k < 50; k++) begin
      query_dest = DW'($urandom); #1;
      for (int p = 0; p < NPORTS; p++)
        chk(port_cost[p] == (remote[p][query_dest] > lvl(p) ? remote[p][query_dest] : lvl(p)), "port_cost");
    end
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
