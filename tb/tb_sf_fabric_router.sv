// Testbench for sf_fabric_router: the switching sub-tables and WRED
// settings are written with random contents, then random headers, path
// costs and queue depths are applied and the destination mask and drop
// decision are compared with a reference model kept in the testbench.
// Directed cases check least-cost selection, trunk pinning of a flow,
// multicast loop removal and a table update during operation.
module tb_sf_fabric_router;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  hdr_t hdr;
  logic [PW-1:0] in_port;
  logic [COSTW-1:0] port_cost [NPORTS];
  logic [QDW-1:0] qdepth [NPORTS][NPRIO];
  logic [15:0] rnd;
  logic [NPORTS-1:0] dest_mask, sweep_mask;
  logic drop;
  logic [DW-1:0] sweep_idx;
  logic tbl_we;
  tbl_sel_e tbl_sel;
  logic [DW-1:0] tbl_addr;
  logic [15:0] tbl_wdata;
  sf_fabric_router dut (.*);

  // reference tables
  logic [15:0] m_dest [NDEST];
  logic [15:0] m_loop [NPORTS];
  int          m_trunk [NPORTS];
  int          m_flow [256];
  int          m_min [NPRIO], m_max [NPRIO], m_sh [NPRIO];

  task automatic wr(tbl_sel_e s, int a, int d);
    @(negedge clk); tbl_we = 1; tbl_sel = s; tbl_addr = DW'(a); tbl_wdata = 16'(d);
    @(negedge clk); tbl_we = 0;
  endtask

  function automatic void model(output logic [15:0] m, output bit d);
    int best = -1, bc = 99, mem, sz, depth;
    logic [15:0] cand;
    cand = m_dest[hdr.dest];
    for (int p = 0; p < NPORTS; p++) if (cand[p] && port_cost[p] < bc) begin best = p; bc = port_cost[p]; end
    if (hdr.mcast) m = cand & m_loop[in_port];
    else if (best < 0) m = '0;
    else begin
      sz = 1 << m_trunk[best];
      mem = (best / sz) * sz + (m_flow[hdr.flow[7:0] ^ hdr.flow[15:8]] % sz);
      m = 16'(1) << mem;
    end
    depth = 0;
    for (int p = 0; p < NPORTS; p++) if (m[p] && qdepth[p][hdr.prio] > depth) depth = qdepth[p][hdr.prio];
    if (depth >= m_max[hdr.prio]) d = 1;
    else if (depth <= m_min[hdr.prio]) d = 0;
    else d = rnd < ((depth - m_min[hdr.prio]) << m_sh[hdr.prio]);
  endfunction

  initial begin
    logic [15:0] em; bit ed;
    tbl_we = 0; tbl_sel = TBL_DEST; tbl_addr = 0; tbl_wdata = 0; hdr = '0; in_port = 0; rnd = 0;
    sweep_idx = 0;
    foreach (port_cost[p]) port_cost[p] = 0;
    foreach (qdepth[p, q]) qdepth[p][q] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int d = 0; d < NDEST; d++) begin
      m_dest[d] = (d % 5 == 0) ? 16'h0 : 16'($urandom) & 16'($urandom);
      wr(TBL_DEST, d, m_dest[d]);
    end
    for (int p = 0; p < NPORTS; p++) begin m_loop[p] = 16'($urandom) | 16'h8000; wr(TBL_LOOP, p, m_loop[p]); end
    // trunks: ports 8-11 a group of 4, 12-13 a group of 2, 0-7 one group of 8
    for (int p = 0; p < NPORTS; p++) begin
      m_trunk[p] = (p < 8) ? 3 : (p < 12) ? 2 : (p < 14) ? 1 : 0;
      wr(TBL_TRUNK, p, m_trunk[p]);
    end
    for (int f = 0; f < 256; f++) begin m_flow[f] = $urandom_range(0, 7); wr(TBL_FLOW, f, m_flow[f]); end
    for (int q = 0; q < NPRIO; q++) begin
      m_min[q] = 20 + 10 * q; m_max[q] = m_min[q] + 40; m_sh[q] = 10;
      wr(TBL_WRED, q, m_min[q]); wr(TBL_WRED, 8 + q, m_max[q]); wr(TBL_WRED, 16 + q, m_sh[q]);
    end
    // second read port
    for (int d = 0; d < 20; d++) begin sweep_idx = DW'(d); #1; chk(sweep_mask == m_dest[d], "sweep port"); end
    // random decisions
    for (int k = 0; k < 5000; k++) begin
      hdr.mcast = ($urandom_range(0, 3) == 0); hdr.prio = 3'($urandom); hdr.dest = DW'($urandom);
      hdr.flow = 16'($urandom); in_port = PW'($urandom); rnd = 16'($urandom);
      foreach (port_cost[p]) port_cost[p] = 4'($urandom);
      foreach (qdepth[p, q]) qdepth[p][q] = QDW'($urandom_range(0, 110));
      #1; model(em, ed);
      chk(dest_mask == em, $sformatf("mask %h exp %h dest %0d", dest_mask, em, hdr.dest));
      chk(drop == ed, "drop");
    end
    // directed: least cost among alternatives 1, 9, 14 (14 is not trunked)
    wr(TBL_DEST, 3, 16'h4202); m_dest[3] = 16'h4202;
    foreach (qdepth[p, q]) qdepth[p][q] = 0;
    hdr = '0; hdr.dest = 3;
    foreach (port_cost[p]) port_cost[p] = 9;
    port_cost[14] = 2; #1; chk(dest_mask == 16'h4000, "port 14 cheapest");
    port_cost[14] = 9; port_cost[9] = 1; #1;
    chk(dest_mask == (16'h1 << (8 + m_flow[0] % 4)), "trunk group of port 9 by flow");
    // same flow, same member, whatever the costs inside the group
    port_cost[8] = 0; #1;
    chk(dest_mask == (16'h1 << (8 + m_flow[0] % 4)), "flow stays on its member");
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
