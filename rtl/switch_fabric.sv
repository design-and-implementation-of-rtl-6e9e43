// switch_fabric - 16x16 shared-memory switch fabric with back-propagated
// path information.
// Each of the 16 ports carries 2 Gbps: 8 bits per cycle at 250 MHz.
// Data path: input buffers cut the byte streams into 32-byte cells; a
// round-robin write arbiter moves one cell per cycle into the shared
// memory, at a cell index given by the free cell manager; the queue
// manager links cells into packets and packets into per-output,
// per-priority lists and schedules one cell read per cycle into the output
// buffers, which serialise the bytes again.
// Control: on a packet's first cell the fabric router looks up the
// switching table, picks the output(s) (least-cost path, trunk member by
// flow) and makes the WRED decision; a dropped packet's cells are
// discarded at the input.  A packet is also refused when fewer than
// ADMIT_CELLS cells are free (one 9 KB jumbo frame by default).  A later
// cell of an admitted packet waits in its input buffer while no cell is
// free; rx_pause then asks the sender to hold (this design's addition, so
// that a stalled input loses no cells).  The path analyzer keeps the state received on each TX backward
// channel, merges it with the local queue lengths and sends changes back
// on the RX backward channel.
// Ports, data rate, shared memory, router tables, WRED and path analysis
// follow the document; cell size, memory size, header format and all
// handshakes are this design's choices.  The management interface is left
// out (tables are written through tbl_*).
// Event outputs pulse once per event and are meant for monitoring.
module switch_fabric
  import sf_pkg::*;
#(
  parameter int NCELLS      = 4096,
  parameter int ADMIT_CELLS = (JUMBO_CELLS < NCELLS / 2) ? JUMBO_CELLS : NCELLS / 2,
  localparam int AW = $clog2(NCELLS)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NPORTS-1:0] rx_valid,
  input  logic [7:0]        rx_data [NPORTS],
  input  logic [NPORTS-1:0] rx_sop,
  input  logic [NPORTS-1:0] rx_eop,
  output logic [NPORTS-1:0] rx_pause,        // input buffer nearly full
  output logic [NPORTS-1:0] tx_valid,
  output logic [7:0]        tx_data [NPORTS],
  output logic [NPORTS-1:0] tx_sop,
  output logic [NPORTS-1:0] tx_eop,
  input  pmsg_t             bwd_in [NPORTS],
  output pmsg_t             bwd_out,
  input  logic              tbl_we,
  input  tbl_sel_e          tbl_sel,
  input  logic [DW-1:0]     tbl_addr,
  input  logic [15:0]       tbl_wdata,
  output logic              ev_drop_wred,    // packet dropped by WRED
  output logic              ev_drop_noroute, // packet with no destination
  output logic              ev_drop_full,    // packet refused, memory low
  output logic              ev_stall_nocell, // a cell waited for a free cell
  output logic              ev_overflow,     // an input buffer lost a cell
  output logic              ev_mcast,        // multicast packet admitted
  output logic              ev_path_diff,    // difference message sent
  output logic              ev_path_refresh  // refresh message sent
);
  // ---------------- input buffers ----------------
  logic [NPORTS-1:0] c_valid, c_ready, ovf;
  cell_t             c_cell [NPORTS];
  hdr_t              c_hdr  [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    sf_in_buf u_ib (
      .clk, .rst_n, .rx_valid(rx_valid[i]), .rx_data(rx_data[i]), .rx_sop(rx_sop[i]),
      .rx_eop(rx_eop[i]), .cell_valid(c_valid[i]), .cell_ready(c_ready[i]),
      .cell_o(c_cell[i]), .hdr(c_hdr[i]), .overflow(ovf[i]), .afull(rx_pause[i])
    );
  end
  assign ev_overflow = |ovf;

  // ---------------- write arbitration ----------------
  logic [AW-1:0]     alloc_idx;
  logic [AW:0]       free_count;
  logic [NPORTS-1:0] dropping;      // per input: current packet is discarded
  logic [NPORTS-1:0] req, c_sop;
  logic [PW-1:0]     wrr, wi;
  logic              wv;
  cell_t             w_cell;
  hdr_t              w_hdr;

  // a continuation cell of an admitted packet needs a free cell
  always_comb
    for (int i = 0; i < NPORTS; i++) begin
      c_sop[i] = c_cell[i].sop;
      req[i]   = c_valid[i] && (c_sop[i] || dropping[i] || free_count != 0);
    end

  always_comb begin
    wv = 1'b0; wi = '0;
    for (int k = 0; k < NPORTS; k++) begin
      logic [PW-1:0] i;
      i = wrr + PW'(k);
      if (!wv && req[i]) begin wv = 1'b1; wi = i; end
    end
  end
  assign w_cell = c_cell[wi];
  assign w_hdr  = c_hdr[wi];

  // ---------------- fabric router ----------------
  logic [COSTW-1:0]  port_cost [NPORTS];
  logic [QDW-1:0]    qdepth [NPORTS][NPRIO];
  logic [NPORTS-1:0] r_mask, sweep_mask;
  logic              r_drop;
  logic [DW-1:0]     sweep_idx;
  logic [15:0]       lfsr;

  sf_fabric_router u_router (
    .clk, .rst_n, .hdr(w_hdr), .in_port(wi), .port_cost, .qdepth, .rnd(lfsr),
    .dest_mask(r_mask), .drop(r_drop), .sweep_idx, .sweep_mask,
    .tbl_we, .tbl_sel, .tbl_addr, .tbl_wdata
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) lfsr <= 16'hACE1;
    else        lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};

  // admission of a first cell
  logic admit_ok, no_route, full, discard, do_write;
  assign no_route = r_mask == '0;
  assign full     = free_count < (AW+1)'(ADMIT_CELLS);
  assign admit_ok = !r_drop && !no_route && !full;
  assign discard  = w_cell.sop ? !admit_ok : dropping[wi];
  assign do_write = wv && !discard;

  always_comb begin
    c_ready = '0;
    if (wv) c_ready[wi] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wrr <= '0; dropping <= '0;
      ev_drop_wred <= 1'b0; ev_drop_noroute <= 1'b0; ev_drop_full <= 1'b0;
      ev_stall_nocell <= 1'b0; ev_mcast <= 1'b0;
    end else begin
      if (wv) begin
        wrr <= wi + 1'b1;
        if (w_cell.sop) dropping[wi] <= !admit_ok && !w_cell.eop;
        else if (w_cell.eop) dropping[wi] <= 1'b0;
      end
      ev_drop_noroute <= wv && w_cell.sop && no_route;
      ev_drop_full    <= wv && w_cell.sop && !no_route && full;
      ev_drop_wred    <= wv && w_cell.sop && !no_route && !full && r_drop;
      ev_mcast        <= wv && w_cell.sop && admit_ok && w_hdr.mcast;
      ev_stall_nocell <= |(c_valid & ~c_sop & ~dropping) && free_count == 0;
    end
  end

  // ---------------- free cells, shared memory, queue manager ----------------
  logic          free_en, rd_en;
  logic [AW-1:0] free_idx, rd_idx;
  logic [PW-1:0] rd_port, rd_port_q;
  logic          rd_en_q;
  cell_t         rcell;
  logic [NPORTS-1:0] out_room;

  sf_free_cell_mgr #(.NCELLS(NCELLS)) u_fcm (
    .clk, .rst_n, .alloc(do_write), .alloc_idx, .free_count, .free_en, .free_idx
  );

  sf_shared_mem #(.NCELLS(NCELLS)) u_mem (
    .clk, .we(do_write), .waddr(alloc_idx), .wcell(w_cell),
    .re(rd_en), .raddr(rd_idx), .rcell
  );

  sf_queue_mgr #(.NCELLS(NCELLS)) u_qm (
    .clk, .rst_n, .wr_en(do_write), .wr_port(wi), .wr_idx(alloc_idx),
    .wr_sop(w_cell.sop), .wr_eop(w_cell.eop), .wr_mask(r_mask), .wr_prio(w_hdr.prio),
    .out_room, .rd_en, .rd_idx, .rd_port, .qdepth, .free_en, .free_idx
  );

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin rd_en_q <= 1'b0; rd_port_q <= '0; end
    else begin rd_en_q <= rd_en; rd_port_q <= rd_port; end

  // ---------------- output buffers ----------------
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    sf_out_buf u_ob (
      .clk, .rst_n, .rd_issue(rd_en && rd_port == PW'(o)),
      .cell_valid(rd_en_q && rd_port_q == PW'(o)), .cell_i(rcell), .room(out_room[o]),
      .tx_valid(tx_valid[o]), .tx_data(tx_data[o]), .tx_sop(tx_sop[o]), .tx_eop(tx_eop[o])
    );
  end

  // ---------------- path analyzer ----------------
  logic [QDW-1:0] qlen [NPORTS];
  always_comb
    for (int o = 0; o < NPORTS; o++) begin
      qlen[o] = '0;
      for (int q = 0; q < NPRIO; q++) qlen[o] = qlen[o] + qdepth[o][q];
    end

  sf_path_analyzer u_pa (
    .clk, .rst_n, .bwd_in, .qlen, .sweep_idx, .sweep_mask, .query_dest(w_hdr.dest),
    .port_cost, .bwd_out, .sent_diff(ev_path_diff), .sent_refresh(ev_path_refresh)
  );
endmodule
