// sf_queue_mgr - queue manager of the switch fabric.
// Write side: for each cell stored in the shared memory it links the cell
// behind the previous cell of the same packet (next_cell), records the eop
// flag and sets a reference count equal to the number of destinations.
// When the last cell of a packet is stored, the packet (its first cell) is
// appended to a linked list of packets for every destination output, one
// list per output and priority (pkt_next is kept per output, so a
// multicast packet can sit in several lists at once).
// Read side: one shared-memory read per cycle.  A round-robin arbiter
// picks an output whose output buffer has room and that is either in the
// middle of a packet or has a packet queued; a new packet is taken from the
// highest non-empty priority (7 highest).  Each read lowers the cell's
// reference count; at zero the cell is returned to the free cell manager.
// qdepth gives the cells queued per output and priority (for WRED and the
// path analyzer).
// The document gives the per-output linked lists and the scheduling role;
// store-and-forward enqueue, strict priority and reference counting are
// this design's choices.
module sf_queue_mgr
  import sf_pkg::*;
#(
  parameter int NCELLS = 4096,
  localparam int AW = $clog2(NCELLS)
) (
  input  logic              clk,
  input  logic              rst_n,
  // cell written into the shared memory this cycle
  input  logic              wr_en,
  input  logic [PW-1:0]     wr_port,
  input  logic [AW-1:0]     wr_idx,
  input  logic              wr_sop,
  input  logic              wr_eop,
  input  logic [NPORTS-1:0] wr_mask,   // used with wr_sop
  input  logic [PRW-1:0]    wr_prio,   // used with wr_sop
  // read scheduling
  input  logic [NPORTS-1:0] out_room,
  output logic              rd_en,
  output logic [AW-1:0]     rd_idx,
  output logic [PW-1:0]     rd_port,
  // status
  output logic [QDW-1:0]    qdepth [NPORTS][NPRIO],
  output logic              free_en,
  output logic [AW-1:0]     free_idx
);
  localparam int RW = $clog2(NPORTS + 1);

  // ---------------- per-cell state ----------------
  logic [AW-1:0] next_cell [NCELLS];
  logic          cell_eop  [NCELLS];
  logic [RW-1:0] refcnt    [NCELLS];

  // ---------------- per-input packet under construction ----------------
  logic [AW-1:0]     phead [NPORTS], ptail [NPORTS];
  logic [QDW-1:0]    pcells [NPORTS];
  logic [NPORTS-1:0] pmask [NPORTS];
  logic [PRW-1:0]    pprio [NPORTS];

  logic [NPORTS-1:0] w_mask;
  logic [PRW-1:0]    w_prio;
  logic [AW-1:0]     w_head;
  logic [QDW-1:0]    w_cells;
  logic              enq;

  assign w_mask  = wr_sop ? wr_mask : pmask[wr_port];
  assign w_prio  = wr_sop ? wr_prio : pprio[wr_port];
  assign w_head  = wr_sop ? wr_idx  : phead[wr_port];
  assign w_cells = wr_sop ? QDW'(1) : pcells[wr_port] + 1'b1;
  assign enq     = wr_en && wr_eop;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      if (!wr_sop) next_cell[ptail[wr_port]] <= wr_idx;
      cell_eop[wr_idx] <= wr_eop;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) begin
        phead[i] <= '0; ptail[i] <= '0; pcells[i] <= '0; pmask[i] <= '0; pprio[i] <= '0;
      end
    end else if (wr_en) begin
      phead[wr_port]  <= w_head;
      ptail[wr_port]  <= wr_idx;
      pcells[wr_port] <= w_cells;
      pmask[wr_port]  <= w_mask;
      pprio[wr_port]  <= w_prio;
    end
  end

  // ---------------- read arbitration ----------------
  logic [NPORTS-1:0] active, pending, elig;
  logic [AW-1:0]     cur [NPORTS];
  logic [PRW-1:0]    cur_prio [NPORTS];
  logic [AW-1:0]     qhead_top [NPORTS];   // head of the highest non-empty list
  logic [PRW-1:0]    qprio_top [NPORTS];
  logic [PW-1:0]     rr;
  logic [PW-1:0]     g;
  logic              gv;
  logic              g_new;                // granted output starts a packet
  logic [PRW-1:0]    g_prio;

  assign elig = out_room & (active | pending);

  always_comb begin
    gv = 1'b0; g = '0;
    for (int k = 0; k < NPORTS; k++) begin
      logic [PW-1:0] o;
      o = rr + PW'(k);
      if (!gv && elig[o]) begin gv = 1'b1; g = o; end
    end
    g_new  = !active[g];
    g_prio = g_new ? qprio_top[g] : cur_prio[g];
    rd_idx = g_new ? qhead_top[g] : cur[g];
  end

  assign rd_en   = gv;
  assign rd_port = g;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr <= '0; active <= '0;
      for (int o = 0; o < NPORTS; o++) begin cur[o] <= '0; cur_prio[o] <= '0; end
    end else if (gv) begin
      rr <= g + 1'b1;
      active[g]   <= !cell_eop[rd_idx];
      cur[g]      <= next_cell[rd_idx];
      cur_prio[g] <= g_prio;
    end
  end

  // reference counts and cell release
  logic [RW-1:0] rc_now;
  assign rc_now = refcnt[rd_idx];
  always_ff @(posedge clk) begin
    if (wr_en) refcnt[wr_idx] <= RW'($countones(w_mask));
    if (gv)    refcnt[rd_idx] <= rc_now - 1'b1;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin free_en <= 1'b0; free_idx <= '0; end
    else begin
      free_en  <= gv && rc_now == RW'(1);
      free_idx <= rd_idx;
    end
  end

  // ---------------- per-output packet lists ----------------
  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    logic [AW-1:0]  pkt_next [NCELLS];
    logic [AW-1:0]  head [NPRIO], tail [NPRIO];
    logic [AW:0]    pcnt [NPRIO];
    logic [NPRIO-1:0] nonempty, app, pop, sub;

    always_comb begin
      for (int q = 0; q < NPRIO; q++) nonempty[q] = pcnt[q] != 0;
      pending[o] = |nonempty;
      qprio_top[o] = '0;
      for (int q = 0; q < NPRIO; q++) if (nonempty[q]) qprio_top[o] = PRW'(q);
      qhead_top[o] = head[qprio_top[o]];
    end

    always_comb begin
      for (int q = 0; q < NPRIO; q++) begin
        app[q] = enq && w_mask[o] && w_prio == PRW'(q);
        pop[q] = gv && g == PW'(o) && g_new && qprio_top[o] == PRW'(q);
        sub[q] = gv && g == PW'(o) && g_prio == PRW'(q);
      end
    end

    always_ff @(posedge clk) begin
      for (int q = 0; q < NPRIO; q++)
        if (app[q] && (pcnt[q] - (AW+1)'(pop[q])) != 0) pkt_next[tail[q]] <= w_head;
    end

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int q = 0; q < NPRIO; q++) begin
          head[q] <= '0; tail[q] <= '0; pcnt[q] <= '0; qdepth[o][q] <= '0;
        end
      end else begin
        for (int q = 0; q < NPRIO; q++) begin
          if (pop[q]) head[q] <= pkt_next[head[q]];
          if (app[q]) begin
            tail[q] <= w_head;
            if ((pcnt[q] - (AW+1)'(pop[q])) == 0) head[q] <= w_head;
          end
          pcnt[q] <= pcnt[q] + (AW+1)'(app[q]) - (AW+1)'(pop[q]);
          qdepth[o][q] <= qdepth[o][q] + (app[q] ? w_cells : '0) - QDW'(sub[q]);
        end
      end
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) gv |-> out_room[g]);
endmodule
