// np_traffic_manager - traffic manager of the network processor.
// Queue manager plus output scheduler for the egress side.  A packet
// processor enqueues a descriptor (priority, flow, length, allocated
// bandwidth, finish time, packet memory address).  On entry two checks may
// drop it:
//   bandwidth filter - the flow exceeds its window-averaged allocation;
//   WRED             - random early drop on the depth of its priority
//                      queue, thresholds per priority.
// Accepted descriptors wait in one of 8 FIFOs; the WFQ scheduler picks the
// next one whenever deq_ready is high.  The enqueue decision takes one
// cycle (registered bandwidth filter); a full queue drops too.
// Roles (WFQ, WRED, bandwidth filtering, 8 levels) follow the document;
// queue depth, thresholds and interfaces are this design's.
module np_traffic_manager
  import np_pkg::*;
#(
  parameter int QDEPTH = 16,
  localparam int AW = $clog2(QDEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enq_valid,
  input  desc_t       enq_desc,
  input  logic [4:0]  win_shift,
  input  logic [AW:0] wred_min [NQ],
  input  logic [AW:0] wred_max [NQ],
  input  logic [3:0]  wred_shift [NQ],
  output logic        deq_valid,
  input  logic        deq_ready,
  output desc_t       deq_desc,
  output logic        drop_bw,
  output logic        drop_wred,
  output logic        drop_full
);
  // stage 1: bandwidth filter (registered)
  logic  bw_valid, bw_pass;
  desc_t d1;
  np_bw_filter u_bw (
    .clk, .rst_n, .win_shift, .req(enq_valid), .flow(enq_desc.flow),
    .len(enq_desc.len), .alloc(enq_desc.alloc), .valid(bw_valid), .pass(bw_pass)
  );
  always_ff @(posedge clk) if (enq_valid) d1 <= enq_desc;

  // queues
  desc_t         q [NQ][QDEPTH];
  logic [AW-1:0] wp [NQ], rp [NQ];
  logic [AW:0]   cnt [NQ];
  logic [15:0]   lfsr;

  logic wr_drop;
  wred_drop #(.DW(AW+1)) u_wred (
    .depth(cnt[d1.prio]), .min_th(wred_min[d1.prio]), .max_th(wred_max[d1.prio]),
    .shift(wred_shift[d1.prio]), .rnd(lfsr), .drop(wr_drop)
  );

  logic          full, push;
  assign full = cnt[d1.prio] == (AW+1)'(QDEPTH);
  assign push = bw_valid && bw_pass && !wr_drop && !full;

  // scheduler
  logic [NQ-1:0] qv, grant;
  logic [15:0]   ts [NQ];
  logic [2:0]    gq;
  always_comb begin
    gq = '0;
    for (int i = 0; i < NQ; i++) begin
      qv[i] = cnt[i] != 0;
      ts[i] = q[i][rp[i]].ts;
      if (grant[i]) gq = 3'(i);
    end
  end
  np_wfq_sched #(.NQ(NQ), .TSW(16)) u_wfq (.q_valid(qv), .q_ts(ts), .grant);

  assign deq_valid = |qv;
  assign deq_desc  = q[gq][rp[gq]];

  logic [NQ-1:0] qpush, qpop;
  always_comb
    for (int i = 0; i < NQ; i++) begin
      qpush[i] = push && d1.prio == 3'(i);
      qpop[i]  = deq_valid && deq_ready && gq == 3'(i);
    end

  always_ff @(posedge clk) begin
    for (int i = 0; i < NQ; i++) if (qpush[i]) q[i][wp[i]] <= d1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NQ; i++) begin wp[i] <= '0; rp[i] <= '0; cnt[i] <= '0; end
      lfsr <= 16'h1D0F; drop_bw <= 1'b0; drop_wred <= 1'b0; drop_full <= 1'b0;
    end else begin
      lfsr      <= {lfsr[14:0], lfsr[15] ^ lfsr[13] ^ lfsr[12] ^ lfsr[10]};
      drop_bw   <= bw_valid && !bw_pass;
      drop_wred <= bw_valid && bw_pass && wr_drop;
      drop_full <= bw_valid && bw_pass && !wr_drop && full;
      for (int i = 0; i < NQ; i++) begin
        if (qpush[i]) wp[i] <= wp[i] + 1'b1;
        if (qpop[i])  rp[i] <= rp[i] + 1'b1;
        cnt[i] <= cnt[i] + (AW+1)'(qpush[i]) - (AW+1)'(qpop[i]);
      end
    end
  end
endmodule
