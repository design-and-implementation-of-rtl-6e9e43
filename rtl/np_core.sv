// np_core - built part of the content switching network processor.
// Ingress: the ingress controller writes each received packet into a slot
// of the ingress buffer and streams its bytes through the packet analyzer
// while the L3-4 key goes to the classification engine.  The pattern
// matching engine searches the bytes for content rules; the decision logic
// combines class and best rule and, once the packet's last byte has left
// the matcher, hands a job (slot + decision) to the job scheduler.  The
// scheduler starts an idle packet processor at the routine the jump table
// gives for the class.  The processors read the packet from the ingress
// buffer with unaligned word/double-word accesses.
// Egress: processors enqueue descriptors into the traffic manager
// (bandwidth filter, WRED, 8-level WFQ), which releases them in schedule
// order.
// The packet processors themselves, the MACs and ingress/egress
// controllers, memory controllers and the switch-fabric interface are not
// part of this module; their signals are ports.  Packet start/end are
// delayed by the matcher's latency (PM_LAT cycles) so every match is
// counted in its packet.  Timing rule for the ingress side: key_valid must
// come at least PM_LAT-1 cycles after the packet's first byte and no later
// than its last byte (a parsed IPv4 5-tuple is ready by byte 34 or so); the
// decision then leaves PM_LAT+1 cycles after the last byte.  The
// classifier's hit flag is not used: a catch-all rule gives every packet a
// class.
module np_core
  import np_pkg::*;
#(
  parameter int NPT    = 64,
  parameter int NSTATE = 1024,
  parameter int NRULES = 32,
  parameter int TM_QDEPTH = 16,
  localparam int PM_LAT = $clog2(NPT) + 2,
  localparam int SW = $clog2(NSTATE) + 1,
  localparam int TAW = $clog2(TM_QDEPTH)
) (
  input  logic           clk,
  input  logic           rst_n,
  // from the ingress controller
  input  logic           in_valid,
  input  logic [7:0]     in_byte,
  input  logic           in_sop,
  input  logic           in_eop,
  input  logic [SLOTW-1:0] in_slot,
  input  logic           key_valid,
  input  key_t           key,
  input  logic           ib_wr_en,
  input  logic [11:0]    ib_wr_addr,
  input  logic [31:0]    ib_wr_data,
  // packet processor cluster
  input  logic [NPP-1:0] pp_idle,
  output logic [NPP-1:0] pp_start,
  output job_t           pp_job,
  output logic [PCW-1:0] pp_pc,
  input  logic           ib_rd_en,
  input  logic [13:0]    ib_rd_addr,
  input  logic           ib_rd_dword,
  output logic [31:0]    ib_rd_data,
  input  logic           tm_enq_valid,
  input  desc_t          tm_enq_desc,
  // egress
  output logic           tm_deq_valid,
  input  logic           tm_deq_ready,
  output desc_t          tm_deq_desc,
  // configuration
  input  logic           cls_wr_en,
  input  logic [$clog2(NRULES)-1:0] cls_wr_idx,
  input  key_t           cls_wr_value,
  input  key_t           cls_wr_care,
  input  logic [CW-1:0]  cls_wr_class,
  input  logic           pm_wr_en,
  input  logic [1:0]     pm_wr_sel,
  input  logic [SW+2:0]  pm_wr_addr,
  input  logic [SW+19:0] pm_wr_data,
  input  logic           jt_we,
  input  logic [CW-1:0]  jt_class,
  input  logic [PCW-1:0] jt_addr,
  input  logic [4:0]     tm_win_shift,
  input  logic [TAW:0]   tm_wred_min [NQ],
  input  logic [TAW:0]   tm_wred_max [NQ],
  input  logic [3:0]     tm_wred_shift [NQ],
  // events
  output logic           ev_match,
  output logic           ev_job_full,
  output logic           ev_drop_bw,
  output logic           ev_drop_wred,
  output logic           ev_drop_full
);
  // ---------------- packet analyzer ----------------
  logic          cls_valid, cls_hit;
  logic [CW-1:0] cls_id;
  np_classifier #(.NRULES(NRULES)) u_cls (
    .clk, .rst_n, .key_valid, .key, .res_valid(cls_valid), .class_id(cls_id), .hit(cls_hit),
    .wr_en(cls_wr_en), .wr_idx(cls_wr_idx), .wr_value(cls_wr_value), .wr_care(cls_wr_care),
    .wr_class(cls_wr_class)
  );

  logic       m_valid;
  logic [9:0] m_rule;
  np_pattern_match #(.NPT(NPT), .NSTATE(NSTATE)) u_pm (
    .clk, .rst_n, .in_valid, .in_sop(in_valid && in_sop), .in_byte,
    .match_valid(m_valid), .match_rule(m_rule),
    .wr_en(pm_wr_en), .wr_sel(pm_wr_sel), .wr_addr(pm_wr_addr), .wr_data(pm_wr_data)
  );
  assign ev_match = m_valid;

  // packet boundaries and slot delayed past the matcher
  logic             d_sop [PM_LAT], d_eop [PM_LAT];
  logic [SLOTW-1:0] d_slot [PM_LAT];
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int i = 0; i < PM_LAT; i++) begin d_sop[i] <= 1'b0; d_eop[i] <= 1'b0; d_slot[i] <= '0; end
    end else begin
      d_sop[0] <= in_valid && in_sop; d_eop[0] <= in_valid && in_eop; d_slot[0] <= in_slot;
      for (int i = 1; i < PM_LAT; i++) begin
        d_sop[i] <= d_sop[i-1]; d_eop[i] <= d_eop[i-1]; d_slot[i] <= d_slot[i-1];
      end
    end

  logic [SLOTW-1:0] cur_slot;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cur_slot <= '0;
    else if (d_sop[PM_LAT-1]) cur_slot <= d_slot[PM_LAT-1];

  logic      dec_valid;
  decision_t dec;
  np_decision_logic u_dec (
    .clk, .rst_n, .pkt_start(d_sop[PM_LAT-1]), .match_valid(m_valid), .match_rule(m_rule),
    .class_valid(cls_valid), .class_id(cls_id), .pkt_end(d_eop[PM_LAT-1]),
    .dec_valid, .dec
  );

  // ---------------- job scheduler ----------------
  logic job_ready;
  job_t job;
  assign job = '{slot: (d_sop[PM_LAT-1] ? d_slot[PM_LAT-1] : cur_slot), dec: dec};
  np_job_scheduler u_js (
    .clk, .rst_n, .job_valid(dec_valid), .job_ready, .job,
    .pp_idle, .pp_start, .pp_job, .pp_pc, .jt_we, .jt_class, .jt_addr
  );
  assign ev_job_full = dec_valid && !job_ready;

  // ---------------- ingress buffer ----------------
  np_ingress_buffer u_ib (
    .clk, .wr_en(ib_wr_en), .wr_addr(ib_wr_addr), .wr_data(ib_wr_data),
    .rd_en(ib_rd_en), .rd_addr(ib_rd_addr), .rd_dword(ib_rd_dword), .rd_data(ib_rd_data)
  );

  // ---------------- traffic manager ----------------
  np_traffic_manager #(.QDEPTH(TM_QDEPTH)) u_tm (
    .clk, .rst_n, .enq_valid(tm_enq_valid), .enq_desc(tm_enq_desc), .win_shift(tm_win_shift),
    .wred_min(tm_wred_min), .wred_max(tm_wred_max), .wred_shift(tm_wred_shift),
    .deq_valid(tm_deq_valid), .deq_ready(tm_deq_ready), .deq_desc(tm_deq_desc),
    .drop_bw(ev_drop_bw), .drop_wred(ev_drop_wred), .drop_full(ev_drop_full)
  );
endmodule
