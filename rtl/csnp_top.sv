// csnp_top - content switching network processor and its companion switch
// fabric, side by side.
// The network processor core (packet analyzer, job scheduler with jump
// table, ingress buffer, traffic manager) and the 16-port shared-memory
// switch fabric are separate chips; in a system the processor's two 2 Gbps
// switch-fabric channels would attach to fabric ports.  That channel's
// format is not defined here, so both blocks bring all their ports out
// unchanged, with the prefixes np_ and sf_.  One clock (250 MHz) and one
// active-low reset drive both.
module csnp_top
  import np_pkg::*;
  import sf_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // ---------------- network processor ----------------
  input  logic              np_in_valid,
  input  logic [7:0]        np_in_byte,
  input  logic              np_in_sop,
  input  logic              np_in_eop,
  input  logic [SLOTW-1:0]  np_in_slot,
  input  logic              np_key_valid,
  input  key_t              np_key,
  input  logic              np_ib_wr_en,
  input  logic [11:0]       np_ib_wr_addr,
  input  logic [31:0]       np_ib_wr_data,
  input  logic [NPP-1:0]    np_pp_idle,
  output logic [NPP-1:0]    np_pp_start,
  output job_t              np_pp_job,
  output logic [PCW-1:0]    np_pp_pc,
  input  logic              np_ib_rd_en,
  input  logic [13:0]       np_ib_rd_addr,
  input  logic              np_ib_rd_dword,
  output logic [31:0]       np_ib_rd_data,
  input  logic              np_tm_enq_valid,
  input  desc_t             np_tm_enq_desc,
  output logic              np_tm_deq_valid,
  input  logic              np_tm_deq_ready,
  output desc_t             np_tm_deq_desc,
  input  logic              np_cls_wr_en,
  input  logic [4:0]        np_cls_wr_idx,
  input  key_t              np_cls_wr_value,
  input  key_t              np_cls_wr_care,
  input  logic [CW-1:0]     np_cls_wr_class,
  input  logic              np_pm_wr_en,
  input  logic [1:0]        np_pm_wr_sel,
  input  logic [13:0]       np_pm_wr_addr,
  input  logic [30:0]       np_pm_wr_data,
  input  logic              np_jt_we,
  input  logic [CW-1:0]     np_jt_class,
  input  logic [PCW-1:0]    np_jt_addr,
  input  logic [4:0]        np_tm_win_shift,
  input  logic [4:0]        np_tm_wred_min [NQ],
  input  logic [4:0]        np_tm_wred_max [NQ],
  input  logic [3:0]        np_tm_wred_shift [NQ],
  output logic              np_ev_match,
  output logic              np_ev_job_full,
  output logic              np_ev_drop_bw,
  output logic              np_ev_drop_wred,
  output logic              np_ev_drop_full,
  // ---------------- switch fabric ----------------
  input  logic [NPORTS-1:0] sf_rx_valid,
  input  logic [7:0]        sf_rx_data [NPORTS],
  input  logic [NPORTS-1:0] sf_rx_sop,
  input  logic [NPORTS-1:0] sf_rx_eop,
  output logic [NPORTS-1:0] sf_rx_pause,
  output logic [NPORTS-1:0] sf_tx_valid,
  output logic [7:0]        sf_tx_data [NPORTS],
  output logic [NPORTS-1:0] sf_tx_sop,
  output logic [NPORTS-1:0] sf_tx_eop,
  input  pmsg_t             sf_bwd_in [NPORTS],
  output pmsg_t             sf_bwd_out,
  input  logic              sf_tbl_we,
  input  tbl_sel_e          sf_tbl_sel,
  input  logic [DW-1:0]     sf_tbl_addr,
  input  logic [15:0]       sf_tbl_wdata,
  output logic              sf_ev_drop_wred,
  output logic              sf_ev_drop_noroute,
  output logic              sf_ev_drop_full,
  output logic              sf_ev_stall_nocell,
  output logic              sf_ev_overflow,
  output logic              sf_ev_mcast,
  output logic              sf_ev_path_diff,
  output logic              sf_ev_path_refresh
);
  np_core u_np (
    .clk, .rst_n,
    .in_valid(np_in_valid), .in_byte(np_in_byte), .in_sop(np_in_sop), .in_eop(np_in_eop),
    .in_slot(np_in_slot), .key_valid(np_key_valid), .key(np_key),
    .ib_wr_en(np_ib_wr_en), .ib_wr_addr(np_ib_wr_addr), .ib_wr_data(np_ib_wr_data),
    .pp_idle(np_pp_idle), .pp_start(np_pp_start), .pp_job(np_pp_job), .pp_pc(np_pp_pc),
    .ib_rd_en(np_ib_rd_en), .ib_rd_addr(np_ib_rd_addr), .ib_rd_dword(np_ib_rd_dword),
    .ib_rd_data(np_ib_rd_data), .tm_enq_valid(np_tm_enq_valid), .tm_enq_desc(np_tm_enq_desc),
    .tm_deq_valid(np_tm_deq_valid), .tm_deq_ready(np_tm_deq_ready), .tm_deq_desc(np_tm_deq_desc),
    .cls_wr_en(np_cls_wr_en), .cls_wr_idx(np_cls_wr_idx), .cls_wr_value(np_cls_wr_value),
    .cls_wr_care(np_cls_wr_care), .cls_wr_class(np_cls_wr_class),
    .pm_wr_en(np_pm_wr_en), .pm_wr_sel(np_pm_wr_sel), .pm_wr_addr(np_pm_wr_addr),
    .pm_wr_data(np_pm_wr_data), .jt_we(np_jt_we), .jt_class(np_jt_class), .jt_addr(np_jt_addr),
    .tm_win_shift(np_tm_win_shift), .tm_wred_min(np_tm_wred_min), .tm_wred_max(np_tm_wred_max),
    .tm_wred_shift(np_tm_wred_shift), .ev_match(np_ev_match), .ev_job_full(np_ev_job_full),
    .ev_drop_bw(np_ev_drop_bw), .ev_drop_wred(np_ev_drop_wred), .ev_drop_full(np_ev_drop_full)
  );

  switch_fabric u_sf (
    .clk, .rst_n,
    .rx_valid(sf_rx_valid), .rx_data(sf_rx_data), .rx_sop(sf_rx_sop), .rx_eop(sf_rx_eop), .rx_pause(sf_rx_pause),
    .tx_valid(sf_tx_valid), .tx_data(sf_tx_data), .tx_sop(sf_tx_sop), .tx_eop(sf_tx_eop),
    .bwd_in(sf_bwd_in), .bwd_out(sf_bwd_out),
    .tbl_we(sf_tbl_we), .tbl_sel(sf_tbl_sel), .tbl_addr(sf_tbl_addr), .tbl_wdata(sf_tbl_wdata),
    .ev_drop_wred(sf_ev_drop_wred), .ev_drop_noroute(sf_ev_drop_noroute),
    .ev_drop_full(sf_ev_drop_full), .ev_stall_nocell(sf_ev_stall_nocell),
    .ev_overflow(sf_ev_overflow), .ev_mcast(sf_ev_mcast),
    .ev_path_diff(sf_ev_path_diff), .ev_path_refresh(sf_ev_path_refresh)
  );
endmodule
