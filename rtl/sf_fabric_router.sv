// sf_fabric_router - destination decision of the switch fabric.
// Holds the programmable switching table, made of four sub-tables:
//   destination: a 16-bit port mask per destination id (512 ids);
//   loop:        per input port, the outputs a multicast may use;
//   trunk:       per port, the size (1, 2, 4, 8) of its aggregated group;
//   flow:        per 8-bit flow hash, the trunk member that flow uses,
//                so all packets of a flow take the same link.
// Unicast: every port in the destination mask is an alternative path; the
// one with the lowest path cost (from the path analyzer, which folds in the
// back-propagated state of the downstream devices) wins, ties to the
// lowest port.  The trunk group of that port is then resolved by the flow
// table.  Multicast: destination mask AND loop mask.  WRED: the packet is
// dropped by wred_drop with its priority's thresholds, using the deepest
// per-priority queue among the chosen outputs.
// The four sub-tables, trunking of 2/4/8 adjacent ports, flow pinning,
// path-based selection and WRED follow the document; entry formats, the
// cost rule and the drop curve are this design's.
// Timing: the decision is combinational from hdr; tables are written one
// entry per cycle through tbl_* and may change during operation.
module sf_fabric_router
  import sf_pkg::*;
#(
  parameter int NFLOW = 256
) (
  input  logic                  clk,
  input  logic                  rst_n,
  // decision
  input  hdr_t                  hdr,
  input  logic [PW-1:0]         in_port,
  input  logic [COSTW-1:0]      port_cost [NPORTS],
  input  logic [QDW-1:0]        qdepth [NPORTS][NPRIO],
  input  logic [15:0]           rnd,
  output logic [NPORTS-1:0]     dest_mask,
  output logic                  drop,
  // second read port of the destination table, for the path analyzer
  input  logic [DW-1:0]         sweep_idx,
  output logic [NPORTS-1:0]     sweep_mask,
  // table update
  input  logic                  tbl_we,
  input  tbl_sel_e              tbl_sel,
  input  logic [DW-1:0]         tbl_addr,
  input  logic [15:0]           tbl_wdata
);
  localparam int FW = $clog2(NFLOW);

  logic [NPORTS-1:0] dest_tbl  [NDEST];
  logic [NPORTS-1:0] loop_tbl  [NPORTS];
  logic [1:0]        trunk_tbl [NPORTS];
  logic [2:0]        flow_tbl  [NFLOW];
  logic [QDW-1:0]    wr_min [NPRIO], wr_max [NPRIO];
  logic [3:0]        wr_shift [NPRIO];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int p = 0; p < NPORTS; p++) begin
        loop_tbl[p]  <= '1;
        trunk_tbl[p] <= '0;
      end
      for (int q = 0; q < NPRIO; q++) begin
        wr_min[q] <= QDW'(2048); wr_max[q] <= QDW'(4095); wr_shift[q] <= 4'd4;
      end
    end else if (tbl_we) begin
      unique case (tbl_sel)
        TBL_LOOP:  loop_tbl[tbl_addr[PW-1:0]]  <= tbl_wdata[NPORTS-1:0];
        TBL_TRUNK: trunk_tbl[tbl_addr[PW-1:0]] <= tbl_wdata[1:0];
        TBL_WRED: begin
          unique case (tbl_addr[4:3])
            2'd0:    wr_min[tbl_addr[2:0]]   <= tbl_wdata[QDW-1:0];
            2'd1:    wr_max[tbl_addr[2:0]]   <= tbl_wdata[QDW-1:0];
            default: wr_shift[tbl_addr[2:0]] <= tbl_wdata[3:0];
          endcase
        end
        default: ;
      endcase
    end
  end

  // destination and flow tables: plain memories (no reset)
  always_ff @(posedge clk) begin
    if (tbl_we && tbl_sel == TBL_DEST) dest_tbl[tbl_addr] <= tbl_wdata[NPORTS-1:0];
    if (tbl_we && tbl_sel == TBL_FLOW) flow_tbl[tbl_addr[FW-1:0]] <= tbl_wdata[2:0];
  end

  assign sweep_mask = dest_tbl[sweep_idx];

  logic [NPORTS-1:0] cand;
  logic [PW-1:0]     best;
  logic [COSTW-1:0]  best_cost;
  logic              found;
  logic [FW-1:0]     fhash;
  logic [PW-1:0]     tsize_m1, member;
  logic [QDW-1:0]    depth;

  always_comb begin
    cand  = dest_tbl[hdr.dest];
    fhash = FW'(hdr.flow[7:0] ^ hdr.flow[15:8]);
    best = '0; best_cost = '1; found = 1'b0;
    for (int p = 0; p < NPORTS; p++)
      if (cand[p] && (!found || port_cost[p] < best_cost)) begin
        best = PW'(p); best_cost = port_cost[p]; found = 1'b1;
      end
    tsize_m1 = PW'((1 << trunk_tbl[best]) - 1);
    member   = (best & ~tsize_m1) | (PW'(flow_tbl[fhash]) & tsize_m1);
    if (hdr.mcast)  dest_mask = cand & loop_tbl[in_port];
    else if (found) dest_mask = NPORTS'(1) << member;
    else            dest_mask = '0;
    depth = '0;
    for (int p = 0; p < NPORTS; p++)
      if (dest_mask[p] && qdepth[p][hdr.prio] > depth) depth = qdepth[p][hdr.prio];
  end

  wred_drop #(.DW(QDW)) u_wred (
    .depth(depth), .min_th(wr_min[hdr.prio]), .max_th(wr_max[hdr.prio]),
    .shift(wr_shift[hdr.prio]), .rnd(rnd), .drop(drop)
  );
endmodule
