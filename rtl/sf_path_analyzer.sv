// sf_path_analyzer - global path-information sharing of the switch fabric.
// Path information is a congestion cost (0..15) per destination id.
//  * PI 0..15: one table per output port, holding the costs last received
//    on that port's backward channel (from the device behind TX p).
//  * Path processor: sweeps the destinations, one per cycle, and computes
//    cost(d) = min over ports p in the route mask of d of
//              max(level(p), remote_p(d)),  level(p) = min(15, qlen(p) >> QSHIFT);
//    a destination with no route gets 15.
//  * Sent information recorder: the cost last sent for every destination.
//  * Difference updater: when the recomputed cost differs from the
//    recorded one, sends (d, cost) and records it - only differences
//    travel backward.
//  * Consistency maintainer: in a cycle with no difference to send, re-sends
//    the recorded cost of a rotating destination, so a receiver that missed
//    a message is brought back in line.
// The message goes to the backward channel of every RX port.  port_cost
// answers the fabric router: the cost of reaching query_dest through each
// output (combinational).
// The block split follows the document's path-analyzer diagram; the cost
// formula, message format and refresh policy are this design's choices.
// Timing: a changed cost is sent one cycle after the sweep reaches it.
module sf_path_analyzer
  import sf_pkg::*;
#(
  parameter int QSHIFT = 5
) (
  input  logic              clk,
  input  logic              rst_n,
  input  pmsg_t             bwd_in [NPORTS],  // backward channel of each TX
  input  logic [QDW-1:0]    qlen [NPORTS],    // queue length per output
  output logic [DW-1:0]     sweep_idx,
  input  logic [NPORTS-1:0] sweep_mask,       // route mask of sweep_idx
  input  logic [DW-1:0]     query_dest,
  output logic [COSTW-1:0]  port_cost [NPORTS],
  output pmsg_t             bwd_out,          // to the backward channel of each RX
  output logic              sent_diff,        // bwd_out carries a difference
  output logic              sent_refresh      // bwd_out carries a refresh
);
  localparam logic [COSTW-1:0] CMAX = '1;

  logic [COSTW-1:0] level [NPORTS];
  always_comb
    for (int p = 0; p < NPORTS; p++)
      level[p] = (qlen[p] >> QSHIFT) > QDW'(CMAX) ? CMAX : COSTW'(qlen[p] >> QSHIFT);

  // PI tables
  logic [COSTW-1:0] r_sweep [NPORTS];
  for (genvar p = 0; p < NPORTS; p++) begin : g_pi
    logic [COSTW-1:0] remote [NDEST];
    logic [COSTW-1:0] r_query;
    always_ff @(posedge clk)
      if (bwd_in[p].valid) remote[bwd_in[p].idx] <= bwd_in[p].cost;
    assign r_sweep[p] = remote[sweep_idx];
    assign r_query = remote[query_dest];
    assign port_cost[p] = r_query > level[p] ? r_query : level[p];
  end

  // Path processor
  logic [COSTW-1:0] cost_now;
  logic [COSTW-1:0] via [NPORTS];
  always_comb begin
    cost_now = CMAX;
    for (int p = 0; p < NPORTS; p++) begin
      via[p] = r_sweep[p] > level[p] ? r_sweep[p] : level[p];
      if (sweep_mask[p] && via[p] < cost_now) cost_now = via[p];
    end
  end

  // Sent information recorder, difference updater, consistency maintainer
  logic [COSTW-1:0] sent [NDEST];
  logic [DW-1:0]    rf_idx;
  logic             diff;
  logic             init_done;   // every entry sent once since reset

  assign diff = !init_done || sent[sweep_idx] != cost_now;

  always_ff @(posedge clk) if (diff) sent[sweep_idx] <= cost_now;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sweep_idx <= '0; rf_idx <= '0; init_done <= 1'b0;
      bwd_out <= '0; sent_diff <= 1'b0; sent_refresh <= 1'b0;
    end else begin
      sweep_idx <= sweep_idx + 1'b1;
      if (sweep_idx == DW'(NDEST - 1)) init_done <= 1'b1;
      sent_diff    <= diff;
      sent_refresh <= !diff;
      if (diff) begin
        bwd_out <= '{valid: 1'b1, idx: sweep_idx, cost: cost_now};
      end else begin
        bwd_out <= '{valid: 1'b1, idx: rf_idx, cost: sent[rf_idx]};
        rf_idx  <= rf_idx + 1'b1;
      end
    end
  end
endmodule
