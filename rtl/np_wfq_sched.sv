// np_wfq_sched - output scheduler of the traffic manager (8-level WFQ).
// The packet processors compute a finish time for every packet (its
// transfer time under the flow's weight) and place it in the descriptor.
// The scheduler serves the non-empty queue whose head packet has the
// earliest finish time, which is weighted fair queuing.  Times are 16-bit
// and compared modulo 2^16 (a is earlier than b when a-b is negative), so
// they may wrap.  Ties go to the higher-priority queue (the higher index).
// Combinational one-hot grant.
// The 8 levels and WFQ follow the document; the comparison and tie rule
// are this design's.
module np_wfq_sched #(
  parameter int NQ  = 8,
  parameter int TSW = 16
) (
  input  logic [NQ-1:0]  q_valid,
  input  logic [TSW-1:0] q_ts [NQ],
  output logic [NQ-1:0]  grant
);
  logic           found;
  logic [TSW-1:0] best_ts;
  logic [TSW-1:0] diff [NQ];
  always_comb begin
    found = 1'b0; best_ts = '0; grant = '0;
    for (int q = NQ - 1; q >= 0; q--) begin
      diff[q] = q_ts[q] - best_ts;
      if (q_valid[q] && (!found || diff[q][TSW-1])) begin
        found = 1'b1; best_ts = q_ts[q]; grant = '0; grant[q] = 1'b1;
      end
    end
  end
endmodule
