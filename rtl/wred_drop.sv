// wred_drop - weighted random early drop decision for one queue.
// Below min_th nothing is dropped, at or above max_th everything is.  In
// between the drop probability rises linearly with the depth:
// drop when rnd < (depth - min_th) << shift, rnd being a 16-bit random
// number.  "Weighted" means each priority has its own thresholds and
// slope, chosen by the caller.  The document names WRED for the traffic
// manager and the fabric router; this curve is this design's choice.
// Purely combinational.
module wred_drop #(
  parameter int DW = 14
) (
  input  logic [DW-1:0] depth,
  input  logic [DW-1:0] min_th,
  input  logic [DW-1:0] max_th,
  input  logic [3:0]    shift,
  input  logic [15:0]   rnd,
  output logic          drop
);
  logic [DW+15:0] ramp;
  always_comb begin
    ramp = (DW+16)'(depth - min_th) << shift;
    if (depth >= max_th)      drop = 1'b1;
    else if (depth <= min_th) drop = 1'b0;
    else                      drop = (DW+16)'(rnd) < ramp;
  end
endmodule
