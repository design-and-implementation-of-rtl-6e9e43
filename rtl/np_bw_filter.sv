// np_bw_filter - per-flow bandwidth filter of the traffic manager.
// Decides per packet whether its flow stays within the bandwidth that the
// packet processors allocated to it (alloc, bytes per window, carried in
// the packet's internal header).  Time is cut into windows of
// W = 2^win_shift cycles.  Per flow the filter keeps the bytes accepted in
// the current window and in the previous one; the occupation over the last
// W cycles is estimated as
//   cur + prev * (W - elapsed) / W,
// a sliding average that absorbs bursts.  The packet passes when the
// estimate plus its length stays within alloc; only passed bytes count.
// Per-flow state is brought up to date lazily when a packet of the flow
// arrives (window stamps).  Decision is registered: pass/valid one cycle
// after req.  win_shift is the controllable window.
// Drop by monitored, window-averaged bandwidth follows the document; the
// averaging formula and the table size are this design's.
module np_bw_filter #(
  parameter int NFLOW = 256,
  parameter int TW    = 32,
  localparam int FW = $clog2(NFLOW)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [4:0]    win_shift,
  input  logic          req,
  input  logic [FW-1:0] flow,
  input  logic [13:0]   len,
  input  logic [19:0]   alloc,
  output logic          valid,
  output logic          pass
);
  logic [TW-1:0] now;
  logic [23:0]   cur  [NFLOW];
  logic [23:0]   prev [NFLOW];
  logic [TW-1:0] wid  [NFLOW];
  logic [NFLOW-1:0] seen;

  logic [TW-1:0] w_now, elapsed, span;
  logic [23:0]   c0, p0;
  logic [47:0]   est;

  always_comb begin
    w_now   = now >> win_shift;
    span    = TW'(1) << win_shift;
    elapsed = now & (span - 1'b1);
    if (!seen[flow] || wid[flow] + 2 <= w_now) begin c0 = '0; p0 = '0; end
    else if (wid[flow] + 1 == w_now)           begin c0 = '0; p0 = cur[flow]; end
    else                                       begin c0 = cur[flow]; p0 = prev[flow]; end
    est = 48'(c0) + ((48'(p0) * 48'(span - elapsed)) >> win_shift) + 48'(len);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now <= '0; seen <= '0; valid <= 1'b0; pass <= 1'b0;
    end else begin
      now   <= now + 1'b1;
      valid <= req;
      if (req) begin
        pass       <= est <= 48'(alloc);
        seen[flow] <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk)
    if (req) begin
      wid[flow]  <= w_now;
      prev[flow] <= p0;
      cur[flow]  <= (est <= 48'(alloc)) ? c0 + 24'(len) : c0;
    end
endmodule
