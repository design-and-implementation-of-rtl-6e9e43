// np_decision_logic - decision logic of the packet analyzer.
// Gathers, for one packet, the L3-4 class from the classification engine
// and the content rules reported by the pattern matching engine.  When the
// packet matches several rules the one of highest priority is kept; the
// priority is the rule's location, rule 0 being the highest, so the lowest
// rule number wins.  At pkt_end (or one cycle later if the class arrives
// then) the summary (class, hit, rule) is issued for one cycle; it goes to
// the job scheduler and on to the packet processors, which may refine it.
// The selection rule follows the document; the interface is this design's.
module np_decision_logic
  import np_pkg::*;
(
  input  logic          clk,
  input  logic          rst_n,
  input  logic          pkt_start,
  input  logic          match_valid,
  input  logic [9:0]    match_rule,
  input  logic          class_valid,
  input  logic [CW-1:0] class_id,
  input  logic          pkt_end,
  output logic          dec_valid,
  output decision_t     dec
);
  decision_t acc;
  logic      have_class, ended;

  decision_t nxt;
  always_comb begin
    nxt = pkt_start ? '0 : acc;
    if (class_valid) nxt.class_id = class_id;
    if (match_valid && (!nxt.hit || match_rule < nxt.rule)) begin
      nxt.hit = 1'b1; nxt.rule = match_rule;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0; have_class <= 1'b0; ended <= 1'b0; dec_valid <= 1'b0; dec <= '0;
    end else begin
      acc <= nxt;
      if (pkt_start) begin have_class <= class_valid; ended <= pkt_end; end
      else begin
        if (class_valid) have_class <= 1'b1;
        if (pkt_end)     ended <= 1'b1;
      end
      dec_valid <= 1'b0;
      if ((ended || pkt_end) && (have_class || class_valid)) begin
        dec_valid <= 1'b1; dec <= nxt; ended <= 1'b0; have_class <= 1'b0;
      end
    end
  end
endmodule
