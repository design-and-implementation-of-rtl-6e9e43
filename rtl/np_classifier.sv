// np_classifier - L3-4 packet classification engine of the packet analyzer.
// Classifies a packet into one of 256 classes from its IPv4 5-tuple.  A
// table of NRULES ternary rules (value, care mask, class) is compared with
// the key in parallel; the first rule in table order that matches wins,
// i.e. priority is given by location.  No match gives class 0 with hit
// low.  The result is registered: it appears one cycle after key_valid.
// The 256 classes and the L3-4 basis follow the document; the ternary
// table and its size are this design's choices.
module np_classifier
  import np_pkg::*;
#(
  parameter int NRULES = 32,
  localparam int RAW = $clog2(NRULES)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           key_valid,
  input  key_t           key,
  output logic           res_valid,
  output logic [CW-1:0]  class_id,
  output logic           hit,
  input  logic           wr_en,
  input  logic [RAW-1:0] wr_idx,
  input  key_t           wr_value,
  input  key_t           wr_care,     // 1 = bit is compared
  input  logic [CW-1:0]  wr_class
);
  key_t          r_val  [NRULES];
  key_t          r_care [NRULES];
  logic [CW-1:0] r_cls  [NRULES];
  logic [NRULES-1:0] r_en;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     r_en <= '0;
    else if (wr_en) r_en[wr_idx] <= 1'b1;

  always_ff @(posedge clk)
    if (wr_en) begin
      r_val[wr_idx] <= wr_value; r_care[wr_idx] <= wr_care; r_cls[wr_idx] <= wr_class;
    end

  logic          m_hit;
  logic [CW-1:0] m_cls;
  always_comb begin
    m_hit = 1'b0; m_cls = '0;
    for (int r = NRULES - 1; r >= 0; r--)
      if (r_en[r] && ((key ^ r_val[r]) & r_care[r]) == '0) begin
        m_hit = 1'b1; m_cls = r_cls[r];
      end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin res_valid <= 1'b0; class_id <= '0; hit <= 1'b0; end
    else begin
      res_valid <= key_valid;
      if (key_valid) begin class_id <= m_cls; hit <= m_hit; end
    end
endmodule
