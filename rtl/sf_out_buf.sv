// sf_out_buf - output buffer of one switch-fabric port.
// Holds cells read from the shared memory and sends them out one byte per
// cycle (8 bits at 250 MHz = 2 Gbps).  tx_sop marks the first byte of a
// cell that has its sop flag, tx_eop the last byte of a cell with eop.
// room tells the queue manager that a read may be issued: it counts one
// read in flight, because the shared memory answers one cycle after the
// request.  The document only says the buffer aligns data behind the
// shared memory; depth and signalling are this design's choices.
module sf_out_buf
  import sf_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rd_issue,     // a read for this port was issued this cycle
  input  logic       cell_valid,   // cell arrives (one cycle after rd_issue)
  input  cell_t      cell_i,
  output logic       room,
  output logic       tx_valid,
  output logic [7:0] tx_data,
  output logic       tx_sop,
  output logic       tx_eop
);
  localparam int AW = $clog2(DEPTH);

  cell_t          fifo [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [AW:0]    cnt;
  logic           inflight;
  logic [CLW-1:0] bpos;
  logic           last_byte, pop;

  assign room      = (cnt + (AW+1)'(inflight)) < (AW+1)'(DEPTH);
  assign tx_valid  = cnt != 0;
  assign tx_data   = fifo[rp].data[bpos*8 +: 8];
  assign tx_sop    = tx_valid && fifo[rp].sop && bpos == 0;
  assign last_byte = bpos == fifo[rp].len - 1'b1;
  assign tx_eop    = tx_valid && fifo[rp].eop && last_byte;
  assign pop       = tx_valid && last_byte;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0; inflight <= 1'b0; bpos <= '0;
    end else begin
      inflight <= rd_issue;
      if (cell_valid) begin
        fifo[wp] <= cell_i;
        wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (tx_valid) bpos <= last_byte ? '0 : bpos + 1'b1;
      if (pop) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(cell_valid) - (AW+1)'(pop);
    end
  end
endmodule
