// sf_free_cell_mgr - free cell manager of the shared memory.
// Hands out free cell indices and takes released ones back.  Cells never
// used since reset come from a counter; released cells go into a FIFO that
// is served first.  So the manager is usable in the cycle after reset, with
// no initialisation sweep.  One allocation and one release per cycle.
// alloc_idx is valid whenever free_count is non-zero; alloc takes it.
// The document gives the function (allocating packet space in the shared
// memory); the free-list structure is this design's own.
module sf_free_cell_mgr #(
  parameter int NCELLS = 4096,
  localparam int AW = $clog2(NCELLS)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          alloc,
  output logic [AW-1:0] alloc_idx,
  output logic [AW:0]   free_count,
  input  logic          free_en,
  input  logic [AW-1:0] free_idx
);
  logic [AW-1:0] fifo [NCELLS];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   fcnt;      // released cells in the FIFO
  logic [AW:0]   fresh;     // next never-used cell
  logic          from_fifo;

  assign from_fifo  = fcnt != 0;
  assign alloc_idx  = from_fifo ? fifo[rp] : fresh[AW-1:0];
  assign free_count = fcnt + ((AW+1)'(NCELLS) - fresh);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; fcnt <= '0; fresh <= '0;
    end else begin
      if (free_en) begin
        fifo[wp] <= free_idx;
        wp <= wp + 1'b1;
      end
      if (alloc && from_fifo) rp <= rp + 1'b1;
      if (alloc && !from_fifo) fresh <= fresh + 1'b1;
      fcnt <= fcnt + (AW+1)'(free_en) - (AW+1)'(alloc && from_fifo);
    end
  end

  // The caller never allocates from an empty pool.
  assert property (@(posedge clk) disable iff (!rst_n) alloc |-> free_count != 0);
endmodule
