// sf_shared_mem - the switch fabric's shared cell memory.
// NCELLS cells of 32 bytes plus length and sop/eop flags.  One cell write
// and one cell read per cycle; read data is registered (one cycle latency).
// All 16 ports together move one cell in and one cell out every two cycles
// at full load.  The document names the shared memory; its organisation is
// this design's choice.
module sf_shared_mem
  import sf_pkg::*;
#(
  parameter int NCELLS = 4096,
  localparam int AW = $clog2(NCELLS)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  cell_t         wcell,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output cell_t         rcell
);
  cell_t mem [NCELLS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wcell;
    if (re) rcell <= mem[raddr];
  end
endmodule
