// np_jump_table - jump table of the packet processor cluster.
// One entry per classification result (256 classes) giving the start
// address of the firmware routine for that class.  The job scheduler looks
// up the class of the packet it dispatches, so the processor starts in the
// right routine without a chain of classification branches.  Lookup is
// combinational; entries are written one per cycle.
// The function follows the document; the address width is this design's.
module np_jump_table
  import np_pkg::*;
(
  input  logic           clk,
  input  logic [CW-1:0]  class_id,
  output logic [PCW-1:0] jump_addr,
  input  logic           wr_en,
  input  logic [CW-1:0]  wr_class,
  input  logic [PCW-1:0] wr_addr
);
  logic [PCW-1:0] tbl [NCLASS];
  always_ff @(posedge clk) if (wr_en) tbl[wr_class] <= wr_addr;
  assign jump_addr = tbl[class_id];
endmodule
