// Shared types and constants of the 16x16 shared-memory switch fabric.
// Ports are 8 bits wide: 2 Gbps per port at the 250 MHz core clock.
// Packets are stored in the shared memory as 32-byte cells.  Every packet
// starts with a 4-byte fabric header (this design's own format):
//   byte0 = {mcast, prio[2:0], 3'b000, dest[8]}, byte1 = dest[7:0],
//   byte2 = flow[15:8], byte3 = flow[7:0].
package sf_pkg;
  localparam int NPORTS     = 16;
  localparam int PW         = $clog2(NPORTS);
  localparam int CELL_BYTES = 32;
  localparam int CLW        = $clog2(CELL_BYTES + 1);   // cell length field
  localparam int NPRIO      = 8;
  localparam int PRW        = $clog2(NPRIO);
  localparam int NDEST      = 512;
  localparam int DW         = $clog2(NDEST);
  localparam int QDW        = 14;                       // queue depth width (cells)
  localparam int COSTW      = 4;                        // path cost width
  localparam int JUMBO_CELLS = (9216 + CELL_BYTES - 1) / CELL_BYTES;

  typedef struct packed {
    logic           mcast;
    logic [PRW-1:0] prio;
    logic [DW-1:0]  dest;
    logic [15:0]    flow;
  } hdr_t;

  typedef struct packed {
    logic [CELL_BYTES*8-1:0] data;   // byte 0 in bits [7:0]
    logic [CLW-1:0]          len;    // valid bytes, 1..CELL_BYTES
    logic                    sop;
    logic                    eop;
  } cell_t;

  // One backward-channel path-information message.
  typedef struct packed {
    logic             valid;
    logic [DW-1:0]    idx;
    logic [COSTW-1:0] cost;
  } pmsg_t;

  // Switching sub-table select for table writes.
  typedef enum logic [2:0] {
    TBL_DEST  = 3'd0,   // destination port mask per dest id
    TBL_LOOP  = 3'd1,   // allowed multicast outputs per input port
    TBL_TRUNK = 3'd2,   // trunk size code per port (0:1 1:2 2:4 3:8)
    TBL_FLOW  = 3'd3,   // trunk member offset per flow hash
    TBL_WRED  = 3'd4    // per-priority WRED: addr[2:0]=prio, addr[4:3]=field
  } tbl_sel_e;

  function automatic hdr_t parse_hdr(input logic [31:0] b);  // b[7:0] = byte0
    hdr_t h;
    h.mcast = b[7];
    h.prio  = b[6:4];
    h.dest  = {b[0], b[15:8]};
    h.flow  = {b[23:16], b[31:24]};
    return h;
  endfunction
endpackage
