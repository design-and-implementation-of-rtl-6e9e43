// Shared types and constants of the content switching network processor.
package np_pkg;
  localparam int NPP     = 4;     // packet processors in the cluster
  localparam int NCLASS  = 256;   // classes of the classification engine
  localparam int CW      = 8;     // class id width
  localparam int PCW     = 12;    // instruction address width
  localparam int NQ      = 8;     // priority levels of the traffic manager
  localparam int SLOTW   = 4;     // ingress buffer slot (1 KB each)

  // L3-4 classification key (IPv4 5-tuple)
  typedef struct packed {
    logic [31:0] sip;
    logic [31:0] dip;
    logic [15:0] sport;
    logic [15:0] dport;
    logic [7:0]  proto;
  } key_t;

  // summary of the packet analyzer for one packet
  typedef struct packed {
    logic [CW-1:0] class_id;
    logic          hit;        // a content rule matched
    logic [9:0]    rule;       // highest-priority matched rule
  } decision_t;

  // job handed to a packet processor
  typedef struct packed {
    logic [SLOTW-1:0] slot;    // ingress buffer slot of the packet
    decision_t        dec;
  } job_t;

  // packet descriptor given to the traffic manager by a packet processor
  typedef struct packed {
    logic [2:0]  prio;
    logic [7:0]  flow;
    logic [13:0] len;          // bytes
    logic [19:0] alloc;        // allowed bytes per averaging window
    logic [15:0] ts;           // finish time computed by the processor
    logic [15:0] ptr;          // packet memory address
  } desc_t;
endpackage
