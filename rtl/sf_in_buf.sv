// sf_in_buf - input buffer of one switch-fabric port.
// Collects the port's byte stream (one byte per cycle, 2 Gbps at 250 MHz)
// into 32-byte cells, the unit of the shared memory, and queues complete
// cells in a small FIFO until the write arbiter takes them.  A cell closes
// when it is full or at the packet's last byte.  The fabric header (first
// four bytes of a packet) is latched and given with every cell of that
// packet.  The document only says the buffer aligns data in front of the
// shared memory; cell size, FIFO depth and the header format are this
// design's choices.
// Interface: rx_valid/rx_data/rx_sop/rx_eop in; cell_valid/cell_ready
// handshake out.  A completed cell that finds the FIFO full is lost and
// pulses overflow; afull warns the sender one cell ahead so it can pause.  Latency: a cell is offered the cycle after its last
// byte.
module sf_in_buf
  import sf_pkg::*;
#(
  parameter int DEPTH = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       rx_valid,
  input  logic [7:0] rx_data,
  input  logic       rx_sop,
  input  logic       rx_eop,
  output logic       cell_valid,
  input  logic       cell_ready,
  output cell_t      cell_o,
  output hdr_t       hdr,
  output logic       overflow,
  output logic       afull        // at most one free FIFO entry left
);
  localparam int AW = $clog2(DEPTH);

  typedef struct packed { cell_t c; hdr_t h; } entry_t;

  logic [CELL_BYTES*8-1:0] asm_data;
  logic [CLW-1:0]          asm_len;
  logic                    asm_sop;
  logic [31:0]             hbytes;
  hdr_t                    cur_hdr;

  entry_t         fifo [DEPTH];
  logic [AW-1:0]  wp, rp;
  logic [AW:0]    cnt;

  // Byte being added and whether it completes a cell.
  logic [CLW-1:0] pos;
  logic           close;
  entry_t         done;
  logic [31:0]    hb;
  logic           push, pop;

  assign pos   = rx_sop ? '0 : asm_len;
  assign close = rx_valid && (rx_eop || pos == CLW'(CELL_BYTES - 1));

  always_comb begin
    hb = hbytes;
    hb[pos[1:0]*8 +: 8] = rx_data;
    done.c.data = rx_sop ? '0 : asm_data;
    done.c.data[pos*8 +: 8] = rx_data;
    done.c.len  = pos + 1'b1;
    done.c.sop  = rx_sop || asm_sop;
    done.c.eop  = rx_eop;
    done.h      = cur_hdr;
    // header bytes still arriving in the first cell
    if (rx_sop) done.h = parse_hdr({24'h0, rx_data});
    else if (asm_sop && pos < 4) done.h = parse_hdr(hb);
  end

  assign push       = close && (cnt < (AW+1)'(DEPTH));
  assign cell_valid = cnt != 0;
  assign afull      = cnt >= (AW+1)'(DEPTH - 1);
  assign pop        = cell_valid && cell_ready;
  assign cell_o     = fifo[rp].c;
  assign hdr        = fifo[rp].h;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      asm_data <= '0; asm_len <= '0; asm_sop <= 1'b0; hbytes <= '0;
      cur_hdr <= '0; wp <= '0; rp <= '0; cnt <= '0; overflow <= 1'b0;
    end else begin
      overflow <= close && !push;
      if (rx_valid) begin
        if (rx_sop) hbytes <= {24'h0, rx_data};
        else if (asm_sop && pos < 4) hbytes <= hb;
        cur_hdr <= done.h;
        if (close) begin
          asm_len <= '0; asm_data <= '0; asm_sop <= 1'b0;
        end else begin
          asm_len  <= pos + 1'b1;
          asm_data <= done.c.data;
          asm_sop  <= rx_sop || asm_sop;
        end
      end
      if (push) begin
        fifo[wp] <= done;
        wp <= (wp == AW'(DEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (pop) rp <= (rp == AW'(DEPTH-1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end
endmodule
