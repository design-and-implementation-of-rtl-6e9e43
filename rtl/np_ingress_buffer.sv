// np_ingress_buffer - ingress buffer of the network processor.
// Holds the packets under processing.  The packet processors read it at any
// byte address, two bytes (word) or four bytes (double word), in a single
// cycle even when the access is unaligned.  The memory is split into four
// byte-wide banks, bank b holding the bytes whose address is b mod 4; an
// access at address a takes byte a+k from bank (a+k) mod 4, row (a+k)/4,
// so every bank is read once and no second cycle is needed.  Bytes are
// returned in network (big-endian) order: rd_data[31:24] is byte a; a word
// read gives its two bytes in rd_data[31:16] and zeros below.
// Writes are aligned 32-bit words from the ingress side, byte 0 in
// bits 31:24.  Read data is registered (one cycle).
// The unaligned single-cycle access follows the document; size, byte order
// and the bank structure are this design's choices.
module np_ingress_buffer #(
  parameter int BYTES = 16384,
  localparam int AW = $clog2(BYTES),
  localparam int RW = AW - 2
) (
  input  logic          clk,
  input  logic          wr_en,
  input  logic [RW-1:0] wr_addr,   // word address
  input  logic [31:0]   wr_data,
  input  logic          rd_en,
  input  logic [AW-1:0] rd_addr,   // byte address
  input  logic          rd_dword,  // 1: 4 bytes, 0: 2 bytes
  output logic [31:0]   rd_data
);
  logic [7:0] bank [4][BYTES/4];

  logic [AW-1:0] ba [4];
  logic [7:0]    bq [4];
  always_comb
    for (int k = 0; k < 4; k++) ba[k] = rd_addr + AW'(k);

  for (genvar b = 0; b < 4; b++) begin : g_bank
    // byte k of the access lands in bank (rd_addr + k) mod 4
    logic [RW-1:0] row;
    always_comb begin
      row = ba[0][AW-1:2];
      for (int k = 0; k < 4; k++) if (ba[k][1:0] == 2'(b)) row = ba[k][AW-1:2];
    end
    always_ff @(posedge clk) begin
      if (wr_en) bank[b][wr_addr] <= wr_data[31-8*b -: 8];
      if (rd_en) bq[b] <= bank[b][row];
    end
  end

  logic [1:0] lo_q;
  logic       dw_q;
  always_ff @(posedge clk) if (rd_en) begin lo_q <= rd_addr[1:0]; dw_q <= rd_dword; end

  always_comb begin
    for (int k = 0; k < 4; k++) rd_data[31-8*k -: 8] = bq[2'(lo_q + 2'(k))];
    if (!dw_q) rd_data[15:0] = '0;
  end
endmodule
