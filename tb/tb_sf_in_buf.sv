// Testbench for sf_in_buf: random packets are sent byte by byte; the cells
// taken out (with random back-pressure) are reassembled and compared with
// the packets sent, and every cell's header with the packet's first four
// bytes.  A final phase holds cell_ready low to force an overflow.
module tb_sf_in_buf;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  logic rx_valid, rx_sop, rx_eop, cell_valid, cell_ready, overflow;
  logic [7:0] rx_data;
  cell_t cell_o;
  hdr_t hdr;
  logic afull;
  sf_in_buf dut (.*);

  byte unsigned sent [$][$];
  byte unsigned cur [$];
  int npkts = 0, ncells = 0, novf = 0;
  bit hold = 0;

  // receiver
  always @(posedge clk) if (rst_n) begin
    if (overflow) novf++;
    if (cell_valid && cell_ready) begin
      ncells++;
      if (cell_o.sop) cur = {};
      for (int i = 0; i < cell_o.len; i++) cur.push_back(cell_o.data[i*8 +: 8]);
      chk(cell_o.eop || cell_o.len == CELL_BYTES, "only last cell may be short");
      if (cell_o.eop) begin
        byte unsigned exp [$];
        exp = sent.pop_front();
        chk(cur == exp, $sformatf("packet %0d contents (%0d vs %0d bytes)", npkts, cur.size(), exp.size()));
        chk(hdr == parse_hdr({exp[3], exp[2], exp[1], exp[0]}), "header");
        npkts++;
      end
    end
  end
  always @(negedge clk) cell_ready = hold ? 1'b0 : ($urandom_range(0, 3) != 0);

  task automatic send_pkt(int len);
    byte unsigned p [$];
    for (int i = 0; i < len; i++) p.push_back(8'($urandom));
    sent.push_back(p);
    for (int i = 0; i < len; i++) begin
      @(negedge clk);
      rx_valid = 1; rx_data = p[i]; rx_sop = (i == 0); rx_eop = (i == len - 1);
      if ($urandom_range(0, 9) == 0) begin
        @(negedge clk); rx_valid = 0;
      end
    end
    @(negedge clk); rx_valid = 0; rx_sop = 0; rx_eop = 0;
  endtask

  initial begin
    rx_valid = 0; rx_sop = 0; rx_eop = 0; rx_data = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int k = 0; k < 200; k++) send_pkt($urandom_range(4, 140));
    send_pkt(32); send_pkt(33); send_pkt(64); send_pkt(4);
    repeat (50) @(posedge clk);
    chk(npkts == 204, "all packets received");
    chk(novf == 0, "no overflow with a draining reader");
    // overflow: 6 full cells with the reader stopped, FIFO holds 4
    hold = 1;
    for (int i = 0; i < 6 * CELL_BYTES; i++) begin
      @(negedge clk); rx_valid = 1; rx_data = 8'(i); rx_sop = (i == 0); rx_eop = (i == 6 * CELL_BYTES - 1);
    end
    @(negedge clk); rx_valid = 0;
    repeat (3) @(posedge clk);
    chk(novf == 2, $sformatf("two cells lost (%0d)", novf));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
