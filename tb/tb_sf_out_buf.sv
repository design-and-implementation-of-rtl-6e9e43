// Testbench for sf_out_buf: cells are fed as the queue manager would (a
// read issued while room is high, the cell one cycle later) and the byte
// stream is compared with the cells' contents and sop/eop marks.  Checks
// that room never allows more cells than the buffer holds.
module tb_sf_out_buf;
  import sf_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  logic rd_issue, cell_valid, room, tx_valid, tx_sop, tx_eop;
  logic [7:0] tx_data;
  cell_t cell_i;
  sf_out_buf dut (.*);

  typedef struct { byte unsigned b; bit s; bit e; } exp_t;
  exp_t expq [$];
  cell_t pend;
  bit pend_v = 0;
  int sent_cells = 0, nbytes = 0;
  localparam int NCELL = 300;

  function automatic cell_t mk(int n);
    cell_t c;
    c = '0;
    c.sop = (n % 3 == 0); c.eop = (n % 3 == 2);
    c.len = c.eop ? CLW'($urandom_range(1, CELL_BYTES)) : CLW'(CELL_BYTES);
    for (int i = 0; i < CELL_BYTES; i++) c.data[i*8 +: 8] = 8'($urandom);
    return c;
  endfunction

  // feeder: issue when room, deliver next cycle
  always @(negedge clk) begin
    cell_valid = pend_v; cell_i = pend; pend_v = 0; rd_issue = 0;
    if (rst_n && room && sent_cells < NCELL && $urandom_range(0, 1)) begin
      rd_issue = 1; pend = mk(sent_cells); pend_v = 1;
      for (int i = 0; i < pend.len; i++)
        expq.push_back('{pend.data[i*8 +: 8], pend.sop && i == 0, pend.eop && i == pend.len - 1});
      sent_cells++;
    end
  end

  always @(posedge clk) if (rst_n) begin
    chk(dut.cnt <= 4, "no overflow of the buffer");
    if (tx_valid) begin
      exp_t e;
      e = expq.pop_front();
      chk(tx_data == e.b && tx_sop == e.s && tx_eop == e.e, $sformatf("byte %0d", nbytes));
      nbytes++;
    end
  end

  initial begin
    rd_issue = 0; cell_valid = 0; cell_i = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    wait (sent_cells == NCELL);
    repeat (200) @(posedge clk);
    chk(expq.size() == 0, "all bytes sent");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
