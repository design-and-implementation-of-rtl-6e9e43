// Testbench for sf_shared_mem: random cells written, read back one cycle
// after the request, with a write and a read in the same cycle.
module tb_sf_shared_mem;
  import sf_pkg::*;
  localparam int N = 64;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic we, re;
  logic [5:0] waddr, raddr;
  cell_t wcell, rcell;
  cell_t model [N];
  sf_shared_mem #(.NCELLS(N)) dut (.*);

  function automatic cell_t rnd_cell();
    cell_t c;
    for (int i = 0; i < CELL_BYTES / 4; i++) c.data[i*32 +: 32] = $urandom;
    c.len = CLW'($urandom_range(1, CELL_BYTES));
    c.sop = 1'($urandom); c.eop = 1'($urandom);
    return c;
  endfunction

  initial begin
    we = 0; re = 0; waddr = 0; raddr = 0; wcell = '0;
    for (int a = 0; a < N; a++) begin
      @(negedge clk); we = 1; waddr = 6'(a); wcell = rnd_cell(); model[a] = wcell;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 300; k++) begin
      int ra;
      ra = $urandom_range(0, N - 1);
      @(negedge clk);
      re = 1; raddr = 6'(ra);
      we = 1'($urandom); waddr = 6'($urandom_range(0, N - 1)); wcell = rnd_cell();
      if (we && waddr == raddr) we = 0;
      @(posedge clk); #1;
      checks++;
      if (rcell !== model[ra]) begin failures++; $display("FAIL addr %0d", ra); end
      if (we) model[waddr] = wcell;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
