// Testbench for sf_free_cell_mgr: allocates the whole pool, checks every
// index is handed out once, releases cells and checks they come back in
// release order, with free_count tracked throughout.
module tb_sf_free_cell_mgr;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic alloc, free_en;
  logic [3:0] alloc_idx, free_idx;
  logic [4:0] free_count;
  sf_free_cell_mgr #(.NCELLS(N)) dut (.*);

  bit used [N];
  int got;
  initial begin
    alloc = 0; free_en = 0; free_idx = 0;
    repeat (2) @(posedge clk); rst_n = 1; @(negedge clk);
    chk(free_count == N, "full pool after reset");
    for (int i = 0; i < N; i++) begin
      chk(!used[alloc_idx], $sformatf("index %0d handed out twice", alloc_idx));
      used[alloc_idx] = 1;
      alloc = 1; @(negedge clk); alloc = 0;
      chk(free_count == N - 1 - i, "count while allocating");
    end
    // release 3, 7, 11 then allocate: FIFO order
    foreach (used[k]) used[k] = 0;
    free_en = 1; free_idx = 3; @(negedge clk);
    free_idx = 7; @(negedge clk);
    free_idx = 11; @(negedge clk); free_en = 0;
    chk(free_count == 3, "count after release");
    chk(alloc_idx == 3, "first released comes first");
    alloc = 1; @(negedge clk);
    chk(alloc_idx == 7, "second released");
    // simultaneous release and allocate
    free_en = 1; free_idx = 5; @(negedge clk); free_en = 0;
    chk(alloc_idx == 11, "third released");
    chk(free_count == 2, "count unchanged by alloc+release");
    @(negedge clk);
    chk(alloc_idx == 5, "fifth cell back");
    @(negedge clk); alloc = 0;
    chk(free_count == 0, "empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
