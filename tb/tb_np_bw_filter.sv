// Testbench for np_bw_filter.  A reference model with the same sliding
// window estimate decides every packet of random flows arriving at random
// times; decisions must agree.  A directed part checks a flow sending at
// twice its allocation passes at most half (and over 30%) of its bytes over many
// windows, and that a flow within its allocation is never dropped.
module tb_np_bw_filter;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask
  logic [4:0] win_shift;
  logic req, valid, pass;
  logic [7:0] flow;
  logic [13:0] len;
  logic [19:0] alloc;
  np_bw_filter dut (.*);

  longint now = 0;
  longint cur [256], prev [256], wid [256];
  bit seen [256];
  always @(posedge clk) if (rst_n) now++;

  function automatic bit model(int f, int l, int a, int sh);
    longint w = now >> sh, span = 1 << sh, el = now & ((1 << sh) - 1), c0, p0, est;
    if (!seen[f] || wid[f] + 2 <= w) begin c0 = 0; p0 = 0; end
    else if (wid[f] + 1 == w) begin c0 = 0; p0 = cur[f]; end
    else begin c0 = cur[f]; p0 = prev[f]; end
    est = c0 + ((p0 * (span - el)) >> sh) + l;
    seen[f] = 1; wid[f] = w; prev[f] = p0; cur[f] = (est <= a) ? c0 + l : c0;
    return est <= a;
  endfunction

  task automatic pkt(int f, int l, int a, output bit exp);
    @(negedge clk); req = 1; flow = 8'(f); len = 14'(l); alloc = 20'(a);
    exp = model(f, l, a, win_shift);
    @(posedge clk); #1; req = 0;
    chk(valid && pass == exp, $sformatf("flow %0d len %0d", f, l));
  endtask

  initial begin
    bit e;
    longint passed = 0, offered = 0;
    req = 0; flow = 0; len = 0; alloc = 0; win_shift = 10;
    foreach (seen[f]) seen[f] = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      repeat ($urandom_range(0, 30)) @(negedge clk);
      pkt($urandom_range(0, 15), $urandom_range(64, 1518), $urandom_range(1500, 20000), e);
    end
    // flow 100: 1000 bytes every 128 cycles = 8000 B per 1024-cycle window, allowed 4000
    for (int n = 0; n < 400; n++) begin
      repeat (127) @(negedge clk);
      pkt(100, 1000, 4000, e); offered += 1000; if (e) passed += 1000;
    end
    chk(passed * 100 > offered * 30 && passed * 100 <= offered * 50, $sformatf("at most half passes (%0d of %0d)", passed, offered));
    // flow 101: well within its allocation, never dropped
    passed = 0;
    for (int n = 0; n < 100; n++) begin
      repeat (127) @(negedge clk);
      pkt(101, 1000, 12000, e); if (e) passed++;
    end
    chk(passed == 100, "conforming flow never dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
