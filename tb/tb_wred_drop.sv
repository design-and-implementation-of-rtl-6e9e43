// Testbench for wred_drop: random depths, thresholds and slopes against a
// reference of the linear early-drop curve.
module tb_wred_drop;
  int checks = 0, failures = 0;
  logic [13:0] depth, min_th, max_th;
  logic [3:0]  shift;
  logic [15:0] rnd;
  logic        drop;

  wred_drop #(.DW(14)) dut (.*);

  initial begin
    int n_lo = 0, n_hi = 0, n_mid = 0;
    for (int i = 0; i < 20000; i++) begin
      longint ramp;
      bit exp;
      min_th = 14'($urandom_range(0, 3000));
      max_th = min_th + 14'($urandom_range(1, 3000));
      depth  = 14'($urandom_range(0, 7000));
      shift  = 4'($urandom_range(0, 12));
      rnd    = 16'($urandom);
      #1;
      ramp = (longint'(depth) - longint'(min_th)) * (longint'(1) << shift);
      if (depth >= max_th)      begin exp = 1; n_hi++; end
      else if (depth <= min_th) begin exp = 0; n_lo++; end
      else                      begin exp = longint'(rnd) < ramp; n_mid++; end
      checks++;
      if (drop !== exp) begin
        failures++;
        if (failures < 5) $display("FAIL depth=%0d min=%0d max=%0d sh=%0d rnd=%0d drop=%b", depth, min_th, max_th, shift, rnd, drop);
      end
    end
    checks++; if (n_lo == 0 || n_hi == 0 || n_mid == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
