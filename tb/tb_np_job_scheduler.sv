// Testbench for np_job_scheduler: jobs with random classes arrive while
// four modelled packet processors take random times per job.  Checks that
// jobs start in arrival order, only on idle processors, each exactly once,
// with the jump-table address of their class, and that all four
// processors get work.
module tb_np_job_scheduler;
  import np_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic chk(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", msg); end
  endtask

  logic job_valid, job_ready, jt_we;
  job_t job, pp_job;
  logic [NPP-1:0] pp_idle, pp_start;
  logic [PCW-1:0] pp_pc, jt_addr;
  logic [CW-1:0] jt_class;
  np_job_scheduler dut (.*);

  logic [PCW-1:0] jt [NCLASS];
  job_t sentq [$];
  int busy [NPP];
  int per_pp [NPP];
  int ndone = 0, full_seen = 0;
  localparam int NJOBS = 400;

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPP; p++) if (pp_start[p]) begin
      job_t e;
      chk(busy[p] == 0, "start only on an idle processor");
      e = sentq.pop_front();
      chk(pp_job == e, "jobs in arrival order");
      chk(pp_pc == jt[e.dec.class_id], "jump address of the class");
      busy[p] = $urandom_range(1, 40); per_pp[p]++; ndone++;
    end
  end
  always @(negedge clk) for (int p = 0; p < NPP; p++) begin
    if (busy[p] > 0) busy[p]--;
    pp_idle[p] = busy[p] == 0 && !pp_start[p];
  end

  initial begin
    job_valid = 0; job = '0; jt_we = 0; jt_class = 0; jt_addr = 0; pp_idle = '1;
    foreach (busy[p]) begin busy[p] = 0; per_pp[p] = 0; end
    repeat (2) @(posedge clk); rst_n = 1;
    for (int c = 0; c < NCLASS; c++) begin
      @(negedge clk); jt_we = 1; jt_class = CW'(c); jt_addr = PCW'($urandom); jt[c] = jt_addr;
    end
    @(negedge clk); jt_we = 0;
    for (int n = 0; n < NJOBS; n++) begin
      @(negedge clk);
      job_valid = ($urandom_range(0, 2) != 0);
      job.slot = SLOTW'($urandom); job.dec = decision_t'($urandom);
      @(posedge clk);
      if (!job_ready && job_valid) full_seen++;
      if (job_valid && job_ready) sentq.push_back(job); else n--;
    end
    @(negedge clk); job_valid = 0;
    repeat (2000) @(posedge clk);
    chk(ndone == NJOBS, $sformatf("all jobs dispatched (%0d)", ndone));
    for (int p = 0; p < NPP; p++) chk(per_pp[p] > NJOBS / 8, "every processor used");
    chk(full_seen > 0, "queue filled at least once");
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
