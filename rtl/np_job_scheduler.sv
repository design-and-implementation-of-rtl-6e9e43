// np_job_scheduler - job scheduler of the packet processor cluster.
// Classified packets (ingress buffer slot plus the packet analyzer's
// decision) wait in a FIFO.  Whenever a processor is idle the oldest job is
// handed to it, round-robin among idle processors, together with the start
// address that the jump table gives for the packet's class.  pp_start
// pulses for one cycle on the chosen processor; pp_idle must fall by the
// next cycle.  One dispatch per cycle.
// Clustering four processors behind a scheduler and the jump table follow
// the document; FIFO order, depth and round-robin are this design's.
module np_job_scheduler
  import np_pkg::*;
#(
  parameter int QDEPTH = 8
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           job_valid,
  output logic           job_ready,
  input  job_t           job,
  input  logic [NPP-1:0] pp_idle,
  output logic [NPP-1:0] pp_start,
  output job_t           pp_job,
  output logic [PCW-1:0] pp_pc,
  // jump table programming
  input  logic           jt_we,
  input  logic [CW-1:0]  jt_class,
  input  logic [PCW-1:0] jt_addr
);
  localparam int AW = $clog2(QDEPTH);

  job_t          q [QDEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   cnt;
  logic [$clog2(NPP)-1:0] rr, pick;
  logic          any, push, pop;
  job_t          head;
  logic [PCW-1:0] head_pc;

  assign head      = q[rp];
  assign job_ready = cnt < (AW+1)'(QDEPTH);
  assign push      = job_valid && job_ready;

  np_jump_table u_jt (
    .clk, .class_id(head.dec.class_id), .jump_addr(head_pc),
    .wr_en(jt_we), .wr_class(jt_class), .wr_addr(jt_addr)
  );

  always_comb begin
    any = 1'b0; pick = '0;
    for (int k = 0; k < NPP; k++) begin
      logic [$clog2(NPP)-1:0] p;
      p = rr + ($clog2(NPP))'(k);
      if (!any && pp_idle[p]) begin any = 1'b1; pick = p; end
    end
  end
  assign pop = any && cnt != 0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0; rr <= '0;
      pp_start <= '0; pp_job <= '0; pp_pc <= '0;
    end else begin
      pp_start <= '0;
      if (push) begin
        q[wp] <= job;
        wp <= (wp == AW'(QDEPTH-1)) ? '0 : wp + 1'b1;
      end
      if (pop) begin
        rp <= (rp == AW'(QDEPTH-1)) ? '0 : rp + 1'b1;
        pp_start[pick] <= 1'b1;
        pp_job <= head;
        pp_pc  <= head_pc;
        rr     <= pick + 1'b1;
      end
      cnt <= cnt + (AW+1)'(push) - (AW+1)'(pop);
    end
  end
endmodule
