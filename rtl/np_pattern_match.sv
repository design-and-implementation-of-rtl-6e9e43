// np_pattern_match - content pattern matching engine of the packet analyzer.
// Finds rule strings anywhere in the packet, one byte per cycle, with a
// state machine held in memory.
//  * Prefix table (PT): every cycle the last two bytes form a 16-bit key.
//    The table holds NPT sorted lower bounds; a pipelined binary range
//    search, one memory block per search step, finds the range the key
//    falls in and reads that range's start state.  A non-zero start state
//    means the first two bytes of some rule were just seen.
//  * Main FSM: a comparator block and a state memory split in two: the
//    non-branching state memory (one transition per state) and the
//    branching state memory (up to NB transitions per state).  Bit SW-1 of
//    a state number selects the memory.  Each transition holds the byte it
//    expects, the next state and an accept flag with a rule number.  The
//    running state compares its transitions with the current byte: a hit
//    moves on (and reports the rule on accept), a miss ends the attempt.
//    When no attempt is running, the FSM takes the PT's start state.
//    A PT range may accept directly (two-byte rules).
// The byte stream into the FSM is delayed to line up with the PT result.
// Outputs: match_valid/match_rule pulse on every rule found.
// PT + pipelined binary range search, the comparator and the two state
// memories follow the document.  The word sharing of states in the
// branching memory, the exact memory layouts and the single running
// attempt (a new attempt starts only when none is running) are this
// design's simplifications.
// Tables are written through wr_* (table select, address, data).
module np_pattern_match #(
  parameter int NPT    = 64,     // prefix ranges
  parameter int NSTATE = 1024,   // states per state memory
  parameter int NB     = 4,      // transitions per branching state
  localparam int LG = $clog2(NPT),
  localparam int SW = $clog2(NSTATE) + 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  logic        in_sop,
  input  logic [7:0]  in_byte,
  output logic        match_valid,
  output logic [9:0]  match_rule,
  // table writes: sel 0 = PT bound, 1 = PT result, 2 = non-branching word,
  // 3 = branching word slot (addr = state*NB + slot)
  input  logic        wr_en,
  input  logic [1:0]  wr_sel,
  input  logic [SW+2:0] wr_addr,
  input  logic [SW+19:0] wr_data
);
  // transition word: {valid, ch, next, acc, rule}
  typedef struct packed {
    logic          valid;
    logic [7:0]    ch;
    logic [SW-1:0] next;
    logic          acc;
    logic [9:0]    rule;
  } tr_t;

  localparam int L = LG + 1;   // PT latency

  // ---------------- prefix table ----------------
  logic [15:0] bound [LG][NPT];     // one copy per search step
  tr_t         pt_res [NPT];        // start "transition" of each range
  logic [7:0]  prev_byte;
  logic        prev_ok;             // previous byte belongs to this packet

  always_ff @(posedge clk) begin
    if (wr_en && wr_sel == 2'd0)
      for (int s = 0; s < LG; s++) bound[s][wr_addr[LG-1:0]] <= wr_data[15:0];
    if (wr_en && wr_sel == 2'd1) pt_res[wr_addr[LG-1:0]] <= tr_t'(wr_data);
  end

  logic [15:0]   st_key [LG+1];
  logic [LG-1:0] st_idx [LG+1];
  logic          st_v   [LG+1];
  logic [LG-1:0] cand   [LG];

  assign st_key[0] = {prev_byte, in_byte};
  assign st_idx[0] = '0;
  assign st_v[0]   = in_valid && !in_sop && prev_ok;

  for (genvar s = 0; s < LG; s++) begin : g_step
    assign cand[s] = st_idx[s] | (LG'(1) << (LG - 1 - s));
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n) begin st_v[s+1] <= 1'b0; st_key[s+1] <= '0; st_idx[s+1] <= '0; end
      else begin
        st_v[s+1]   <= st_v[s];
        st_key[s+1] <= st_key[s];
        st_idx[s+1] <= (bound[s][cand[s]] <= st_key[s]) ? cand[s] : st_idx[s];
      end
  end

  tr_t pt_out;
  logic pt_v;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin pt_v <= 1'b0; pt_out <= '0; end
    else begin pt_v <= st_v[LG]; pt_out <= pt_res[st_idx[LG]]; end

  // ---------------- byte delay to meet the PT result ----------------
  // The PT result for the key ending at byte t is used L cycles after byte t
  // arrived; the FSM then needs byte t+1, delayed by L cycles.
  logic [7:0] dly_b [L];
  logic       dly_v [L];
  logic       dly_s [L];
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_byte <= '0; prev_ok <= 1'b0;
      for (int i = 0; i < L; i++) begin dly_b[i] <= '0; dly_v[i] <= 1'b0; dly_s[i] <= 1'b0; end
    end else begin
      if (in_valid) begin prev_byte <= in_byte; prev_ok <= 1'b1; end
      dly_b[0] <= in_byte; dly_v[0] <= in_valid; dly_s[0] <= in_sop;
      for (int i = 1; i < L; i++) begin
        dly_b[i] <= dly_b[i-1]; dly_v[i] <= dly_v[i-1]; dly_s[i] <= dly_s[i-1];
      end
    end
  end
  logic [7:0] f_byte;
  logic       f_v, f_sop;
  assign f_byte = dly_b[L-1];
  assign f_v    = dly_v[L-1];
  assign f_sop  = dly_s[L-1];

  // ---------------- state memories and comparator ----------------
  tr_t nb_mem [NSTATE];
  tr_t br_mem [NSTATE][NB];
  always_ff @(posedge clk) begin
    if (wr_en && wr_sel == 2'd2) nb_mem[wr_addr[SW-2:0]] <= tr_t'(wr_data);
    if (wr_en && wr_sel == 2'd3)
      br_mem[wr_addr[SW-2+$clog2(NB):$clog2(NB)]][wr_addr[$clog2(NB)-1:0]] <= tr_t'(wr_data);
  end

  logic          run;
  logic [SW-1:0] state;
  tr_t           cmp [NB];
  tr_t           hitw;
  logic          hit;
  always_comb begin
    for (int k = 0; k < NB; k++) cmp[k] = '0;
    if (state[SW-1]) for (int k = 0; k < NB; k++) cmp[k] = br_mem[state[SW-2:0]][k];
    else             cmp[0] = nb_mem[state[SW-2:0]];
    hit = 1'b0; hitw = '0;
    for (int k = 0; k < NB; k++)
      if (!hit && cmp[k].valid && cmp[k].ch == f_byte) begin hit = 1'b1; hitw = cmp[k]; end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0; state <= '0; match_valid <= 1'b0; match_rule <= '0;
    end else begin
      match_valid <= 1'b0;
      if (run && f_v && !f_sop) begin
        // running attempt consumes this byte
        if (hit && hitw.acc) begin
          match_valid <= 1'b1; match_rule <= hitw.rule; run <= 1'b0;
        end else if (hit) state <= hitw.next;
        else              run <= 1'b0;
      end else if (pt_v && pt_out.valid) begin
        if (pt_out.acc) begin match_valid <= 1'b1; match_rule <= pt_out.rule; run <= 1'b0; end
        else begin run <= 1'b1; state <= pt_out.next; end
      end else if (f_sop) run <= 1'b0;
    end
  end
endmodule
