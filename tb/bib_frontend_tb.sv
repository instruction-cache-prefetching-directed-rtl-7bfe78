// bib_frontend_tb: end-to-end test of the BIB prefetching fetch front end
// at its default parameters (2 KB direct-mapped cache, 8-entry prefetch
// buffer, 1024-entry 4-way EBTB), with a three-cycle L2 model.
//
// The testbench plays the rest of the processor: a decode (RD) stage that
// offers the EBTB index of every branch to the index FIFO and carries the
// "queued" answer on, an ALU stage that resolves branches and redirects
// fetch when the predicted next PC was wrong (flushing the two younger
// stages), and a MEM stage, the first cycle after execution, in which the
// branch outcome is reported to the EBTB and the index FIFO. A branch
// decoded right behind another one therefore finds the FIFO's check bit
// clear and is refused. The program is synthetic and
// generated from hash functions of the word address over a 16 KB code
// region: about one instruction in five is a branch, either a loop branch
// (backward, taken trip-count times then not taken), a biased forward
// branch (80% in its direction) or an unconditional far jump; the last word
// jumps back to 0. The committed stream is checked against an independent
// architectural PC walk: every instruction reaching the ALU stage must be
// the next one of the program and carry the word the memory holds there.
//
// It also checks the cold-start latency (the first instruction arrives four
// cycles after reset: a one-cycle lookup plus the three-cycle L2), counts
// every mechanism of the design (stall, miss, miss on a line in flight,
// prefetch issue, EBTB and sequential candidates, on-chip drop, buffer
// supply, line move, FIFO update and refusal, misprediction) and fails if
// one never happened, and prints the memory cycles per instruction (MCPI:
// fetch stall cycles over committed instructions). It traces every
// prefetch back to its candidate rule (EBTB line or next sequential line),
// counts the prefetched lines the fetch later took from the prefetch
// buffer, and requires at least one EBTB-directed prefetch in five to be
// used.
module bib_frontend_tb;
  import bib_pkg::*;

  localparam int unsigned N_INSTR    = 1000000;
  localparam int unsigned CODE_WORDS = 4096;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      if_valid, if_ebtb_hit, if_pred_taken;
  addr_t     if_pc, if_pred_next;
  instr_t    if_instr;
  ebtb_idx_t if_ebtb_idx;
  logic      dec_branch, dec_queued;
  ebtb_idx_t dec_idx;
  resolve_t  res;
  logic      redirect_valid;
  addr_t     redirect_pc;
  logic      l2_req_valid, l2_req_ready, l2_resp_valid;
  laddr_t    l2_req_line;
  line_t     l2_resp_data;
  events_t   events;
  int        l2_accepted;

  bib_frontend dut (.*);
  l2_model #(.LATENCY(3)) u_l2 (
    .clk, .rst_n, .req_valid(l2_req_valid), .req_line(l2_req_line), .req_ready(l2_req_ready),
    .resp_valid(l2_resp_valid), .resp_data(l2_resp_data), .accepted(l2_accepted)
  );

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ---------------- synthetic program ----------------
  function automatic int unsigned hsh(int unsigned x);
    int unsigned h;
    h = x * 32'h9E37_79B1;
    h = h ^ (h >> 15);
    h = h * 32'h85EB_CA6B;
    return h ^ (h >> 13);
  endfunction

  function automatic bit is_branch(int unsigned w);
    return (w == CODE_WORDS - 1) || (w < CODE_WORDS && hsh(w) % 5 == 0);
  endfunction

  function automatic instr_t mem_word(addr_t a);
    return a ^ 32'hA5C3_0F00;
  endfunction

  // next word address of branch w on its visit-th execution
  function automatic int unsigned next_of(int unsigned w, int unsigned visit, output bit taken,
                                          output int unsigned tgt);
    int unsigned kind, h2, h3;
    kind = hsh(w + 17) % 10;
    h2   = hsh(w + 101);
    h3   = hsh(w + 733);
    if (w == CODE_WORDS - 1) begin
      taken = 1; tgt = 0;
    end else if (kind < 4) begin
      int unsigned trip;
      trip  = 2 + h2 % 7;
      taken = (visit % (trip + 1)) != trip;
      tgt   = (w + CODE_WORDS - (4 + h3 % 36)) % CODE_WORDS;
    end else if (kind < 8) begin
      taken = (h2 % 2 == 1) ^ (hsh(w * 131 + visit) % 10 >= 8);
      tgt   = (w + 2 + h3 % 30) % CODE_WORDS;
    end else begin
      taken = 1;
      tgt   = h3 % CODE_WORDS;
    end
    return taken ? tgt : w + 1;
  endfunction

  // ---------------- pipeline model ----------------
  typedef struct packed {
    logic      v;
    addr_t     pc;
    instr_t    ins;
    addr_t     pnext;
    ebtb_idx_t idx;
    logic      q;
  } stage_t;

  stage_t      rd, ex;
  resolve_t    mem_res;
  int unsigned visit [CODE_WORDS];
  addr_t       arch_pc;
  addr_t       ex_next;
  bit          ex_taken;
  int unsigned ex_tgt;
  int unsigned committed;

  always_comb begin
    ex_next  = ex.pc + 4;
    ex_taken = 0;
    ex_tgt   = 0;
    if (ex.v && is_branch(ex.pc[31:2]))
      ex_next = addr_t'(next_of(ex.pc[31:2], visit[ex.pc[31:2] % CODE_WORDS], ex_taken, ex_tgt)) << 2;
    redirect_valid = ex.v && ex_next != ex.pnext;
    redirect_pc    = ex_next;
    res            = mem_res;
    dec_branch     = rd.v && is_branch(rd.pc[31:2]) && !redirect_valid;
    dec_idx        = rd.idx;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd        <= '0;
      ex        <= '0;
      mem_res   <= '0;
      arch_pc   <= '0;
      committed <= 0;
      foreach (visit[i]) visit[i] <= 0;
    end else begin
      if (ex.v) begin
        check(ex.pc == arch_pc, "committed PC follows the program");
        check(ex.ins == mem_word(ex.pc), "committed word matches memory");
        arch_pc   <= ex_next;
        committed <= committed + 1;
        if (is_branch(ex.pc[31:2])) visit[ex.pc[31:2] % CODE_WORDS] <= visit[ex.pc[31:2] % CODE_WORDS] + 1;
      end
      mem_res        <= '0;
      mem_res.valid  <= ex.v && is_branch(ex.pc[31:2]);
      mem_res.pc     <= ex.pc;
      mem_res.taken  <= ex_taken;
      mem_res.target <= addr_t'(ex_tgt) << 2;
      mem_res.idx    <= ex.idx;
      mem_res.queued <= ex.q;
      if (redirect_valid) begin
        rd <= '0;
        ex <= '0;
      end else begin
        ex   <= rd;
        ex.q <= dec_branch && dec_queued;
        rd   <= if_valid ? stage_t'{1'b1, if_pc, if_instr, if_pred_next, if_ebtb_idx, 1'b0} : '0;
      end
    end
  end

  // ---------------- mechanism counters ----------------
  int unsigned cycles, first_cycle;
  int unsigned n_stall, n_miss, n_miss_inflight, n_pf, n_ebtb_cand, n_seq_cand, n_drop,
               n_buf, n_move, n_fifo_upd, n_fifo_rej, n_redirect, n_ebtb_hit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycles <= 0; first_cycle <= 0;
      n_stall <= 0; n_miss <= 0; n_miss_inflight <= 0; n_pf <= 0; n_ebtb_cand <= 0;
      n_seq_cand <= 0; n_drop <= 0; n_buf <= 0; n_move <= 0; n_fifo_upd <= 0;
      n_fifo_rej <= 0; n_redirect <= 0; n_ebtb_hit <= 0;
    end else begin
      cycles <= cycles + 1;
      if (if_valid && first_cycle == 0) first_cycle <= cycles;
      n_stall         <= n_stall         + events.fetch_stall;
      n_miss          <= n_miss          + events.miss_issue;
      n_miss_inflight <= n_miss_inflight + events.miss_on_inflight;
      n_pf            <= n_pf            + events.pf_issue;
      n_ebtb_cand     <= n_ebtb_cand     + events.ebtb_cand;
      n_seq_cand      <= n_seq_cand      + events.seq_cand;
      n_drop          <= n_drop          + events.onchip_drop;
      n_buf           <= n_buf           + events.buf_supply;
      n_move          <= n_move          + events.line_move;
      n_fifo_upd      <= n_fifo_upd      + events.fifo_update;
      n_fifo_rej      <= n_fifo_rej      + events.fifo_reject;
      n_redirect      <= n_redirect      + redirect_valid;
      n_ebtb_hit      <= n_ebtb_hit      + (if_valid && if_ebtb_hit);
    end
  end

  // ---------------- prefetch usefulness ----------------
  // source of each queued candidate (1 = EBTB line, 2 = sequential), then of
  // each line sent to the L2 as a prefetch; a fetch served from the buffer
  // by such a line counts as a useful prefetch of that source
  byte unsigned cand_src  [laddr_t];
  byte unsigned issued_src[laddr_t];
  int unsigned  n_pf_src [3], n_used_src [3];
  initial foreach (n_pf_src[i]) begin n_pf_src[i] = 0; n_used_src[i] = 0; end

  always @(posedge clk) if (rst_n) begin
    if (dut.ev_queued) cand_src[dut.cand_line] = dut.ev_ebtb_cand ? 8'd1 : 8'd2;
    if (events.pf_issue && cand_src.exists(l2_req_line)) begin
      issued_src[l2_req_line] = cand_src[l2_req_line];
      n_pf_src[cand_src[l2_req_line]]++;
    end
    if (events.buf_supply && issued_src.exists(dut.fetch_line)) begin
      n_used_src[issued_src[dut.fetch_line]]++;
      issued_src.delete(dut.fetch_line);
    end
  end

  task automatic seen(int unsigned n, string what);
    check(n > 0, what);
    $display("  %-34s %0d", what, n);
  endtask

  initial begin
    repeat (N_INSTR * 20) @(posedge clk);
    failures++;
    $display("FAIL watchdog: %0d instructions committed", committed);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    wait (committed >= N_INSTR);
    @(posedge clk); #1;
    check(first_cycle == 4, "cold start: first instruction four cycles after reset");
    check(l2_accepted == int'(n_miss + n_pf), "every lower level request counted once");
    $display("cycles %0d, instructions %0d, first delivery in cycle %0d", cycles, committed, first_cycle);
    seen(n_stall,         "fetch stall cycles");
    seen(n_miss,          "fetch miss requests");
    seen(n_miss_inflight, "stall cycles on a line in flight");
    seen(n_pf,            "prefetch requests");
    seen(n_ebtb_cand,     "EBTB prefetch candidates");
    seen(n_seq_cand,      "sequential candidates");
    seen(n_drop,          "candidates already on chip");
    seen(n_buf,           "fetches from the prefetch buffer");
    seen(n_move,          "lines moved buffer -> cache");
    seen(n_fifo_upd,      "EBTB prefetch fields written");
    seen(n_fifo_rej,      "branch indices refused by the FIFO");
    seen(n_redirect,      "mispredictions (redirects)");
    seen(n_ebtb_hit,      "delivered EBTB hits");
    seen(n_used_src[1],   "used EBTB-directed prefetches");
    seen(n_used_src[2],   "used sequential prefetches");
    $display("prefetches issued: EBTB %0d (%0d used), sequential %0d (%0d used)",
             n_pf_src[1], n_used_src[1], n_pf_src[2], n_used_src[2]);
    check(n_pf_src[1] + n_pf_src[2] == n_pf, "every prefetch traced to its candidate");
    check(n_used_src[1] * 5 >= n_pf_src[1], "at least one EBTB-directed prefetch in five is used");
    $display("MCPI %0.4f", real'(n_stall) / real'(committed));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
