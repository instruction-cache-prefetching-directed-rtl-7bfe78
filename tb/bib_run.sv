// bib_run: one complete fetch system for testbenches: the front end with a
// given cache organisation, the three-cycle L2 model, and the same RD/ALU/MEM
// pipeline model and synthetic program as bib_frontend_tb (see there). It
// runs until N_INSTR instructions have committed, checking each committed
// PC and word against the architectural walk of the program, then raises
// done with its counts: cycles, fetch stall cycles (the instruction access
// penalty), lower level requests and the number of failed checks.
module bib_run
  import bib_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 2048,
  parameter int unsigned CACHE_WAYS  = 1,
  parameter int unsigned N_INSTR     = 100000
)(
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output int unsigned cycles,
  output int unsigned n_stall,
  output int unsigned n_req,
  output int          failures
);
  localparam int unsigned CODE_WORDS = 4096;

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

  bib_frontend #(.CACHE_BYTES(CACHE_BYTES), .CACHE_WAYS(CACHE_WAYS)) dut (.*);
  l2_model #(.LATENCY(3)) u_l2 (
    .clk, .rst_n, .req_valid(l2_req_valid), .req_line(l2_req_line), .req_ready(l2_req_ready),
    .resp_valid(l2_resp_valid), .resp_data(l2_resp_data), .accepted(l2_accepted)
  );

  int checks = 0;
  initial failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 5) $display("FAIL %s (%0d B, %0d-way)", what, CACHE_BYTES, CACHE_WAYS);
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

  // ---------------- counters ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cycles  <= 0;
      n_stall <= 0;
    end else if (!done) begin
      cycles  <= cycles + 1;
      n_stall <= n_stall + events.fetch_stall;
    end
  end
  assign done  = committed >= N_INSTR;
  assign n_req = l2_accepted;

endmodule
