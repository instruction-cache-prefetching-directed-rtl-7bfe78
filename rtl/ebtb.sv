// ebtb: extended branch target buffer.
//
// A conventional set-associative BTB (tag, taken address, 2-bit saturating
// history counter) whose entries carry one more field, the prefetch line
// address: the line of the first instruction of the basic block that ran
// after the basic block this branch is predicted to enter. The fetch unit
// looks it up combinationally with the address of every fetched instruction
// (one cycle for lookup, as in the evaluated machine). On a hit it predicts
// taken when the counter's upper bit is set and hands the prefetch line
// address, if one was recorded, to the prefetch controller.
//
// Writes, all at the clock edge:
//  * resolve port: a branch that left the ALU stage updates its counter and
//    taken address; a branch not found in its set is allocated in the entry
//    named by res.idx, which was picked at fetch time (the LRU or an empty way).
//  * prefetch port: the EBTB index FIFO writes a prefetch line address into
//    the entry pfw_idx. It is applied after the resolve write, so it wins on
//    the prefetch fields when both name the same entry.
// Replacement is true LRU with a 2-bit age per way (0 = most recent); a hit
// delivered to the decoder and every resolve touch their entry, the resolve
// winning when both fall in one set in the same cycle.
//
// From the document: 1024 entries, 4 ways, LRU, 2-bit saturating counter,
// the four fields of an entry. This design's choices: every branch is
// allocated (so that every branch has an entry to receive a prefetch line),
// a new entry starts weakly taken or weakly not taken after its first
// outcome, the prefetch field carries a valid bit and is cleared on
// allocation, and all state is cleared by reset.
module ebtb
  import bib_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // lookup (combinational)
  input  addr_t     lookup_pc,
  input  logic      lookup_fire,     // looked-up instruction was delivered: touch LRU
  output logic      hit,
  output logic      pred_taken,
  output addr_t     pred_target,
  output ebtb_idx_t lookup_idx,      // hit entry, or the entry a new branch would get
  output logic      pf_valid,
  output laddr_t    pf_line,
  // branch resolution
  input  resolve_t  res,
  // prefetch line address write from the index FIFO
  input  logic      pfw_valid,
  input  ebtb_idx_t pfw_idx,
  input  laddr_t    pfw_line
);
  localparam int unsigned SETS  = EBTB_SETS;
  localparam int unsigned WAYS  = EBTB_WAYS;
  localparam int unsigned SET_W = EBTB_SET_W;
  localparam int unsigned WAY_W = EBTB_WAY_W;
  localparam int unsigned TAG_W = ADDR_W - 2 - SET_W;
  localparam int unsigned TGT_W = ADDR_W - 2;

  typedef logic [SET_W-1:0] set_t;
  typedef logic [WAY_W-1:0] way_t;
  typedef logic [TAG_W-1:0] tag_t;

  // valid bits and LRU ages are flops with reset; the entry fields are
  // plain memories indexed by {set, way}, read only behind a valid bit
  logic [WAYS-1:0]  valid_q [SETS];
  logic [WAYS-1:0]  pfv_q   [SETS];
  way_t             age_q   [SETS][WAYS];
  tag_t             tag_m   [EBTB_ENTRIES];
  logic [TGT_W-1:0] tgt_m   [EBTB_ENTRIES];
  logic [1:0]       hist_m  [EBTB_ENTRIES];
  laddr_t           pfl_m   [EBTB_ENTRIES];

  function automatic set_t set_of(addr_t a);
    return a[2 +: SET_W];
  endfunction
  function automatic tag_t tag_of(addr_t a);
    return a[ADDR_W-1 -: TAG_W];
  endfunction
  function automatic ebtb_idx_t ent(set_t s, way_t w);
    return {s, w};
  endfunction

  // ---------------- lookup ----------------
  set_t l_set;
  tag_t l_tag;
  way_t l_way, l_victim;

  always_comb begin
    l_set = set_of(lookup_pc);
    l_tag = tag_of(lookup_pc);
    hit   = 1'b0;
    l_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[l_set][w] && tag_m[ent(l_set, way_t'(w))] == l_tag && !hit) begin
        hit   = 1'b1;
        l_way = way_t'(w);
      end
    end
    // victim: first empty way, else the least recently used one
    l_victim      = '0;
    for (int w = WAYS-1; w >= 0; w--) begin
      if (age_q[l_set][w] == way_t'(WAYS-1)) l_victim = way_t'(w);
    end
    for (int w = WAYS-1; w >= 0; w--) begin
      if (!valid_q[l_set][w]) begin
        l_victim      = way_t'(w);
      end
    end
    pred_taken  = hit && hist_m[ent(l_set, l_way)][1];
    pred_target = {tgt_m[ent(l_set, l_way)], 2'b00};
    pf_valid    = hit && pfv_q[l_set][l_way];
    pf_line     = pfl_m[ent(l_set, l_way)];
    lookup_idx  = {l_set, (hit ? l_way : l_victim)};
  end

  // ---------------- resolve ----------------
  set_t r_set;
  tag_t r_tag;
  way_t r_way;
  logic r_found;

  always_comb begin
    r_set   = set_of(res.pc);
    r_tag   = tag_of(res.pc);
    r_found = 1'b0;
    r_way   = res.idx[WAY_W-1:0];
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[r_set][w] && tag_m[ent(r_set, way_t'(w))] == r_tag && !r_found) begin
        r_found = 1'b1;
        r_way   = way_t'(w);
      end
    end
  end

  // touch: make way w of set s the most recent
  logic touch_en;
  set_t touch_set;
  way_t touch_way;
  always_comb begin
    touch_en  = 1'b0;
    touch_set = l_set;
    touch_way = l_way;
    if (res.valid) begin
      touch_en  = 1'b1;
      touch_set = r_set;
      touch_way = r_way;
    end else if (lookup_fire && hit) begin
      touch_en  = 1'b1;
    end
  end

  set_t      p_set;
  way_t      p_way;
  assign p_set = pfw_idx[EBTB_IDX_W-1:WAY_W];
  assign p_way = pfw_idx[WAY_W-1:0];

  ebtb_idx_t r_ent;
  logic      r_alloc;
  logic [1:0] r_hist;
  assign r_ent   = ent(r_set, r_way);
  assign r_alloc = res.valid && !r_found;
  always_comb begin
    // 2-bit saturating counter; a new entry starts weakly biased to its outcome
    r_hist = hist_m[r_ent];
    if (r_alloc)                           r_hist = res.taken ? 2'b10 : 2'b01;
    else if (res.taken && r_hist != 2'b11)  r_hist = r_hist + 2'd1;
    else if (!res.taken && r_hist != 2'b00) r_hist = r_hist - 2'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        pfv_q[s]   <= '0;
        for (int w = 0; w < WAYS; w++) age_q[s][w] <= way_t'(w);
      end
    end else begin
      if (r_alloc) begin
        valid_q[r_set][r_way] <= 1'b1;
        pfv_q[r_set][r_way]   <= 1'b0;
      end
      if (pfw_valid) pfv_q[p_set][p_way] <= 1'b1;
      if (touch_en) begin
        for (int w = 0; w < WAYS; w++) begin
          if (way_t'(w) == touch_way)
            age_q[touch_set][w] <= '0;
          else if (age_q[touch_set][w] < age_q[touch_set][touch_way])
            age_q[touch_set][w] <= age_q[touch_set][w] + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (res.valid) begin
      hist_m[r_ent] <= r_hist;
      if (r_alloc) tag_m[r_ent] <= r_tag;
      if (r_alloc || res.taken) tgt_m[r_ent] <= res.target[ADDR_W-1:2];
    end
    if (pfw_valid) pfl_m[pfw_idx] <= pfw_line;
  end

endmodule
