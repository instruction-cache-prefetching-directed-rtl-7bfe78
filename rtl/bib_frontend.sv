// bib_frontend: instruction fetch front end with branch-instruction-based
// (BIB) prefetching.
//
// The fetch unit looks up every fetch address in the extended BTB (EBTB),
// the instruction cache and the prefetch buffer in one cycle. The EBTB
// predicts the next fetch address like a conventional BTB and, on a hit,
// also names a line to prefetch: the first line of the basic block that
// followed the predicted block the last time. Without an EBTB hit, moving
// into a new line makes the next sequential line the candidate. The
// prefetch controller drops a candidate that is already on chip and queues
// the rest for the lower level port, where a fetch miss always goes first.
// Every line from the lower level lands in the prefetch buffer; a fetch that
// hits there moves the line into the cache one cycle later.
//
// The EBTB prefetch fields are written by a two-entry index FIFO: the decode
// stage offers the EBTB index of each branch (dec_*), and when a queued
// branch resolves in the execute stage (res), the line of its next
// instruction is written into the EBTB entry of the branch before it.
//
// Interface: if_* delivers one instruction per cycle to decode, with the
// EBTB index and the predicted next PC the pipeline must carry to execute.
// dec_branch/dec_idx/dec_queued form the decode-side FIFO insertion; res
// reports a branch leaving the ALU stage (valid for one cycle, in program
// order, wrong-path branches never reported); redirect_* restarts fetch
// after a misprediction. l2_* is the single-outstanding, line-wide port to
// the lower level memory.
//
// The structure (EBTB, fetch unit, +1 and candidate multiplexer, AND of the
// two misses, cache, prefetch buffer, shared bus to the lower level) follows
// the document's block diagram; the handshakes, the reset values and the
// details recorded in each block are this design's own.
module bib_frontend
  import bib_pkg::*;
#(
  parameter int unsigned CACHE_BYTES = 2048,
  parameter int unsigned CACHE_WAYS  = 1,
  parameter int unsigned PFB_ENTRIES = 8,
  parameter addr_t       RESET_PC    = '0
)(
  input  logic      clk,
  input  logic      rst_n,
  // fetch to decode
  output logic      if_valid,
  output addr_t     if_pc,
  output instr_t    if_instr,
  output logic      if_ebtb_hit,
  output logic      if_pred_taken,
  output addr_t     if_pred_next,
  output ebtb_idx_t if_ebtb_idx,
  // decode: branch index into the FIFO
  input  logic      dec_branch,
  input  ebtb_idx_t dec_idx,
  output logic      dec_queued,
  // execute: branch resolution and redirect
  input  resolve_t  res,
  input  logic      redirect_valid,
  input  addr_t     redirect_pc,
  // lower level memory
  output logic      l2_req_valid,
  output laddr_t    l2_req_line,
  input  logic      l2_req_ready,
  input  logic      l2_resp_valid,
  input  line_t     l2_resp_data,
  // event flags for performance counters
  output events_t   events
);
  // fetch unit
  addr_t     pc;
  laddr_t    fetch_line;
  logic      miss_req, cache_touch, buf_use, new_line, fire;
  // EBTB
  logic      e_hit, e_taken, e_pfv;
  addr_t     e_target;
  ebtb_idx_t e_idx;
  laddr_t    e_pfl;
  // FIFO
  logic      pfw_valid;
  ebtb_idx_t pfw_idx;
  laddr_t    pfw_line;
  // stores
  logic      c_hit, c_phit, b_hit, b_phit;
  line_t     c_data, b_data;
  logic      x_valid;
  laddr_t    x_line;
  line_t     x_data;
  // prefetch and lower level
  laddr_t    cand_line;
  logic      pf_req_valid, pf_grant, dm_grant;
  laddr_t    pf_req_line;
  logic      inflight_valid;
  laddr_t    inflight_line;
  logic      f_valid;
  laddr_t    f_line;
  line_t     f_data;
  logic      ev_ebtb_cand, ev_seq_cand, ev_onchip_drop, ev_queued;

  fetch_unit #(.RESET_PC(RESET_PC)) u_fetch (
    .clk, .rst_n,
    .redirect_valid, .redirect_pc,
    .pc, .fetch_line,
    .cache_hit(c_hit), .cache_data(c_data),
    .buf_hit(b_hit), .buf_data(b_data),
    .ebtb_hit(e_hit), .ebtb_pred_taken(e_taken), .ebtb_pred_target(e_target), .ebtb_idx(e_idx),
    .out_valid(if_valid), .out_pc(if_pc), .out_instr(if_instr),
    .out_ebtb_hit(if_ebtb_hit), .out_pred_taken(if_pred_taken),
    .out_pred_next(if_pred_next), .out_ebtb_idx(if_ebtb_idx),
    .miss_req, .cache_touch, .buf_use, .new_line, .fire
  );

  ebtb u_ebtb (
    .clk, .rst_n,
    .lookup_pc(pc), .lookup_fire(fire),
    .hit(e_hit), .pred_taken(e_taken), .pred_target(e_target), .lookup_idx(e_idx),
    .pf_valid(e_pfv), .pf_line(e_pfl),
    .res,
    .pfw_valid, .pfw_idx, .pfw_line
  );

  ebtb_index_fifo u_fifo (
    .clk, .rst_n,
    .ins_valid(dec_branch), .ins_idx(dec_idx), .ins_accepted(dec_queued),
    .res,
    .pfw_valid, .pfw_idx, .pfw_line,
    .t_bit(), .c_bit()
  );

  icache #(.SIZE_BYTES(CACHE_BYTES), .WAYS(CACHE_WAYS)) u_icache (
    .clk, .rst_n,
    .f_line(fetch_line), .f_touch(cache_touch), .f_hit(c_hit), .f_data(c_data),
    .p_line(cand_line), .p_hit(c_phit),
    .fill_valid(x_valid), .fill_line(x_line), .fill_data(x_data)
  );

  prefetch_buffer #(.ENTRIES(PFB_ENTRIES)) u_pfb (
    .clk, .rst_n,
    .f_line(fetch_line), .f_use(buf_use), .f_hit(b_hit), .f_data(b_data),
    .p_line(cand_line), .p_hit(b_phit),
    .fill_valid(f_valid), .fill_line(f_line), .fill_data(f_data),
    .xfer_valid(x_valid), .xfer_line(x_line), .xfer_data(x_data),
    .occupancy()
  );

  prefetch_ctrl u_pfc (
    .clk, .rst_n,
    .ebtb_hit(e_hit && !redirect_valid), .ebtb_pf_valid(e_pfv), .ebtb_pf_line(e_pfl),
    .new_line, .fetch_line,
    .cand_valid(), .cand_line,
    .cache_p_hit(c_phit), .buf_p_hit(b_phit),
    .inflight_valid, .inflight_line,
    .dm_req(miss_req), .dm_line(fetch_line),
    .pf_req_valid, .pf_req_line, .pf_grant,
    .ev_ebtb_cand, .ev_seq_cand, .ev_onchip_drop, .ev_queued
  );

  l2_arbiter u_arb (
    .clk, .rst_n,
    .dm_req(miss_req), .dm_line(fetch_line),
    .pf_req_valid, .pf_req_line, .pf_grant, .dm_grant,
    .l2_req_valid, .l2_req_line, .l2_req_ready, .l2_resp_valid, .l2_resp_data,
    .inflight_valid, .inflight_line, .inflight_is_pf(),
    .fill_valid(f_valid), .fill_line(f_line), .fill_data(f_data)
  );

  assign events.fetch_stall      = miss_req;
  assign events.miss_issue       = dm_grant;
  assign events.miss_on_inflight = miss_req && inflight_valid && inflight_line == fetch_line;
  assign events.pf_issue         = pf_grant;
  assign events.ebtb_cand        = ev_ebtb_cand;
  assign events.seq_cand         = ev_seq_cand;
  assign events.onchip_drop      = ev_onchip_drop;
  assign events.buf_supply       = buf_use;
  assign events.line_move        = x_valid;
  assign events.fifo_update      = pfw_valid;
  assign events.fifo_reject      = dec_branch && !dec_queued;

  // a line lives in the cache or in the prefetch buffer, not both, except in
  // the cycle it moves
  assert property (@(posedge clk) disable iff (!rst_n) !(c_hit && b_hit && !x_valid));

endmodule
