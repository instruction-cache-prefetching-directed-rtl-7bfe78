// prefetch_ctrl: chooses and issues the BIB prefetch candidate.
//
// Each cycle at most one candidate is formed (the flow chart of BIB
// prefetching):
//  * the instruction being fetched hits an EBTB entry that holds a prefetch
//    line address: the candidate is that line (lookahead basic-block
//    prefetch, the first line of the block expected after the predicted one);
//  * otherwise, if the fetch unit has moved to a new line: the candidate is
//    the sequentially next line (block address + 1).
// The EBTB choice has priority, as the multiplexer before the prefetch
// request does. The candidate is sent to the second tag port of the cache and
// of the prefetch buffer (cand_line); if it is on chip, or already being
// fetched from the lower level, it is dropped. Otherwise it is held in a
// one-entry pending register until the lower level port is free and no fetch
// miss wants it (a fetch miss has priority over a prefetch). A newer
// candidate replaces a pending one, and a pending line that a fetch miss now
// asks for is cancelled, the miss fetching it instead.
//
// From the document: the two candidate sources, their priority, the on-chip
// check in cache and prefetch buffer, miss priority. This design's choices:
// treating a line in flight as on chip, the one-entry pending register with
// replacement by newer candidates, and skipping an EBTB hit whose prefetch
// field was never written (it then falls through to the new-line rule).
module prefetch_ctrl
  import bib_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // from the fetch unit and the EBTB
  input  logic   ebtb_hit,        // fetched instruction hit an EBTB entry
  input  logic   ebtb_pf_valid,   // ... whose prefetch line address is recorded
  input  laddr_t ebtb_pf_line,
  input  logic   new_line,        // fetch unit uses a new line
  input  laddr_t fetch_line,      // block address of the fetch
  // on-chip check of the candidate
  output logic   cand_valid,
  output laddr_t cand_line,
  input  logic   cache_p_hit,
  input  logic   buf_p_hit,
  // lower level port state
  input  logic   inflight_valid,
  input  laddr_t inflight_line,
  input  logic   dm_req,
  input  laddr_t dm_line,
  // prefetch request
  output logic   pf_req_valid,
  output laddr_t pf_req_line,
  input  logic   pf_grant,
  // events, for observation
  output logic   ev_ebtb_cand,
  output logic   ev_seq_cand,
  output logic   ev_onchip_drop,
  output logic   ev_queued
);
  logic   pend_q;
  laddr_t pend_line_q;

  logic on_chip, dup, load, cancel;

  always_comb begin
    ev_ebtb_cand = ebtb_hit && ebtb_pf_valid;
    ev_seq_cand  = !ev_ebtb_cand && new_line;
    cand_valid   = ev_ebtb_cand || ev_seq_cand;
    cand_line    = ev_ebtb_cand ? ebtb_pf_line : fetch_line + laddr_t'(1);
  end

  assign on_chip        = cache_p_hit || buf_p_hit || (inflight_valid && inflight_line == cand_line);
  assign dup            = (pend_q && pend_line_q == cand_line) || (dm_req && dm_line == cand_line);
  assign load           = cand_valid && !on_chip && !dup;
  assign cancel         = dm_req && dm_line == pend_line_q;
  assign ev_onchip_drop = cand_valid && on_chip;
  assign ev_queued      = load;

  assign pf_req_valid = pend_q && !cancel;
  assign pf_req_line  = pend_line_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q      <= 1'b0;
      pend_line_q <= '0;
    end else if (load) begin
      pend_q      <= 1'b1;
      pend_line_q <= cand_line;
    end else if (pf_grant || cancel) begin
      pend_q      <= 1'b0;
    end
  end

  // a granted request must have been offered
  assert property (@(posedge clk) disable iff (!rst_n) pf_grant |-> pf_req_valid);

endmodule
