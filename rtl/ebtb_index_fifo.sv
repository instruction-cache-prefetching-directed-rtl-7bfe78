// ebtb_index_fifo: the modified two-entry FIFO that maintains the prefetch
// line addresses of the EBTB (lookahead basic-block prefetching).
//
// Two registers hold EBTB indices. A toggle bit T names the entry that the
// next index is inserted into; its inverse T' names the top (older) entry.
// A check bit C allows one insertion between two updates:
//  * insert (decode stage found a branch): if C is set, its EBTB index is
//    written into entry T and C is cleared; ins_accepted reports whether the
//    index was taken, and the pipeline carries that flag with the branch.
//  * update (a branch whose index was accepted leaves the ALU stage): the
//    line of that branch's next instruction address is written into the EBTB
//    entry named by entry T', i.e. the previous branch. Then T and T' toggle
//    and C is set.
// So branch A's entry receives the first line of the basic block that
// followed branch B, the branch after A. Both operations act at the clock
// edge; when they coincide, the update is applied first and the insertion
// sees the toggled T and the set C. The EBTB write is combinational
// (pfw_*) and is taken by the EBTB at the same edge.
//
// From the document: the two entries, T/T', C and their rules. This design's
// choices: a valid bit per entry (so nothing is written before a previous
// branch exists), reset to T=0 and C=1, update-before-insert in one cycle,
// the next address of a not-taken branch being pc+4 (no delay slot), and
// that only branches whose index was accepted trigger an update.
module ebtb_index_fifo
  import bib_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  // decode stage
  input  logic      ins_valid,
  input  ebtb_idx_t ins_idx,
  output logic      ins_accepted,
  // execute stage
  input  resolve_t  res,
  // prefetch line write into the EBTB
  output logic      pfw_valid,
  output ebtb_idx_t pfw_idx,
  output laddr_t    pfw_line,
  // state, for observation
  output logic      t_bit,
  output logic      c_bit
);
  ebtb_idx_t  idx_q [2];
  logic [1:0] vld_q;
  logic       t_q, c_q;

  logic upd;
  logic t_eff, c_eff;
  addr_t next_pc;

  assign upd     = res.valid && res.queued;
  assign next_pc = res.taken ? res.target : res.pc + addr_t'(4);

  assign pfw_valid = upd && vld_q[~t_q];
  assign pfw_idx   = idx_q[~t_q];
  assign pfw_line  = line_of(next_pc);

  // state as the insertion sees it (after a same-cycle update)
  assign t_eff        = upd ? ~t_q : t_q;
  assign c_eff        = upd ? 1'b1 : c_q;
  assign ins_accepted = ins_valid && c_eff;

  assign t_bit = t_q;
  assign c_bit = c_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx_q[0] <= '0;
      idx_q[1] <= '0;
      vld_q    <= '0;
      t_q      <= 1'b0;
      c_q      <= 1'b1;
    end else begin
      t_q <= t_eff;
      c_q <= ins_accepted ? 1'b0 : c_eff;
      if (ins_accepted) begin
        idx_q[t_eff] <= ins_idx;
        vld_q[t_eff] <= 1'b1;
      end
    end
  end

endmodule
