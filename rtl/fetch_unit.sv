// fetch_unit: the instruction fetch (IF) stage.
//
// Holds the PC and fetches one instruction per cycle. In one cycle the PC is
// looked up in the EBTB, the instruction cache and the prefetch buffer
// (combinationally); if the line is in the cache or the buffer, the
// instruction is delivered to the decoder (out_*) and the PC moves to the
// EBTB's predicted target when the EBTB hits and predicts taken, else to
// PC + 4. If the line is in neither, the fetch stalls and raises the fetch
// miss request, the AND of "not in cache" and "not in prefetch buffer", until
// the line arrives. A redirect from the execute stage (a mispredicted branch)
// replaces the PC at the next edge and suppresses this cycle's delivery.
// new_line marks the first fetch in a line other than the last one
// delivered; it starts a sequential prefetch. cache_touch and buf_use tell
// the stores which of them supplied the instruction.
//
// From the document: one instruction per cycle (perfectly pipelined CPU),
// EBTB prediction in the IF stage, the miss request formed from both stores,
// the new-line trigger. This design's choices: the reset PC, a stall instead
// of a wrong-line delivery, and no branch delay slot.
module fetch_unit
  import bib_pkg::*;
#(
  parameter addr_t RESET_PC = '0
)(
  input  logic      clk,
  input  logic      rst_n,
  // redirect from the execute stage
  input  logic      redirect_valid,
  input  addr_t     redirect_pc,
  // lookup address and results
  output addr_t     pc,
  output laddr_t    fetch_line,
  input  logic      cache_hit,
  input  line_t     cache_data,
  input  logic      buf_hit,
  input  line_t     buf_data,
  input  logic      ebtb_hit,
  input  logic      ebtb_pred_taken,
  input  addr_t     ebtb_pred_target,
  input  ebtb_idx_t ebtb_idx,
  // to the decode stage
  output logic      out_valid,
  output addr_t     out_pc,
  output instr_t    out_instr,
  output logic      out_ebtb_hit,
  output logic      out_pred_taken,
  output addr_t     out_pred_next,
  output ebtb_idx_t out_ebtb_idx,
  // to the stores and the prefetch controller
  output logic      miss_req,
  output logic      cache_touch,
  output logic      buf_use,
  output logic      new_line,
  output logic      fire
);
  addr_t  pc_q;
  laddr_t last_line_q;
  logic   last_vld_q;
  addr_t  pred_next;

  assign pc         = pc_q;
  assign fetch_line = line_of(pc_q);

  assign fire        = (cache_hit || buf_hit) && !redirect_valid;
  assign miss_req    = !cache_hit && !buf_hit;
  assign cache_touch = fire && cache_hit;
  assign buf_use     = fire && !cache_hit && buf_hit;
  assign new_line    = !redirect_valid && (!last_vld_q || fetch_line != last_line_q);
  assign pred_next   = ebtb_pred_taken ? ebtb_pred_target : pc_q + addr_t'(4);

  assign out_valid      = fire;
  assign out_pc         = pc_q;
  assign out_instr      = word_of(cache_hit ? cache_data : buf_data, pc_q);
  assign out_ebtb_hit   = ebtb_hit;
  assign out_pred_taken = ebtb_pred_taken;
  assign out_pred_next  = pred_next;
  assign out_ebtb_idx   = ebtb_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q        <= RESET_PC;
      last_line_q <= '0;
      last_vld_q  <= 1'b0;
    end else if (redirect_valid) begin
      pc_q <= redirect_pc;
    end else if (fire) begin
      pc_q        <= pred_next;
      last_line_q <= fetch_line;
      last_vld_q  <= 1'b1;
    end
  end

endmodule
