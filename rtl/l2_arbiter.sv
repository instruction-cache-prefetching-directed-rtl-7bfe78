// l2_arbiter: the single request port from the fetch front end to the lower
// level memory (the L2 cache) and the data bus back.
//
// The lower level is non-pipelined and non-preemptive: one request is in
// flight at a time and runs to completion. A request is a line address; the
// reply is a whole line (the bus is one line wide). A fetch miss (dm_req:
// the fetch needs a line that is neither in the cache nor in the prefetch
// buffer) wins over a pending prefetch. A fetch miss for the line already
// in flight simply waits for it. Every returned line is written into the
// prefetch buffer (fill_*), in the cycle the reply arrives.
//
// Handshakes: l2_req_valid/l2_req_ready move a request; l2_resp_valid marks
// the one cycle in which l2_resp_data holds the line of the request in
// flight. The latency is set by the lower level (three cycles in the
// evaluated machine).
//
// From the document: priority of fetch misses, one-line-wide bus,
// non-pipelined non-preemptive lower level, lines entering the prefetch
// buffer first. This design's choice: the valid/ready request handshake.
module l2_arbiter
  import bib_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // fetch miss request
  input  logic   dm_req,
  input  laddr_t dm_line,
  // prefetch request
  input  logic   pf_req_valid,
  input  laddr_t pf_req_line,
  output logic   pf_grant,
  output logic   dm_grant,
  // lower level memory
  output logic   l2_req_valid,
  output laddr_t l2_req_line,
  input  logic   l2_req_ready,
  input  logic   l2_resp_valid,
  input  line_t  l2_resp_data,
  // line in flight
  output logic   inflight_valid,
  output laddr_t inflight_line,
  output logic   inflight_is_pf,
  // returned line, to the prefetch buffer
  output logic   fill_valid,
  output laddr_t fill_line,
  output line_t  fill_data
);
  logic   busy_q, is_pf_q;
  laddr_t line_q;

  always_comb begin
    l2_req_valid = !busy_q && (dm_req || pf_req_valid);
    l2_req_line  = dm_req ? dm_line : pf_req_line;
    dm_grant     = l2_req_valid && l2_req_ready && dm_req;
    pf_grant     = l2_req_valid && l2_req_ready && !dm_req;
  end

  assign inflight_valid = busy_q;
  assign inflight_line  = line_q;
  assign inflight_is_pf = is_pf_q;
  assign fill_valid     = busy_q && l2_resp_valid;
  assign fill_line      = line_q;
  assign fill_data      = l2_resp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q  <= 1'b0;
      is_pf_q <= 1'b0;
      line_q  <= '0;
    end else if (l2_req_valid && l2_req_ready) begin
      busy_q  <= 1'b1;
      is_pf_q <= !dm_req;
      line_q  <= l2_req_line;
    end else if (fill_valid) begin
      busy_q  <= 1'b0;
    end
  end

  // the lower level answers only a request in flight
  assert property (@(posedge clk) disable iff (!rst_n) l2_resp_valid |-> busy_q);

endmodule
