// prefetch_buffer: small fully associative buffer between the lower level
// memory and the instruction cache.
//
// Every line returned by the lower level memory, whether asked for by a
// fetch miss or by a prefetch, is written here first, so prefetched lines
// that are never used do not pollute the cache. The fetch port f_* compares
// all tags in the same cycle; on a hit the fetch unit takes its instruction
// from f_data without delay. When that hit is used (f_use), the line is
// moved into the cache: the cycle after, xfer_* presents it to the cache
// fill port, and at the end of that cycle the cache holds it and this entry
// is freed, so the line is always findable in exactly one of the two
// stores. Port p_* checks whether a prefetch candidate is already here.
// A fill takes an empty entry, else the entry after the last one replaced
// (round robin), never the entry being moved or about to be moved.
//
// From the document: eight fully associative entries, a hit supplies the
// line at once and moves it into the cache in the next cycle, a line is in
// the cache or in the buffer but not both, no T bit. This design's choices:
// round-robin replacement and the reset behaviour.
module prefetch_buffer
  import bib_pkg::*;
#(
  parameter int unsigned ENTRIES = 8
)(
  input  logic   clk,
  input  logic   rst_n,
  // fetch lookup
  input  laddr_t f_line,
  input  logic   f_use,
  output logic   f_hit,
  output line_t  f_data,
  // on-chip check for a prefetch candidate
  input  laddr_t p_line,
  output logic   p_hit,
  // line from the lower level memory
  input  logic   fill_valid,
  input  laddr_t fill_line,
  input  line_t  fill_data,
  // line moving into the cache
  output logic   xfer_valid,
  output laddr_t xfer_line,
  output line_t  xfer_data,
  // number of occupied entries, for observation
  output logic [$clog2(ENTRIES+1)-1:0] occupancy
);
  localparam int unsigned E_W = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  typedef logic [E_W-1:0] ent_t;

  logic [ENTRIES-1:0] valid_q;
  laddr_t             tag_q  [ENTRIES];
  line_t              data_q [ENTRIES];
  ent_t               rr_q;
  logic               xfer_q;
  ent_t               xfer_ent_q;

  ent_t f_ent;
  always_comb begin
    f_hit = 1'b0;
    f_ent = '0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (valid_q[e] && tag_q[e] == f_line && !f_hit) begin
        f_hit = 1'b1;
        f_ent = ent_t'(e);
      end
    end
    f_data = data_q[f_ent];
  end

  always_comb begin
    p_hit = 1'b0;
    for (int e = 0; e < ENTRIES; e++)
      if (valid_q[e] && tag_q[e] == p_line) p_hit = 1'b1;
  end

  // schedule a move to the cache (not twice for the entry already moving)
  logic sched;
  assign sched = f_use && f_hit && !(xfer_q && f_ent == xfer_ent_q);

  // fill victim
  logic [ENTRIES-1:0] excl;
  ent_t victim;
  logic found;
  always_comb begin
    excl = '0;
    if (xfer_q) excl[xfer_ent_q] = 1'b1;
    if (sched)  excl[f_ent]      = 1'b1;
    victim = '0;
    found  = 1'b0;
    for (int e = 0; e < ENTRIES; e++) begin
      if (!valid_q[e] && !found) begin
        victim = ent_t'(e);
        found  = 1'b1;
      end
    end
    for (int k = 0; k < ENTRIES; k++) begin
      if (!found && !excl[ent_t'((int'(rr_q) + k) % ENTRIES)]) begin
        victim = ent_t'((int'(rr_q) + k) % ENTRIES);
        found  = 1'b1;
      end
    end
  end

  assign xfer_valid = xfer_q;
  assign xfer_line  = tag_q[xfer_ent_q];
  assign xfer_data  = data_q[xfer_ent_q];

  always_comb begin
    occupancy = '0;
    for (int e = 0; e < ENTRIES; e++) occupancy += valid_q[e];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q    <= '0;
      rr_q       <= '0;
      xfer_q     <= 1'b0;
      xfer_ent_q <= '0;
      for (int e = 0; e < ENTRIES; e++) tag_q[e] <= '0;
    end else begin
      xfer_q     <= sched;
      xfer_ent_q <= f_ent;
      if (xfer_q) valid_q[xfer_ent_q] <= 1'b0;
      if (fill_valid) begin
        valid_q[victim] <= 1'b1;
        tag_q[victim]   <= fill_line;
        if (valid_q[victim]) rr_q <= ent_t'((int'(victim) + 1) % ENTRIES);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (fill_valid) data_q[victim] <= fill_data;
  end

endmodule
