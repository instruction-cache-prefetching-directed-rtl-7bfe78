// icache: on-chip instruction cache with a one-cycle (combinational) lookup.
//
// SIZE_BYTES of 16-byte lines in WAYS ways. Port f_* is the fetch lookup: it
// returns hit and the whole line in the same cycle; the fetch unit picks the
// word. Port p_* is a second tag lookup used by the prefetch controller to
// check whether a prefetch candidate is already on chip; the evaluated
// machine does the fetch and the prefetch lookup in the same cycle. Lines
// enter only through the fill port, which is fed by the prefetch buffer one
// cycle after the fetch unit first used a line there; the fill picks an empty
// way, else the least recently used one (2-bit ages, 0 = most recent), and
// fetch hits touch their way. Reset clears the valid bits.
//
// From the document: 16-byte lines, one-cycle access, sizes 2/4/8/16 KB and
// direct-mapped, 2-way and 4-way organisations; the default is the 2 KB
// direct-mapped cache, the smallest configuration evaluated. This design's
// choices: LRU replacement for the set-associative organisations and the
// reset behaviour.
module icache
  import bib_pkg::*;
#(
  parameter int unsigned SIZE_BYTES = 2048,
  parameter int unsigned WAYS       = 1
)(
  input  logic   clk,
  input  logic   rst_n,
  // fetch lookup
  input  laddr_t f_line,
  input  logic   f_touch,
  output logic   f_hit,
  output line_t  f_data,
  // on-chip check for a prefetch candidate
  input  laddr_t p_line,
  output logic   p_hit,
  // line fill
  input  logic   fill_valid,
  input  laddr_t fill_line,
  input  line_t  fill_data
);
  localparam int unsigned SETS  = SIZE_BYTES / LINE_BYTES / WAYS;
  localparam int unsigned SET_W = (SETS > 1) ? $clog2(SETS) : 1;
  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;
  localparam int unsigned TAG_W = LADDR_W - IDX_W;

  typedef logic [SET_W-1:0] set_t;
  typedef logic [WAY_W-1:0] way_t;
  typedef logic [TAG_W-1:0] tag_t;

  logic [WAYS-1:0] valid_q [SETS];
  tag_t            tag_q   [SETS][WAYS];
  line_t           data_q  [SETS][WAYS];
  way_t            age_q   [SETS][WAYS];

  function automatic set_t set_of(laddr_t l);
    return set_t'(l % LADDR_W'(SETS));
  endfunction
  function automatic tag_t tag_of(laddr_t l);
    return l[LADDR_W-1:IDX_W];
  endfunction

  set_t f_set, p_set, w_set;
  way_t f_way, w_way;

  always_comb begin
    f_set = set_of(f_line);
    f_hit = 1'b0;
    f_way = '0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[f_set][w] && tag_q[f_set][w] == tag_of(f_line) && !f_hit) begin
        f_hit = 1'b1;
        f_way = way_t'(w);
      end
    end
    f_data = data_q[f_set][f_way];
  end

  always_comb begin
    p_set = set_of(p_line);
    p_hit = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid_q[p_set][w] && tag_q[p_set][w] == tag_of(p_line)) p_hit = 1'b1;
    end
  end

  // fill victim: first empty way, else the oldest
  always_comb begin
    w_set = set_of(fill_line);
    w_way = '0;
    for (int w = WAYS-1; w >= 0; w--) begin
      if (age_q[w_set][w] == way_t'(WAYS-1)) w_way = way_t'(w);
    end
    for (int w = WAYS-1; w >= 0; w--) begin
      if (!valid_q[w_set][w]) w_way = way_t'(w);
    end
  end

  logic touch_en;
  set_t touch_set;
  way_t touch_way;
  always_comb begin
    touch_en  = fill_valid || (f_touch && f_hit);
    touch_set = fill_valid ? w_set : f_set;
    touch_way = fill_valid ? w_way : f_way;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid_q[s] <= '0;
        for (int w = 0; w < WAYS; w++) age_q[s][w] <= way_t'(w);
      end
    end else begin
      if (fill_valid) begin
        valid_q[w_set][w_way] <= 1'b1;
      end
      if (touch_en && WAYS > 1) begin
        for (int w = 0; w < WAYS; w++) begin
          if (way_t'(w) == touch_way)
            age_q[touch_set][w] <= '0;
          else if (age_q[touch_set][w] < age_q[touch_set][touch_way])
            age_q[touch_set][w] <= age_q[touch_set][w] + 1'b1;
        end
      end
    end
  end

  // tags and data need no reset: they are read only behind a valid bit
  always_ff @(posedge clk) begin
    if (fill_valid) begin
      tag_q[w_set][w_way]  <= tag_of(fill_line);
      data_q[w_set][w_way] <= fill_data;
    end
  end

endmodule
