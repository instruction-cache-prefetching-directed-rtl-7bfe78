// bib_pkg: shared constants and types of the branch-instruction-based (BIB)
// prefetching instruction fetch front end.
//
// Addresses are 32-bit byte addresses of 4-byte instructions; a cache line
// is 16 bytes (four instructions), so a line address is the byte address
// without its low four bits. The extended BTB (EBTB) holds 1024 entries in
// four ways; an EBTB index names one entry as {set, way}. The line size and
// the EBTB geometry follow the evaluated machine model; the 32-bit address
// and the 4-byte instruction are this design's choice (an R3000-class CPU).
package bib_pkg;

  localparam int unsigned ADDR_W       = 32;
  localparam int unsigned INSTR_W      = 32;
  localparam int unsigned LINE_BYTES   = 16;
  localparam int unsigned LINE_OFF_W   = $clog2(LINE_BYTES);
  localparam int unsigned LINE_W       = LINE_BYTES * 8;           // 128-bit line = bus width
  localparam int unsigned LADDR_W      = ADDR_W - LINE_OFF_W;      // line address width

  localparam int unsigned EBTB_ENTRIES = 1024;
  localparam int unsigned EBTB_WAYS    = 4;
  localparam int unsigned EBTB_SETS    = EBTB_ENTRIES / EBTB_WAYS;
  localparam int unsigned EBTB_SET_W   = $clog2(EBTB_SETS);
  localparam int unsigned EBTB_WAY_W   = $clog2(EBTB_WAYS);
  localparam int unsigned EBTB_IDX_W   = EBTB_SET_W + EBTB_WAY_W;

  typedef logic [ADDR_W-1:0]     addr_t;
  typedef logic [LADDR_W-1:0]    laddr_t;
  typedef logic [LINE_W-1:0]     line_t;
  typedef logic [INSTR_W-1:0]    instr_t;
  typedef logic [EBTB_IDX_W-1:0] ebtb_idx_t;

  // Line address of a byte address.
  function automatic laddr_t line_of(addr_t a);
    return a[ADDR_W-1:LINE_OFF_W];
  endfunction

  // Instruction word at byte address a inside line l.
  function automatic instr_t word_of(line_t l, addr_t a);
    return l[a[LINE_OFF_W-1:2]*INSTR_W +: INSTR_W];
  endfunction

  // Branch resolution reported by the execute stage.
  typedef struct packed {
    logic      valid;     // a branch finished the ALU stage this cycle
    addr_t     pc;        // its address
    logic      taken;     // resolved direction
    addr_t     target;    // taken address
    ebtb_idx_t idx;       // EBTB entry it hit, or the entry chosen for it at fetch
    logic      queued;    // its index was accepted by the EBTB index FIFO at decode
  } resolve_t;

  // One-cycle event flags of the front end, for performance counters.
  typedef struct packed {
    logic fetch_stall;     // fetch waits: line in neither cache nor prefetch buffer
    logic miss_issue;      // fetch miss request sent to the lower level
    logic miss_on_inflight;// fetch waits for a line already in flight
    logic pf_issue;        // prefetch request sent to the lower level
    logic ebtb_cand;       // candidate taken from the EBTB prefetch field
    logic seq_cand;        // candidate = sequentially next line
    logic onchip_drop;     // candidate found on chip (or in flight) and dropped
    logic buf_supply;      // instruction supplied by the prefetch buffer
    logic line_move;       // line moved from the prefetch buffer into the cache
    logic fifo_update;     // EBTB prefetch field written by the index FIFO
    logic fifo_reject;     // branch index not queued (check bit clear)
  } events_t;

endpackage
