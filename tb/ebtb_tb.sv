// ebtb_tb: checks the extended BTB.
//
// Directed checks: a cold miss names an empty way; a resolved taken branch
// is allocated and then predicts taken with its target; the 2-bit counter
// saturates at both ends and flips the prediction only after two opposite
// outcomes from a strong state; the prefetch line field is written through
// its own port and cleared when the entry is re-allocated; five branches in
// one set evict the least recently used one (ways touched in a known order).
// A random part compares hit, prediction and prefetch field with a
// reference model of a 4-way LRU set kept in the testbench.
module ebtb_tb;
  import bib_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  addr_t     lookup_pc;
  logic      lookup_fire;
  logic      hit, pred_taken, pf_valid;
  addr_t     pred_target;
  ebtb_idx_t lookup_idx;
  laddr_t    pf_line;
  resolve_t  res;
  logic      pfw_valid;
  ebtb_idx_t pfw_idx;
  laddr_t    pfw_line;

  ebtb dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    lookup_fire = 0; res = '0; pfw_valid = 0; pfw_idx = '0; pfw_line = '0;
  endtask

  // look pc up and resolve it in the same cycle with the index found
  task automatic resolve(addr_t pc, bit taken, addr_t tgt);
    idle();
    lookup_pc = pc; #1;
    res.valid = 1; res.pc = pc; res.taken = taken; res.target = tgt; res.idx = lookup_idx;
    @(posedge clk); #1 idle();
  endtask

  // pc in set s with tag t
  function automatic addr_t pc_of(int s, int t);
    return addr_t'({22'(t), 8'(s), 2'b00});
  endfunction

  // reference model of one set (random part uses set 17)
  typedef struct {
    bit     v;
    addr_t  pc;
    addr_t  tgt;
    int     hist;
    bit     pfv;
    laddr_t pfl;
    int     age;
  } ref_t;
  ref_t rm [4];

  function automatic int ref_find(addr_t pc);
    for (int w = 0; w < 4; w++) if (rm[w].v && rm[w].pc == pc) return w;
    return -1;
  endfunction
  function automatic int ref_victim();
    for (int w = 0; w < 4; w++) if (!rm[w].v) return w;
    for (int w = 0; w < 4; w++) if (rm[w].age == 3) return w;
    return 0;
  endfunction
  function automatic void ref_touch(int w);
    for (int k = 0; k < 4; k++) if (k != w && rm[k].age < rm[w].age) rm[k].age++;
    rm[w].age = 0;
  endfunction

  initial begin
    idle();
    lookup_pc = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // cold miss
    lookup_pc = pc_of(3, 100); #1;
    check(!hit && !pred_taken && !pf_valid, "cold lookup misses");
    check(lookup_idx == {8'd3, 2'd0}, "cold lookup names way 0 of its set");

    // allocate taken
    resolve(pc_of(3, 100), 1, 32'h0000_8000);
    lookup_pc = pc_of(3, 100); #1;
    check(hit && pred_taken && pred_target == 32'h0000_8000, "allocated taken branch predicts its target");
    check(!pf_valid, "new entry has no prefetch line");
    // counter 2 -> 1: predicts not taken after one not-taken
    resolve(pc_of(3, 100), 0, 32'h0000_8000);
    lookup_pc = pc_of(3, 100); #1;
    check(hit && !pred_taken, "weakly taken + not taken -> not taken");
    // 1 -> 0 -> 0 (saturate), then one taken -> 1 still not taken
    resolve(pc_of(3, 100), 0, 0);
    resolve(pc_of(3, 100), 0, 0);
    resolve(pc_of(3, 100), 1, 32'h0000_9000);
    lookup_pc = pc_of(3, 100); #1;
    check(hit && !pred_taken, "counter saturated at 0");
    // -> 2 -> 3 -> 3, then one not-taken -> 2 still taken
    resolve(pc_of(3, 100), 1, 32'h0000_9000);
    resolve(pc_of(3, 100), 1, 32'h0000_9000);
    resolve(pc_of(3, 100), 1, 32'h0000_A000);
    resolve(pc_of(3, 100), 0, 0);
    lookup_pc = pc_of(3, 100); #1;
    check(hit && pred_taken && pred_target == 32'h0000_A000, "counter saturated at 3, target updated");

    // prefetch line write
    pfw_valid = 1; pfw_idx = lookup_idx; pfw_line = 28'h123_4567;
    @(posedge clk); #1 idle();
    lookup_pc = pc_of(3, 100); #1;
    check(hit && pf_valid && pf_line == 28'h123_4567, "prefetch line written and read");

    // LRU: fill the set with tags 101..103, then touch 100 by a fire
    resolve(pc_of(3, 101), 1, 32'h100);
    resolve(pc_of(3, 102), 1, 32'h200);
    resolve(pc_of(3, 103), 1, 32'h300);
    lookup_pc = pc_of(3, 100); lookup_fire = 1;
    @(posedge clk); #1 idle();
    // least recent now is 101: a new branch must replace it
    lookup_pc = pc_of(3, 104); #1;
    check(!hit, "fifth branch misses");
    resolve(pc_of(3, 104), 1, 32'h400);
    lookup_pc = pc_of(3, 101); #1;
    check(!hit, "LRU way (tag 101) evicted");
    lookup_pc = pc_of(3, 100); #1; check(hit && pf_valid, "tag 100 kept with its prefetch line");
    lookup_pc = pc_of(3, 102); #1; check(hit && pred_target == 32'h200, "tag 102 kept");
    lookup_pc = pc_of(3, 103); #1; check(hit && pred_target == 32'h300, "tag 103 kept");
    lookup_pc = pc_of(3, 104); #1; check(hit && pred_target == 32'h400, "tag 104 allocated");

    // random part against the reference model, set 17
    foreach (rm[w]) rm[w] = '{v: 0, pc: 0, tgt: 0, hist: 0, pfv: 0, pfl: 0, age: w};
    for (int i = 0; i < 4000; i++) begin
      addr_t pc;
      int    w, op;
      pc = pc_of(17, $urandom_range(0, 6));
      idle();
      lookup_pc = pc; #1;
      w = ref_find(pc);
      check(hit == (w >= 0), "random hit");
      if (w >= 0) begin
        check(pred_taken == (rm[w].hist >= 2), "random direction");
        if (rm[w].hist >= 2) check(pred_target == rm[w].tgt, "random target");
        check(pf_valid == rm[w].pfv, "random prefetch valid");
        if (rm[w].pfv) check(pf_line == rm[w].pfl, "random prefetch line");
        check(lookup_idx == {8'd17, 2'(w)}, "random index of hit");
      end else begin
        check(lookup_idx == {8'd17, 2'(ref_victim())}, "random victim index");
      end
      op = $urandom_range(0, 2);
      if (op == 0) begin
        // fetch only
        lookup_fire = 1;
        if (w >= 0) ref_touch(w);
      end else if (op == 1) begin
        bit tk; addr_t tg;
        tk = $urandom_range(0, 1); tg = {$urandom()} & 32'hFFFF_FFFC;
        res.valid = 1; res.pc = pc; res.taken = tk; res.target = tg; res.idx = lookup_idx;
        if (w < 0) begin
          w = ref_victim();
          rm[w] = '{v: 1, pc: pc, tgt: tg, hist: tk ? 2 : 1, pfv: 0, pfl: 0, age: rm[w].age};
        end else begin
          if (tk) begin rm[w].tgt = tg; if (rm[w].hist < 3) rm[w].hist++; end
          else if (rm[w].hist > 0) rm[w].hist--;
        end
        ref_touch(w);
      end else begin
        int pw; laddr_t pl;
        pw = $urandom_range(0, 3); pl = laddr_t'($urandom());
        pfw_valid = 1; pfw_idx = {8'd17, 2'(pw)}; pfw_line = pl;
        rm[pw].pfv = 1; rm[pw].pfl = pl;
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
