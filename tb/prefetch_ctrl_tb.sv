// prefetch_ctrl_tb: checks candidate selection and issue of the prefetch
// controller.
//
// Directed cases: an EBTB hit with a recorded line makes that line the
// candidate even when a new line starts in the same cycle; a new line alone
// makes the next sequential line the candidate; an EBTB hit without a
// recorded line falls back to the new-line rule; a candidate found in the
// cache, the prefetch buffer or in flight is dropped; a queued candidate is
// offered until granted; a newer candidate replaces it; a fetch miss for
// the queued line cancels it. A random part checks the candidate and the
// offered request against a reference of the selection rule.
module prefetch_ctrl_tb;
  import bib_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   ebtb_hit, ebtb_pf_valid, new_line;
  laddr_t ebtb_pf_line, fetch_line;
  logic   cand_valid;
  laddr_t cand_line;
  logic   cache_p_hit, buf_p_hit, inflight_valid, dm_req;
  laddr_t inflight_line, dm_line;
  logic   pf_req_valid, pf_grant;
  laddr_t pf_req_line;
  logic   ev_ebtb_cand, ev_seq_cand, ev_onchip_drop, ev_queued;

  prefetch_ctrl dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic idle();
    ebtb_hit = 0; ebtb_pf_valid = 0; ebtb_pf_line = '0; new_line = 0; fetch_line = '0;
    cache_p_hit = 0; buf_p_hit = 0; inflight_valid = 0; inflight_line = '0;
    dm_req = 0; dm_line = '0; pf_grant = 0;
  endtask

  bit     rp;
  laddr_t rl;

  initial begin
    idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1; #1;
    check(!pf_req_valid, "nothing offered after reset");

    // EBTB wins over the new line
    ebtb_hit = 1; ebtb_pf_valid = 1; ebtb_pf_line = 28'h777; new_line = 1; fetch_line = 28'h100; #1;
    check(cand_valid && cand_line == 28'h777 && ev_ebtb_cand && !ev_seq_cand, "EBTB prefetch line chosen first");
    check(ev_queued, "absent candidate queued");
    @(posedge clk); #1 idle(); #1;
    check(pf_req_valid && pf_req_line == 28'h777, "queued line offered");
    // offered until granted
    @(posedge clk); #1;
    check(pf_req_valid, "still offered without grant");
    pf_grant = 1;
    @(posedge clk); #1 idle(); #1;
    check(!pf_req_valid, "grant clears the request");

    // sequential candidate
    new_line = 1; fetch_line = 28'h100; #1;
    check(cand_valid && cand_line == 28'h101 && ev_seq_cand, "new line: next sequential line");
    @(posedge clk); #1 idle(); #1;
    check(pf_req_valid && pf_req_line == 28'h101, "sequential line offered");
    // newer candidate replaces it
    ebtb_hit = 1; ebtb_pf_valid = 1; ebtb_pf_line = 28'h555; #1;
    @(posedge clk); #1 idle(); #1;
    check(pf_req_valid && pf_req_line == 28'h555, "newer candidate replaces the pending one");
    // fetch miss on the pending line cancels it
    dm_req = 1; dm_line = 28'h555; #1;
    check(!pf_req_valid, "fetch miss on the pending line hides it");
    @(posedge clk); #1 idle(); #1;
    check(!pf_req_valid, "pending line cancelled");

    // EBTB hit without a recorded line falls back to the new-line rule
    ebtb_hit = 1; ebtb_pf_valid = 0; ebtb_pf_line = 28'h999; new_line = 1; fetch_line = 28'h200; #1;
    check(cand_valid && cand_line == 28'h201, "unrecorded prefetch field: sequential rule");
    ebtb_hit = 1; ebtb_pf_valid = 0; new_line = 0; #1;
    check(!cand_valid, "EBTB hit without line and no new line: no candidate");

    // on-chip drops
    idle(); new_line = 1; fetch_line = 28'h300; cache_p_hit = 1; #1;
    check(ev_onchip_drop && !ev_queued, "candidate in cache dropped");
    cache_p_hit = 0; buf_p_hit = 1; #1;
    check(ev_onchip_drop && !ev_queued, "candidate in prefetch buffer dropped");
    buf_p_hit = 0; inflight_valid = 1; inflight_line = 28'h301; #1;
    check(ev_onchip_drop && !ev_queued, "candidate in flight dropped");
    @(posedge clk); #1 idle(); #1;
    check(!pf_req_valid, "dropped candidates are not offered");

    // random
    rp = 0; rl = '0;
    for (int i = 0; i < 3000; i++) begin
      bit     ec, sc, oc, ld, cn;
      laddr_t cl;
      idle();
      ebtb_hit = $urandom_range(0, 1); ebtb_pf_valid = $urandom_range(0, 1);
      ebtb_pf_line = laddr_t'($urandom_range(0, 7)); new_line = $urandom_range(0, 1);
      fetch_line = laddr_t'($urandom_range(0, 7));
      cache_p_hit = ($urandom_range(0, 3) == 0); buf_p_hit = ($urandom_range(0, 3) == 0);
      inflight_valid = $urandom_range(0, 1); inflight_line = laddr_t'($urandom_range(0, 8));
      dm_req = $urandom_range(0, 1); dm_line = laddr_t'($urandom_range(0, 8));
      #1;
      ec = ebtb_hit && ebtb_pf_valid;
      sc = !ec && new_line;
      cl = ec ? ebtb_pf_line : fetch_line + 1;
      check(cand_valid == (ec || sc), "random candidate valid");
      if (ec || sc) check(cand_line == cl, "random candidate line");
      oc = cache_p_hit || buf_p_hit || (inflight_valid && inflight_line == cl);
      ld = (ec || sc) && !oc && !(rp && rl == cl) && !(dm_req && dm_line == cl);
      cn = dm_req && dm_line == rl;
      check(pf_req_valid == (rp && !cn), "random offer");
      if (rp && !cn) check(pf_req_line == rl, "random offered line");
      pf_grant = pf_req_valid && $urandom_range(0, 1);
      #1;
      if (ld) begin rp = 1; rl = cl; end
      else if (pf_grant || cn) rp = 0;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
