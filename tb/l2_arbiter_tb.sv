// l2_arbiter_tb: checks the request port to the lower level memory, with
// the behavioural three-cycle L2 model attached.
//
// A lone prefetch is sent and its line returns three cycles later into the
// fill port with the right address and data. A fetch miss and a prefetch
// offered together: the miss goes first and the prefetch follows only after
// the miss's line returned (one request in flight). A fetch miss arriving
// while a prefetch is in flight waits for it (no preemption). A random part
// checks that at most one request is in flight, that every fill carries
// the line of the request in flight and that each request takes exactly
// three cycles.
module l2_arbiter_tb;
  import bib_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic   dm_req, pf_req_valid, pf_grant, dm_grant;
  laddr_t dm_line, pf_req_line;
  logic   l2_req_valid, l2_req_ready, l2_resp_valid;
  laddr_t l2_req_line;
  line_t  l2_resp_data;
  logic   inflight_valid, inflight_is_pf;
  laddr_t inflight_line;
  logic   fill_valid;
  laddr_t fill_line;
  line_t  fill_data;
  int     accepted;

  l2_arbiter dut (.*);
  l2_model #(.LATENCY(3)) u_l2 (
    .clk, .rst_n, .req_valid(l2_req_valid), .req_line(l2_req_line), .req_ready(l2_req_ready),
    .resp_valid(l2_resp_valid), .resp_data(l2_resp_data), .accepted
  );

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

  function automatic line_t expect_data(laddr_t l);
    line_t d;
    for (int w = 0; w < 4; w++) d[w*32 +: 32] = {l, 4'(w * 4)} ^ 32'hA5C3_0F00;
    return d;
  endfunction

  // cycles from grant to fill
  task automatic wait_fill(input laddr_t l, output int n);
    n = 0;
    while (!fill_valid) begin
      @(posedge clk); #1; n++;
      if (n > 20) break;
    end
    check(fill_line == l && fill_data == expect_data(l), "fill carries the requested line");
  endtask

  int n;
  int inflight_cycles;
  laddr_t exp_line;

  initial begin
    dm_req = 0; pf_req_valid = 0; dm_line = '0; pf_req_line = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    // lone prefetch
    pf_req_valid = 1; pf_req_line = 28'h0AB; #1;
    check(l2_req_valid && l2_req_line == 28'h0AB && pf_grant && !dm_grant, "prefetch sent when idle");
    @(posedge clk); #1 pf_req_valid = 0;
    check(inflight_valid && inflight_is_pf && inflight_line == 28'h0AB, "prefetch in flight");
    wait_fill(28'h0AB, n);
    check(n == 2, "line returns in the third cycle after the request");
    @(posedge clk); #1;
    check(!inflight_valid, "port idle after the fill");

    // miss beats prefetch
    dm_req = 1; dm_line = 28'h111; pf_req_valid = 1; pf_req_line = 28'h222; #1;
    check(dm_grant && !pf_grant && l2_req_line == 28'h111, "fetch miss has priority");
    @(posedge clk); #1;
    check(!l2_req_valid, "no second request while one is in flight");
    wait_fill(28'h111, n);
    dm_req = 0;
    @(posedge clk); #1;
    check(pf_grant && l2_req_line == 28'h222, "prefetch follows once the port is free");
    @(posedge clk); #1 pf_req_valid = 0;
    // miss arrives during the prefetch: waits
    dm_req = 1; dm_line = 28'h333; #1;
    check(!dm_grant && !l2_req_valid, "no preemption of the prefetch in flight");
    wait_fill(28'h222, n);
    @(posedge clk); #1;
    check(dm_grant && l2_req_line == 28'h333, "waiting miss sent after the prefetch");
    @(posedge clk); #1 dm_req = 0;
    wait_fill(28'h333, n);
    @(posedge clk); #1;

    // random
    inflight_cycles = 0;
    for (int i = 0; i < 3000; i++) begin
      dm_req = ($urandom_range(0, 3) == 0); dm_line = laddr_t'($urandom());
      pf_req_valid = $urandom_range(0, 1); pf_req_line = laddr_t'($urandom());
      #1;
      check(!(l2_req_valid && inflight_valid), "random: one request at a time");
      if (dm_req && l2_req_valid) check(dm_grant && l2_req_line == dm_line, "random: miss first");
      if (fill_valid) begin
        check(fill_line == exp_line && fill_data == expect_data(exp_line), "random fill line");
        check(inflight_cycles == 3, "random: three-cycle latency");
      end
      if (l2_req_valid && l2_req_ready) begin
        exp_line = l2_req_line;
        inflight_cycles = 1;
      end else if (inflight_valid && !fill_valid) begin
        inflight_cycles++;
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
