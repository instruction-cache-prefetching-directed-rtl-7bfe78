// fetch_unit_tb: checks the instruction fetch stage against a reference PC
// model.
//
// The testbench plays the two stores and the EBTB: for each line it decides
// at random whether the cache and/or the prefetch buffer hold it (with
// different data, so the source can be told apart), and for each PC
// whether the EBTB predicts taken and where. Each cycle it checks delivery
// (only on a hit, never in a redirect cycle), the delivered word, the fetch
// miss request (the AND of both misses), which store is told it was used,
// the new-line flag and, after the edge, the PC: redirect target, else the
// predicted target or PC + 4 after a delivery, else unchanged (stall). The
// directed start checks the reset PC and a stall lasting until the line
// appears.
module fetch_unit_tb;
  import bib_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      redirect_valid;
  addr_t     redirect_pc, pc;
  laddr_t    fetch_line;
  logic      cache_hit, buf_hit, ebtb_hit, ebtb_pred_taken;
  line_t     cache_data, buf_data;
  addr_t     ebtb_pred_target;
  ebtb_idx_t ebtb_idx;
  logic      out_valid, out_ebtb_hit, out_pred_taken;
  addr_t     out_pc, out_pred_next;
  instr_t    out_instr;
  ebtb_idx_t out_ebtb_idx;
  logic      miss_req, cache_touch, buf_use, new_line, fire;

  fetch_unit #(.RESET_PC(32'h0000_0100)) dut (.*);

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

  function automatic line_t data_of(laddr_t l, bit from_buf);
    line_t d;
    for (int w = 0; w < 4; w++) d[w*32 +: 32] = {l, 4'(w * 4)} ^ (from_buf ? 32'h0F0F_0000 : 32'h0000_F0F0);
    return d;
  endfunction

  // drive the stores and the EBTB for the current PC
  bit     in_cache [64];
  bit     in_buf   [64];
  task automatic drive();
    laddr_t l;
    l = fetch_line;
    cache_hit  = in_cache[l % 64];
    buf_hit    = in_buf[l % 64];
    cache_data = data_of(l, 0);
    buf_data   = data_of(l, 1);
    ebtb_hit         = (pc[4:2] == 3'd3) || (pc[4:2] == 3'd6);
    ebtb_pred_taken  = ebtb_hit && pc[5];
    ebtb_pred_target = {pc[31:10] ^ 22'h3, 8'(pc[9:2] * 7), 2'b00} & 32'h0000_03FC;
    ebtb_idx         = ebtb_idx_t'(pc[11:2]);
  endtask

  addr_t  rpc, nxt;
  laddr_t rlast;
  bit     rlast_v;

  initial begin
    redirect_valid = 0; redirect_pc = '0;
    foreach (in_cache[i]) begin in_cache[i] = 0; in_buf[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1; #1;
    check(pc == 32'h0000_0100, "reset PC");
    drive(); #1;
    check(miss_req && !out_valid && new_line, "cold line: miss requested, nothing delivered");
    repeat (3) begin @(posedge clk); #1 drive(); #1; end
    check(pc == 32'h0000_0100 && miss_req, "stalls while the line is absent");
    in_buf[16] = 1; drive(); #1;
    check(!miss_req && out_valid && buf_use && !cache_touch, "line in the buffer delivers");
    check(out_instr == data_of(28'h10, 1)[31:0], "word 0 of the buffer line");
    @(posedge clk); #1;

    // random
    rpc = pc; rlast = 28'h10; rlast_v = 1;
    for (int i = 0; i < 5000; i++) begin
      bit hitc, hitb, rd;
      addr_t rpcn;
      if ($urandom_range(0, 3) == 0) begin
        int k = $urandom_range(0, 63);
        in_cache[k] = $urandom_range(0, 1);
        in_buf[k]   = !in_cache[k] && $urandom_range(0, 1);
      end
      redirect_valid = ($urandom_range(0, 9) == 0);
      redirect_pc    = {$urandom()} & 32'h0000_03FC;
      drive(); #1;
      check(pc == rpc, "random PC");
      hitc = in_cache[line_of(rpc) % 64]; hitb = in_buf[line_of(rpc) % 64];
      rd   = redirect_valid;
      check(miss_req == (!hitc && !hitb), "random miss request is the AND of both misses");
      check(out_valid == ((hitc || hitb) && !rd), "random delivery");
      check(cache_touch == (hitc && !rd) && buf_use == (!hitc && hitb && !rd), "random store use");
      check(new_line == (!rd && (!rlast_v || line_of(rpc) != rlast)), "random new line");
      if (out_valid)
        check(out_instr == word_of(data_of(line_of(rpc), !hitc), rpc) && out_pc == rpc, "random word");
      nxt = ebtb_pred_taken ? ebtb_pred_target : rpc + 4;
      check(out_pred_next == nxt && out_ebtb_idx == ebtb_idx && out_ebtb_hit == ebtb_hit, "random prediction passed on");
      if (rd) rpcn = redirect_pc;
      else if (hitc || hitb) begin rpcn = nxt; rlast = line_of(rpc); rlast_v = 1; end
      else rpcn = rpc;
      rpc = rpcn;
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
