// ebtb_index_fifo_tb: checks the two-entry EBTB index FIFO.
//
// A directed part walks through the document's example (branch A, then B:
// A's entry receives the line after B), a refused second insertion, a
// resolve of an unqueued branch and an update and insertion in one cycle.
// A random part drives legal decode/execute traffic and compares every EBTB
// write with a reference that numbers the accepted branches in order: the
// resolution of accepted branch n writes the line of its next address into
// the entry of accepted branch n-1.
module ebtb_index_fifo_tb;
  import bib_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic      ins_valid;
  ebtb_idx_t ins_idx;
  logic      ins_accepted;
  resolve_t  res;
  logic      pfw_valid;
  ebtb_idx_t pfw_idx;
  laddr_t    pfw_line;
  logic      t_bit, c_bit;

  ebtb_index_fifo dut (.*);

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
    ins_valid = 0; ins_idx = '0; res = '0;
  endtask

  // reference state for the random part
  ebtb_idx_t acc_list [$];
  int        n_upd;
  bit        outstanding;

  initial begin
    idle();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #1;
    check(t_bit == 0 && c_bit == 1, "reset state T=0 C=1");

    // branch A decoded, index 5
    ins_valid = 1; ins_idx = 10'd5; #1;
    check(ins_accepted, "A accepted");
    @(posedge clk); #1 idle(); #1;
    check(c_bit == 0, "C cleared after insert");
    // a second branch before A resolves is refused
    ins_valid = 1; ins_idx = 10'd7; #1;
    check(!ins_accepted, "second index refused while C clear");
    @(posedge clk); #1 idle();
    // A resolves, taken to 0x1000: no previous branch, nothing written
    res.valid = 1; res.queued = 1; res.pc = 32'h0000_0040; res.taken = 1; res.target = 32'h0000_1000; #1;
    check(!pfw_valid, "no write before a previous branch exists");
    @(posedge clk); #1 idle(); #1;
    check(t_bit == 1 && c_bit == 1, "T toggled and C set after update");
    // B decoded, index 9
    ins_valid = 1; ins_idx = 10'd9; #1;
    check(ins_accepted, "B accepted");
    @(posedge clk); #1 idle();
    // B resolves not taken at 0x2004: A's entry (5) gets line of 0x2008
    res.valid = 1; res.queued = 1; res.pc = 32'h0000_2004; res.taken = 0; res.target = 32'h0000_3000; #1;
    check(pfw_valid && pfw_idx == 10'd5 && pfw_line == laddr_t'(32'h2008 >> 4), "A's entry gets B's fall-through line");
    // ... while C (index 12) is decoded in the same cycle
    ins_valid = 1; ins_idx = 10'd12; #1;
    check(ins_accepted, "insert accepted in the cycle of an update");
    @(posedge clk); #1 idle();
    // an unqueued branch resolving changes nothing
    res.valid = 1; res.queued = 0; res.pc = 32'h0000_5000; res.taken = 1; res.target = 32'h0000_6000; #1;
    check(!pfw_valid, "unqueued branch writes nothing");
    @(posedge clk); #1 idle();
    // C resolves taken to 0x4440: B's entry (9) gets line 0x444
    res.valid = 1; res.queued = 1; res.pc = 32'h0000_3010; res.taken = 1; res.target = 32'h0000_4440; #1;
    check(pfw_valid && pfw_idx == 10'd9 && pfw_line == 28'h444, "B's entry gets C's target line");
    @(posedge clk); #1 idle();

    // random part: restart from reset
    rst_n = 0; #1 rst_n = 1;
    acc_list = {}; n_upd = 0; outstanding = 0;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      bit do_res, do_unq, exp_acc;
      addr_t pc, tgt, nxt;
      idle();
      do_res = outstanding && ($urandom_range(0, 2) == 0);
      do_unq = !do_res && ($urandom_range(0, 4) == 0);
      pc  = {$urandom()} & 32'hFFFF_FFFC;
      tgt = {$urandom()} & 32'hFFFF_FFFC;
      if (do_res || do_unq) begin
        res.valid = 1; res.queued = do_res; res.pc = pc; res.taken = $urandom_range(0, 1); res.target = tgt;
      end
      ins_valid = ($urandom_range(0, 1) == 1);
      ins_idx   = ebtb_idx_t'($urandom());
      #1;
      nxt = res.taken ? tgt : pc + 4;
      if (do_res) begin
        if (n_upd >= 1)
          check(pfw_valid && pfw_idx == acc_list[n_upd-1] && pfw_line == line_of(nxt), "random update");
        else
          check(!pfw_valid, "random first update writes nothing");
        n_upd++;
        outstanding = 0;
      end else begin
        check(!pfw_valid, "no write without a queued resolve");
      end
      exp_acc = ins_valid && !outstanding;
      check(ins_accepted == exp_acc, "random acceptance");
      if (exp_acc) begin
        acc_list.push_back(ins_idx);
        outstanding = 1;
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
