// prefetch_buffer_tb: checks the fully associative prefetch buffer.
//
// Lines filled from below are found on both lookup ports with their data.
// A used hit appears on the transfer port exactly one cycle later and the
// entry is free after that cycle (the line stays visible until then). Nine
// fills into eight entries replace the oldest entry (round robin), and the
// occupancy output follows. A random part compares hits, data and transfers
// with a reference list of resident lines.
module prefetch_buffer_tb;
  import bib_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  laddr_t f_line, p_line, fill_line, xfer_line;
  logic   f_use, f_hit, p_hit, fill_valid, xfer_valid;
  line_t  f_data, fill_data, xfer_data;
  logic [3:0] occupancy;

  prefetch_buffer dut (.*);

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

  function automatic line_t pat(laddr_t l);
    return {4{~l, 4'hC}};
  endfunction
  task automatic fill(laddr_t l);
    fill_valid = 1; fill_line = l; fill_data = pat(l);
    @(posedge clk); #1 fill_valid = 0;
  endtask

  // reference: resident lines
  laddr_t res_q [$];
  bit     mv_pend;
  laddr_t mv_line;

  initial begin
    f_use = 0; fill_valid = 0; f_line = '0; p_line = '0; fill_line = '0; fill_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    #1 check(occupancy == 0, "empty after reset");
    fill(28'h100); fill(28'h200); fill(28'h300);
    check(occupancy == 3, "three entries used");
    f_line = 28'h200; p_line = 28'h300; #1;
    check(f_hit && f_data == pat(28'h200) && p_hit, "lookup ports find filled lines");
    p_line = 28'h400; #1;
    check(!p_hit, "probe misses an absent line");
    // use 0x200: moves next cycle
    f_use = 1;
    @(posedge clk); #1 f_use = 0;
    check(xfer_valid && xfer_line == 28'h200 && xfer_data == pat(28'h200), "line moves to the cache one cycle after use");
    check(f_hit, "line still visible during its move");
    @(posedge clk); #1;
    check(!xfer_valid, "one transfer per use");
    check(!f_hit && occupancy == 2, "entry freed after the move");
    // fill to capacity and one more: oldest replacement
    for (int i = 0; i < 6; i++) fill(laddr_t'(28'h500 + i));
    check(occupancy == 8, "full");
    fill(28'h900);
    check(occupancy == 8, "still full after replacement");
    f_line = 28'h900; #1; check(f_hit, "new line resident");
    f_line = 28'h100; #1; check(!f_hit, "first-filled entry (0x100) replaced");
    f_line = 28'h300; #1; check(f_hit, "0x300 kept");

    // random part
    rst_n = 0; #1 rst_n = 1;
    res_q = {}; mv_pend = 0;
    for (int i = 0; i < 3000; i++) begin
      laddr_t l;
      int     k;
      bit     ex, fill_now;
      l = laddr_t'($urandom_range(0, 15));
      f_line = l; p_line = laddr_t'($urandom_range(0, 15)); #1;
      ex = 0;
      foreach (res_q[j]) if (res_q[j] == l) ex = 1;
      check(f_hit == ex, "random fetch hit");
      if (ex) check(f_data == pat(l), "random data");
      check(xfer_valid == mv_pend, "random transfer valid");
      if (mv_pend) check(xfer_line == mv_line && xfer_data == pat(mv_line), "random transfer line");
      // at this edge the moving line leaves
      if (mv_pend) begin
        k = -1;
        foreach (res_q[j]) if (res_q[j] == mv_line) k = j;
        if (k >= 0) res_q.delete(k);
      end
      f_use = ex && ($urandom_range(0, 2) == 0) && !(mv_pend && mv_line == l);
      fill_now = 0;
      if (res_q.size() < 7 && !(ex) && ($urandom_range(0, 1) == 1)) fill_now = 1;
      fill_valid = fill_now; fill_line = l; fill_data = pat(l);
      mv_pend = f_use; mv_line = l;
      if (fill_now) res_q.push_back(l);
      @(posedge clk); #1;
      f_use = 0; fill_valid = 0;
      check(occupancy == res_q.size(), "random occupancy");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
