// icache_tb: checks the instruction cache.
//
// The default instance (2 KB, direct mapped) is checked for cold misses, a
// fill followed by a hit returning the filled line on the fetch port and
// on the probe port, and the conflict eviction of a line 2 KB away. A
// second instance (256 B, 2-way) checks LRU replacement: after lines A and
// B fill one set and A is fetched again, line C must replace B. A random
// part on the default instance compares hits and data with a reference
// direct-mapped tag array.
module icache_tb;
  import bib_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  laddr_t f_line, p_line, fill_line;
  logic   f_touch, f_hit, p_hit, fill_valid;
  line_t  f_data, fill_data;

  laddr_t f2_line, p2_line, fill2_line;
  logic   f2_touch, f2_hit, p2_hit, fill2_valid;
  line_t  f2_data, fill2_data;

  icache dut (.*);
  icache #(.SIZE_BYTES(256), .WAYS(2)) dut2 (
    .clk, .rst_n,
    .f_line(f2_line), .f_touch(f2_touch), .f_hit(f2_hit), .f_data(f2_data),
    .p_line(p2_line), .p_hit(p2_hit),
    .fill_valid(fill2_valid), .fill_line(fill2_line), .fill_data(fill2_data)
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

  function automatic line_t pat(laddr_t l);
    return {4{l ^ 28'h5A5_A5A5, 4'h3}};
  endfunction

  task automatic fill(laddr_t l);
    fill_valid = 1; fill_line = l; fill_data = pat(l);
    @(posedge clk); #1 fill_valid = 0;
  endtask
  task automatic fill2(laddr_t l);
    fill2_valid = 1; fill2_line = l; fill2_data = pat(l);
    @(posedge clk); #1 fill2_valid = 0;
  endtask

  // reference: 128 sets direct mapped
  bit     rv [128];
  laddr_t rt [128];

  initial begin
    f_touch = 0; fill_valid = 0; f_line = '0; p_line = '0; fill_line = '0; fill_data = '0;
    f2_touch = 0; fill2_valid = 0; f2_line = '0; p2_line = '0; fill2_line = '0; fill2_data = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;

    f_line = 28'h000_0010; p_line = 28'h000_0010; #1;
    check(!f_hit && !p_hit, "cold miss");
    fill(28'h000_0010);
    f_line = 28'h000_0010; p_line = 28'h000_0010; #1;
    check(f_hit && f_data == pat(28'h000_0010), "hit after fill with the filled line");
    check(p_hit, "probe port sees the line");
    // 2 KB away: same set, other tag
    f_line = 28'h000_0090; #1;
    check(!f_hit, "conflicting line misses");
    fill(28'h000_0090);
    f_line = 28'h000_0010; p_line = 28'h000_0090; #1;
    check(!f_hit && p_hit, "direct mapped conflict evicts the old line");

    // 2-way LRU: 8 sets, lines 0x3, 0xB, 0x13 share set 3
    fill2(28'h3);
    fill2(28'hB);
    f2_line = 28'h3; f2_touch = 1; #1;
    check(f2_hit && f2_data == pat(28'h3), "2-way: A hits");
    @(posedge clk); #1 f2_touch = 0;
    fill2(28'h13);
    f2_line = 28'h3;  #1; check(f2_hit, "2-way: recently used A kept");
    f2_line = 28'hB;  #1; check(!f2_hit, "2-way: least recently used B replaced");
    f2_line = 28'h13; #1; check(f2_hit && f2_data == pat(28'h13), "2-way: C present");

    // random, default instance
    rst_n = 0; #1 rst_n = 1;
    foreach (rv[i]) rv[i] = 0;
    for (int i = 0; i < 4000; i++) begin
      laddr_t l;
      l = laddr_t'($urandom_range(0, 1023));
      f_line = l; p_line = laddr_t'($urandom_range(0, 1023)); #1;
      check(f_hit == (rv[l % 128] && rt[l % 128] == l), "random fetch hit");
      if (f_hit) check(f_data == pat(l), "random data");
      check(p_hit == (rv[p_line % 128] && rt[p_line % 128] == p_line), "random probe hit");
      if ($urandom_range(0, 1) == 1) begin
        fill_valid = 1; fill_line = l; fill_data = pat(l);
        rv[l % 128] = 1; rt[l % 128] = l;
      end
      @(posedge clk); #1 fill_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
