// bib_cache_sweep_tb: runs the synthetic program through the front end in
// the twelve cache organisations the design is meant for (direct mapped,
// 2-way and 4-way; 2, 4, 8 and 16 KB; 16-byte lines, 8-entry prefetch buffer,
// 1024-entry EBTB) side by side, and prints the MCPI (fetch stall cycles per
// committed instruction) of each.
//
// Checks: every system commits its instructions in program order with the
// right words (checked inside bib_run), and for each associativity the
// 16 KB cache stalls less than the 2 KB one and no size stalls more than
// the next smaller one by over 5%.
module bib_cache_sweep_tb;
  localparam int unsigned N = 100000;
  localparam int SIZES [4] = '{2048, 4096, 8192, 16384};
  localparam int WAYSS [3] = '{1, 2, 4};

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        done   [3][4];
  int unsigned cycles [3][4];
  int unsigned stall  [3][4];
  int unsigned req    [3][4];
  int          fails  [3][4];

  for (genvar a = 0; a < 3; a++) begin : g_assoc
    for (genvar s = 0; s < 4; s++) begin : g_size
      bib_run #(.CACHE_BYTES(SIZES[s]), .CACHE_WAYS(WAYSS[a]), .N_INSTR(N)) u_run (
        .clk, .rst_n, .done(done[a][s]), .cycles(cycles[a][s]), .n_stall(stall[a][s]),
        .n_req(req[a][s]), .failures(fails[a][s])
      );
    end
  end

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  function automatic bit all_done();
    foreach (done[a, s]) if (!done[a][s]) return 0;
    return 1;
  endfunction

  initial begin
    repeat (N * 20) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    while (!all_done()) @(posedge clk);
    @(posedge clk); #1;
    $display("config      MCPI    L2 requests per instruction");
    foreach (done[a, s]) begin
      string name;
      name = (WAYSS[a] == 1) ? $sformatf("D_%0d", SIZES[s] / 1024) : $sformatf("%0d-way_%0d", WAYSS[a], SIZES[s] / 1024);
      $display("%-10s  %0.4f  %0.4f", name, real'(stall[a][s]) / N, real'(req[a][s]) / N);
      check(fails[a][s] == 0, $sformatf("%s committed stream correct", name));
      if (s > 0)
        check(stall[a][s] <= stall[a][s-1] + stall[a][s-1] / 20, $sformatf("%s stalls no more than the next smaller cache", name));
    end
    for (int a = 0; a < 3; a++)
      check(stall[a][3] < stall[a][0], $sformatf("%0d-way: 16 KB stalls less than 2 KB", WAYSS[a]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
