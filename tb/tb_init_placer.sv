// tb_init_placer: runs the random initial placer against testbench models of
// the Occupied RAM (47x47, one clock read latency, preloaded with garbage) and
// the Locations RAM. After each run every grid location must be either free or
// hold the CLB whose location points back to it, every CLB must be placed
// inside grid_size x grid_size, no two CLBs may share a location, and the run
// must take at least GRID*GRID + 3*n_clbs clocks. Problem sizes include a
// completely full grid (so collisions and retries happen) and Table I case 5.
module tb_init_placer;
  import place_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic        start, busy, done;
  logic [31:0] seed;
  clb_t        n_clbs;
  coord_t      grid_size;
  loc_t        occ_rloc, occ_wloc, loc_wdata;
  clb_t        occ_rdata, occ_wdata, loc_waddr;
  logic        occ_we, loc_we;

  int     mOCC [GRID_MAX][GRID_MAX];
  loc_t   mLOC [N_CLB_MAX];
  int     checks = 0, failures = 0, retries = 0;
  longint cycle = 0;

  init_placer dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(posedge clk) begin
    occ_rdata <= (mOCC[occ_rloc.x][occ_rloc.y] < 0) ? CLB_NONE : clb_t'(mOCC[occ_rloc.x][occ_rloc.y]);
    if (occ_we) mOCC[occ_wloc.x][occ_wloc.y] <= (occ_wdata == CLB_NONE) ? -1 : int'(occ_wdata);
    if (loc_we) mLOC[loc_waddr] <= loc_wdata;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one_run(int n, int g, logic [31:0] s);
    longint t0;
    int seen [GRID_MAX][GRID_MAX];
    int bad = 0;
    foreach (mOCC[x, y]) mOCC[x][y] = $urandom_range(N_CLB_MAX - 1);  // stale contents
    foreach (seen[x, y]) seen[x][y] = 0;
    @(negedge clk);
    start = 1; n_clbs = clb_t'(n); grid_size = coord_t'(g); seed = s;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    for (int c = 0; c < n; c++) begin
      checks++;
      if (int'(mLOC[c].x) >= g || int'(mLOC[c].y) >= g || mOCC[mLOC[c].x][mLOC[c].y] != c) begin
        failures++; bad++;
        $display("FAIL CLB %0d at (%0d,%0d)", c, mLOC[c].x, mLOC[c].y);
      end else begin
        seen[mLOC[c].x][mLOC[c].y]++;
      end
    end
    foreach (mOCC[x, y]) begin
      checks++;
      if (mOCC[x][y] >= 0 && (mOCC[x][y] >= n || seen[x][y] != 1)) begin
        failures++; bad++;
        if (bad < 10) $display("FAIL location (%0d,%0d) holds %0d", x, y, mOCC[x][y]);
      end
    end
    // GRID*GRID clear clocks, 3 clocks per draw, 2 to finish: the draws
    // beyond n are retries after a collision.
    checks++;
    if (cycle - t0 < longint'(GRID_MAX * GRID_MAX + 3 * n + 2) ||
        (cycle - t0 - GRID_MAX * GRID_MAX - 2) % 3 != 0) begin
      failures++;
      $display("FAIL run took %0d clocks", cycle - t0);
    end else begin
      retries += int'((cycle - t0 - GRID_MAX * GRID_MAX - 2) / 3) - n;
    end
    $display("n=%0d g=%0d: %0d clocks, %0d retries so far", n, g, cycle - t0, retries);
  endtask

  initial begin
    start = 0; seed = '0; n_clbs = '0; grid_size = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    one_run(20, 9, 32'h1234_5678);
    one_run(81, 9, 32'hDEAD_BEEF);     // full grid
    one_run(150, 25, 32'h0000_0001);
    one_run(550, 47, 32'hCAFE_F00D);   // Table I case 5
    one_run(2, 47, 32'h0);              // zero seed is replaced
    checks++;
    if (retries == 0) begin failures++; $display("FAIL no collision retried"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
