// tb_improve_ctrl: runs the Improve controller against testbench models of the
// Locations and Occupied RAMs (one clock read latency) and of the Difference
// controller (answers 2*n_clbs+1 clocks after start with the exact wire-length
// change). The final placement, the statistics counters and the number of
// clocks of the whole run are compared with the reference model, in node-swap
// and in node-move mode, on sparse and dense random netlists.
module tb_improve_ctrl;
  import place_pkg::*;
  import place_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  clb_t   n_clbs;
  coord_t grid_size, radius;
  logic   swap_en, start, busy, done;
  stat_t  iterations, moves, swaps, evals, skipped;
  delta_t total_delta;
  clb_t   loc_raddr, loc_waddr, occ_rdata, occ_wdata;
  loc_t   loc_rdata, loc_wdata, occ_rloc, occ_wloc;
  logic   loc_we, occ_we;
  logic   diff_start, diff_done;
  clb_t   diff_i, diff_k;
  loc_t   diff_old, diff_new;
  delta_t diff_delta;

  int     checks = 0, failures = 0;
  int     tot_moves = 0, tot_swaps = 0, tot_skipped = 0, tot_multi_iter = 0, tot_clipped = 0;
  longint cycle = 0;

  // Testbench copy of the RAM contents.
  int mLX [N_CLB_MAX];
  int mLY [N_CLB_MAX];
  int mOCC [GRID_MAX][GRID_MAX];

  improve_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  always @(posedge clk) begin
    loc_rdata <= '{x: coord_t'(mLX[loc_raddr]), y: coord_t'(mLY[loc_raddr])};
    occ_rdata <= (mOCC[occ_rloc.x][occ_rloc.y] < 0) ? CLB_NONE : clb_t'(mOCC[occ_rloc.x][occ_rloc.y]);
    if (loc_we) begin
      mLX[loc_waddr] <= int'(loc_wdata.x);
      mLY[loc_waddr] <= int'(loc_wdata.y);
    end
    if (occ_we) mOCC[occ_wloc.x][occ_wloc.y] <= (occ_wdata == CLB_NONE) ? -1 : int'(occ_wdata);
  end

  // Difference controller model.
  function automatic longint model_delta(int n, int i, int k, int nx, int ny, int ox, int oy);
    longint d = 0;
    int dn, dold;
    for (int j = 0; j < n; j++) begin
      if (j == i || j == k) continue;
      dn   = mdist(nx, ny, mLX[j], mLY[j]);
      dold = mdist(ox, oy, mLX[j], mLY[j]);
      d += longint'(W[i][j] - ((k >= 0) ? W[k][j] : 0)) * (dn - dold);
    end
    return d;
  endfunction

  // Sampled on the clock edge like the real controller: start seen at the end
  // of the start clock, done high 2*n_clbs+1 clocks after it.
  int     diff_cnt = 0;
  delta_t diff_result;
  always @(posedge clk) begin
    diff_done <= 1'b0;
    if (diff_start) begin
      diff_result <= delta_t'(model_delta(int'(n_clbs), int'(diff_i),
                                          (diff_k == CLB_NONE) ? -1 : int'(diff_k),
                                          int'(diff_new.x), int'(diff_new.y),
                                          int'(diff_old.x), int'(diff_old.y)));
      diff_cnt <= 2 * int'(n_clbs);
    end else if (diff_cnt > 0) begin
      diff_cnt <= diff_cnt - 1;
      if (diff_cnt == 1) begin
        diff_done  <= 1'b1;
        diff_delta <= diff_result;
      end
    end
  end

  initial begin
    repeat (40000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic random_place(int n, int g);
    int x, y;
    foreach (OCC[a, b]) OCC[a][b] = -1;
    for (int c = 0; c < n; c++) begin
      do begin
        x = $urandom_range(g - 1);
        y = $urandom_range(g - 1);
      end while (OCC[x][y] >= 0);
      OCC[x][y] = c; LX[c] = x; LY[c] = y;
    end
    mLX = LX; mLY = LY; mOCC = OCC;
  endtask

  task automatic one_run(int n, int g, int conns, int r, bit sw);
    longint t0, l0;
    random_netlist(n, conns);
    random_place(n, g);
    l0 = length(n);
    @(negedge clk);
    n_clbs = clb_t'(n); grid_size = coord_t'(g); radius = coord_t'(r); swap_en = sw;
    start = 1;
    t0 = cycle;
    @(negedge clk);
    start = 0;
    run(n, g, r, sw);             // reference, on its own copy
    while (!done) @(negedge clk);
    checks++;
    if (cycle - t0 != r_cycles) begin
      failures++;
      $display("FAIL n=%0d: run took %0d clocks, expected %0d", n, cycle - t0, r_cycles);
    end
    for (int c = 0; c < n; c++) begin
      checks++;
      if (mLX[c] != LX[c] || mLY[c] != LY[c] || mOCC[LX[c]][LY[c]] != c) begin
        failures++;
        $display("FAIL n=%0d CLB %0d at (%0d,%0d) expected (%0d,%0d)", n, c, mLX[c], mLY[c], LX[c], LY[c]);
      end
    end
    checks += 6;
    if (int'(iterations) != r_iter)  begin failures++; $display("FAIL iterations %0d/%0d", iterations, r_iter); end
    if (int'(moves)      != r_moves) begin failures++; $display("FAIL moves %0d/%0d", moves, r_moves); end
    if (int'(swaps)      != r_swaps) begin failures++; $display("FAIL swaps %0d/%0d", swaps, r_swaps); end
    if (int'(evals)      != r_evals) begin failures++; $display("FAIL evals %0d/%0d", evals, r_evals); end
    if (int'(skipped)    != r_skipped) begin failures++; $display("FAIL skipped %0d/%0d", skipped, r_skipped); end
    if (longint'(total_delta) != length(n) - l0) begin
      failures++;
      $display("FAIL total delta %0d, length went %0d -> %0d", total_delta, l0, length(n));
    end
    $display("n=%0d g=%0d conns=%0d r=%0d swap=%0d: L %0d -> %0d, %0d iterations, %0d moves, %0d swaps, %0d clocks",
             n, g, conns, r, sw, l0, length(n), r_iter, r_moves, r_swaps, r_cycles);
    tot_moves += r_moves; tot_swaps += r_swaps; tot_skipped += r_skipped; tot_clipped += r_clipped;
    if (r_iter > 1) tot_multi_iter++;
  endtask

  initial begin
    start = 0; n_clbs = '0; grid_size = '0; radius = '0; swap_en = 0;
    diff_done = 0; diff_delta = '0;
    clear_all();
    mLX = LX; mLY = LY; mOCC = OCC;
    repeat (3) @(negedge clk);
    rst_n = 1;
    one_run(20, 9, 27, 2, 1);
    one_run(20, 9, 190, 2, 1);
    one_run(20, 9, 27, 2, 0);
    one_run(20, 9, 190, 1, 0);
    one_run(6, 3, 10, 3, 1);
    one_run(60, 12, 300, 2, 1);
    // every mechanism happened at least once
    checks += 5;
    if (tot_moves == 0)      begin failures++; $display("FAIL no move"); end
    if (tot_swaps == 0)      begin failures++; $display("FAIL no swap"); end
    if (tot_skipped == 0)    begin failures++; $display("FAIL no occupied candidate refused in node-move mode"); end
    if (tot_multi_iter == 0) begin failures++; $display("FAIL no second iteration"); end
    if (tot_clipped == 0)    begin failures++; $display("FAIL no clipped box"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
