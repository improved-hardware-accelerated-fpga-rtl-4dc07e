// placer_host_tasks.svh: host-side tasks shared by the end-to-end testbenches
// of placer_top. Included inside a testbench module that declares the top's
// port signals, clk, cycle, checks and failures, and imports place_pkg and
// place_ref_pkg. The tasks load a netlist from the reference model's W
// matrix, build or load a starting placement, run the accelerator and compare
// the final placement, the counters and the clock count with the reference.

int unsigned mech_moves = 0, mech_swaps = 0, mech_skipped = 0;
int unsigned mech_multi_iter = 0, mech_clipped = 0, mech_init_retry = 0;
int unsigned mech_host_load = 0, mech_move_mode = 0;

task automatic host_idle();
  conn_we = 0; conn_a = '0; conn_b = '0; conn_w = '0;
  loc_we = 0; loc_clb = '0; loc_val = '0;
  occ_we = 0; occ_loc = '0; occ_val = '0;
  init_start = 0; place_start = 0;
  rd_clb = '0; rd_cell = '0;
endtask

// Write every CLB pair of an n-CLB problem into the Connected RAM.
task automatic load_netlist(int n);
  for (int a = 1; a < n; a++)
    for (int b = 0; b < a; b++) begin
      @(negedge clk);
      conn_we = 1; conn_a = clb_t'(a); conn_b = clb_t'(b); conn_w = wgt_t'(W[a][b]);
    end
  @(negedge clk);
  conn_we = 0;
endtask

// Read the placement back into the reference model (LX, LY, OCC) and check
// that the Locations and Occupied RAMs agree with each other.
task automatic read_back(int n, int g);
  int seen;
  for (int c = 0; c < n; c++) begin
    rd_clb = clb_t'(c);
    @(negedge clk);
    LX[c] = int'(rd_loc.x);
    LY[c] = int'(rd_loc.y);
  end
  foreach (OCC[x, y]) OCC[x][y] = -1;
  seen = 0;
  for (int x = 0; x < g; x++)
    for (int y = 0; y < g; y++) begin
      rd_cell = '{x: coord_t'(x), y: coord_t'(y)};
      @(negedge clk);
      if (rd_occ != CLB_NONE) begin
        OCC[x][y] = int'(rd_occ);
        seen++;
        checks++;
        if (int'(rd_occ) >= n || LX[rd_occ] != x || LY[rd_occ] != y) begin
          failures++;
          $display("FAIL location (%0d,%0d) holds %0d", x, y, rd_occ);
        end
      end
    end
  checks++;
  if (seen != n) begin
    failures++;
    $display("FAIL %0d occupied locations for %0d CLBs", seen, n);
  end
endtask

// Random start placement made by the on-chip initial placer.
task automatic init_on_chip(int n, int g, logic [31:0] s, int grid_param);
  longint t0;
  @(negedge clk);
  n_clbs = clb_t'(n); grid_size = coord_t'(g); seed = s;
  init_start = 1;
  t0 = cycle;
  @(negedge clk);
  init_start = 0;
  while (!init_done) @(negedge clk);
  if ((cycle - t0 - grid_param * grid_param - 2) / 3 > n) mech_init_retry++;
  read_back(n, g);
endtask

// Start placement computed here and written by the host through the direct
// load ports (grid cleared first).
task automatic init_by_host(int n, int g, int grid_param);
  int x, y;
  foreach (OCC[a, b]) OCC[a][b] = -1;
  for (int c = 0; c < n; c++) begin
    do begin
      x = $urandom_range(g - 1);
      y = $urandom_range(g - 1);
    end while (OCC[x][y] >= 0);
    OCC[x][y] = c; LX[c] = x; LY[c] = y;
  end
  for (int x2 = 0; x2 < grid_param; x2++)
    for (int y2 = 0; y2 < grid_param; y2++) begin
      @(negedge clk);
      occ_we = 1; occ_loc = '{x: coord_t'(x2), y: coord_t'(y2)};
      occ_val = (x2 < g && y2 < g && OCC[x2][y2] >= 0) ? clb_t'(OCC[x2][y2]) : CLB_NONE;
    end
  @(negedge clk);
  occ_we = 0;
  for (int c = 0; c < n; c++) begin
    @(negedge clk);
    loc_we = 1; loc_clb = clb_t'(c); loc_val = '{x: coord_t'(LX[c]), y: coord_t'(LY[c])};
  end
  @(negedge clk);
  loc_we = 0;
  mech_host_load++;
  read_back(n, g);
endtask

// Run the accelerator on the loaded problem and compare with the reference.
task automatic place_and_check(int n, int g, int r, bit sw);
  longint t0, l0;
  l0 = length(n);
  @(negedge clk);
  n_clbs = clb_t'(n); grid_size = coord_t'(g); radius = coord_t'(r); swap_en = sw;
  place_start = 1;
  t0 = cycle;
  @(negedge clk);
  place_start = 0;
  run(n, g, r, sw);                    // reference on its own copy
  while (!place_done) @(negedge clk);
  checks++;
  if (cycle - t0 != r_cycles) begin
    failures++;
    $display("FAIL run took %0d clocks, expected %0d", cycle - t0, r_cycles);
  end
  checks += 6;
  if (int'(iterations) != r_iter)    begin failures++; $display("FAIL iterations %0d/%0d", iterations, r_iter); end
  if (int'(moves)      != r_moves)   begin failures++; $display("FAIL moves %0d/%0d", moves, r_moves); end
  if (int'(swaps)      != r_swaps)   begin failures++; $display("FAIL swaps %0d/%0d", swaps, r_swaps); end
  if (int'(evals)      != r_evals)   begin failures++; $display("FAIL evals %0d/%0d", evals, r_evals); end
  if (int'(skipped)    != r_skipped) begin failures++; $display("FAIL skipped %0d/%0d", skipped, r_skipped); end
  if (longint'(total_delta) != length(n) - l0) begin
    failures++;
    $display("FAIL total delta %0d, reference length %0d -> %0d", total_delta, l0, length(n));
  end
  // final placement, read from the hardware, must equal the reference
  for (int c = 0; c < n; c++) begin
    rd_clb = clb_t'(c);
    @(negedge clk);
    checks++;
    if (int'(rd_loc.x) != LX[c] || int'(rd_loc.y) != LY[c]) begin
      failures++;
      $display("FAIL CLB %0d at (%0d,%0d) expected (%0d,%0d)", c, rd_loc.x, rd_loc.y, LX[c], LY[c]);
    end
  end
  read_back(n, g);                     // RAMs consistent with each other
  $display("n=%0d grid=%0dx%0d r=%0d swap=%0d: length %0d -> %0d, %0d iterations, %0d moves, %0d swaps, %0d clocks",
           n, g, g, r, sw, l0, length(n), r_iter, r_moves, r_swaps, r_cycles);
  mech_moves += r_moves; mech_swaps += r_swaps; mech_skipped += r_skipped;
  mech_clipped += r_clipped;
  if (r_iter > 1) mech_multi_iter++;
  if (!sw) mech_move_mode++;
endtask

// Count a failure for every mechanism that never happened.
task automatic check_mechanisms();
  checks += 8;
  if (mech_moves == 0)      begin failures++; $display("FAIL no move to a free location"); end
  if (mech_swaps == 0)      begin failures++; $display("FAIL no swap"); end
  if (mech_skipped == 0)    begin failures++; $display("FAIL no occupied candidate refused in node-move mode"); end
  if (mech_multi_iter == 0) begin failures++; $display("FAIL no run with a second iteration"); end
  if (mech_clipped == 0)    begin failures++; $display("FAIL no neighbourhood clipped at the grid edge"); end
  if (mech_init_retry == 0) begin failures++; $display("FAIL no collision in the initial placer"); end
  if (mech_host_load == 0)  begin failures++; $display("FAIL no host-loaded placement"); end
  if (mech_move_mode == 0)  begin failures++; $display("FAIL no node-move run"); end
  $display("mechanisms: moves %0d swaps %0d refused %0d multi-iteration runs %0d clipped boxes %0d init retries %0d host loads %0d move-mode runs %0d",
           mech_moves, mech_swaps, mech_skipped, mech_multi_iter, mech_clipped, mech_init_retry,
           mech_host_load, mech_move_mode);
endtask
