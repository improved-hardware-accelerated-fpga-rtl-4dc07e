// tb_difference_ctrl: drives the Difference controller with random netlists
// and placements held in testbench memories (one clock read latency, like the
// RAMs) and compares each returned delta with the reference model, for moves
// to free locations and for swaps. Also checks that done comes exactly
// 2*n_clbs+1 clocks after start (two clocks per CLB, not pipelined).
module tb_difference_ctrl;
  import place_pkg::*;
  import place_ref_pkg::*;

  logic   clk = 0, rst_n = 0;
  logic   start;
  clb_t   n_clbs, clb_i, clb_k;
  loc_t   old_loc, new_loc;
  logic   busy, done;
  delta_t delta;
  clb_t   loc_raddr, conn_j, conn_i, conn_k;
  loc_t   loc_rdata;
  wgt_t   w_ij, w_kj;
  int     checks = 0, failures = 0, n_swaps = 0, n_moves = 0;
  longint cycle = 0;

  difference_ctrl dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  // Testbench memories, synchronous read.
  always @(posedge clk) begin
    loc_rdata <= '{x: coord_t'(LX[loc_raddr]), y: coord_t'(LY[loc_raddr])};
    w_ij      <= wgt_t'(W[conn_i][conn_j]);
    w_kj      <= (conn_k == CLB_NONE) ? '0 : wgt_t'(W[conn_k][conn_j]);
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Random placement of n CLBs on a g x g grid.
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
  endtask

  task automatic evaluate(int n, int g, bit want_swap);
    int i, x, y, k;
    longint t0, expv;
    i = $urandom_range(n - 1);
    do begin
      x = $urandom_range(g - 1);
      y = $urandom_range(g - 1);
      k = OCC[x][y];
    end while (k == i || (want_swap != (k >= 0)));
    expv = place_ref_pkg::delta(n, i, k, x, y);
    @(negedge clk);
    start = 1; n_clbs = clb_t'(n); clb_i = clb_t'(i);
    clb_k = (k < 0) ? CLB_NONE : clb_t'(k);
    old_loc = '{x: coord_t'(LX[i]), y: coord_t'(LY[i])};
    new_loc = '{x: coord_t'(x), y: coord_t'(y)};
    t0 = cycle;
    @(negedge clk);
    start = 0;
    n_clbs = '0; clb_i = '0; clb_k = '0; old_loc = '0; new_loc = '0;  // must be latched
    while (!done) @(negedge clk);
    checks += 2;
    if (longint'(delta) != expv) begin
      failures++;
      $display("FAIL n=%0d i=%0d k=%0d to (%0d,%0d): delta %0d expected %0d", n, i, k, x, y, delta, expv);
    end
    if (cycle - t0 != longint'(2 * n + 1)) begin
      failures++;
      $display("FAIL latency %0d expected %0d", cycle - t0, 2 * n + 1);
    end
    if (k >= 0) n_swaps++; else n_moves++;
  endtask

  initial begin
    start = 0; n_clbs = '0; clb_i = '0; clb_k = '0; old_loc = '0; new_loc = '0;
    clear_all();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Table I cases 1 (sparse and dense) and 5 (sparse), plus a tiny one
    random_netlist(20, 27);   random_place(20, 9);
    repeat (40) begin evaluate(20, 9, 0); evaluate(20, 9, 1); end
    random_netlist(20, 190);  random_place(20, 9);
    repeat (40) begin evaluate(20, 9, 0); evaluate(20, 9, 1); end
    random_netlist(3, 3);     random_place(3, 2);
    repeat (10) evaluate(3, 2, 1);
    random_netlist(550, 13227); random_place(550, 47);
    repeat (20) begin evaluate(550, 47, 0); evaluate(550, 47, 1); end
    checks++;
    if (n_swaps == 0 || n_moves == 0) failures++;
    $display("moves %0d swaps %0d", n_moves, n_swaps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
