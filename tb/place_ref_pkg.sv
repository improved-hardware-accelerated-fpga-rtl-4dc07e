// place_ref_pkg: software reference model of the greedy node-move / node-swap
// placement heuristic, used by the testbenches to predict the accelerator's
// results independently of the RTL.
//
// It holds the netlist (symmetric wire-count matrix W), the placement (LX, LY)
// and the grid occupancy (OCC, -1 = free), and provides the wire-length change
// of a candidate, a full placement run that visits CLBs and candidates in the
// same order as the hardware (so the final placements must match exactly), the
// total wire length, and the number of clocks the hardware needs for a run.
package place_ref_pkg;
  import place_pkg::*;

  int W   [N_CLB_MAX][N_CLB_MAX];
  int LX  [N_CLB_MAX];
  int LY  [N_CLB_MAX];
  int OCC [GRID_MAX][GRID_MAX];

  // Results of the last run().
  int     r_iter, r_moves, r_swaps, r_evals, r_skipped, r_clipped;
  longint r_total, r_cycles;

  function automatic int absi(int v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic int mdist(int x1, int y1, int x2, int y2);
    return absi(x1 - x2) + absi(y1 - y2);
  endfunction

  // Clear netlist, placement and grid.
  function automatic void clear_all();
    foreach (W[a, b]) W[a][b] = 0;
    foreach (OCC[x, y]) OCC[x][y] = -1;
    foreach (LX[c]) begin LX[c] = 0; LY[c] = 0; end
  endfunction

  // Random multigraph: conns wires, each between two distinct random CLBs,
  // so a pair may get several wires (at most 15). The dense test cases use
  // conns = n*(n-1)/2 random wires, not one wire on every pair.
  function automatic void random_netlist(int n, int conns);
    int a, b, placed;
    foreach (W[p, q]) W[p][q] = 0;
    placed = 0;
    while (placed < conns) begin
      a = $urandom_range(n - 1);
      b = $urandom_range(n - 1);
      if (a != b && W[a][b] < 15) begin
        W[a][b]++;
        W[b][a]++;
        placed++;
      end
    end
  endfunction

  // Total wire length, each wire counted once.
  function automatic longint length(int n);
    longint s = 0;
    for (int a = 1; a < n; a++)
      for (int b = 0; b < a; b++)
        s += longint'(W[a][b]) * mdist(LX[a], LY[a], LX[b], LY[b]);
    return s;
  endfunction

  // Change of total wire length if i moves to (nx, ny) and k (or -1) moves
  // to i's location.
  function automatic longint delta(int n, int i, int k, int nx, int ny);
    longint d = 0;
    int dn, dold;
    for (int j = 0; j < n; j++) begin
      if (j == i || j == k) continue;
      dn   = mdist(nx, ny, LX[j], LY[j]);
      dold = mdist(LX[i], LY[i], LX[j], LY[j]);
      d += longint'(W[i][j]) * (dn - dold);
      if (k >= 0) d -= longint'(W[k][j]) * (dn - dold);
    end
    return d;
  endfunction

  // Full heuristic run; also counts the clocks the hardware takes from the
  // start clock to the done pulse.
  function automatic void run(int n, int g, int r, bit swap_en);
    longint it_delta, d;
    int xlo, xhi, ylo, yhi, k, ox, oy;
    bit taken;
    r_iter = 0; r_moves = 0; r_swaps = 0; r_evals = 0; r_skipped = 0;
    r_clipped = 0; r_total = 0; r_cycles = 0;
    do begin
      it_delta = 0;
      r_cycles += 1;                                   // start of iteration
      for (int i = 0; i < n; i++) begin
        r_cycles += 2;                                 // fetch loc[i]
        ox = LX[i]; oy = LY[i];
        xlo = (ox > r) ? ox - r : 0;
        ylo = (oy > r) ? oy - r : 0;
        xhi = (ox + r > g - 1) ? g - 1 : ox + r;
        yhi = (oy + r > g - 1) ? g - 1 : oy + r;
        if (xlo != ox - r || ylo != oy - r || xhi != ox + r || yhi != oy + r) r_clipped++;
        taken = 0;
        for (int x = xlo; x <= xhi && !taken; x++)
          for (int y = ylo; y <= yhi && !taken; y++) begin
            r_cycles += 1;                             // candidate
            if (x == ox && y == oy) begin
              r_cycles += 1;
              continue;
            end
            k = OCC[x][y];
            r_cycles += 1;                             // occupied read
            // node-move: evaluated as a plain move, refused if occupied
            if (k >= 0 && !swap_en) r_skipped++;
            r_evals++;
            d = delta(n, i, swap_en ? k : -1, x, y);
            r_cycles += 2 * n + 1;                     // difference check
            if (d < 0 && (swap_en || k < 0)) begin
              taken = 1;
              r_cycles += 2;                           // two update writes
              LX[i] = x; LY[i] = y; OCC[x][y] = i;
              if (k >= 0) begin
                LX[k] = ox; LY[k] = oy; OCC[ox][oy] = k;
                r_swaps++;
              end else begin
                OCC[ox][oy] = -1;
                r_moves++;
              end
              it_delta += d;
              r_total  += d;
            end else begin
              r_cycles += 1;                           // next candidate
            end
          end
        r_cycles += 1;                                 // next CLB
      end
      r_cycles += 1;                                   // end of iteration
      r_iter++;
    end while (it_delta < 0);
    r_cycles += 2;                                     // done state, done pulse
  endfunction

endpackage
