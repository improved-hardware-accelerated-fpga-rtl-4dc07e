// placer_top: hardware accelerator for FPGA placement with the greedy
// node-swap heuristic.
//
// A netlist of n_clbs logic blocks (CLBs) is to be placed on a grid_size x
// grid_size island-style FPGA so that the total Manhattan wire length is small.
// Starting from a random placement, the Improve controller tries, for every CLB,
// the locations in a box of +/- radius around it and takes the first one that
// shortens the total wire length, moving the CLB to a free location or swapping
// it with the CLB already there. Iterations repeat until one brings no gain: the
// result is a local minimum.
//
// Blocks: the Locations RAM (CLB -> (x, y)), the Occupied RAM ((x, y) -> CLB or
// -1), the Connected RAM (wires per CLB pair, lower triangle, addressed through
// pair address encoders), the Improve controller, the Difference controller
// (change of wire length of one candidate) and the initial placer (random
// non-overlapping start placement). The RAM organisation and the controller
// split follow the accelerator this design implements; the host interface, the
// port multiplexing and the on-chip initial placer are this design's own.
//
// Host interface. While the accelerator is idle (busy = 0) the host may:
//   - write wire counts: conn_we with a pair (conn_a != conn_b) and conn_w;
//     every pair of the problem must be written (0 = unconnected);
//   - write the Locations and Occupied RAMs directly (loc_we, occ_we), or
//     pulse init_start to have the initial placer clear the grid and scatter
//     the CLBs at random from seed; init_done pulses at the end;
//   - pulse place_start to run the heuristic; place_done pulses at the end;
//   - read back: rd_clb gives rd_loc and rd_cell gives rd_occ one clock later.
// n_clbs, grid_size, radius and swap_en must stay stable during a run. The
// statistics outputs hold the counts of the last run.
module placer_top
  import place_pkg::*;
#(
  parameter int unsigned N_MAX = N_CLB_MAX,  // largest number of CLBs
  parameter int unsigned GRID  = GRID_MAX    // largest grid side
) (
  input  logic        clk,
  input  logic        rst_n,
  // problem configuration
  input  clb_t        n_clbs,
  input  coord_t      grid_size,
  input  coord_t      radius,
  input  logic        swap_en,
  input  logic [31:0] seed,
  // netlist load
  input  logic        conn_we,
  input  clb_t        conn_a,
  input  clb_t        conn_b,
  input  wgt_t        conn_w,
  // direct placement load
  input  logic        loc_we,
  input  clb_t        loc_clb,
  input  loc_t        loc_val,
  input  logic        occ_we,
  input  loc_t        occ_loc,
  input  clb_t        occ_val,
  // commands
  input  logic        init_start,
  output logic        init_done,
  input  logic        place_start,
  output logic        place_done,
  output logic        busy,
  // readback (one clock latency, valid while idle)
  input  clb_t        rd_clb,
  output loc_t        rd_loc,
  input  loc_t        rd_cell,
  output clb_t        rd_occ,
  // statistics of the last run
  output stat_t       iterations,
  output stat_t       moves,
  output stat_t       swaps,
  output stat_t       evals,
  output stat_t       skipped,
  output delta_t      total_delta
);

  // ---------------------------------------------------------------- controllers
  logic   imp_busy, ini_busy;
  clb_t   imp_loc_raddr, imp_loc_waddr, imp_occ_wdata;
  loc_t   imp_loc_wdata, imp_occ_rloc, imp_occ_wloc;
  logic   imp_loc_we, imp_occ_we;
  logic   diff_start, diff_done, diff_busy;
  clb_t   diff_i, diff_k;
  loc_t   diff_old, diff_new;
  delta_t diff_delta;
  clb_t   dif_loc_raddr, conn_j, conn_i, conn_k;
  loc_t   loc_rdata_a, loc_rdata_b;
  clb_t   occ_rdata;
  wgt_t   w_ij, w_kj;
  loc_t   ini_occ_rloc, ini_occ_wloc, ini_loc_wdata;
  clb_t   ini_occ_wdata, ini_loc_waddr;
  logic   ini_occ_we, ini_loc_we;

  improve_ctrl u_improve (
    .clk, .rst_n,
    .n_clbs, .grid_size, .radius, .swap_en,
    .start(place_start), .busy(imp_busy), .done(place_done),
    .iterations, .moves, .swaps, .evals, .skipped, .total_delta,
    .loc_raddr(imp_loc_raddr), .loc_rdata(loc_rdata_a),
    .loc_we(imp_loc_we), .loc_waddr(imp_loc_waddr), .loc_wdata(imp_loc_wdata),
    .occ_rloc(imp_occ_rloc), .occ_rdata(occ_rdata),
    .occ_we(imp_occ_we), .occ_wloc(imp_occ_wloc), .occ_wdata(imp_occ_wdata),
    .diff_start, .diff_i, .diff_k, .diff_old, .diff_new,
    .diff_done, .diff_delta
  );

  difference_ctrl u_difference (
    .clk, .rst_n,
    .start(diff_start), .n_clbs, .clb_i(diff_i), .clb_k(diff_k),
    .old_loc(diff_old), .new_loc(diff_new),
    .busy(diff_busy), .done(diff_done), .delta(diff_delta),
    .loc_raddr(dif_loc_raddr), .loc_rdata(loc_rdata_b),
    .conn_j, .conn_i, .conn_k, .w_ij, .w_kj
  );

  init_placer #(.GRID(GRID)) u_init (
    .clk, .rst_n,
    .start(init_start), .seed, .n_clbs, .grid_size,
    .busy(ini_busy), .done(init_done),
    .occ_rloc(ini_occ_rloc), .occ_rdata(occ_rdata),
    .occ_we(ini_occ_we), .occ_wloc(ini_occ_wloc), .occ_wdata(ini_occ_wdata),
    .loc_we(ini_loc_we), .loc_waddr(ini_loc_waddr), .loc_wdata(ini_loc_wdata)
  );

  assign busy = imp_busy | ini_busy;

  // ---------------------------------------------------------------- memories
  logic       l_we, o_we;
  clb_t       l_waddr, l_raddr_a, o_wdata;
  loc_t       l_wdata, o_wloc, o_rloc;
  pair_addr_t c_waddr, c_raddr_a, c_raddr_b;

  // Port owner: Improve controller while placing, initial placer while
  // initialising, otherwise the host.
  always_comb begin
    if (imp_busy) begin
      l_we      = imp_loc_we;    l_waddr = imp_loc_waddr; l_wdata = imp_loc_wdata;
      l_raddr_a = imp_loc_raddr;
      o_we      = imp_occ_we;    o_wloc  = imp_occ_wloc;  o_wdata = imp_occ_wdata;
      o_rloc    = imp_occ_rloc;
    end else if (ini_busy) begin
      l_we      = ini_loc_we;    l_waddr = ini_loc_waddr; l_wdata = ini_loc_wdata;
      l_raddr_a = rd_clb;
      o_we      = ini_occ_we;    o_wloc  = ini_occ_wloc;  o_wdata = ini_occ_wdata;
      o_rloc    = ini_occ_rloc;
    end else begin
      l_we      = loc_we;        l_waddr = loc_clb;       l_wdata = loc_val;
      l_raddr_a = rd_clb;
      o_we      = occ_we;        o_wloc  = occ_loc;       o_wdata = occ_val;
      o_rloc    = rd_cell;
    end
  end

  assign rd_loc = loc_rdata_a;
  assign rd_occ = occ_rdata;

  locations_ram #(.N_MAX(N_MAX)) u_locations (
    .clk,
    .we(l_we), .waddr(l_waddr), .wdata(l_wdata),
    .raddr_a(l_raddr_a), .rdata_a(loc_rdata_a),
    .raddr_b(dif_loc_raddr), .rdata_b(loc_rdata_b)
  );

  occupied_ram #(.GRID(GRID)) u_occupied (
    .clk,
    .we(o_we), .wloc(o_wloc), .wdata(o_wdata),
    .rloc(o_rloc), .rdata(occ_rdata)
  );

  pair_addr_encoder u_enc_host (.a(conn_a), .b(conn_b), .addr(c_waddr));
  pair_addr_encoder u_enc_ij   (.a(conn_i), .b(conn_j), .addr(c_raddr_a));
  pair_addr_encoder u_enc_kj   (.a(conn_k), .b(conn_j), .addr(c_raddr_b));

  connected_ram #(.N_MAX(N_MAX)) u_connected (
    .clk,
    .we(conn_we && !busy), .waddr(c_waddr), .wdata(conn_w),
    .raddr_a(c_raddr_a), .rdata_a(w_ij),
    .raddr_b(c_raddr_b), .rdata_b(w_kj)
  );

  // ---------------------------------------------------------------- checks
  assert property (@(posedge clk) disable iff (!rst_n) (place_start || init_start) |-> !busy)
    else $error("placer_top: command while busy");
  assert property (@(posedge clk) disable iff (!rst_n) !(place_start && init_start))
    else $error("placer_top: two commands at once");
  assert property (@(posedge clk) disable iff (!rst_n) diff_busy |-> imp_busy)
    else $error("placer_top: difference check outside a placement run");

endmodule
