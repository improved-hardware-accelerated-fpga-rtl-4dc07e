// tb_placer_top: end-to-end test of the placement accelerator at reduced
// memory sizes (64 CLBs, 16x16 grid). For several problems it loads a random
// netlist through the host port, builds the start placement with the on-chip
// initial placer or through the direct load ports, runs the heuristic in
// node-swap and node-move mode, and checks the final placement, the counters,
// the change of wire length and the exact clock count against the software
// reference. Every mechanism (move, swap, occupied candidate refused in node-move mode,
// repeated iteration, neighbourhood clipped at the grid edge, collision in the
// initial placer, host-loaded placement) must occur at least once.
module tb_placer_top;
  import place_pkg::*;
  import place_ref_pkg::*;

  localparam int unsigned N_MAX = 64;
  localparam int unsigned GRID  = 16;

  logic        clk = 0, rst_n = 0;
  clb_t        n_clbs;
  coord_t      grid_size, radius;
  logic        swap_en;
  logic [31:0] seed;
  logic        conn_we, loc_we, occ_we;
  clb_t        conn_a, conn_b, loc_clb, occ_val, rd_clb, rd_occ;
  wgt_t        conn_w;
  loc_t        loc_val, occ_loc, rd_loc, rd_cell;
  logic        init_start, init_done, place_start, place_done, busy;
  stat_t       iterations, moves, swaps, evals, skipped;
  delta_t      total_delta;

  int     checks = 0, failures = 0;
  longint cycle = 0;

  placer_top #(.N_MAX(N_MAX), .GRID(GRID)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  `include "placer_host_tasks.svh"

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_idle();
    n_clbs = '0; grid_size = '0; radius = '0; swap_en = 0; seed = '0;
    clear_all();
    repeat (3) @(negedge clk);
    rst_n = 1;
    // Table I case 1, sparse: node-swap, then node-move from another start
    random_netlist(20, 27);
    load_netlist(20);
    init_on_chip(20, 9, 32'h0BAD_F00D, GRID);
    place_and_check(20, 9, 2, 1);
    init_on_chip(20, 9, 32'h1357_9BDF, GRID);
    place_and_check(20, 9, 2, 0);
    // Table I case 1, dense
    random_netlist(20, 190);
    load_netlist(20);
    init_by_host(20, 9, GRID);
    place_and_check(20, 9, 2, 1);
    // full small grid: every candidate is a swap
    random_netlist(16, 40);
    load_netlist(16);
    init_on_chip(16, 4, 32'h2468_ACE0, GRID);
    place_and_check(16, 4, 1, 1);
    // largest instance of this build
    random_netlist(64, 250);
    load_netlist(64);
    init_on_chip(64, 16, 32'h7777_1111, GRID);
    place_and_check(64, 16, 3, 1);
    check_mechanisms();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
