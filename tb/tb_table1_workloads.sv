// tb_table1_workloads: runs the Table I style test cases on the full-size
// accelerator (default parameters): test cases 1 (20 CLBs, 9x9) and 2 (150
// CLBs, 25x25) and 3 (280 CLBs, 34x34), each with a sparse random netlist and
// a dense one (n*(n-1)/2 random wires, so some pairs get several). For cases 1 and 2 both the
// node-move and the node-swap heuristic start from the same random placement,
// so their final wire lengths can be compared. Every run is checked against
// the software reference (final placement, counters, exact clock count); the
// clock counts are also printed as seconds at a 40 MHz clock.
module tb_table1_workloads;
  import place_pkg::*;
  import place_ref_pkg::*;

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

  placer_top dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  `include "placer_host_tasks.svh"

  initial begin
    repeat (1000000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic test_case(int id, int n, int g, int conns, bit both);
    longint len_move, len_swap;
    random_netlist(n, conns);
    load_netlist(n);
    len_move = -1;
    if (both) begin
      init_on_chip(n, g, 32'hC0DE_0000 + id, 47);
      place_and_check(n, g, 2, 0);
      len_move = length(n);
      $display("case %0d %0s node-move: %0d clocks = %f s at 40 MHz", id,
               (conns >= n * (n - 1) / 2) ? "dense" : "sparse", r_cycles, r_cycles / 40.0e6);
    end
    init_on_chip(n, g, 32'hC0DE_0000 + id, 47);
    place_and_check(n, g, 2, 1);
    len_swap = length(n);
    $display("case %0d %0s node-swap: %0d clocks = %f s at 40 MHz", id,
             (conns >= n * (n - 1) / 2) ? "dense" : "sparse", r_cycles, r_cycles / 40.0e6);
    if (both) $display("case %0d: swap length %0d vs move length %0d", id, len_swap, len_move);
  endtask

  initial begin
    host_idle();
    n_clbs = '0; grid_size = '0; radius = '0; swap_en = 0; seed = '0;
    clear_all();
    repeat (3) @(negedge clk);
    rst_n = 1;
    test_case(1, 20, 9, 27, 1);
    test_case(1, 20, 9, 190, 1);
    test_case(2, 150, 25, 1118, 1);
    test_case(2, 150, 25, 11175, 1);
    test_case(3, 280, 34, 3255, 0);
    test_case(3, 280, 34, 39060, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
