// tb_placer_full: one complete placement at the accelerator's full size
// (placer_top with its default 550-CLB, 47x47 memories): Table I case 5,
// sparse version (550 CLBs, 13227 random wires), random start placement from
// the on-chip initial placer, node-swap heuristic with a +/-2 neighbourhood.
// The final placement, counters and clock count are compared with the
// software reference.
module tb_placer_full;
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
    repeat (1500000000) @(posedge clk);
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
    random_netlist(550, 13227);
    load_netlist(550);
    init_on_chip(550, 47, 32'h5EED_0005, 47);
    place_and_check(550, 47, 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
