// improve_ctrl: the Improve controller, main control of the placement
// accelerator. It runs the greedy node-swap heuristic on the placement held in
// the Locations and Occupied RAMs until an iteration no longer shortens the
// total wire length.
//
// How it works: one iteration visits CLB i = 0 .. n_clbs-1. For each i it reads
// loc[i], clips the box loc[i] +/- radius to the grid_size x grid_size array,
// and walks its locations x-major (for x, for y), skipping loc[i] itself. For a
// candidate it reads the Occupied RAM: a free location is a move, an occupied
// one a swap with the CLB k found there. The Difference controller returns
// delta for every candidate. In node-move mode (swap_en = 0, the earlier
// heuristic) the check is made as a plain move even for an occupied location,
// and an occupied location is then refused whatever its delta, as the node-move
// pseudocode does ("if delta < 0 and !occupied(x,y) then update"). The first candidate
// with delta < 0 is taken: two write clocks update loc[i], occ[new], and loc[k]
// plus occ[old] (or occ[old] = -1 for a move); the search then moves to i+1.
// The deltas taken are summed over the iteration; if the sum is negative a new
// iteration starts, otherwise done is raised. Iteration, move, swap, candidate
// and skip counters and the sum of all deltas are kept for the host.
//
// Interface and timing: start (sampled while idle) begins a run; busy is high
// until done pulses for one clock. RAM reads have one clock latency. Per
// candidate: 2 clocks (occupied read), plus 2*n_clbs+1 clocks for the difference
// check, plus 1 clock to step on or 2 update clocks if taken; 2 clocks for the
// CLB's own location. Per CLB: 2 clocks to fetch its location, 1 to
// step. Visiting order, the write sequence and the counters are this design's
// own choices.
module improve_ctrl
  import place_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // configuration, held stable while busy
  input  clb_t   n_clbs,     // CLBs in the problem, 2 .. N_MAX
  input  coord_t grid_size,  // side of the square grid used, 1 .. GRID
  input  coord_t radius,     // neighbourhood half-width
  input  logic   swap_en,    // 1: node-swap, 0: node-move only
  // command and status
  input  logic   start,
  output logic   busy,
  output logic   done,
  output stat_t  iterations,
  output stat_t  moves,
  output stat_t  swaps,
  output stat_t  evals,      // difference checks started
  output stat_t  skipped,    // occupied candidates refused in node-move mode
  output delta_t total_delta,// sum of all deltas taken (change of wire length)
  // Locations RAM
  output clb_t   loc_raddr,
  input  loc_t   loc_rdata,
  output logic   loc_we,
  output clb_t   loc_waddr,
  output loc_t   loc_wdata,
  // Occupied RAM
  output loc_t   occ_rloc,
  input  clb_t   occ_rdata,
  output logic   occ_we,
  output loc_t   occ_wloc,
  output clb_t   occ_wdata,
  // Difference controller
  output logic   diff_start,
  output clb_t   diff_i,
  output clb_t   diff_k,
  output loc_t   diff_old,
  output loc_t   diff_new,
  input  logic   diff_done,
  input  delta_t diff_delta
);

  typedef enum logic [3:0] {
    S_IDLE, S_ITER, S_RDI, S_LATI, S_CAND, S_OCC, S_DIFF,
    S_UPD1, S_UPD2, S_NEXT, S_NEXTI, S_ENDIT, S_DONE
  } state_t;

  state_t state;
  clb_t   i, k;
  logic   cand_busy;          // candidate location is occupied
  loc_t   loc_i, cand;
  coord_t xmax, ymin, ymax;
  delta_t iter_delta, taken_delta;

  // Neighbourhood box of the location just read, clipped to the grid.
  coord_t           lo_x, lo_y;
  logic [COORD_W:0] hi_x, hi_y, gmax;
  always_comb begin
    gmax = {1'b0, grid_size} - 1'b1;
    lo_x = (loc_rdata.x > radius) ? loc_rdata.x - radius : '0;
    lo_y = (loc_rdata.y > radius) ? loc_rdata.y - radius : '0;
    hi_x = {1'b0, loc_rdata.x} + {1'b0, radius};
    hi_y = {1'b0, loc_rdata.y} + {1'b0, radius};
    if (hi_x > gmax) hi_x = gmax;
    if (hi_y > gmax) hi_y = gmax;
  end

  assign busy       = (state != S_IDLE);
  assign loc_raddr  = i;
  assign occ_rloc   = cand;
  assign diff_i     = i;
  // sampled with diff_start in S_OCC; node-move mode evaluates a plain move
  assign diff_k     = swap_en ? occ_rdata : CLB_NONE;
  assign diff_old   = loc_i;
  assign diff_new   = cand;
  assign diff_start = (state == S_OCC);

  // Update writes: first i into the candidate, then k (or nothing) into i's
  // old location.
  always_comb begin
    loc_we    = 1'b0;
    loc_waddr = i;
    loc_wdata = cand;
    occ_we    = 1'b0;
    occ_wloc  = cand;
    occ_wdata = i;
    if (state == S_UPD1) begin
      loc_we = 1'b1;
      occ_we = 1'b1;
    end else if (state == S_UPD2) begin
      loc_we    = (k != CLB_NONE);
      loc_waddr = k;
      loc_wdata = loc_i;
      occ_we    = 1'b1;
      occ_wloc  = loc_i;
      occ_wdata = k;          // CLB_NONE frees the location after a move
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      i           <= '0;
      k           <= CLB_NONE;
      cand_busy   <= 1'b0;
      loc_i       <= '0;
      cand        <= '0;
      xmax        <= '0;
      ymin        <= '0;
      ymax        <= '0;
      iter_delta  <= '0;
      taken_delta <= '0;
      done        <= 1'b0;
      iterations  <= '0;
      moves       <= '0;
      swaps       <= '0;
      evals       <= '0;
      skipped     <= '0;
      total_delta <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          iterations  <= '0;
          moves       <= '0;
          swaps       <= '0;
          evals       <= '0;
          skipped     <= '0;
          total_delta <= '0;
          state       <= S_ITER;
        end
        S_ITER: begin
          iter_delta <= '0;
          i          <= '0;
          state      <= S_RDI;
        end
        S_RDI: state <= S_LATI;          // loc[i] address presented
        S_LATI: begin
          loc_i  <= loc_rdata;
          xmax   <= coord_t'(hi_x);
          ymin   <= lo_y;
          ymax   <= coord_t'(hi_y);
          cand.x <= lo_x;
          cand.y <= lo_y;
          state  <= S_CAND;
        end
        S_CAND: state <= (cand == loc_i) ? S_NEXT : S_OCC;  // occ[cand] address presented
        S_OCC: begin
          k         <= swap_en ? occ_rdata : CLB_NONE;
          cand_busy <= (occ_rdata != CLB_NONE);
          evals     <= evals + stat_t'(1);
          if (!swap_en && occ_rdata != CLB_NONE) skipped <= skipped + stat_t'(1);
          state     <= S_DIFF;
        end
        S_DIFF: if (diff_done) begin
          taken_delta <= diff_delta;
          state       <= (diff_delta < 0 && (swap_en || !cand_busy)) ? S_UPD1 : S_NEXT;
        end
        S_UPD1: state <= S_UPD2;
        S_UPD2: begin
          iter_delta  <= iter_delta + taken_delta;
          total_delta <= total_delta + taken_delta;
          if (k == CLB_NONE) moves <= moves + stat_t'(1);
          else               swaps <= swaps + stat_t'(1);
          state <= S_NEXTI;
        end
        S_NEXT: begin
          if (cand.y != ymax) begin
            cand.y <= cand.y + coord_t'(1);
            state  <= S_CAND;
          end else if (cand.x != xmax) begin
            cand.x <= cand.x + coord_t'(1);
            cand.y <= ymin;
            state  <= S_CAND;
          end else begin
            state <= S_NEXTI;
          end
        end
        S_NEXTI: begin
          if (i == n_clbs - clb_t'(1)) begin
            state <= S_ENDIT;
          end else begin
            i     <= i + clb_t'(1);
            state <= S_RDI;
          end
        end
        S_ENDIT: begin
          iterations <= iterations + stat_t'(1);
          state      <= (iter_delta < 0) ? S_ITER : S_DONE;
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE)
    else $error("improve_ctrl: start while busy");
  // The Difference controller answers exactly one request at a time.
  assert property (@(posedge clk) disable iff (!rst_n) diff_done |-> state == S_DIFF)
    else $error("improve_ctrl: unexpected difference result");

endmodule
