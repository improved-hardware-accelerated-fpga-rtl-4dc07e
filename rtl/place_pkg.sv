// place_pkg: types and constants shared by the node-swap placement accelerator.
//
// The accelerator keeps a placement of up to N_CLB_MAX logic blocks (CLBs) on a
// square island-style grid of up to GRID_MAX x GRID_MAX locations. The default
// sizes, 550 CLBs on a 47x47 grid, are the largest problem the accelerator was
// built for. The field widths below (CLB index, coordinate, wire count) are this
// design's own choice; they are fixed here so that smaller instances used in
// simulation share one set of types with the full-size one.
package place_pkg;

  // Largest problem handled: 550 CLBs on a 47x47 grid.
  localparam int unsigned N_CLB_MAX = 550;
  localparam int unsigned GRID_MAX  = 47;

  // Field widths (own choice: smallest that hold the maxima above).
  localparam int unsigned CLB_W   = 10;  // CLB number, all ones means "none" (-1)
  localparam int unsigned COORD_W = 6;   // x or y coordinate, 0..63
  localparam int unsigned DIST_W  = COORD_W + 1; // Manhattan distance
  localparam int unsigned WGT_W   = 4;   // wires between one CLB pair, 0..15
  localparam int unsigned DELTA_W = 32;  // signed change of total wire length
  localparam int unsigned PAIR_AW = 18;  // Connected RAM address, 550*549/2 = 150975 entries
  localparam int unsigned STAT_W  = 32;  // statistics counters

  typedef logic [CLB_W-1:0]          clb_t;
  typedef logic [COORD_W-1:0]        coord_t;
  typedef logic [DIST_W-1:0]         dist_t;
  typedef logic [WGT_W-1:0]          wgt_t;
  typedef logic signed [DELTA_W-1:0] delta_t;
  typedef logic [PAIR_AW-1:0]        pair_addr_t;
  typedef logic [STAT_W-1:0]         stat_t;

  // A grid location.
  typedef struct packed {
    coord_t x;
    coord_t y;
  } loc_t;

  // Occupied RAM code for an empty grid location.
  localparam clb_t CLB_NONE = '1;

  // Number of unordered CLB pairs (Connected RAM depth) for n CLBs.
  function automatic int unsigned num_pairs(int unsigned n);
    return (n * (n - 1)) / 2;
  endfunction

endpackage
