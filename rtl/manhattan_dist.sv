// manhattan_dist: orthogonal (Manhattan) wire length between two grid locations.
//
// l = |xa - xb| + |ya - yb|: two differences and one sum, purely combinational.
// The routing channels of an island-style FPGA are horizontal or vertical, so
// this is the wire length used for every connection. Each absolute difference is
// formed by subtracting the smaller coordinate from the larger one. The
// two-differences-and-a-sum structure is the original accelerator's; having
// no register inside (so the distance datapath is not pipelined) follows it
// too.
module manhattan_dist
  import place_pkg::*;
(
  input  loc_t  a,
  input  loc_t  b,
  output dist_t len
);

  coord_t dx, dy;

  always_comb begin
    dx   = (a.x >= b.x) ? (a.x - b.x) : (b.x - a.x);
    dy   = (a.y >= b.y) ? (a.y - b.y) : (b.y - a.y);
    len  = dist_t'(dx) + dist_t'(dy);
  end

endmodule
