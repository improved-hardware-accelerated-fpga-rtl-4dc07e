// occupied_ram: the Occupied RAM, one entry per grid location holding the number
// of the CLB placed there, or -1 (all ones, CLB_NONE) when the location is free.
//
// Addressed by (x, y); the linear address is y*GRID + x. One synchronous write
// port and one synchronous read port, read data one clock after the address.
// Locations outside the GRID x GRID array read as free and ignore writes. No
// reset: the initial placer or the host clears and fills it before a run.
module occupied_ram
  import place_pkg::*;
#(
  parameter int unsigned GRID = GRID_MAX
) (
  input  logic clk,
  // write port
  input  logic we,
  input  loc_t wloc,
  input  clb_t wdata,
  // read port
  input  loc_t rloc,
  output clb_t rdata
);

  localparam int unsigned DEPTH = GRID * GRID;
  localparam int unsigned AW    = $clog2(DEPTH);

  clb_t mem [DEPTH];

  function automatic logic [AW-1:0] cell_addr(loc_t l);
    return AW'(l.y) * AW'(GRID) + AW'(l.x);
  endfunction

  function automatic logic inside_grid(loc_t l);
    return (int'(l.x) < GRID) && (int'(l.y) < GRID);
  endfunction

  always_ff @(posedge clk) begin
    if (we && inside_grid(wloc)) mem[cell_addr(wloc)] <= wdata;
    rdata <= inside_grid(rloc) ? mem[cell_addr(rloc)] : CLB_NONE;
  end

endmodule
