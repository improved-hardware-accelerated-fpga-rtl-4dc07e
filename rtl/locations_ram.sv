// locations_ram: the Locations RAM, an array indexed by CLB number holding the
// (x, y) grid location of each CLB.
//
// One synchronous write port and two synchronous read ports (data one clock
// after the address). Port A serves the Improve controller (location of the
// CLB being moved) or, when the accelerator is idle, the host readback; port B
// serves the Difference controller, which reads the location of every other
// CLB in turn. Two read ports is this design's choice, matching the dual-port
// block RAMs of the FPGA the accelerator targets. A read of an address written
// in the same clock returns the old contents. No reset: contents are loaded by
// the host or by the initial placer before use.
module locations_ram
  import place_pkg::*;
#(
  parameter int unsigned N_MAX = N_CLB_MAX
) (
  input  logic clk,
  // write port
  input  logic we,
  input  clb_t waddr,
  input  loc_t wdata,
  // read port A
  input  clb_t raddr_a,
  output loc_t rdata_a,
  // read port B
  input  clb_t raddr_b,
  output loc_t rdata_b
);

  loc_t mem [N_MAX];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < N_MAX)) mem[waddr] <= wdata;
    rdata_a <= (int'(raddr_a) < N_MAX) ? mem[raddr_a] : '0;
    rdata_b <= (int'(raddr_b) < N_MAX) ? mem[raddr_b] : '0;
  end

endmodule
