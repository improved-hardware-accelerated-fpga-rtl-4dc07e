// connected_ram: the Connected RAM, one entry per unordered CLB pair holding the
// number of wires between the two CLBs (0 = not connected).
//
// The pair (i, j) is stored at the linear address produced by
// pair_addr_encoder, so the RAM holds N_MAX*(N_MAX-1)/2 entries (150975 for 550
// CLBs). One synchronous write port (host load) and two synchronous read ports:
// during a swap evaluation the Difference controller needs, in the same clock,
// the wires of the moved CLB i and of the displaced CLB k to the same third
// CLB j. Read data appears one clock after the address. The two read ports and
// the 4-bit wire count are this design's choices. No reset: the host writes
// every pair before a placement run.
module connected_ram
  import place_pkg::*;
#(
  parameter int unsigned N_MAX = N_CLB_MAX
) (
  input  logic       clk,
  // write port
  input  logic       we,
  input  pair_addr_t waddr,
  input  wgt_t       wdata,
  // read port A
  input  pair_addr_t raddr_a,
  output wgt_t       rdata_a,
  // read port B
  input  pair_addr_t raddr_b,
  output wgt_t       rdata_b
);

  localparam int unsigned DEPTH = num_pairs(N_MAX);

  wgt_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < DEPTH)) mem[waddr] <= wdata;
    rdata_a <= (int'(raddr_a) < DEPTH) ? mem[raddr_a] : '0;
    rdata_b <= (int'(raddr_b) < DEPTH) ? mem[raddr_b] : '0;
  end

endmodule
