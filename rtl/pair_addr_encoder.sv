// pair_addr_encoder: maps an unordered CLB pair to its Connected RAM address.
//
// The Connected RAM stores only the lower triangle of the CLB connection matrix,
// one entry per pair (i, j) with i > j, packed row after row into a linear array:
//   addr(i, j) = i*(i-1)/2 + j.
// The inputs may come in either order; the larger index is taken as i. The
// result for a == b is the address of an unrelated pair and must not be used
// (the Difference controller masks j == i). Combinational. Storing only pairs
// with i > j in a linear array behind an encoder is the original design; the
// row-by-row order and so the formula are this design's choice.
module pair_addr_encoder
  import place_pkg::*;
(
  input  clb_t       a,
  input  clb_t       b,
  output pair_addr_t addr
);

  clb_t hi, lo;
  logic [2*CLB_W-1:0] tri_base;

  always_comb begin
    if (a > b) begin
      hi = a;
      lo = b;
    end else begin
      hi = b;
      lo = a;
    end
    // hi*(hi-1) is always even; hi == 0 only when a == b == 0.
    tri_base = ({{CLB_W{1'b0}}, hi} * {{CLB_W{1'b0}}, (hi - clb_t'(1))}) >> 1;
    if (hi == '0) tri_base = '0;
    addr = pair_addr_t'(tri_base) + pair_addr_t'(lo);
  end

endmodule
