// difference_ctrl: the Difference controller. It computes the change in total
// wire length, delta, if CLB i moves from old_loc to the candidate new_loc and,
// for a swap, the CLB k found at new_loc moves to old_loc.
//
// How it works: the controller walks j = 0 .. n_clbs-1 over all CLBs. For every j
// it reads loc[j] from the Locations RAM and, from the two Connected RAM ports,
// the wire counts w(i,j) and w(k,j). Two Manhattan distance units give
// dn = |new_loc - loc[j]| and do = |old_loc - loc[j]|. Moving i changes its
// wires to j by w(i,j)*(dn - do); moving k the other way changes its wires by
// w(k,j)*(do - dn). So one multiply-accumulate per j suffices:
//   delta += (w(i,j) - w(k,j)) * (dn - do),   j != i, j != k.
// The i-k wires themselves keep their length in a swap and are skipped. For a
// plain move k = CLB_NONE and w(k,j) counts as 0. As in the accelerator this
// follows, the distance is computed for every j whether or not it is connected,
// and the datapath is not pipelined: each j takes a fetch clock (addresses to
// the RAMs) and an accumulate clock. Handling k in the same pass as i, instead
// of a second pass, follows the statement that the swap check "can be done in
// parallel by the hardware"; the single-pass formula is this design's own.
//
// Timing: start is sampled in one clock; done pulses for one clock 2*n_clbs+1
// clocks later, with delta valid from then until the next start. busy is high
// from the clock after start until done. Memory reads have one clock latency.
module difference_ctrl
  import place_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  // command
  input  logic   start,
  input  clb_t   n_clbs,     // CLBs in the problem, 2 .. N_MAX
  input  clb_t   clb_i,      // CLB being moved
  input  clb_t   clb_k,      // CLB at new_loc, CLB_NONE if free
  input  loc_t   old_loc,    // current location of i
  input  loc_t   new_loc,    // candidate location
  output logic   busy,
  output logic   done,
  output delta_t delta,
  // Locations RAM read (one clock latency)
  output clb_t   loc_raddr,
  input  loc_t   loc_rdata,
  // Connected RAM reads: j is paired with i on port A and with k on port B
  output clb_t   conn_j,
  output clb_t   conn_i,
  output clb_t   conn_k,
  input  wgt_t   w_ij,
  input  wgt_t   w_kj
);

  typedef enum logic [1:0] {S_IDLE, S_FETCH, S_ACC} state_t;

  state_t state;
  clb_t   j, n_r, i_r, k_r;
  loc_t   old_r, new_r;
  delta_t acc;
  dist_t  d_new, d_old;

  manhattan_dist u_dist_new (.a(new_r), .b(loc_rdata), .len(d_new));
  manhattan_dist u_dist_old (.a(old_r), .b(loc_rdata), .len(d_old));

  assign loc_raddr = j;
  assign conn_j    = j;
  assign conn_i    = i_r;
  assign conn_k    = k_r;
  assign busy      = (state != S_IDLE);

  // Contribution of CLB j (valid in S_ACC).
  logic signed [WGT_W+1:0]  wdiff;
  logic signed [DIST_W+1:0] ddiff;
  delta_t                   term;

  always_comb begin
    wdiff = $signed({2'b00, w_ij}) - ((k_r == CLB_NONE) ? '0 : $signed({2'b00, w_kj}));
    ddiff = $signed({2'b00, d_new}) - $signed({2'b00, d_old});
    term  = delta_t'(wdiff) * delta_t'(ddiff);
    if (j == i_r || j == k_r) term = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      j     <= '0;
      n_r   <= '0;
      i_r   <= '0;
      k_r   <= CLB_NONE;
      old_r <= '0;
      new_r <= '0;
      acc   <= '0;
      delta <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          j     <= '0;
          n_r   <= n_clbs;
          i_r   <= clb_i;
          k_r   <= clb_k;
          old_r <= old_loc;
          new_r <= new_loc;
          acc   <= '0;
          state <= S_FETCH;
        end
        S_FETCH: state <= S_ACC;
        S_ACC: begin
          if (j == n_r - clb_t'(1)) begin
            delta <= acc + term;
            done  <= 1'b1;
            state <= S_IDLE;
          end else begin
            acc   <= acc + term;
            j     <= j + clb_t'(1);
            state <= S_FETCH;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // A new evaluation may only be requested while idle.
  assert property (@(posedge clk) disable iff (!rst_n) start |-> state == S_IDLE)
    else $error("difference_ctrl: start while busy");

endmodule
