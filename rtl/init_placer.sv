// init_placer: builds the non-overlapping random initial placement that the
// placement heuristic starts from.
//
// How it works: first every location of the GRID x GRID Occupied RAM is
// cleared to -1 (free), one per clock. Then for each CLB c = 0 .. n_clbs-1 a
// 32-bit Galois LFSR (taps 0x80200003, seeded by the host, advanced 32 steps
// per draw) proposes a location;
// x and y are scaled into 0 .. grid_size-1 by multiplying 16 random bits by
// grid_size and keeping the upper part. The proposed location is read from the
// Occupied RAM; if it is free, c is written there and into the Locations RAM,
// otherwise a new location is drawn. The caller must keep n_clbs <= grid_size^2.
// The random placement itself is what the heuristic asks for; the generator,
// the scaling and the retry on collision are this design's own choices.
//
// Timing: start is sampled while idle; GRID*GRID clear clocks follow, then at
// least 3 clocks per CLB (draw, read, check/write); done pulses for one clock.
module init_placer
  import place_pkg::*;
#(
  parameter int unsigned GRID = GRID_MAX
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [31:0] seed,      // must be non-zero
  input  clb_t        n_clbs,
  input  coord_t      grid_size,
  output logic        busy,
  output logic        done,
  // Occupied RAM
  output loc_t        occ_rloc,
  input  clb_t        occ_rdata,
  output logic        occ_we,
  output loc_t        occ_wloc,
  output clb_t        occ_wdata,
  // Locations RAM
  output logic        loc_we,
  output clb_t        loc_waddr,
  output loc_t        loc_wdata
);

  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_DRAW, S_READ, S_CHECK, S_DONE} state_t;

  state_t      state;
  logic [31:0] lfsr;
  loc_t        pos;
  clb_t        c;

  // LFSR advanced by 32 steps, so that successive draws share no bits.
  function automatic logic [31:0] lfsr_next(logic [31:0] s);
    logic [31:0] r;
    r = s;
    for (int n = 0; n < 32; n++) r = r[0] ? ((r >> 1) ^ 32'h8020_0003) : (r >> 1);
    return r;
  endfunction

  // Scale 16 random bits into 0 .. grid_size-1.
  function automatic coord_t scale(logic [15:0] r, coord_t g);
    logic [15+COORD_W:0] p;
    p = {{COORD_W{1'b0}}, r} * {16'b0, g};
    return p[15+COORD_W:16];
  endfunction

  assign busy      = (state != S_IDLE);
  assign occ_rloc  = pos;
  assign occ_we    = (state == S_CLEAR) || (state == S_CHECK && occ_rdata == CLB_NONE);
  assign occ_wloc  = pos;
  assign occ_wdata = (state == S_CLEAR) ? CLB_NONE : c;
  assign loc_we    = (state == S_CHECK) && (occ_rdata == CLB_NONE);
  assign loc_waddr = c;
  assign loc_wdata = pos;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      lfsr  <= 32'h1;
      pos   <= '0;
      c     <= '0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          lfsr  <= (seed == '0) ? 32'h1 : seed;
          pos   <= '0;
          c     <= '0;
          state <= S_CLEAR;
        end
        S_CLEAR: begin
          if (int'(pos.x) == GRID - 1) begin
            pos.x <= '0;
            if (int'(pos.y) == GRID - 1) state <= S_DRAW;
            else pos.y <= pos.y + coord_t'(1);
          end else begin
            pos.x <= pos.x + coord_t'(1);
          end
        end
        S_DRAW: begin
          pos.x <= scale(lfsr[31:16], grid_size);
          pos.y <= scale(lfsr[15:0], grid_size);
          lfsr  <= lfsr_next(lfsr);
          state <= S_READ;
        end
        S_READ: state <= S_CHECK;         // occ[pos] address presented
        S_CHECK: begin
          if (occ_rdata == CLB_NONE) begin
            if (c == n_clbs - clb_t'(1)) state <= S_DONE;
            else begin
              c     <= c + clb_t'(1);
              state <= S_DRAW;
            end
          end else begin
            state <= S_DRAW;
          end
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
    else $error("init_placer: start while busy");

endmodule
