// tb_occupied_ram: clears the 47x47 Occupied RAM to -1, places random CLBs at
// random locations, and reads every location back one clock after its address,
// comparing with a model; also checks that locations outside the grid read as
// free.
module tb_occupied_ram;
  import place_pkg::*;

  logic clk = 0;
  logic we;
  loc_t wloc, rloc;
  clb_t wdata, rdata;
  int   model [GRID_MAX][GRID_MAX];
  int   checks = 0, failures = 0;

  occupied_ram dut (.clk, .we, .wloc, .wdata, .rloc, .rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int x, y, c;
    we = 0; wloc = '0; wdata = '0; rloc = '0;
    for (int yy = 0; yy < GRID_MAX; yy++)
      for (int xx = 0; xx < GRID_MAX; xx++) begin
        @(negedge clk);
        we = 1; wloc = '{x: coord_t'(xx), y: coord_t'(yy)}; wdata = CLB_NONE;
        model[xx][yy] = -1;
      end
    for (int n = 0; n < 600; n++) begin
      @(negedge clk);
      x = $urandom_range(GRID_MAX - 1);
      y = $urandom_range(GRID_MAX - 1);
      c = $urandom_range(N_CLB_MAX - 1);
      we = 1; wloc = '{x: coord_t'(x), y: coord_t'(y)}; wdata = clb_t'(c);
      model[x][y] = c;
    end
    @(negedge clk);
    // an out-of-grid write must not alias onto a grid location
    we = 1; wloc = '{x: coord_t'(GRID_MAX), y: 6'd0}; wdata = clb_t'(5);
    @(negedge clk); we = 0;
    for (int yy = 0; yy < GRID_MAX; yy++)
      for (int xx = 0; xx < GRID_MAX; xx++) begin
        rloc = '{x: coord_t'(xx), y: coord_t'(yy)};
        @(negedge clk);
        checks++;
        if (rdata != ((model[xx][yy] < 0) ? CLB_NONE : clb_t'(model[xx][yy]))) begin
          failures++;
          $display("FAIL (%0d,%0d): got %0d expected %0d", xx, yy, rdata, model[xx][yy]);
        end
      end
    rloc = '{x: coord_t'(GRID_MAX), y: 6'd0};
    @(negedge clk);
    checks++;
    if (rdata != CLB_NONE) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
