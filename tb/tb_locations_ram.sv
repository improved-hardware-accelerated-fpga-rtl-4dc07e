// tb_locations_ram: writes random locations to all 550 entries of the Locations
// RAM, then reads them back on both ports with different addresses, checking
// the one-clock read latency and that a read in the write clock returns the
// old value.
module tb_locations_ram;
  import place_pkg::*;

  logic clk = 0;
  logic we;
  clb_t waddr, raddr_a, raddr_b;
  loc_t wdata, rdata_a, rdata_b;
  loc_t model [N_CLB_MAX];
  int   checks = 0, failures = 0;

  locations_ram dut (.clk, .we, .waddr, .wdata, .raddr_a, .rdata_a, .raddr_b, .rdata_b);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_loc(string port, loc_t got, loc_t expv);
    checks++;
    if (got != expv) begin
      failures++;
      $display("FAIL port %s: got (%0d,%0d) expected (%0d,%0d)", port, got.x, got.y, expv.x, expv.y);
    end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr_a = '0; raddr_b = '0;
    for (int c = 0; c < N_CLB_MAX; c++) begin
      @(negedge clk);
      we = 1; waddr = clb_t'(c);
      wdata = '{x: coord_t'($urandom_range(46)), y: coord_t'($urandom_range(46))};
      model[c] = wdata;
    end
    @(negedge clk); we = 0;
    for (int c = 0; c < N_CLB_MAX; c++) begin
      @(negedge clk);
      raddr_a = clb_t'(c);
      raddr_b = clb_t'(N_CLB_MAX - 1 - c);
      @(negedge clk);
      expect_loc("A", rdata_a, model[c]);
      expect_loc("B", rdata_b, model[N_CLB_MAX - 1 - c]);
    end
    // read during write returns the old contents, next read the new
    @(negedge clk);
    we = 1; waddr = clb_t'(7); wdata = '{x: 6'd1, y: 6'd2}; raddr_a = clb_t'(7);
    @(negedge clk);
    we = 0;
    expect_loc("A old", rdata_a, model[7]);
    @(negedge clk);
    expect_loc("A new", rdata_a, '{x: 6'd1, y: 6'd2});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
