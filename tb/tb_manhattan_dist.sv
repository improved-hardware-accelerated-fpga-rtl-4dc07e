// tb_manhattan_dist: checks the Manhattan distance unit on all corner cases of
// a 47x47 grid and on random location pairs against |dx| + |dy|.
module tb_manhattan_dist;
  import place_pkg::*;

  loc_t  a, b;
  dist_t len;
  int    checks = 0, failures = 0;

  manhattan_dist dut (.a, .b, .len);

  task automatic check(int ax, int ay, int bx, int by);
    int expv;
    a = '{x: coord_t'(ax), y: coord_t'(ay)};
    b = '{x: coord_t'(bx), y: coord_t'(by)};
    #1;
    expv = ((ax > bx) ? ax - bx : bx - ax) + ((ay > by) ? ay - by : by - ay);
    checks++;
    if (int'(len) != expv) begin
      failures++;
      $display("FAIL (%0d,%0d)-(%0d,%0d): got %0d expected %0d", ax, ay, bx, by, len, expv);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0, 0);
    check(0, 0, 46, 46);
    check(46, 46, 0, 0);
    check(46, 0, 0, 46);
    check(63, 63, 0, 0);
    for (int n = 0; n < 2000; n++)
      check($urandom_range(46), $urandom_range(46), $urandom_range(46), $urandom_range(46));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
