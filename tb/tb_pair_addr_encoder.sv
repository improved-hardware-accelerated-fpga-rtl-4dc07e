// tb_pair_addr_encoder: checks the Connected RAM address encoder. For every pair
// of 550 CLBs, in both argument orders, the address must equal a running count
// of the pairs (hi, lo), hi > lo, taken row after row. This shows that every
// pair gets its own address and that the addresses fill 0 .. 150974 without gaps.
module tb_pair_addr_encoder;
  import place_pkg::*;

  clb_t       a, b;
  pair_addr_t addr;
  int         checks = 0, failures = 0;
  int         expv;

  pair_addr_encoder dut (.a, .b, .addr);

  initial begin
    #50000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    expv = 0;
    for (int hi = 1; hi < N_CLB_MAX; hi++)
      for (int lo = 0; lo < hi; lo++) begin
        a = clb_t'(hi); b = clb_t'(lo); #1;
        checks++;
        if (int'(addr) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d): got %0d expected %0d", hi, lo, addr, expv);
        end
        a = clb_t'(lo); b = clb_t'(hi); #1;
        checks++;
        if (int'(addr) != expv) begin
          failures++;
          if (failures < 10) $display("FAIL (%0d,%0d): got %0d expected %0d", lo, hi, addr, expv);
        end
        expv++;
      end
    $display("%0d pairs", expv);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
