// tb_connected_ram: fills all 150975 pair entries of the Connected RAM with a
// pattern computed from the address, then reads random entries on both ports
// at once and checks them one clock later.
module tb_connected_ram;
  import place_pkg::*;

  localparam int DEPTH = int'(num_pairs(N_CLB_MAX));

  logic       clk = 0;
  logic       we;
  pair_addr_t waddr, raddr_a, raddr_b;
  wgt_t       wdata, rdata_a, rdata_b;
  int         checks = 0, failures = 0;

  connected_ram dut (.clk, .we, .waddr, .wdata, .raddr_a, .rdata_a, .raddr_b, .rdata_b);

  always #5 clk = ~clk;

  function automatic wgt_t pattern(int addr);
    return wgt_t'((addr * 7 + addr / 13) % 16);
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pa, pb;
    we = 0; waddr = '0; wdata = '0; raddr_a = '0; raddr_b = '0;
    for (int n = 0; n < DEPTH; n++) begin
      @(negedge clk);
      we = 1; waddr = pair_addr_t'(n); wdata = pattern(n);
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 5000; n++) begin
      pa = (n < 2) ? n * (DEPTH - 1) : $urandom_range(DEPTH - 1);
      pb = $urandom_range(DEPTH - 1);
      raddr_a = pair_addr_t'(pa);
      raddr_b = pair_addr_t'(pb);
      @(negedge clk);
      checks += 2;
      if (rdata_a != pattern(pa)) begin
        failures++;
        $display("FAIL A[%0d]: got %0d expected %0d", pa, rdata_a, pattern(pa));
      end
      if (rdata_b != pattern(pb)) begin
        failures++;
        $display("FAIL B[%0d]: got %0d expected %0d", pb, rdata_b, pattern(pb));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
