// Random test of SISO1's branch-metric unit against the defining equations
// (parity used on even steps only), including the one-clock latency.
module tb_m_siso1;
  import turbo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 3000
  `include "tb_common.svh"

  logic [7:0] data;
  soft_t      si;
  logic       odd;
  bm_t        bm;
  m_siso1 dut (.clk, .data, .si, .odd, .bm);

  initial begin
    for (int i = 0; i < 500; i++) begin
      int z1, z2, s, e0, e1, e2;
      @(negedge clk);
      z1 = int'($urandom_range(15)) - 8; z2 = int'($urandom_range(15)) - 8; s = int'($urandom_range(15)) - 8;
      odd = 1'($urandom);
      data = {4'(z1), 4'(z2)}; si = 4'(s);
      if (odd) z2 = 0;
      e0 = s + z1 + z2; e1 = z2; e2 = s + z1;
      @(posedge clk); #1;
      check(int'(bm.m0) == e0 && int'(bm.m1) == e1 && int'(bm.m2) == e2,
            $sformatf("z1=%0d z2=%0d si=%0d odd=%0d", z1, z2, s, odd));
    end
    finish_tb();
  end
endmodule
