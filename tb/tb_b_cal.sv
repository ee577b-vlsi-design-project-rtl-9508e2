// Test of the backward ACS: after clear, random branch metrics for many
// steps; each step is compared with an independent model using full-range
// integers (minimum of true values, then taken modulo 128). Metric spreads
// stay below 64 because the values are bounded by the trellis itself.
module tb_b_cal;
  import turbo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 3000
  `include "tb_common.svh"

  logic    clear;
  bm_t     bm;
  metric_t f [4];
  b_cal dut (.clk, .clear, .bm, .b(f));

  int r[4];
  function automatic int mn(int a, int b); return a < b ? a : b; endfunction

  initial begin
    for (int blk = 0; blk < 8; blk++) begin
      @(negedge clk); clear = 1;
      @(posedge clk); #1;
      r = '{0, 31, 31, 31};
      for (int j = 0; j < 4; j++) check(int'(f[j]) == r[j], "clear value");
      for (int s = 0; s < 40; s++) begin
        int m0, m1, m2, n[4];
        @(negedge clk); clear = 0;
        m0 = int'($urandom_range(31)) - 16; m1 = int'($urandom_range(15)) - 8; m2 = int'($urandom_range(15)) - 8;
        bm.m0 = 6'(m0); bm.m1 = 6'(m1); bm.m2 = 6'(m2);
        n[0] = mn(r[0], r[1] + m0); n[1] = mn(r[3] + m1, r[2] + m2);
        n[2] = mn(r[1], r[0] + m0); n[3] = mn(r[2] + m1, r[3] + m2);
        r = n;
        @(posedge clk); #1;
        for (int j = 0; j < 4; j++)
          check(int'(f[j]) == ((r[j] % 128) + 128) % 128, $sformatf("step %0d B%0d", s, j));
      end
    end
    finish_tb();
  end
endmodule
