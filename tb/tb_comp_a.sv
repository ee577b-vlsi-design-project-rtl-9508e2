// Random test of the completion adders: the eight path sums, modulo 128,
// and that the outputs hold while `en` is low.
module tb_comp_a;
  import turbo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 3000
  `include "tb_common.svh"

  logic    en;
  bm_t     bm;
  metric_t f [4], b [4], x [4], y [4];
  comp_a dut (.clk, .en, .bm, .f, .b, .x, .y);

  function automatic int w(int v); return ((v % 128) + 128) % 128; endfunction

  initial begin
    int ex[4], ey[4];
    for (int i = 0; i < 400; i++) begin
      int m0, m1, m2;
      @(negedge clk);
      en = (i % 5) != 4;
      m0 = int'($urandom_range(63)) - 32; m1 = int'($urandom_range(63)) - 32; m2 = int'($urandom_range(63)) - 32;
      bm.m0 = 6'(m0); bm.m1 = 6'(m1); bm.m2 = 6'(m2);
      for (int j = 0; j < 4; j++) begin f[j] = 7'($urandom); b[j] = 7'($urandom); end
      if (en) begin
        ex[0] = w(f[0] + m0 + b[1]); ex[1] = w(f[1] + m2 + b[2]);
        ex[2] = w(f[2] + m0 + b[0]); ex[3] = w(f[3] + m2 + b[3]);
        ey[0] = w(f[0] + b[0]);      ey[1] = w(f[1] + m1 + b[3]);
        ey[2] = w(f[2] + b[1]);      ey[3] = w(f[3] + m1 + b[2]);
      end
      @(posedge clk); #1;
      if (i > 0 || en)
        for (int j = 0; j < 4; j++) begin
          check(int'(x[j]) == ex[j], $sformatf("x%0d", j));
          check(int'(y[j]) == ey[j], $sformatf("y%0d", j));
        end
    end
    finish_tb();
  end
endmodule
