// Random test of the final summation stage: SO = so1 - so0 - SI modulo 128,
// with SI ignored when last_iter is set; checks the one-clock latency.
module tb_sum_comp;
  import turbo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 2000
  `include "tb_common.svh"

  metric_t so1, so0, so;
  soft_t   si;
  logic    last_iter;
  sum_comp dut (.clk, .so1, .so0, .si, .last_iter, .so);

  initial begin
    for (int i = 0; i < 300; i++) begin
      int e;
      @(negedge clk);
      so1 = 7'($urandom); so0 = 7'($urandom); si = 4'($urandom); last_iter = 1'($urandom);
      e = ((int'(so1) - int'(so0) - (last_iter ? 0 : int'(si))) % 128 + 128) % 128;
      @(posedge clk); #1;
      check(int'(so) == e, $sformatf("so=%0d expected %0d", so, e));
    end
    finish_tb();
  end
endmodule
