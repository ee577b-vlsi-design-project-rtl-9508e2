// Random test of the completion compare-select: each output must be the
// smallest of its four inputs in the modular sense (no other input lies
// below it by less than 64) for inputs spread by less than 64.
module tb_comp_cs;
  import turbo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 3000
  `include "tb_common.svh"

  metric_t x [4], y [4], so1, so0;
  comp_cs dut (.clk, .x, .y, .so1, .so0);

  function automatic int true_min(int base, int off[4]);
    int m = off[0];
    for (int i = 1; i < 4; i++) if (off[i] < m) m = off[i];
    return (base + m) % 128;
  endfunction

  initial begin
    for (int i = 0; i < 500; i++) begin
      int bx, by, ox[4], oy[4];
      @(negedge clk);
      bx = $urandom_range(127); by = $urandom_range(127);
      for (int j = 0; j < 4; j++) begin
        ox[j] = $urandom_range(62); oy[j] = $urandom_range(62);
        x[j] = 7'((bx + ox[j]) % 128); y[j] = 7'((by + oy[j]) % 128);
      end
      @(posedge clk); #1;
      check(int'(so1) == true_min(bx, ox), "min of x");
      check(int'(so0) == true_min(by, oy), "min of y");
    end
    finish_tb();
  end
endmodule
