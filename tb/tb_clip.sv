// Exhaustive test of the output clipping: all 128 7-bit inputs against
// saturation of the signed value to [-8, 7].
module tb_clip;
  import turbo_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 1000
  `include "tb_common.svh"

  metric_t so_in;
  soft_t   so_out;
  clip dut (.so_in, .so_out);

  initial begin
    for (int v = 0; v < 128; v++) begin
      int s, e;
      so_in = 7'(v);
      #1;
      s = (v >= 64) ? v - 128 : v;
      e = (s > 7) ? 7 : (s < -8) ? -8 : s;
      check(int'(so_out) == e, $sformatf("clip(%0d) = %0d, expected %0d", s, so_out, e));
    end
    finish_tb();
  end
endmodule
