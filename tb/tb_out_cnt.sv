// Test of the readout pair counter: cleared value, counting, and the `last`
// flag at pair N/2 (N = 6 and N = 14).
module tb_out_cnt;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 1000
  `include "tb_common.svh"

  logic clear = 1;
  logic [1:0] c6; logic l6;
  logic [2:0] c14; logic l14;
  out_cnt #(.N(6))  d6  (.clk, .clear, .count(c6),  .last(l6));
  out_cnt #(.N(14)) d14 (.clk, .clear, .count(c14), .last(l14));

  initial begin
    repeat (2) @(negedge clk);
    for (int r = 0; r < 3; r++) begin
      clear = 1; @(negedge clk);
      check(c6 == 0 && c14 == 0, "cleared");
      clear = 0;
      for (int k = 0; k < 8; k++) begin
        check(c14 == 3'(k), "count N=14");
        check(l14 == (k == 7), "last N=14");
        if (k < 4) begin
          check(c6 == 2'(k), "count N=6");
          check(l6 == (k == 3), "last N=6");
        end
        @(negedge clk);
      end
    end
    finish_tb();
  end
endmodule
