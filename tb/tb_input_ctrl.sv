// Test of the input-buffer controller at N = 6. The TB plays the word
// counter: one word slot every two clocks, pair_pos running 0 .. 2N+3 and
// last_word on the write of the last slot. Checks: `run` only after start,
// no `ready` during the first pair, and afterwards `ready` exactly while
// pair_pos is 0 (two clocks per pair), for four pairs; a second `start`
// restarts the sequence.
module tb_input_ctrl;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 5000
  `include "tb_common.svh"

  localparam int N = 6;
  localparam int AW = 3;
  logic rst = 1, start = 0, last_word = 0, run, ready;
  logic [AW:0] pair_pos = 0;

  input_ctrl #(.N(N)) dut (.*);

  task automatic run_pairs(int npairs);
    int nready = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    check(run, "run after start");
    for (int p = 0; p < npairs; p++)
      for (int w = 0; w < 2 * (N + 2); w++)
        for (int ph = 0; ph < 2; ph++) begin
          pair_pos  = (AW+1)'(w);
          last_word = (ph == 1) && (w == 2 * N + 3);
          #1;
          check(ready == (p > 0 && w == 0), $sformatf("ready pair %0d word %0d", p, w));
          nready += ready;
          @(negedge clk);
        end
    last_word = 0; pair_pos = 0; #1;
    check(ready, "ready after the last pair");
    check(nready == 2 * (npairs - 1), "ready is two clocks per completed pair");
  endtask

  initial begin
    @(negedge clk); @(negedge clk);
    rst = 0;
    repeat (3) @(negedge clk);
    check(!run && !ready, "idle after reset");
    run_pairs(4);
    run_pairs(2);
    finish_tb();
  end
endmodule
