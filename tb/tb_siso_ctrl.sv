// Test of the SISO local controller at N = 6 and N = 1022: after a start
// pulse the address must run 0 .. N+1 on consecutive clocks, `write` must be
// high exactly for addresses N/2+1 .. N+1, `done` only at address N, and
// the controller must be idle again afterwards.
module tb_siso_ctrl;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 10000
  `include "tb_common.svh"

  logic rst = 1, start = 0;
  logic [2:0] a6;  logic w6, d6, b6;
  logic [9:0] ab;  logic wb, db, bb;
  siso_ctrl #(.N(6))    dut6 (.clk, .rst, .start, .addr(a6), .write(w6), .done(d6), .busy(b6));
  siso_ctrl #(.N(1022)) dutb (.clk, .rst, .start, .addr(ab), .write(wb), .done(db), .busy(bb));

  initial begin
    @(negedge clk); rst = 0;
    repeat (2) @(negedge clk);
    for (int rep = 0; rep < 2; rep++) begin
      start = 1; @(negedge clk); start = 0;
      for (int k = 0; k < 1024; k++) begin
        if (k < 8) begin
          check(a6 == 3'(k), $sformatf("N=6 addr %0d at step %0d", a6, k));
          check(w6 == (k >= 4), "N=6 write");
          check(d6 == (k == 6), "N=6 done");
          check(b6, "N=6 busy");
        end
        if (k == 8) check(!b6, "N=6 idle after block");
        check(ab == 10'(k), "N=1022 addr");
        check(wb == (k >= 512), "N=1022 write");
        check(db == (k == 1022), "N=1022 done");
        @(negedge clk);
      end
      check(!bb && !b6, "idle after block");
      repeat (3) @(negedge clk);
    end
    finish_tb();
  end
endmodule
