// Test of the interleaver at N = 6 (published permutation) and N = 14: a
// block of soft outputs is written the way SISO1 delivers it (pairs
// {SO(k), SO(N+1-k)} for k = N/2+1 .. N+1), then read the way SISO2 asks
// for it (addresses 0 .. N/2); the values must be SO(pi(c)) and
// SO(pi(N+1-c)), with zero for the tail steps. Several blocks in a row.
module tb_interleaver;
  import turbo_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 5000
  `include "tb_common.svh"

  `define IL_HARNESS(NAME, NN, AWW)                                             \
  logic NAME``_write = 0;                                                       \
  logic [AWW-1:0] NAME``_addr = 0, NAME``_addr_w = 0;                           \
  logic signed [3:0] NAME``_sof = 0, NAME``_sob = 0, NAME``_sif, NAME``_sib;     \
  interleaver #(.N(NN)) NAME (.clk, .rst, .write(NAME``_write), .addr(NAME``_addr), \
    .addr_w(NAME``_addr_w), .so_f(NAME``_sof), .so_b(NAME``_sob),                \
    .si_f(NAME``_sif), .si_b(NAME``_sib));                                      \
  task automatic NAME``_block();                                                \
    int so[NN+2];                                                               \
    foreach (so[i]) so[i] = int'($urandom_range(15)) - 8;                       \
    for (int k = NN/2 + 1; k <= NN + 1; k++) begin                              \
      @(negedge clk); NAME``_write = 1; NAME``_addr_w = AWW'(k);                \
      NAME``_sof = 4'(so[k]); NAME``_sob = 4'(so[NN + 1 - k]);                  \
    end                                                                         \
    @(negedge clk); NAME``_write = 0;                                           \
    for (int c = 0; c <= NN/2; c++) begin                                       \
      int ef, eb;                                                               \
      NAME``_addr = AWW'(c); #1;                                                \
      ef = (c < NN) ? so[pi_f(c, NN)] : 0;                                      \
      eb = (NN + 1 - c < NN) ? so[pi_f(NN + 1 - c, NN)] : 0;                    \
      check(int'(NAME``_sif) == ef, $sformatf("%s c=%0d fwd %0d exp %0d", `"NAME`", c, NAME``_sif, ef)); \
      check(int'(NAME``_sib) == eb, $sformatf("%s c=%0d bwd %0d exp %0d", `"NAME`", c, NAME``_sib, eb)); \
      @(negedge clk);                                                           \
    end                                                                         \
  endtask

  logic rst = 1;
  `IL_HARNESS(il6, 6, 3)
  `IL_HARNESS(il14, 14, 4)

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int r = 0; r < 5; r++) begin
      il6_block();
      il14_block();
    end
    finish_tb();
  end
endmodule
