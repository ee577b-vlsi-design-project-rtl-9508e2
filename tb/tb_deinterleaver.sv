// Test of the deinterleaver at N = 6 and N = 14: blocks written as SISO2
// delivers them must read back in natural order, value(n) = SO(pi^-1(n)),
// tail steps zero. Then a hard_dici pulse starts the readout: for N/2+1
// clocks `writeout` is high, the soft outputs read zero, and the two
// decisions per clock must be the signs of the deinterleaved values, with
// the tail positions flagged invalid.
module tb_deinterleaver;
  import turbo_ref_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 5000
  `include "tb_common.svh"

  `define DI_HARNESS(NAME, NN, AWW)                                             \
  logic NAME``_write = 0, NAME``_hd = 0, NAME``_wo;                             \
  logic [AWW-1:0] NAME``_addr = 0, NAME``_addr_w = 0;                           \
  logic [AWW-2:0] NAME``_idx;                                                   \
  logic [1:0] NAME``_hard, NAME``_hv;                                           \
  logic signed [3:0] NAME``_sof = 0, NAME``_sob = 0, NAME``_sif, NAME``_sib;     \
  deinterleaver #(.N(NN)) NAME (.clk, .rst, .write(NAME``_write), .addr(NAME``_addr), \
    .addr_w(NAME``_addr_w), .so_f(NAME``_sof), .so_b(NAME``_sob),                \
    .hard_dici(NAME``_hd), .si_f(NAME``_sif), .si_b(NAME``_sib),                 \
    .hard(NAME``_hard), .hard_valid(NAME``_hv), .hard_idx(NAME``_idx),           \
    .writeout(NAME``_wo));                                                      \
  task automatic NAME``_block();                                                \
    int so[NN+2], val[NN+2], inv[NN], nbits;                                    \
    foreach (so[i]) so[i] = int'($urandom_range(15)) - 8;                       \
    for (int i = 0; i < NN; i++) inv[pi_f(i, NN)] = i;                          \
    for (int i = 0; i < NN + 2; i++) val[i] = (i < NN) ? so[inv[i]] : 0;        \
    for (int k = NN/2 + 1; k <= NN + 1; k++) begin                              \
      @(negedge clk); NAME``_write = 1; NAME``_addr_w = AWW'(k);                \
      NAME``_sof = 4'(so[k]); NAME``_sob = 4'(so[NN + 1 - k]);                  \
    end                                                                         \
    @(negedge clk); NAME``_write = 0;                                           \
    for (int c = 0; c <= NN/2; c++) begin                                       \
      NAME``_addr = AWW'(c); #1;                                                \
      check(int'(NAME``_sif) == val[c] && int'(NAME``_sib) == val[NN + 1 - c],   \
            $sformatf("%s read c=%0d", `"NAME`", c));                            \
      @(negedge clk);                                                           \
    end                                                                         \
    NAME``_hd = 1; @(negedge clk); NAME``_hd = 0;                               \
    nbits = 0;                                                                  \
    for (int c = 0; c <= NN/2; c++) begin                                       \
      check(NAME``_wo && int'(NAME``_idx) == c, $sformatf("%s writeout at %0d", `"NAME`", c)); \
      check(NAME``_sif == 0 && NAME``_sib == 0, "soft outputs zero in readout"); \
      check(NAME``_hard[0] == (val[c] < 0) && NAME``_hv[0], $sformatf("%s bit %0d", `"NAME`", c)); \
      check(NAME``_hv[1] == (c >= 2), "tail flag");                             \
      if (c >= 2) check(NAME``_hard[1] == (val[NN + 1 - c] < 0), $sformatf("%s bit %0d", `"NAME`", NN + 1 - c)); \
      nbits += NAME``_hv[0] + NAME``_hv[1];                                     \
      @(negedge clk);                                                           \
    end                                                                         \
    check(!NAME``_wo, "readout ends");                                          \
    check(nbits == NN, "N decisions per block");                                \
  endtask

  logic rst = 1;
  `DI_HARNESS(di6, 6, 3)
  `DI_HARNESS(di14, 14, 4)

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int r = 0; r < 5; r++) begin
      di6_block();
      di14_block();
    end
    finish_tb();
  end
endmodule
