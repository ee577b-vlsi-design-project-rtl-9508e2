// Test of the main controller at N_ITER = 10 (the default) and N_ITER = 2.
// A SISO model answers each start pulse with a `done` pulse a fixed time
// later. The TB records every START cycle and checks, for each controller
// iteration k = 1 .. 2I+2, the pulses start_siso1/2, first_pass, last_iter,
// hard_dici and the value of select. Also checks that the controller waits
// for a ready edge, returns to idle after iteration 2I+2, and that a ready
// edge arriving while busy starts the next pair straight away.
module tb_control;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 20000
  `include "tb_common.svh"

  logic rst = 1;

  `define CTRL_HARNESS(NAME, NI)                                                \
  logic NAME``_rdy = 0, NAME``_d1 = 0, NAME``_d2 = 0;                           \
  logic NAME``_s1, NAME``_s2, NAME``_fp, NAME``_li, NAME``_hd, NAME``_sel, NAME``_busy; \
  logic [5:0] NAME``_iter;                                                      \
  control #(.N_ITER(NI)) NAME (.clk, .rst, .ready_async(NAME``_rdy),            \
    .done_siso1(NAME``_d1), .done_siso2(NAME``_d2), .start_siso1(NAME``_s1),     \
    .start_siso2(NAME``_s2), .first_pass(NAME``_fp), .last_iter(NAME``_li),      \
    .hard_dici(NAME``_hd), .select(NAME``_sel), .iter(NAME``_iter),             \
    .busy(NAME``_busy));                                                        \
  int NAME``_t1 = -1, NAME``_t2 = -1, NAME``_k = 0, NAME``_pairs = 0;           \
  always @(posedge clk) begin                                                   \
    NAME``_d1 <= (NAME``_t1 == 1); NAME``_d2 <= (NAME``_t2 == 1);               \
    if (NAME``_t1 > 0) NAME``_t1 <= NAME``_t1 - 1;                              \
    if (NAME``_t2 > 0) NAME``_t2 <= NAME``_t2 - 1;                              \
    if (NAME``_s1) NAME``_t1 <= 13;                                             \
    if (NAME``_s2) NAME``_t2 <= 13;                                             \
    if (NAME``.state == 1) begin \
      int k;                                                                    \
      k = NAME``_k + 1;                                                         \
      NAME``_k <= (k == 2 * NI + 2) ? 0 : k;                                    \
      if (k == 2 * NI + 2) NAME``_pairs <= NAME``_pairs + 1;                    \
      check(NAME``_s1 == (k <= 2 * NI), $sformatf("%s k=%0d start_siso1", `"NAME`", k)); \
      check(NAME``_s2 == (k >= 2 && k <= 2 * NI + 1), $sformatf("%s k=%0d start_siso2", `"NAME`", k)); \
      check(NAME``_fp == (k <= 2), $sformatf("%s k=%0d first_pass", `"NAME`", k)); \
      check(NAME``_li == (k == 2 * NI || k == 2 * NI + 1), $sformatf("%s k=%0d last_iter", `"NAME`", k)); \
      check(NAME``_hd == (k == 2 * NI + 1 || k == 2 * NI + 2), $sformatf("%s k=%0d hard_dici", `"NAME`", k)); \
      check(NAME``_sel == (k % 2 == 1), $sformatf("%s k=%0d select before toggle", `"NAME`", k)); \
      check(NAME``_iter == 6'(k - 1), $sformatf("%s k=%0d iter", `"NAME`", k)); \
    end                                                                         \
  end                                                                           \
  task automatic NAME``_pulse_ready();                                          \
    @(negedge clk); NAME``_rdy = 1;                                             \
    repeat (2) @(negedge clk); NAME``_rdy = 0;                                  \
  endtask                                                                       \
  task automatic NAME``_test();                                                 \
    repeat (20) @(negedge clk);                                                 \
    check(!NAME``_busy, "idle without ready");                                  \
    NAME``_pulse_ready();                                                       \
    repeat (4) @(negedge clk);                                                  \
    check(NAME``_busy, "busy after ready");                                     \
    wait (NAME``_pairs == 1); @(negedge clk); @(negedge clk);                   \
    check(!NAME``_busy, "idle after one pair");                                 \
    NAME``_pulse_ready();                                                       \
    repeat (30) @(negedge clk);                                                 \
    NAME``_pulse_ready();                                                       \
    wait (NAME``_pairs == 2); @(negedge clk);                                   \
    repeat (4) @(negedge clk);                                                  \
    check(NAME``_busy, "pending ready starts the next pair");                   \
    wait (NAME``_pairs == 3); repeat (10) @(negedge clk);                       \
    check(!NAME``_busy && NAME``_k == 0, "idle after three pairs");             \
  endtask

  `CTRL_HARNESS(c10, 10)
  `CTRL_HARNESS(c2, 2)

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    fork
      c10_test();
      c2_test();
    join
    check(c10_pairs == 3 && c2_pairs == 3, "three pairs each");
    finish_tb();
  end
endmodule
