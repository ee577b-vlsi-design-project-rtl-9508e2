// End-to-end testbench of the turbo decoder at block length 6.
//
// Streams three pairs of blocks through the channel input, keeps the
// stream running so that every pair is announced, and collects the hard
// decisions. Pair 0 is the published 6-bit example (two blocks with known
// decoded words {1,1,1,1,1,0} and {0,1,0,0,0,1}); pairs 1 and 2 are random
// noisy samples. Every decision is compared with the reference model in
// turbo_ref_pkg. It also checks the processing time of a pair,
// (2*N_ITER+1)*(N+7)+2 clocks, and counts that each mechanism of the
// design happened: first-pass zeroing, SISO2's last pass, hard-decision
// readout, block swapping, LIFO replay, input bank rotation and ready.
module tb_turbo_decoder;
  import turbo_ref_pkg::*;

  localparam int N     = 6;
  localparam int NI    = 10;
  localparam int AW    = $clog2(N + 2);
  localparam int L     = N + 2;
  localparam int NPAIR = 3;
  localparam int NBLK  = 2 * NPAIR;

  logic          clk = 0, clk_in = 0, rst = 1, start = 0;
  logic [3:0]    in = '0;
  logic          ready, writeout, busy;
  logic [1:0]    hard, hard_valid, bank;
  logic [AW-2:0] hard_idx;
  logic [5:0]    iter;

  turbo_decoder #(.N(N), .N_ITER(NI)) dut (
    .clk, .clk_in, .rst, .start, .in, .ready, .hard, .hard_valid, .hard_idx,
    .writeout, .busy, .iter, .bank);

  always #5   clk    = ~clk;      // processing clock
  always #100 clk_in = ~clk_in;   // sample clock, 20x slower

  int checks = 0, failures = 0;
  int z1 [NBLK][L], z2 [NBLK][L];
  bit got [NBLK][N];
  int got_n [NBLK];
  int blk = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Published example, pair 0.
  initial begin
    int a1[L] = '{5, 2, 2, 0, -3, 3, 0, 1};
    int a2[L] = '{0, 1, -5, 6, -1, -6, 0, -2};
    int b1[L] = '{4, 1, 0, -2, -6, 4, -1, -5};
    int b2[L] = '{5, 3, -3, -5, 6, -1, 2, 3};
    for (int k = 0; k < L; k++) begin
      z1[0][k] = a1[k]; z2[0][k] = a2[k];
      z1[1][k] = b1[k]; z2[1][k] = b2[k];
    end
    // Random pairs: a noisy all-zero-like pattern, signs random.
    for (int bb = 2; bb < NBLK; bb++)
      for (int k = 0; k < L; k++) begin
        z1[bb][k] = int'($urandom_range(15)) - 8;
        z2[bb][k] = int'($urandom_range(15)) - 8;
      end
  end

  // Sample stream: start, then all blocks, then zeros for the rest of the run.
  initial begin
    repeat (3) @(posedge clk_in);
    rst <= 0;
    @(posedge clk_in); start <= 1;
    @(posedge clk_in); start <= 0;
    for (int bb = 0; bb < NBLK; bb++)
      for (int k = 0; k < L; k++) begin
        in <= 4'(z1[bb][k]); @(posedge clk_in);
        in <= 4'(z2[bb][k]); @(posedge clk_in);
      end
    forever begin
      in <= '0; @(posedge clk_in);
    end
  end

  // Decision capture.
  logic writeout_q = 0;
  always @(negedge clk) begin
    if (writeout && blk < NBLK) begin
      if (hard_valid[0]) begin got[blk][hard_idx] = hard[0]; got_n[blk]++; end
      if (hard_valid[1]) begin got[blk][N + 1 - int'(hard_idx)] = hard[1]; got_n[blk]++; end
    end
    if (writeout_q && !writeout) blk++;
    writeout_q <= writeout;
  end

  // Mechanism counters and pair timing.
  int n_first = 0, n_last = 0, n_hard = 0, n_swap = 0, n_pop = 0, n_ready = 0, n_pairs = 0;
  int n_bankwrap = 0, busy_len = 0;
  logic sel_q = 1, ready_q = 0;
  logic [1:0] bank_q = 0;
  always @(posedge clk) begin
    if (dut.u_control.first_pass) n_first++;
    if (dut.u_control.last_iter)  n_last++;
    if (dut.u_control.hard_dici)  n_hard++;
    if (dut.u_control.select != sel_q) n_swap++;
    sel_q <= dut.u_control.select;
    if (dut.u_siso1.write_d[2] && !dut.u_siso1.write_d[3]) n_pop++;
    if (busy) busy_len++;
    else if (busy_len != 0) begin
      n_pairs++;
      check(busy_len == (2 * NI + 1) * (N + 7) + 2,
            $sformatf("pair took %0d clocks, expected %0d", busy_len, (2 * NI + 1) * (N + 7) + 2));
      busy_len = 0;
    end
  end
  always @(posedge clk_in) begin
    if (ready && !ready_q) n_ready++;
    ready_q <= ready;
    if (bank_q == 2'd3 && bank == 2'd0) n_bankwrap++;
    bank_q <= bank;
  end

  bit expect0 [N] = '{1, 1, 1, 1, 1, 0};
  bit expect1 [N] = '{0, 1, 0, 0, 0, 1};

  initial begin
    wait (blk == NBLK);
    repeat (5) @(posedge clk);
    for (int bb = 0; bb < NBLK; bb++) begin
      int zz1[], zz2[];
      bit dec[];
      zz1 = new[L]; zz2 = new[L];
      for (int k = 0; k < L; k++) begin zz1[k] = z1[bb][k]; zz2[k] = z2[bb][k]; end
      decode_block(N, NI, zz1, zz2, dec);
      check(got_n[bb] == N, $sformatf("block %0d: %0d decisions", bb, got_n[bb]));
      for (int i = 0; i < N; i++)
        check(got[bb][i] == dec[i], $sformatf("block %0d bit %0d: dut %0d ref %0d", bb, i, got[bb][i], dec[i]));
      if (bb < 2)
        for (int i = 0; i < N; i++)
          check(got[bb][i] == (bb == 0 ? expect0[i] : expect1[i]),
                $sformatf("block %0d bit %0d differs from the published result", bb, i));
    end
    check(n_pairs == NPAIR, $sformatf("%0d pairs decoded", n_pairs));
    check(n_first == 2 * NPAIR, "first-pass zeroing count");
    check(n_last  == 2 * NPAIR, "last-iteration count");
    check(n_hard  == 2 * NPAIR, "hard-decision pulses");
    check(n_swap  >= 21 * NPAIR, "block swaps");
    check(n_pop   == 2 * NI * NPAIR, "SISO1 LIFO replays");
    check(n_ready >= NPAIR, "ready pulses");
    check(n_bankwrap >= 1, "input bank rotation");
    $display("mechanisms: first=%0d last=%0d hard=%0d swap=%0d pop=%0d ready=%0d bankwrap=%0d",
             n_first, n_last, n_hard, n_swap, n_pop, n_ready, n_bankwrap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
