// Full-size testbench: the top at its default parameters (N = 1022,
// N_ITER = 10), no parameter overrides. Two pairs of random noisy blocks are
// streamed through the sample input at 6 processing clocks per sample,
// close to the real-time limit: a pair arrives in 4(N+2) = 4096 sample
// clocks and is decoded in (2I+1)(N+7)+2 = 21611 processing clocks, so the
// decoder keeps up from a ratio of 5.28 on. Zero samples follow, so that
// the second pair is announced. All 4 x 1022 decisions are compared with the reference model,
// and the pair time (2I+1)(N+7)+2 = 21611 clocks is checked.
module tb_turbo_decoder_full;
  import turbo_ref_pkg::*;

  localparam int N     = 1022;
  localparam int NI    = 10;
  localparam int L     = N + 2;
  localparam int NPAIR = 2;
  localparam int NBLK  = 2 * NPAIR;

  logic       clk = 0, clk_in = 0, rst = 1, start = 0;
  logic [3:0] in = '0;
  logic       ready, writeout, busy;
  logic [1:0] hard, hard_valid, bank;
  logic [8:0] hard_idx;
  logic [5:0] iter;

  turbo_decoder dut (
    .clk, .clk_in, .rst, .start, .in, .ready, .hard, .hard_valid, .hard_idx,
    .writeout, .busy, .iter, .bank);

  always #5  clk    = ~clk;
  always #30 clk_in = ~clk_in;   // 6 processing clocks per sample

  int checks = 0, failures = 0;
  int z1 [NBLK][L], z2 [NBLK][L];
  bit got [NBLK][N];
  int got_n [NBLK];
  int blk = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // Random blocks: soft values spread over the whole 4-bit range.
  initial begin
    for (int bb = 0; bb < NBLK; bb++)
      for (int k = 0; k < L; k++) begin
        z1[bb][k] = int'($urandom_range(15)) - 8;
        z2[bb][k] = int'($urandom_range(15)) - 8;
      end
  end

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

  logic writeout_q = 0;
  always @(negedge clk) begin
    if (writeout && blk < NBLK) begin
      if (hard_valid[0]) begin got[blk][hard_idx] = hard[0]; got_n[blk]++; end
      if (hard_valid[1]) begin got[blk][N + 1 - int'(hard_idx)] = hard[1]; got_n[blk]++; end
    end
    if (writeout_q && !writeout) blk++;
    writeout_q <= writeout;
  end

  int n_pairs = 0, busy_len = 0, n_first = 0, n_hard = 0;
  always @(posedge clk) begin
    if (dut.u_control.first_pass) n_first++;
    if (dut.u_control.hard_dici)  n_hard++;
    if (busy) busy_len++;
    else if (busy_len != 0) begin
      n_pairs++;
      check(busy_len == (2 * NI + 1) * (N + 7) + 2,
            $sformatf("pair took %0d clocks, expected %0d", busy_len, (2 * NI + 1) * (N + 7) + 2));
      busy_len = 0;
    end
  end

  initial begin
    wait (blk == NBLK);
    repeat (5) @(posedge clk);
    for (int bb = 0; bb < NBLK; bb++) begin
      int zz1[], zz2[], nerr;
      bit dec[];
      zz1 = new[L]; zz2 = new[L];
      for (int k = 0; k < L; k++) begin zz1[k] = z1[bb][k]; zz2[k] = z2[bb][k]; end
      decode_block(N, NI, zz1, zz2, dec);
      check(got_n[bb] == N, $sformatf("block %0d: %0d decisions", bb, got_n[bb]));
      nerr = 0;
      for (int i = 0; i < N; i++) begin
        check(got[bb][i] == dec[i], $sformatf("block %0d bit %0d: dut %0d ref %0d", bb, i, got[bb][i], dec[i]));
        nerr += (got[bb][i] != dec[i]);
      end
      $display("block %0d: %0d decisions, %0d differ from the reference", bb, got_n[bb], nerr);
    end
    check(n_pairs == NPAIR, $sformatf("%0d pairs decoded", n_pairs));
    check(n_first == 2 * NPAIR, "first-pass zeroing count");
    check(n_hard  == 2 * NPAIR, "hard-decision pulses");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
