// Coded-data testbench at the default size (N = 1022, 10 iterations, no
// parameter overrides): decodes real codewords instead of random samples.
//
// A behavioural encoder, written from the decoder's trellis, encodes four
// random 1022-bit messages (two pairs): constituent code 1 on the message, code 2 on the
// interleaved message, each terminated to state 0 by two tail bits. The
// channel word of step k is {system, parity}, the parity being code 1's on
// even steps and code 2's on odd steps. Bits map to +A (0) and -A (1).
//   block 0: noise-free, A = 7.
//   blocks 1..3: A = 3 plus Gaussian noise for Eb/N0 = 1 dB, 2 dB and
//            1.5 dB at rate 1/2 (sigma = 0.89, 0.79, 0.84 of the signal
//            amplitude), rounded and saturated to 4 bits.
// All decisions must equal the reference model's. Blocks 0 and 2 (no noise,
// 2 dB) must decode to the message; the noisy blocks must have fewer errors
// than the raw signs of their system samples. Bit errors are printed.
// The pairs are fed at 6 processing clocks per sample and an empty pair
// follows so that the second is announced.
//
// Trellis (state, input bit) -> (next state, parity):
//   0: 0->(0,0) 1->(1,1)   1: 0->(3,1) 1->(2,0)
//   2: 0->(1,0) 1->(0,1)   3: 0->(2,1) 1->(3,0)
module tb_turbo_decoder_coded;
  import turbo_ref_pkg::*;

  localparam int N = 1022;
  localparam int NI = 10;
  localparam int L = N + 2;
  localparam int NBLK = 4;

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
  always #30 clk_in = ~clk_in;

  int checks = 0, failures = 0;
  bit msg [NBLK][N];
  int z1 [NBLK][L], z2 [NBLK][L];
  bit got [NBLK][N];
  int got_n [NBLK];
  int sig_pct [NBLK] = '{0, 89, 79, 84};
  int raw_err [NBLK];
  int blk = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic void step(inout int s, input bit u, output bit p);
    int ns [4][2] = '{'{0, 1}, '{3, 2}, '{1, 0}, '{2, 3}};
    bit pp [4][2] = '{'{0, 1}, '{1, 0}, '{0, 1}, '{1, 0}};
    p = pp[s][u];
    s = ns[s][u];
  endfunction

  // Encodes bits u[0..N-1] and appends the two terminating bits.
  function automatic void encode(input bit u[N], output bit x[L], output bit p[L]);
    int s = 0;
    bit tail [4][2] = '{'{0, 0}, '{1, 1}, '{1, 0}, '{0, 1}};
    for (int k = 0; k < N; k++) begin x[k] = u[k]; step(s, u[k], p[k]); end
    begin
      int s0 = s;
      for (int k = 0; k < 2; k++) begin x[N + k] = tail[s0][k]; step(s, x[N + k], p[N + k]); end
    end
    if (s != 0) $display("FAIL: encoder not terminated");
  endfunction

  function automatic int sample(bit b, int amp_milli, int sigma_milli, inout int seed);
    int y, q;
    y = (b ? -amp_milli : amp_milli);
    if (sigma_milli > 0) y += $dist_normal(seed, 0, sigma_milli);
    q = (y >= 0) ? (y + 500) / 1000 : -((-y + 500) / 1000);
    return (q > 7) ? 7 : (q < -8) ? -8 : q;
  endfunction

  initial begin
    int seed = 577;
    for (int bb = 0; bb < NBLK; bb++) begin
      bit u2 [N], x1 [L], p1 [L], x2 [L], p2 [L];
      int amp, sig;
      for (int i = 0; i < N; i++) msg[bb][i] = $urandom_range(1);
      for (int i = 0; i < N; i++) u2[i] = msg[bb][pi_f(i, N)];
      encode(msg[bb], x1, p1);
      encode(u2, x2, p2);
      amp = (bb == 0) ? 7000 : 3000;
      sig = amp * sig_pct[bb] / 100;
      for (int k = 0; k < L; k++) begin
        z1[bb][k] = sample(x1[k], amp, sig, seed);
        z2[bb][k] = sample((k % 2 == 0) ? p1[k] : p2[k], amp, sig, seed);
      end
      raw_err[bb] = 0;
      for (int i = 0; i < N; i++) raw_err[bb] += ((z1[bb][i] < 0) != msg[bb][i]);
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

  initial begin
    int dec_err;
    wait (blk == NBLK);
    repeat (5) @(posedge clk);
    for (int bb = 0; bb < NBLK; bb++) begin
      int zz1[], zz2[];
      bit dec[];
      zz1 = new[L]; zz2 = new[L];
      for (int k = 0; k < L; k++) begin zz1[k] = z1[bb][k]; zz2[k] = z2[bb][k]; end
      decode_block(N, NI, zz1, zz2, dec);
      check(got_n[bb] == N, $sformatf("block %0d: %0d decisions", bb, got_n[bb]));
      dec_err = 0;
      for (int i = 0; i < N; i++) begin
        check(got[bb][i] == dec[i], $sformatf("block %0d bit %0d differs from the model", bb, i));
        if (bb % 2 == 0) check(got[bb][i] == msg[bb][i], $sformatf("block %0d bit %0d wrong", bb, i));
        dec_err += (got[bb][i] != msg[bb][i]);
      end
      $display("block %0d: %0d bit errors after decoding, %0d in the raw system samples",
               bb, dec_err, raw_err[bb]);
      if (bb != 0) check(dec_err < raw_err[bb], "decoding must correct errors");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
