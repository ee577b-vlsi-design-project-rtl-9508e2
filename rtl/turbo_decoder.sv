// Turbo decoder for a rate-1/2 parallel concatenated code built from two
// 4-state recursive convolutional encoders (system, parity1, system,
// parity2, ... on the channel), decoding blocks of N data bits plus two
// tail bits with the min-sum SISO algorithm and N_ITER iterations per SISO.
//
// Blocks are decoded two at a time. Two SISOs run concurrently, one per
// constituent code, each on a different block of the pair, and swap blocks
// at every iteration; the interleaver carries SISO1's soft outputs to SISO2
// and the deinterleaver carries SISO2's back to SISO1 and also produces the
// hard decisions. An input buffer of four blocks receives the next pair
// while the current pair is decoded, so the decoder keeps up with the
// channel when f_clk / f_clk_in >= ((2*N_ITER+1)*(N+7) + 2) / (4*(N+2)),
// i.e. 5.28 at the defaults (a pair is 4*(N+2) samples).
//
// Interface
//   clk_in, in      channel samples, 4-bit two's complement, one per clk_in
//                   cycle, alternating system and parity, starting with a
//                   system sample in the cycle after `start`.
//   start           (clk_in) begins sample reception.
//   clk             processing clock.
//   rst             synchronous reset, high for a few cycles of both clocks.
//   writeout        high while decisions are delivered (N/2+1 clk cycles
//                   per block). Each cycle gives hard[0] for data bit
//                   hard_idx and hard[1] for data bit N+1-hard_idx;
//                   hard_valid flags the bits that are data bits (not tail).
//                   A 1 means the decoded bit is 1.
//   ready           (clk_in) a new pair of blocks has been stored.
//   busy, iter      controller active, and its count of issued iterations.
//   bank            input bank being filled (clk_in domain).
//
// Timing: one iteration takes N+7 clk cycles (N+2 trellis steps plus five
// pipeline cycles); a pair of blocks takes (2*N_ITER+1)(N+7)+2 cycles from
// the start to the last decisions of its second block being issued.
// The decisions of the first block of a pair appear at the start of
// iteration 2*N_ITER+1, those of the second at the start of 2*N_ITER+2.
//
// The six blocks, their connections, the two-block schedule and the pair
// time follow the source design (its throughput formula with a pipeline
// latency of 5). This design's own choices are the two-decisions-per-clock
// output (hard_valid, hard_idx), the status outputs busy/iter/bank, the
// first-pass zeroing of SISO1's soft input, and the pseudo-random
// interleaver used for block lengths other than 6.
module turbo_decoder
  import turbo_pkg::*;
#(
  parameter int unsigned N      = 1022,
  parameter int unsigned N_ITER = 10,
  parameter int unsigned AW     = $clog2(N + 2)
) (
  input  logic          clk,
  input  logic          clk_in,
  input  logic          rst,
  input  logic          start,
  input  logic [W-1:0]  in,
  output logic          ready,
  output logic [1:0]    hard,
  output logic [1:0]    hard_valid,
  output logic [AW-2:0] hard_idx,
  output logic          writeout,
  output logic          busy,
  output logic [5:0]    iter,      // controller iteration count (status)
  output logic [1:0]    bank       // input bank being written (status)
);
  logic           start_siso1, start_siso2, first_pass, last_iter, hard_dici, select;
  logic           done1, done2, write1, write2;
  logic [AW-1:0]  addr1, addr2, addr_w1, addr_w2;
  logic [2*W-1:0] data1f, data1b, data2f, data2b;
  soft_t          si1f, si1b, si2f, si2b, so1f, so1b, so2f, so2b;

  input_buff #(.N(N), .AW(AW)) u_input_buff (
    .clk_in, .rst, .start, .in, .select, .addr1, .addr2,
    .data1f, .data1b, .data2f, .data2b, .ready, .bank);

  siso #(.N(N), .AW(AW), .IS_SISO2(1'b0)) u_siso1 (
    .clk, .rst, .start(start_siso1), .first_pass, .last_iter(1'b0),
    .data_f(data1f), .data_b(data1b), .si_f(si1f), .si_b(si1b),
    .addr(addr1), .addr_w(addr_w1), .so_f(so1f), .so_b(so1b),
    .done(done1), .write(write1));

  siso #(.N(N), .AW(AW), .IS_SISO2(1'b1)) u_siso2 (
    .clk, .rst, .start(start_siso2), .first_pass(1'b0), .last_iter,
    .data_f(data2f), .data_b(data2b), .si_f(si2f), .si_b(si2b),
    .addr(addr2), .addr_w(addr_w2), .so_f(so2f), .so_b(so2b),
    .done(done2), .write(write2));

  interleaver #(.N(N), .AW(AW)) u_interleaver (
    .clk, .rst, .write(write1), .addr(addr2), .addr_w(addr_w1),
    .so_f(so1f), .so_b(so1b), .si_f(si2f), .si_b(si2b));

  deinterleaver #(.N(N), .AW(AW)) u_deinterleaver (
    .clk, .rst, .write(write2), .addr(addr1), .addr_w(addr_w2),
    .so_f(so2f), .so_b(so2b), .hard_dici, .si_f(si1f), .si_b(si1b),
    .hard, .hard_valid, .hard_idx, .writeout);

  control #(.N_ITER(N_ITER)) u_control (
    .clk, .rst, .ready_async(ready), .done_siso1(done1), .done_siso2(done2),
    .start_siso1, .start_siso2, .first_pass, .last_iter, .hard_dici,
    .select, .iter, .busy);
endmodule
