# Min-sum turbo decoder with two concurrent SISOs

This is the RTL of a turbo decoder chip for a rate-1/2 parallel
concatenated code built from two 4-state recursive convolutional codes.
The decoder takes 4-bit soft channel samples and returns hard decisions.
Each block holds N data bits plus two tail bits, and it goes through ten
iterations of a min-sum SISO (soft-input soft-output) decoder for each
constituent code.

Turbo decoding is serial by nature: SISO1's pass over a block feeds SISO2's
pass over the same block, which feeds SISO1's next pass, and so on. A
second SISO working on the same block would sit idle half the time. The
design therefore decodes **two blocks at once**. SISO1 works on block A
while SISO2 works on block B, and they swap at every iteration. Both SISOs
stay busy, and throughput is about twice that of a single-block schedule.
The rest of the design follows from that choice:

- a four-block input buffer, so that one pair can arrive while the other is
  decoded;
- interleaver and deinterleaver memories that are written in one order and
  read in another;
- a small controller that counts 22 iterations per pair.

The default configuration is the one used for the original speed and area
estimate: N = 1022 (1024 trellis steps with the tail), 10 iterations, 4-bit
soft values and 7-bit path metrics. Every block is parameterised. Any even
N works, and the testbenches run most of them at N = 6 and N = 14.

## Numbers at a glance

| quantity | value at the defaults | formula |
|---|---|---|
| block length | 1022 data bits, 1024 steps | N, L = N + 2 |
| soft value width | 4 bits, two's complement | W |
| path metric width | 7 bits, kept modulo 128 | WF |
| branch metric width | 6 bits | W + 2 |
| iterations per SISO and block | 10 | N_ITER |
| one SISO iteration | 1029 clocks | N + 7 |
| one pair of blocks | 21611 clocks | (2·N_ITER + 1)(N + 7) + 2 |
| throughput | 0.0946 bits per clock | 2N / pair time |
| minimum f_clk / f_clk_in for real time | 5.28 | pair time / (4(N + 2)) |
| input buffer | 4 banks × 1024 × 8 bits | 4 × L × 2W |
| interleaver, deinterleaver RAM | 1024 × 4 bits each | L × W |
| address ROM | 512 × 20 bits each | (N/2 + 1) × 2·AW |
| LIFOs per SISO | 2 × 512 × 28 bits (F, B), 2 × 512 × 4 bits (SI) | depth N/2 + 1 |

## Schedule of a pair

The controller (`control`) has three states:

- **Idle** waits for `ready`.
- **Start** lasts one clock and issues the pulses for the coming iteration.
- **Run** waits for a SISO's `done`.

For blocks A and B, with I = N_ITER:

| controller iteration | SISO1 | SISO2 | deinterleaver |
|---|---|---|---|
| 1 | A, first pass | idle | |
| 2 | B, first pass | A | |
| 3 … 2I | swaps A/B each time | swaps B/A each time | |
| 2I | | last pass on A | |
| 2I + 1 | idle | last pass on B | hard decisions of A |
| 2I + 2 | idle | idle | hard decisions of B |

Iteration 2I+2 needs only the deinterleaver. After issuing it, the
controller goes straight back to Idle, so the next pair can start while
block B's decisions are being read out. `select` toggles at every Start and
tells the input buffer which block of the pair each SISO reads.

On its "last pass", SISO2 does not subtract its soft input from its soft
output. The soft output then holds the full a-posteriori value, whose sign
is the decision.

## Inside a SISO

The SISO is the hardest part of the design to follow.

**Walking the trellis from both ends.** One iteration covers the L = N+2
trellis steps of a block in N+2 clocks. The forward recursion (F) starts
at step 0 and the backward recursion (B) starts at step N+1, both in the
same clock. The local controller (`siso_ctrl`) has two halves:

- **F_B** (steps 0 … N/2 forward, N+1 … N/2+1 backward). Only the two
  recursions run. Their state metrics, and the soft inputs they used, are
  pushed into four LIFOs.
- **COMP**. The recursions cross the middle, and every forward step now
  meets the backward metrics of the same step, which come back out of the
  LIFO in the right order, and vice versa. The SISO therefore produces two
  soft outputs per clock: SO(k) for k rising from N/2+1, and SO(N+1−k)
  falling from N/2.

The branch metrics are cheap, so COMP recomputes them instead of storing
them. The soft inputs are read from the (de)interleaver only during F_B.
In COMP they are replayed from the SI LIFOs. This keeps each
(de)interleaver memory to one read phase and one write phase per
iteration.

**Pipeline.** Each stage has its own module and ends in a register:

| stage | module | does |
|---|---|---|
| 0 | `siso` | registers the input words, soft inputs and control |
| 1 | `m_siso1` / `m_siso2` | branch metrics m0, m1, m2 |
| 2 | `f_cal`, `b_cal` | add-compare-select over 4 states; F/B LIFOs here |
| 3 | `comp_a` | eight completion sums F + M + B, enabled only in COMP |
| 4 | `comp_cs` | minimum over the four bit-1 and four bit-0 sums |
| 5 | `sum_comp` | SO = min1 − min0 − SI |
| 6 | `clip` | saturate to [−8, 7], combinational |

The controller's `addr`, `write` and `done` go through a five-register
delay line, so that `addr_w`/`write` line up with the soft outputs they
describe. `start` is delayed by two clocks to reset F and B to
(0, 31, 31, 31) exactly when the first branch metrics arrive. The first
completion step uses those initial values directly, which saves a pipeline
stage. One iteration therefore takes N+7 clocks, five of which are pipeline
latency.

**Trellis and metrics.** Metrics are costs: smaller is more likely. They are
never normalised. They wrap modulo 128, and two metrics are compared by the
sign of their 7-bit difference. That comparison is correct as long as live
metrics differ by less than 64, which 4-bit inputs and 31 as "infinity"
keep true. Only three distinct non-zero branch metrics exist per step:

- SISO1: m0 = SI + z_sys + z_par, m1 = z_par, m2 = SI + z_sys
- SISO2: m0 = SI + z_par, m1 = z_par, m2 = SI

SISO2 has no systematic sample: the interleaved systematic information
arrives through its soft input. Each channel word carries one parity
sample. SISO1 uses it on even steps and SISO2 on odd steps, and the parity
term is zero on the other steps (the puncturing of the rate-1/2 code).

**LIFOs.** `lifo` is a circular memory with a single pointer: a push
advances the pointer and writes, and a pop reads and steps back. It needs
no empty or full logic, because a SISO always pushes N/2+1 entries and
then pops N/2+1.

## Interleaver and deinterleaver memories

A SISO delivers soft outputs in pairs, {k, N+1−k}, and the next SISO reads
them in pairs {c, N+1−c} of permuted positions. Each memory (`ram2r`) has:

- one 8-bit write port that stores a pair in two adjacent words: word 2p
  holds step p and word 2p+1 holds step N+1−p;
- two 4-bit read ports.

The address ROM (`addr_rom`) turns the read pair index c into the two
storage words of the permuted positions. One ROM word holds both
addresses, so a single 20-bit ROM serves both read ports. For N = 6 with
the permutation {3, 2, 5, 0, 4, 1}, storage is in step order
{0, 7, 1, 6, 2, 5, 3, 4}. The interleaver ROM then reads
{(6,1), (4,3), (5,2), (0,7)}, and the testbench checks exactly this
table. Three details:

- The interleaver is read in permuted order π(i).
- The deinterleaver is read through the inverse permutation.
- Tail steps N and N+1 carry no extrinsic information. Their words are
  written as zero.

The ROM contents are computed at elaboration from the permutation:
loc(v) = 2v for v ≤ N/2, else 2(N+1−v)+1. The permutation is
{3, 2, 5, 0, 4, 1} for N = 6. For every other N it is a pseudo-random
permutation, built as follows:

1. Start from the identity.
2. For i = N−1 down to 1, advance a 32-bit linear congruential generator,
   x ← 69069·x + 1 (mod 2³²), starting from 0x2545F491.
3. Swap entries i and (x >> 8) mod (i+1).

**This is not the interleaver of any standard or of the original chip.** To
decode a real code, replace the permutation block in `addr_rom.sv` with the
code's own interleaver, and replace `pi_f` in the testbenches' reference
model to match. Nothing else depends on it. A random-like permutation
matters: a linear one, (P·i + 1) mod N, left 97 instead of 67 errors in a
1022-bit block at 1 dB.

**Hard decisions.** The deinterleaver also produces the output. A
`hard_dici` pulse starts `out_cnt`. For N/2+1 clocks, `writeout` is high and
the ROM is addressed by the counter. Each clock delivers two decisions, the
sign bits of positions c and N+1−c in natural order. `hard_valid[1]` is low
for the two tail positions. The readout ends halfway through the iteration,
before SISO2 starts writing the memory again.

## Input buffer and the two clocks

Samples arrive on `in` at one per `clk_in` cycle: system, parity, system,
parity, and so on, starting in the cycle after `start`. `input_buff` packs
each pair of samples into an 8-bit word {system, parity} and writes one
word every second `clk_in` cycle. Each of the four `ram_in` banks holds one
block of L words. A bank is written at `addr` and read at `addr` and N+1−addr
through the same address decoder.

The banks are filled in the order 2, 3, 0, 1. While one pair of banks fills,
the other pair is read combinationally by the SISOs, with `select` choosing
which SISO gets which block. `input_ctrl` raises `ready` for the first word
slot after each complete pair.

`ready` crosses into the `clk` domain through a two-flip-flop synchroniser.
Its rising edge sets a pending flag in the controller, so a pair that
completes while the previous pair is still being decoded is not lost.

A pair arrives in 4(N+2) sample clocks and is decoded in
(2I+1)(N+7)+2 processing clocks. The decoder keeps up with the channel when

    f_clk / f_clk_in >= ((2I+1)(N+7) + 2) / (4(N+2))      (5.28 at the defaults)

The buffer relies on this. A pair is decoded while the next one arrives,
and the pair after that overwrites its banks.

## Where this RTL departs from the original design

- **Two decisions per clock.** The original reads out one decision per
  half-clock, using a counter at twice the clock rate. Its first half comes
  from one read port in rising order and its second half from the other
  port. Here the readout delivers both ports' bits in the same clock, as
  the pair (c, N+1−c), over the same N/2+1 cycles. The `clk` domain
  therefore uses only rising edges. A consumer that wants a serial
  natural-order stream places the bits by `hard_idx`.
- **First-pass zeroing.** On SISO1's first pass over a block, the
  deinterleaver still holds the previous pair's values. `control` flags
  these two passes (`first_pass`), and the SISO treats its soft input as
  zero.
- **ready synchroniser and pending flag**, as described above.
- **Backward address N+1−addr.** The original uses the bitwise complement
  of the address, which equals N+1−addr only when N = 2^B − 2. The
  subtraction makes any even N work.
- **Phase enable, not a divided clock.** The input buffer runs entirely on
  `clk_in` with a phase bit, instead of clocking its banks with `clk_in`/2.
- **Register enable, not tri-states.** The original gates the completion
  stage's inputs with tri-state buffers during F_B to save power. Here the
  stage-3 registers simply hold their value.
- **Interleaver.** For N ≠ 6 the permutation is this design's own
  pseudo-random one (see above), because the original coefficient table
  is not available.
- **Ports.** The top adds `hard_valid`, `hard_idx`, `busy`, `iter` and
  `bank` to the original `in`, `clk`, `clk_in`, `reset`, `start`, output
  and `writeout`.
- **Reset.** Reset is synchronous and active-high. It clears the two
  soft-information memories. The input banks are not reset, because every
  word is written before it is read.

The trellis connectivity, the branch-metric mapping and the min-sum
arithmetic follow the block-level description of the original design. The
original does not spell out the underlying algorithm. The decoder
reproduces the published 6-bit example: the decoded words {1,1,1,1,1,0}
and {0,1,0,0,0,1}.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

Reference model: `tb/turbo_ref_pkg.sv` is written independently of the RTL.
It uses plain integers, one array per block and whole-block passes, and it
decodes blocks bit-exactly as the hardware should.

| testbench | what it checks |
|---|---|
| `tb_turbo_decoder` | N = 6, three pairs: the published example and two random pairs. Every decision is checked against the model and the published words. Checks the pair time of 275 clocks. Each mechanism (first pass, last pass, readout, swaps, LIFO replay, ready, bank rotation) is counted and must occur. |
| `tb_turbo_decoder_coded` | The top at its defaults, decoding real codewords. A behavioural encoder written from the trellis encodes four random messages, and the blocks are sent over a quantised Gaussian channel. The noise-free block and the 2 dB block must decode to the message, and the noisy blocks must beat the raw decisions. Every decision is compared with the model. Measured bit errors per 1022 bits: 0 noise-free, 67 at 1 dB (143 raw), 0 at 1.5 dB, 0 at 2 dB. |
| `tb_turbo_decoder_full` | The top at its defaults, with no parameter overrides. Two random pairs (4 × 1022 decisions) are fed at 6 processing clocks per sample, near the real-time limit. Every decision is compared with the model, and the 21611-clock pair time is checked. Runs in about 15 s. |
| `tb_siso` | Both SISO flavours at N = 6 and 14 against the model's single pass; `done` timing and the number of write cycles. |
| `tb_control` | The 22-iteration schedule pulse by pulse, at N_ITER = 10 and 2; a ready arriving while busy. |
| `tb_input_buff`, `tb_input_ctrl`, `tb_ram_in` | Sample packing, bank order, both read ports for both `select` values, ready timing. |
| `tb_interleaver`, `tb_deinterleaver`, `tb_addr_rom`, `tb_ram2r`, `tb_out_cnt` | Permuted reads, tail zeroing, the published ROM table, readout order and validity. |
| `tb_f_cal`, `tb_b_cal`, `tb_comp_a`, `tb_comp_cs`, `tb_sum_comp`, `tb_clip`, `tb_m_siso1`, `tb_m_siso2`, `tb_lifo`, `tb_siso_ctrl` | Each stage against its defining equations, including modular wrap-around; the controller's state timing at N = 6 and 1022. |

Each testbench has also been run against a deliberately broken copy of its
module, with one wrong term, index or constant. Every one of them fails
there.

To run one with Verilator 5, put the package first:

    verilator --binary --timing --assert -Wno-fatal -Itb \
        rtl/turbo_pkg.sv $(ls rtl/*.sv | grep -v turbo_pkg) \
        tb/turbo_ref_pkg.sv tb/tb_turbo_decoder.sv --top-module tb_turbo_decoder
    ./obj_dir/Vtb_turbo_decoder

The simulator has two states. The testbenches reset or initialise
everything they read.

## How far to trust it

- **Cycle-exact and bit-exact against the model.** The whole chip matches
  the reference model and the published small example. The model was
  written from the same reading of the trellis, so it cannot catch an error
  in that reading. The published example does cross-check it.
- **Error-correcting performance has been measured, but only roughly.**
  The coded test decodes one block per noise level, so its error counts
  are single samples, not BER curves. The encoder and the interleaver are
  this design's own, as is the channel scaling: about 3 of the 7 levels
  per unit of signal.
- **Metric wrap-around relies on the bounded spread of the metrics.** The
  unit tests cover the wrap. A wider soft input would need a wider WF.
- **`first_pass` is required.** Without it, SISO1's first pass over every
  pair after the first would use the previous pair's extrinsic values.
  Without the pending flag, a pair could be dropped when the clock ratio is
  close to the limit.

## Files

`rtl/turbo_pkg.sv` holds the widths, the metric helpers and the shuffle
generator. `rtl/turbo_decoder.sv` is the top. Each other file in `rtl/` is
one block named above, and each file begins with a description of its
interface and timing. `tb/` holds one testbench per block,
`tb_common.svh` (the check counter and watchdog) and the reference model.
