// Soft-input soft-output (SISO) decoder for one constituent code.
//
// One iteration walks the L = N+2 trellis steps of a block (N data bits
// plus two tail bits) in N+2 clocks, working from both ends at once:
// a forward recursion from step 0 and a backward recursion from step N+1.
// During the first half (state F_B, steps 0..N/2 forward and N+1..N/2+1
// backward) only the recursions run, and their metrics and the soft inputs
// are pushed into LIFOs. During the second half (state COMP) the recursions
// cross the middle; each forward step now meets the backward metrics stored
// in the LIFO for the same step and vice versa, so two soft outputs are
// produced per clock: SO(k) in rising order from N/2+1 and SO(N+1-k) in
// falling order from N/2. The soft inputs are read from the (de)interleaver
// only during F_B; in COMP they come back out of the SI LIFOs, and the
// branch metrics are recomputed rather than stored.
//
// Pipeline (one register per stage, all control delayed to match):
//   stage 0  input registers (channel words, soft inputs, addr, write, done)
//   stage 1  branch metrics (m_siso1 or m_siso2)
//   stage 2  forward/backward ACS (f_cal, b_cal); the F/B LIFOs sit here
//   stage 3  completion adders (comp_a), enabled only in COMP
//   stage 4  compare-select (comp_cs)
//   stage 5  SO = min1 - min0 - SI (sum_comp)
//   stage 6  clipping to 4 bits (clip), combinational
// From the address sent out to the soft output for that address is five
// clocks: `addr_w`, `write` and `done` are the controller's addr, write and
// done delayed by five clocks. The start of the next iteration is therefore
// N+7 clocks after the previous start (N+2 steps plus 5 pipeline cycles).
//
// Interface: `addr` (combinational from the local controller) addresses the
// input buffer and the (de)interleaver; data_f/si_f must answer for step
// addr and data_b/si_b for step N+1-addr in the same cycle. In COMP, on
// every cycle with `write` high, so_f is the soft output of step addr_w and
// so_b that of step N+1-addr_w.
//
// The architecture, stage split and delays follow the source design.
// Choices of this design: a single module with IS_SISO2 selecting the
// branch-metric unit; `first_pass`, latched at start like `last_iter`,
// forces the soft inputs to zero (SISO1's first pass over a block, when the
// deinterleaver holds no information for it yet); synchronous reset of the
// control pipeline.
module siso
  import turbo_pkg::*;
#(
  parameter int unsigned N        = 1022,
  parameter int unsigned AW       = $clog2(N + 2),
  parameter bit          IS_SISO2 = 1'b0
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           start,
  input  logic           first_pass,
  input  logic           last_iter,
  input  logic [2*W-1:0] data_f,
  input  logic [2*W-1:0] data_b,
  input  soft_t          si_f,
  input  soft_t          si_b,
  output logic [AW-1:0]  addr,
  output logic [AW-1:0]  addr_w,
  output soft_t          so_f,
  output soft_t          so_b,
  output logic           done,
  output logic           write
);
  localparam int unsigned D = N / 2 + 1;   // LIFO depth, half a block

  // ---------------------------------------------------------------- control
  logic          write0, done0, busy0;
  logic [AW-1:0] addr_d [1:5];
  logic [5:1]    write_d, done_d;
  logic [2:1]    start_d;
  logic          zero_si_q, last_q;

  siso_ctrl #(.N(N), .AW(AW)) u_ctrl (
    .clk, .rst, .start, .addr, .write(write0), .done(done0), .busy(busy0)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      write_d <= '0;
      done_d  <= '0;
      start_d <= '0;
    end else begin
      write_d <= {write_d[4:1], write0};
      done_d  <= {done_d[4:1], done0};
      start_d <= {start_d[1], start};
    end
  end

  always_ff @(posedge clk) begin
    addr_d[1] <= addr;
    for (int i = 2; i <= 5; i++) addr_d[i] <= addr_d[i-1];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      zero_si_q <= 1'b0;
      last_q    <= 1'b0;
    end else if (start) begin
      zero_si_q <= first_pass;
      last_q    <= last_iter;
    end
  end

  assign addr_w = addr_d[5];
  assign write  = write_d[5];
  assign done   = done_d[5];

  // ---------------------------------------------------------------- stage 0
  logic [2*W-1:0] data_f1, data_b1;
  soft_t          si_f1, si_b1;

  always_ff @(posedge clk) begin
    data_f1 <= data_f;
    data_b1 <= data_b;
    si_f1   <= zero_si_q ? soft_t'(0) : si_f;
    si_b1   <= zero_si_q ? soft_t'(0) : si_b;
  end

  // Soft inputs of the F_B half, replayed in COMP: the forward path of COMP
  // needs the inputs the backward path read in F_B and the other way round.
  soft_t si_f_lifo, si_b_lifo, si_f_mux, si_b_mux;

  lifo #(.WIDTH(W), .DEPTH(D)) u_lifo_sif (
    .clk, .rst, .read(write_d[1]), .din(si_f1), .dout(si_f_lifo));
  lifo #(.WIDTH(W), .DEPTH(D)) u_lifo_sib (
    .clk, .rst, .read(write_d[1]), .din(si_b1), .dout(si_b_lifo));

  assign si_f_mux = write_d[1] ? si_b_lifo : si_f1;
  assign si_b_mux = write_d[1] ? si_f_lifo : si_b1;

  // ---------------------------------------------------------------- stage 1
  // N is even, so the backward step N+1-k has the opposite parity of k.
  bm_t bm_f, bm_b;

  if (IS_SISO2) begin : g_m2
    m_siso2 u_mf (.clk, .par(data_f1[W-1:0]), .si(si_f_mux), .odd( addr_d[1][0]), .bm(bm_f));
    m_siso2 u_mb (.clk, .par(data_b1[W-1:0]), .si(si_b_mux), .odd(~addr_d[1][0]), .bm(bm_b));
  end else begin : g_m1
    m_siso1 u_mf (.clk, .data(data_f1), .si(si_f_mux), .odd( addr_d[1][0]), .bm(bm_f));
    m_siso1 u_mb (.clk, .data(data_b1), .si(si_b_mux), .odd(~addr_d[1][0]), .bm(bm_b));
  end

  // ---------------------------------------------------------------- stage 2
  metric_t f [4], b [4], f_lifo [4], b_lifo [4];
  logic [4*WF-1:0] f_lifo_w, b_lifo_w;

  f_cal u_fcal (.clk, .clear(start_d[2]), .bm(bm_f), .f);
  b_cal u_bcal (.clk, .clear(start_d[2]), .bm(bm_b), .b);

  lifo #(.WIDTH(4*WF), .DEPTH(D)) u_lifo_f (
    .clk, .rst, .read(write_d[2]), .din({f[0], f[1], f[2], f[3]}), .dout(f_lifo_w));
  lifo #(.WIDTH(4*WF), .DEPTH(D)) u_lifo_b (
    .clk, .rst, .read(write_d[2]), .din({b[0], b[1], b[2], b[3]}), .dout(b_lifo_w));

  assign {f_lifo[0], f_lifo[1], f_lifo[2], f_lifo[3]} = f_lifo_w;
  assign {b_lifo[0], b_lifo[1], b_lifo[2], b_lifo[3]} = b_lifo_w;

  // ---------------------------------------------------------------- stage 3
  metric_t xf [4], yf [4], xb [4], yb [4];

  comp_a u_compa_f (.clk, .en(write_d[2]), .bm(bm_f), .f(f),      .b(b_lifo), .x(xf), .y(yf));
  comp_a u_compa_b (.clk, .en(write_d[2]), .bm(bm_b), .f(f_lifo), .b(b),      .x(xb), .y(yb));

  // ---------------------------------------------------------------- stage 4
  metric_t so1_f, so0_f, so1_b, so0_b;

  comp_cs u_cs_f (.clk, .x(xf), .y(yf), .so1(so1_f), .so0(so0_f));
  comp_cs u_cs_b (.clk, .x(xb), .y(yb), .so1(so1_b), .so0(so0_b));

  // ---------------------------------------------------------------- stage 5
  // The soft input of each output step, delayed from the LIFO by three
  // clocks to line up with the completion pipeline.
  soft_t si_fl_d [1:3], si_bl_d [1:3];
  always_ff @(posedge clk) begin
    si_fl_d[1] <= si_f_lifo;
    si_bl_d[1] <= si_b_lifo;
    for (int i = 2; i <= 3; i++) begin
      si_fl_d[i] <= si_fl_d[i-1];
      si_bl_d[i] <= si_bl_d[i-1];
    end
  end

  metric_t so_f7, so_b7;
  sum_comp u_sum_f (.clk, .so1(so1_f), .so0(so0_f), .si(si_bl_d[3]), .last_iter(last_q), .so(so_f7));
  sum_comp u_sum_b (.clk, .so1(so1_b), .so0(so0_b), .si(si_fl_d[3]), .last_iter(last_q), .so(so_b7));

  // ---------------------------------------------------------------- stage 6
  clip u_clip_f (.so_in(so_f7), .so_out(so_f));
  clip u_clip_b (.so_in(so_b7), .so_out(so_b));

  // The two-ended schedule needs an even block length.
  initial assert (N % 2 == 0) else $error("siso: N must be even");
  // A start pulse is only legal while the local controller is idle.
  assert property (@(posedge clk) disable iff (rst) start |-> !busy0);
endmodule
