// Main controller: sequences the decoding of each pair of blocks.
//
// Two blocks, A and B, are decoded together: SISO1 and SISO2 work at the
// same time on different blocks and swap blocks at every iteration, so
// each SISO iteration of one block feeds the other SISO's next iteration
// on the same block. With N_ITER iterations per SISO and block, one pair
// takes 2*N_ITER+2 controller iterations (22 for N_ITER = 10):
//   iteration 1              SISO1 on A (first pass)
//   iteration 2              SISO1 on B (first pass), SISO2 on A
//   iterations 3 .. 2I-1     both SISOs
//   iteration 2I             both; SISO2's last pass on A
//   iteration 2I+1           SISO2 alone, last pass on B; hard decisions of A
//   iteration 2I+2           hard decisions of B (deinterleaver only)
// The FSM (IDLE, START, RUN) waits in IDLE for a new pair, spends one clock
// in START issuing the pulses of the coming iteration, and waits in RUN
// for a SISO's `done`. After issuing iteration 2I+2 it returns to IDLE
// without waiting, so a new pair can start while the last decisions are
// read out. `select` toggles at every START and tells the input buffer
// which block each SISO reads.
//
// `ready_async` comes from the input-clock domain. It is synchronised with
// two flip-flops; its rising edge sets a pending flag that START clears, so
// a pair announced while the previous one is still running is not lost.
// Schedule, FSM and outputs follow the source design; the synchroniser, the
// pending flag and `first_pass` (SISO1 ignores its soft input on its first
// pass over each block) are this design's additions.
module control #(
  parameter int unsigned N_ITER = 10   // iterations per SISO and block
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       ready_async,
  input  logic       done_siso1,
  input  logic       done_siso2,
  output logic       start_siso1,
  output logic       start_siso2,
  output logic       first_pass,
  output logic       last_iter,
  output logic       hard_dici,
  output logic       select,
  output logic [5:0] iter,
  output logic       busy
);
  localparam int unsigned LAST = 2 * N_ITER + 2;   // iterations per pair

  typedef enum logic [1:0] {S_IDLE, S_START, S_RUN} state_t;
  state_t state;

  logic [2:0] rdy_sync;
  logic       pending;

  always_ff @(posedge clk) begin
    if (rst) rdy_sync <= '0;
    else     rdy_sync <= {rdy_sync[1:0], ready_async};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= S_IDLE;
      iter    <= '0;
      select  <= 1'b1;
      pending <= 1'b0;
    end else begin
      if (rdy_sync[1] && !rdy_sync[2]) pending <= 1'b1;
      case (state)
        S_IDLE: begin
          iter   <= '0;
          select <= 1'b1;
          if (pending) begin
            state   <= S_START;
            pending <= 1'b0;
          end
        end
        S_START: begin
          iter   <= iter + 1'b1;
          select <= ~select;
          state  <= S_RUN;
        end
        S_RUN: begin
          if (iter == 6'(LAST))             state <= S_IDLE;
          else if (done_siso1 || done_siso2) state <= S_START;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Pulses of the iteration that starts now (iter counts from 0).
  always_comb begin
    start_siso1 = 1'b0;
    start_siso2 = 1'b0;
    first_pass  = 1'b0;
    last_iter   = 1'b0;
    hard_dici   = 1'b0;
    if (state == S_START) begin
      start_siso1 = (iter <= 6'(2 * N_ITER - 1));
      start_siso2 = (iter >= 6'd1) && (iter <= 6'(2 * N_ITER));
      first_pass  = (iter <= 6'd1);
      last_iter   = (iter == 6'(2 * N_ITER - 1)) || (iter == 6'(2 * N_ITER));
      hard_dici   = (iter == 6'(2 * N_ITER)) || (iter == 6'(2 * N_ITER + 1));
    end
  end

  assign busy = (state != S_IDLE);
endmodule
