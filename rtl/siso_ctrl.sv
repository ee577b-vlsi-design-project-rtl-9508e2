// Local controller of one SISO: address counter plus a three-state machine.
//
//   IDLE : waits for the `start` pulse from the main controller; the
//          address counter is held at 0.
//   F_B  : addr = 0 .. N/2. The SISO reads its inputs and runs the forward
//          and backward recursions from both ends of the block towards the
//          middle, storing metrics in its LIFOs.
//   COMP : addr = N/2+1 .. N+1. The recursions continue past the middle
//          and the completion produces two soft outputs per clock;
//          `write` is high.
// `done` is high for the one COMP cycle with addr = N, one step before the
// last; the main controller uses it to start the next iteration. One
// iteration is N+2 cycles of counting plus the cycle spent in IDLE.
// States, counter and done position follow the source design; the state
// encoding is this design's choice.
module siso_ctrl #(
  parameter int unsigned N  = 1022,            // block length without tail
  parameter int unsigned AW = $clog2(N + 2)    // address width
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          start,
  output logic [AW-1:0] addr,
  output logic          write,
  output logic          done,
  output logic          busy
);
  typedef enum logic [1:0] {S_IDLE, S_FB, S_COMP} state_t;
  state_t state, state_n;

  always_comb begin
    state_n = state;
    case (state)
      S_IDLE: if (start) state_n = S_FB;
      S_FB:   if (addr == AW'(N / 2)) state_n = S_COMP;
      S_COMP: if (addr == AW'(N + 1)) state_n = S_IDLE;
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) state <= S_IDLE;
    else     state <= state_n;
  end

  // Address counter, synchronously cleared while idle.
  always_ff @(posedge clk) begin
    if (rst || state == S_IDLE) addr <= '0;
    else                        addr <= addr + 1'b1;
  end

  assign write = (state == S_COMP);
  assign done  = (state == S_COMP) && (addr == AW'(N));
  assign busy  = (state != S_IDLE);
endmodule
