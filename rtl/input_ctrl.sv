// Control of the input buffer, in the input-sample clock domain.
//
// States: IDLE until `start`; then S1 and S2 alternate, one per pair of
// received blocks. `run` enables the sample packing and the word counter.
// `ready` is high during the first word slot of every pair except the
// very first, i.e. right after a complete pair of blocks has been stored;
// it tells the main controller that two new blocks wait to be decoded.
// `pair_pos` is the word position inside the current pair (0 .. 2N+3)
// and `last_word` marks the cycle in which the last word of a pair is
// written. States and the ready rule follow the source design.
module input_ctrl #(
  parameter int unsigned N  = 1022,
  parameter int unsigned AW = $clog2(N + 2)
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        start,
  input  logic [AW:0] pair_pos,
  input  logic        last_word,
  output logic        run,
  output logic        ready
);
  typedef enum logic [1:0] {S_IDLE, S_1, S_2} state_t;
  state_t state;
  logic   have_pair;   // at least one pair has been completed

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= S_IDLE;
      have_pair <= 1'b0;
    end else if (start) begin
      state     <= S_1;
      have_pair <= 1'b0;
    end else begin
      case (state)
        S_1: if (last_word) begin state <= S_2; have_pair <= 1'b1; end
        S_2: if (last_word) state <= S_1;
        default: ;
      endcase
    end
  end

  assign run   = (state != S_IDLE);
  assign ready = run && have_pair && (pair_pos == '0);
endmodule
