// Backward add-compare-select unit (pipeline stage 2, backward half).
//
// Holds the four backward state metrics B and moves them one trellis step
// towards the start of the block per clock:
//   B0' = min(B0, B1 + m0)      B1' = min(B3 + m1, B2 + m2)
//   B2' = min(B1, B0 + m0)      B3' = min(B2 + m1, B3 + m2)
// `clear` loads (0, 31, 31, 31): the tail bits drive the encoder back to
// state 0. Modular 7-bit arithmetic as in f_cal; recursion from the source
// design.
module b_cal
  import turbo_pkg::*;
(
  input  logic   clk,
  input  logic   clear,
  input  bm_t    bm,
  output metric_t b [4]
);
  metric_t m0, m1, m2;
  assign m0 = bm_ext(bm.m0);
  assign m1 = bm_ext(bm.m1);
  assign m2 = bm_ext(bm.m2);

  always_ff @(posedge clk) begin
    if (clear) begin
      b[0] <= METRIC_INIT;
      b[1] <= METRIC_INF;
      b[2] <= METRIC_INF;
      b[3] <= METRIC_INF;
    end else begin
      b[0] <= min2(b[0], b[1] + m0);
      b[1] <= min2(b[3] + m1, b[2] + m2);
      b[2] <= min2(b[1], b[0] + m0);
      b[3] <= min2(b[2] + m1, b[3] + m2);
    end
  end
endmodule
