// Forward add-compare-select unit (pipeline stage 2, forward half).
//
// Holds the four forward state metrics F and advances them by one trellis
// step per clock:
//   F0' = min(F0, F2 + m0)      F1' = min(F0 + m0, F2)
//   F2' = min(F1 + m2, F3 + m1) F3' = min(F1 + m1, F3 + m2)
// Metrics are 7-bit modulo 128 and compared through the sign of their
// difference (turbo_pkg::min2). `clear` loads the start vector (0, 31, 31,
// 31), the known start state 0. This recursion is the loop that limits the
// clock rate; it cannot be pipelined. Recursion and widths follow the
// source design.
module f_cal
  import turbo_pkg::*;
(
  input  logic   clk,
  input  logic   clear,
  input  bm_t    bm,
  output metric_t f [4]
);
  metric_t m0, m1, m2;
  assign m0 = bm_ext(bm.m0);
  assign m1 = bm_ext(bm.m1);
  assign m2 = bm_ext(bm.m2);

  always_ff @(posedge clk) begin
    if (clear) begin
      f[0] <= METRIC_INIT;
      f[1] <= METRIC_INF;
      f[2] <= METRIC_INF;
      f[3] <= METRIC_INF;
    end else begin
      f[0] <= min2(f[0], f[2] + m0);
      f[1] <= min2(f[0] + m0, f[2]);
      f[2] <= min2(f[1] + m2, f[3] + m1);
      f[3] <= min2(f[1] + m1, f[3] + m2);
    end
  end
endmodule
