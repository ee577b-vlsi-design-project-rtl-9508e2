// Completion adders (pipeline stage 3).
//
// Forms, for one trellis step, the four path sums through branches with
// input bit 1 (x) and the four with input bit 0 (y):
//   x0 = F0 + m0 + B1   x1 = F1 + m2 + B2   x2 = F2 + m0 + B0   x3 = F3 + m2 + B3
//   y0 = F0 + B0        y1 = F1 + m1 + B3   y2 = F2 + B1        y3 = F3 + m1 + B2
// where F are the forward metrics before the step and B the backward metrics
// after it. Sums are 7-bit modulo 128 and registered.
//
// The source design puts tri-state gates in front of this stage, driven by
// the pipelined write strobe, to stop switching while no completion is
// needed (state F_B). Here that gating is an enable: with `en` low the
// output registers hold their value. Either way the result is unused then.
module comp_a
  import turbo_pkg::*;
(
  input  logic    clk,
  input  logic    en,
  input  bm_t     bm,
  input  metric_t f [4],
  input  metric_t b [4],
  output metric_t x [4],
  output metric_t y [4]
);
  metric_t m0, m1, m2;
  assign m0 = bm_ext(bm.m0);
  assign m1 = bm_ext(bm.m1);
  assign m2 = bm_ext(bm.m2);

  always_ff @(posedge clk) begin
    if (en) begin
      x[0] <= f[0] + m0 + b[1];
      x[1] <= f[1] + m2 + b[2];
      x[2] <= f[2] + m0 + b[0];
      x[3] <= f[3] + m2 + b[3];
      y[0] <= f[0] + b[0];
      y[1] <= f[1] + m1 + b[3];
      y[2] <= f[2] + b[1];
      y[3] <= f[3] + m1 + b[2];
    end
  end
endmodule
