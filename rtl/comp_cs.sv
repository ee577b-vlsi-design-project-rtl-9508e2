// Completion compare-select (pipeline stage 4).
//
// Takes the four bit-1 path sums x and the four bit-0 sums y and registers
// the minimum of each group (min-sum approximation of the log-domain sum).
// The minimum of four is chosen from the signs of the six pairwise 7-bit
// differences, as in the source design.
module comp_cs
  import turbo_pkg::*;
(
  input  logic    clk,
  input  metric_t x [4],
  input  metric_t y [4],
  output metric_t so1,   // min over input bit 1
  output metric_t so0    // min over input bit 0
);
  always_ff @(posedge clk) begin
    so1 <= min4(x[0], x[1], x[2], x[3]);
    so0 <= min4(y[0], y[1], y[2], y[3]);
  end
endmodule
