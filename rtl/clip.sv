// Output clipping (pipeline stage 6, combinational).
//
// Saturates the 7-bit signed soft output to the 4-bit range [-8, 7]: the
// value passes unchanged when its four top bits are all equal, otherwise it
// becomes -8 or 7 according to its sign. Follows the source design.
module clip
  import turbo_pkg::*;
(
  input  metric_t so_in,
  output soft_t   so_out
);
  assign so_out = clip7(so_in);
endmodule
