// Completion final summation (pipeline stage 5).
//
// Soft output SO = so1 - so0 - SI, in 7-bit arithmetic, registered. The
// soft input SI is removed so that only new (extrinsic) information is
// passed on. In SISO2's last iteration `last_iter` suppresses the
// subtraction, so that the full a-posteriori value reaches the hard
// decision. Follows the source design.
module sum_comp
  import turbo_pkg::*;
(
  input  logic    clk,
  input  metric_t so1,
  input  metric_t so0,
  input  soft_t   si,
  input  logic    last_iter,
  output metric_t so
);
  metric_t si_ext;
  assign si_ext = last_iter ? metric_t'(0) : metric_t'(si);

  always_ff @(posedge clk) so <= so1 - so0 - si_ext;
endmodule
