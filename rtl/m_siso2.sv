// Branch-metric unit of SISO2 (pipeline stage 1).
//
// SISO2 works on the interleaved sequence and receives no system sample:
// the system information reaches it only through its soft input SI, the
// interleaved output of SISO1. Its parity samples are the odd-step parity
// values of the channel stream (`par`); on even steps z2 is zero.
//   m0 = SI + z2,  m1 = z2,  m2 = SI.
// Equations follow the source design; the result is registered.
module m_siso2
  import turbo_pkg::*;
(
  input  logic         clk,
  input  logic [W-1:0] par,      // parity sample of this step
  input  soft_t        si,
  input  logic         odd,
  output bm_t          bm
);
  soft_t z2;
  assign z2 = odd ? soft_t'(par) : soft_t'(0);

  always_ff @(posedge clk) begin
    bm.m0 <= soft_ext(si) + soft_ext(z2);
    bm.m1 <= soft_ext(z2);
    bm.m2 <= soft_ext(si);
  end
endmodule
