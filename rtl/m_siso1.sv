// Branch-metric unit of SISO1 (pipeline stage 1).
//
// For each trellis step it forms the three distinct branch metrics from the
// soft input SI and the channel samples z1 (system, data[7:4]) and z2
// (parity, data[3:0]):
//   m0 = SI + z1 + z2,  m1 = z2,  m2 = SI + z1.
// The parity sample belongs to SISO1 only on even steps (the transmitted
// stream alternates the parities of the two encoders), so z2 is taken as
// zero when `odd` is set. The equations follow the source design; the
// result is registered, giving one cycle of latency.
module m_siso1
  import turbo_pkg::*;
(
  input  logic         clk,
  input  logic [2*W-1:0] data,   // {system, parity} channel samples
  input  soft_t        si,       // soft input (extrinsic from SISO2)
  input  logic         odd,      // step index is odd
  output bm_t          bm
);
  soft_t z1, z2;
  assign z1 = soft_t'(data[2*W-1:W]);
  assign z2 = odd ? soft_t'(0) : soft_t'(data[W-1:0]);

  always_ff @(posedge clk) begin
    bm.m0 <= soft_ext(si) + soft_ext(z1) + soft_ext(z2);
    bm.m1 <= soft_ext(z2);
    bm.m2 <= soft_ext(si) + soft_ext(z1);
  end
endmodule
