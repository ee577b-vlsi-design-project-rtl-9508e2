// Shared types, constants and arithmetic of the min-sum turbo decoder.
//
// Soft values (channel samples and extrinsic information) are 4-bit two's
// complement. Path metrics (F, B and the completion sums) are 7-bit and are
// kept modulo 128: they are never normalised, and the smaller of two metrics
// is found from the sign of their 7-bit difference, which is correct as long
// as the metrics in flight differ by less than 64. Branch metrics are 6-bit.
// The widths, the initial metric vector (0, 31, 31, 31) and the output
// saturation to [-8, 7] follow the source design.
//
// The package also holds what the address ROMs need to build the
// interleaver: the pair-wise storage order and the generator of the
// pseudo-random shuffle used for block lengths other than 6 (see addr_rom).
package turbo_pkg;

  localparam int unsigned W   = 4;   // soft-information width
  localparam int unsigned WF  = 7;   // path-metric width
  localparam int unsigned WM  = W + 2; // branch-metric width

  typedef logic signed [W-1:0]  soft_t;
  typedef logic        [WF-1:0] metric_t;
  typedef logic signed [WM-1:0] bmetric_t;

  localparam metric_t METRIC_INIT = metric_t'(0);
  localparam metric_t METRIC_INF  = metric_t'(31);
  localparam soft_t   SOFT_MAX    = soft_t'(7);
  localparam soft_t   SOFT_MIN    = soft_t'(-8);

  // Four state metrics of the 4-state trellis.
  typedef metric_t state_metrics_t [4];

  // Branch metrics of one trellis step. M(s,u,s') has only three distinct
  // non-zero values: m0 on the u=1 branches 0->1, 2->0 (forward view),
  // m1 on the u=0 branches 1->3, 3->2, m2 on the u=1 branches 1->2, 3->3.
  typedef struct packed {
    bmetric_t m0;
    bmetric_t m1;
    bmetric_t m2;
  } bm_t;

  // Sign-extend a branch metric to the path-metric width.
  function automatic metric_t bm_ext(bmetric_t m);
    return metric_t'(m);
  endfunction

  // Sign-extend a soft value to the branch-metric width.
  function automatic bmetric_t soft_ext(soft_t s);
    return bmetric_t'(s);
  endfunction

  // Smaller of two modular metrics: a when a-b is negative.
  function automatic metric_t min2(metric_t a, metric_t b);
    metric_t d;
    d = a - b;
    return d[WF-1] ? a : b;
  endfunction

  // Smaller of four modular metrics from the six pairwise differences.
  function automatic metric_t min4(metric_t a, metric_t b, metric_t c, metric_t d);
    metric_t ab, ac, ad, bc, bd, cd;
    logic amin, bmin, cmin;
    ab = a - b; ac = a - c; ad = a - d;
    bc = b - c; bd = b - d; cd = c - d;
    amin =  ab[WF-1] &  ac[WF-1] & ad[WF-1];
    bmin = ~ab[WF-1] &  bc[WF-1] & bd[WF-1];
    cmin = ~ac[WF-1] & ~bc[WF-1] & cd[WF-1];
    if (amin)      return a;
    else if (bmin) return b;
    else if (cmin) return c;
    else           return d;
  endfunction

  // Saturate a 7-bit signed soft output to the 4-bit range.
  function automatic soft_t clip7(metric_t v);
    logic [WF-W:0] top;
    top = v[WF-1:W-1];
    if (&top || ~|top) return soft_t'(v[W-1:0]);
    else if (v[WF-1])  return SOFT_MIN;
    else               return SOFT_MAX;
  endfunction

  // ---------------------------------------------------------------------
  // Interleaver permutation and address-ROM coefficients.

  // Pseudo-random generator of the interleaver shuffle: a 32-bit linear
  // congruential step, x' = 69069 x + 1 mod 2^32, started at PERM_SEED.
  localparam logic [31:0] PERM_SEED = 32'h2545_F491;

  function automatic logic [31:0] lcg_next(logic [31:0] x);
    return x * 32'd69069 + 32'd1;
  endfunction

  // Pair-wise storage order: location 2p holds time step p and location
  // 2p+1 holds step N+1-p (L = N+2 steps including the two tail steps).
  function automatic int store_loc(int v, int n);
    if (v <= n / 2) return 2 * v;
    else            return 2 * (n + 1 - v) + 1;
  endfunction

endpackage
