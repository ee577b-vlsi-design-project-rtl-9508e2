// Reference model of the turbo decoding algorithm, for the testbenches.
//
// A plain sequential description, written independently of the RTL: whole-
// block forward and backward recursions over arrays, then completion,
// interleaving and deinterleaving by index. It reproduces the arithmetic
// of the hardware exactly: path metrics are kept modulo 128 and compared by
// the sign of their 7-bit difference, soft outputs are taken as 7-bit
// signed values and saturated to [-8, 7], tail steps carry zero soft input,
// and the last SISO2 pass adds back its soft input.
package turbo_ref_pkg;

  function automatic int wrap7(int v);
    return ((v % 128) + 128) % 128;
  endfunction

  function automatic int smin(int a, int b);
    int d;
    d = wrap7(a - b);
    return (d >= 64) ? wrap7(a) : wrap7(b);
  endfunction

  // Same selection rule as a tournament of pairwise sign tests on 4 values:
  // the first value that is smaller than all later ones and not larger than
  // all earlier ones.
  function automatic int smin4(int a, int b, int c, int d);
    int v[4];
    v = '{wrap7(a), wrap7(b), wrap7(c), wrap7(d)};
    for (int i = 0; i < 3; i++) begin
      bit best = 1;
      for (int j = 0; j < 4; j++) begin
        if (j < i && wrap7(v[j] - v[i]) >= 64) best = 0;     // earlier one smaller
        if (j > i && wrap7(v[i] - v[j]) < 64) best = 0;      // later one not larger
      end
      if (best) return v[i];
    end
    return v[3];
  endfunction

  function automatic int sat(int v7);
    int s;
    s = (v7 >= 64) ? v7 - 128 : v7;
    if (s > 7)  return 7;
    if (s < -8) return -8;
    return s;
  endfunction

  // Interleaver pi(i), 0 <= i < n: the published permutation for n = 6,
  // otherwise a Fisher-Yates shuffle driven by x = 69069 x + 1 mod 2^32
  // from x = 32'h2545F491, swapping entries i and (x >> 8) mod (i+1) for
  // i = n-1 down to 1. The last permutation built is cached.
  int pi_cache [$];
  int pi_cache_n = -1;

  function automatic int pi_f(int i, int n);
    int t6[6] = '{3, 2, 5, 0, 4, 1};
    longint unsigned x;
    if (n == 6) return t6[i];
    if (pi_cache_n != n) begin
      pi_cache.delete();
      for (int k = 0; k < n; k++) pi_cache.push_back(k);
      x = 64'h2545F491;
      for (int k = n - 1; k >= 1; k--) begin
        int j, t;
        x = (x * 69069 + 1) % 64'h1_0000_0000;
        j = int'((x / 256) % longint'(k + 1));
        t = pi_cache[k]; pi_cache[k] = pi_cache[j]; pi_cache[j] = t;
      end
      pi_cache_n = n;
    end
    return pi_cache[i];
  endfunction

  // One SISO pass over a block of L = n+2 steps.
  function automatic void siso_pass(input int n, input bit second, input bit last,
                                    input int z1[], input int z2[], input int si[],
                                    output int so[]);
    int L, m0[], m1[], m2[], f[][4], b[][4];
    L = n + 2;
    m0 = new[L]; m1 = new[L]; m2 = new[L]; so = new[L];
    f = new[L + 1]; b = new[L + 1];
    for (int k = 0; k < L; k++) begin
      int zp;
      if (!second) begin
        zp = (k % 2 == 0) ? z2[k] : 0;
        m0[k] = si[k] + z1[k] + zp; m1[k] = zp; m2[k] = si[k] + z1[k];
      end else begin
        zp = (k % 2 == 1) ? z2[k] : 0;
        m0[k] = si[k] + zp; m1[k] = zp; m2[k] = si[k];
      end
    end
    f[0] = '{0, 31, 31, 31};
    for (int k = 0; k < L; k++) begin
      f[k+1][0] = smin(f[k][0], f[k][2] + m0[k]);
      f[k+1][1] = smin(f[k][0] + m0[k], f[k][2]);
      f[k+1][2] = smin(f[k][1] + m2[k], f[k][3] + m1[k]);
      f[k+1][3] = smin(f[k][1] + m1[k], f[k][3] + m2[k]);
    end
    b[L] = '{0, 31, 31, 31};
    for (int k = L - 1; k >= 0; k--) begin
      b[k][0] = smin(b[k+1][0], b[k+1][1] + m0[k]);
      b[k][1] = smin(b[k+1][3] + m1[k], b[k+1][2] + m2[k]);
      b[k][2] = smin(b[k+1][1], b[k+1][0] + m0[k]);
      b[k][3] = smin(b[k+1][2] + m1[k], b[k+1][3] + m2[k]);
    end
    for (int k = 0; k < L; k++) begin
      int s1, s0;
      s1 = smin4(f[k][0] + m0[k] + b[k+1][1], f[k][1] + m2[k] + b[k+1][2],
                 f[k][2] + m0[k] + b[k+1][0], f[k][3] + m2[k] + b[k+1][3]);
      s0 = smin4(f[k][0] + b[k+1][0], f[k][1] + m1[k] + b[k+1][3],
                 f[k][2] + b[k+1][1], f[k][3] + m1[k] + b[k+1][2]);
      so[k] = sat(wrap7(s1 - s0 - (last ? 0 : si[k])));
    end
  endfunction

  // Full decoding of one block: n_iter passes of each SISO, then the sign
  // of the final deinterleaved soft values. dec[i] = 1 for a decoded 1.
  function automatic void decode_block(input int n, input int n_iter,
                                       input int z1[], input int z2[],
                                       output bit dec[]);
    int L, si1[], si2[], so1[], so2[], inv[];
    L = n + 2;
    si1 = new[L]; si2 = new[L]; inv = new[n]; dec = new[n];
    foreach (si1[i]) si1[i] = 0;
    for (int i = 0; i < n; i++) inv[pi_f(i, n)] = i;
    for (int it = 1; it <= n_iter; it++) begin
      siso_pass(n, 1'b0, 1'b0, z1, z2, si1, so1);
      foreach (si2[i]) si2[i] = (i < n) ? so1[pi_f(i, n)] : 0;
      siso_pass(n, 1'b1, it == n_iter, z1, z2, si2, so2);
      foreach (si1[i]) si1[i] = (i < n) ? so2[inv[i]] : 0;
    end
    for (int i = 0; i < n; i++) dec[i] = (si1[i] < 0);
  endfunction

endpackage
