// Address-translation ROM of the interleaver (DEINT = 0) or the
// deinterleaver (DEINT = 1).
//
// The reading SISO asks for steps c and N+1-c together (c = 0 .. N/2). The
// values it needs were written by the other SISO at its own steps
// src(c) and src(N+1-c), where src is the permutation (interleaver) or its
// inverse (deinterleaver) and the tail steps map to themselves. The ROM
// returns the RAM word addresses of those two steps in the pair-wise
// storage order of ram2r (step v at word 2v for v <= N/2, else at word
// 2(N+1-v)+1):
//   rom[c] = { loc(src(c)), loc(src(N+1-c)) }.
// This is the coefficient derivation of the source design; here the table
// is computed when the ROM is built instead of being read from a file. The
// read is combinational.
//
// The permutation pi: for N = 6 it is the source design's {3,2,5,0,4,1}.
// For other N the source design's coefficient file is not available, so a
// pseudo-random permutation of this design's own is used: start from the
// identity and, for i = N-1 down to 1, advance x = 69069 x + 1 (mod 2^32,
// from x = PERM_SEED) and swap entries i and (x >> 8) mod (i+1)
// (a Fisher-Yates shuffle). Replace this block to use another code's
// interleaver; nothing else depends on it.
module addr_rom
  import turbo_pkg::*;
#(
  parameter int unsigned N     = 1022,
  parameter int unsigned AW    = $clog2(N + 2),
  parameter bit          DEINT = 1'b0
) (
  input  logic [AW-2:0] c,
  output logic [AW-1:0] loc_f,   // word holding step c
  output logic [AW-1:0] loc_b    // word holding step N+1-c
);
  localparam int unsigned ROWS = N / 2 + 1;

  logic [2*AW-1:0] rom [ROWS];

  initial begin
    int          pi [N];
    int          src [N + 2];
    logic [31:0] x;
    int          j, t;
    int          pi6 [6];
    pi6 = '{3, 2, 5, 0, 4, 1};
    for (int i = 0; i < int'(N); i++) pi[i] = i;
    if (N == 6) begin
      for (int i = 0; i < 6; i++) pi[i] = pi6[i];
    end else begin
      x = PERM_SEED;
      for (int i = int'(N) - 1; i >= 1; i--) begin
        x = lcg_next(x);
        j = int'((x >> 8) % (i + 1));
        t = pi[i]; pi[i] = pi[j]; pi[j] = t;
      end
    end
    // Step read at position i comes from step src[i]; tail steps stay put.
    for (int i = 0; i < int'(N); i++) begin
      if (DEINT) src[pi[i]] = i;
      else       src[i] = pi[i];
    end
    src[N] = N;
    src[N + 1] = N + 1;
    for (int i = 0; i < int'(ROWS); i++) begin
      rom[i] = {AW'(store_loc(src[i], N)), AW'(store_loc(src[N + 1 - i], N))};
    end
  end
  assign {loc_f, loc_b} = rom[c];
endmodule
