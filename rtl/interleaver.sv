// Interleaver between SISO1 and SISO2.
//
// SISO1 writes its soft outputs in its own (natural) step order: on each
// write cycle the pair {SO(N+1-k), SO(k)} for addr_w = k goes to pair index
// N+1-k of the RAM, one 8-bit word. SISO2 reads in interleaved order: its
// address c (0 .. N/2, during its F_B half) goes through the address ROM,
// which gives the two RAM words holding the values for SISO2's steps c and
// N+1-c. One write port and one ROM read port suffice because both sides
// always work on step pairs (k, N+1-k). The RAM's first address port is
// switched between the write pair index and the ROM output by `write`.
// Reads are combinational; writes take effect at the clock edge.
//
// Structure follows the source design. The source design forms the pair
// index as the bitwise complement of addr_w, valid only for N = 2^B - 2;
// here it is N+1-addr_w, valid for any even N.
module interleaver
  import turbo_pkg::*;
#(
  parameter int unsigned N  = 1022,
  parameter int unsigned AW = $clog2(N + 2)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          write,    // writing SISO's pipelined write strobe
  input  logic [AW-1:0] addr,     // reading SISO's address
  input  logic [AW-1:0] addr_w,   // writing SISO's output step
  input  soft_t         so_f,     // SO(addr_w)
  input  soft_t         so_b,     // SO(N+1-addr_w)
  output soft_t         si_f,     // value for step addr
  output soft_t         si_b      // value for step N+1-addr
);
  logic [AW-1:0] loc_f, loc_b, addra;

  addr_rom #(.N(N), .AW(AW), .DEINT(1'b0)) u_rom (
    .c(addr[AW-2:0]), .loc_f, .loc_b);

  assign addra = write ? AW'(N + 1) - addr_w : loc_f;

  ram2r #(.N(N), .AW(AW)) u_ram (
    .clk, .rst, .write, .addra, .addrb(loc_b), .din({so_f, so_b}),
    .outa(si_f), .outb(si_b));
endmodule
