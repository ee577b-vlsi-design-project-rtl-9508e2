// Soft-information RAM of the interleaver and deinterleaver: L = N+2 words
// of 4 bits, one 8-bit write port, two 4-bit read ports.
//
// A SISO produces its soft outputs in pairs, step k and step N+1-k, so a
// write stores both in adjacent words: with pair index p = addra,
// word 2p <- din[3:0] (step p) and word 2p+1 <- din[7:4] (step N+1-p).
// The words of pairs 0 and 1 at odd locations are the two tail steps N+1
// and N; they are written as zero, so a tail step never carries soft
// information to the other SISO. Reads are combinational: outa = word at
// addra, outb = word at addrb (word addresses, not pair indices); addra is
// shared between the write and the first read port, as in the source
// design. Reset clears the memory. Organisation, tail forcing and reset
// follow the source design.
module ram2r
  import turbo_pkg::*;
#(
  parameter int unsigned N  = 1022,
  parameter int unsigned AW = $clog2(N + 2)
) (
  input  logic           clk,
  input  logic           rst,
  input  logic           write,
  input  logic [AW-1:0]  addra,   // pair index when writing, word when reading
  input  logic [AW-1:0]  addrb,
  input  logic [2*W-1:0] din,     // {step N+1-p, step p}
  output soft_t          outa,
  output soft_t          outb
);
  localparam int unsigned L = N + 2;

  soft_t mem [L];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < L; i++) mem[i] <= '0;
    end else if (write) begin
      mem[2 * addra]      <= soft_t'(din[W-1:0]);
      mem[2 * addra + 1]  <= (addra <= 1) ? soft_t'(0) : soft_t'(din[2*W-1:W]);
    end
  end

  assign outa = mem[addra];
  assign outb = mem[addrb];
endmodule
