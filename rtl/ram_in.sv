// One bank of the input buffer: L = N+2 words of 8 bits ({system, parity}).
//
// One address port: while `write` is high, `din` is stored at `addr`;
// otherwise the bank is read on two combinational ports, outa = word at
// addr (the forward step k) and outb = word at N+1-addr (the backward step).
// Deriving the second address inside the bank lets the two SISO ports share
// one address bus, as in the source design (which uses the bitwise
// complement, valid for N = 2^B - 2; N+1-addr is used here for any even
// N). The memory is not reset: a bank is always written before it is read.
module ram_in #(
  parameter int unsigned N  = 1022,
  parameter int unsigned AW = $clog2(N + 2),
  parameter int unsigned DW = 8
) (
  input  logic          clk,
  input  logic          write,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] din,
  output logic [DW-1:0] outa,
  output logic [DW-1:0] outb
);
  localparam int unsigned L = N + 2;

  logic [DW-1:0] mem [L];
  logic [AW-1:0] addrb;

  assign addrb = AW'(N + 1) - addr;

  always_ff @(posedge clk) begin
    if (write) mem[addr] <= din;
  end

  assign outa = mem[addr];
  assign outb = mem[addrb];
endmodule
