// Deinterleaver between SISO2 and SISO1, with the hard-decision readout.
//
// Storage and addressing are those of the interleaver: SISO2 writes its
// step pairs in its own order, SISO1 reads through an address ROM holding
// the inverse permutation, so SISO1 sees the values in natural order.
//
// After SISO2's last iteration on a block, this memory holds the final
// a-posteriori values in deinterleaved order, and the decided bit of each
// step is simply the sign bit of the stored value (1 when negative). A
// `hard_dici` pulse from the main controller starts the readout: while
// `writeout` is high (N/2+1 clocks) the out_cnt counter replaces SISO1's
// address at the ROM, and each clock delivers two decisions, hard[0] for
// step hard_idx and hard[1] for step N+1-hard_idx. Steps N and N+1 are the
// tail; hard_valid marks the decisions that belong to data bits. The soft
// outputs towards SISO1 read as zero during the readout.
//
// The readout ends half-way through the iteration so that SISO2 can write
// the other block's results into the memory in the second half. The source
// design reaches that rate by emitting one bit per edge of a doubled clock;
// here the two read ports give the same two bits per clock in parallel,
// which is this design's choice.
module deinterleaver
  import turbo_pkg::*;
#(
  parameter int unsigned N  = 1022,
  parameter int unsigned AW = $clog2(N + 2)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          write,
  input  logic [AW-1:0] addr,
  input  logic [AW-1:0] addr_w,
  input  soft_t         so_f,
  input  soft_t         so_b,
  input  logic          hard_dici,
  output soft_t         si_f,
  output soft_t         si_b,
  output logic [1:0]    hard,
  output logic [1:0]    hard_valid,
  output logic [AW-2:0] hard_idx,
  output logic          writeout
);
  logic [AW-1:0] loc_f, loc_b, addra;
  logic [AW-2:0] c, cnt;
  logic          cnt_last;
  soft_t         ram_a, ram_b;

  out_cnt #(.N(N), .AW(AW)) u_cnt (.clk, .clear(!writeout), .count(cnt), .last(cnt_last));

  always_ff @(posedge clk) begin
    if (rst)                       writeout <= 1'b0;
    else if (writeout && cnt_last) writeout <= 1'b0;
    else if (hard_dici)            writeout <= 1'b1;
  end

  assign c = writeout ? cnt : addr[AW-2:0];

  addr_rom #(.N(N), .AW(AW), .DEINT(1'b1)) u_rom (.c, .loc_f, .loc_b);

  assign addra = write ? AW'(N + 1) - addr_w : loc_f;

  ram2r #(.N(N), .AW(AW)) u_ram (
    .clk, .rst, .write, .addra, .addrb(loc_b), .din({so_f, so_b}),
    .outa(ram_a), .outb(ram_b));

  assign si_f       = writeout ? soft_t'(0) : ram_a;
  assign si_b       = writeout ? soft_t'(0) : ram_b;
  assign hard       = writeout ? {ram_b[W-1], ram_a[W-1]} : 2'b00;
  assign hard_valid = writeout ? {(cnt >= 2), 1'b1} : 2'b00;
  assign hard_idx   = cnt;

  // The readout and a SISO2 write must never share the RAM port.
  assert property (@(posedge clk) disable iff (rst) !(writeout && write));
endmodule
