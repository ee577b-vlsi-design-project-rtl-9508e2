// Input buffer: packs the channel sample stream into words and keeps four
// banks of one block each, so that two blocks can be received while the
// previous two are decoded.
//
// The 4-bit input `in` alternates system and parity samples, one per
// clk_in cycle, the first one a system sample after `start`. A phase bit
// keeps the system sample in a register and, one cycle later, writes the
// word {system, parity} to the bank being filled; so one word per two
// clk_in cycles. A word counter {bank, addr_w} walks L = N+2 words per bank
// and the four banks in the order 2, 3, 0, 1 (bank 0 -> buffer 2, bank 1 ->
// buffer 3, bank 2 -> buffer 0, bank 3 -> buffer 1). bank[1] therefore
// tells which pair is being written; the other pair is read:
//   bank[1] select  SISO1 reads  SISO2 reads
//      0      0      buffer 0     buffer 1
//      0      1      buffer 1     buffer 0
//      1      0      buffer 2     buffer 3
//      1      1      buffer 3     buffer 2
// `select` comes from the main controller and swaps the blocks between the
// SISOs at every iteration. Reads are combinational (asynchronous to
// clk_in): data1f/data1b are the words of steps addr1 and N+1-addr1 for
// SISO1, data2f/data2b likewise for SISO2. `ready` (clk_in domain) rises
// when a new pair is complete.
//
// Bank order, read table and word format follow the source design. The
// source design divides clk_in by two to clock the banks; here everything
// runs on clk_in with a phase enable, which is this design's choice.
module input_buff
  import turbo_pkg::*;
#(
  parameter int unsigned N  = 1022,
  parameter int unsigned AW = $clog2(N + 2)
) (
  input  logic           clk_in,
  input  logic           rst,
  input  logic           start,
  input  logic [W-1:0]   in,
  input  logic           select,
  input  logic [AW-1:0]  addr1,
  input  logic [AW-1:0]  addr2,
  output logic [2*W-1:0] data1f,
  output logic [2*W-1:0] data1b,
  output logic [2*W-1:0] data2f,
  output logic [2*W-1:0] data2b,
  output logic           ready,
  output logic [1:0]     bank
);
  logic          run, phase, wr, last_word;
  logic [W-1:0]  sys_q;
  logic [AW-1:0] addr_w;
  logic [AW:0]   pair_pos;

  input_ctrl #(.N(N), .AW(AW)) u_ctrl (
    .clk(clk_in), .rst, .start, .pair_pos, .last_word, .run, .ready);

  assign wr        = run && phase;
  assign last_word = wr && bank[0] && (addr_w == AW'(N + 1));
  assign pair_pos  = bank[0] ? (AW+1)'(N + 2) + (AW+1)'(addr_w) : (AW+1)'(addr_w);

  always_ff @(posedge clk_in) begin
    if (rst || start) begin
      phase  <= 1'b0;
      addr_w <= '0;
      bank   <= '0;
    end else if (run) begin
      phase <= ~phase;
      if (wr) begin
        if (addr_w == AW'(N + 1)) begin
          addr_w <= '0;
          bank   <= bank + 1'b1;
        end else begin
          addr_w <= addr_w + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk_in) begin
    if (run && !phase) sys_q <= in;
  end

  // Four banks; buffer b is written when the counter's bank field selects it.
  logic [2*W-1:0] outa [4], outb [4];
  logic [AW-1:0]  baddr [4];
  logic [1:0]     wbuf;            // buffer being written
  logic [1:0]     rbase;           // first buffer of the pair being read
  logic [1:0]     buf1, buf2;      // buffers read by SISO1 and SISO2

  assign wbuf  = bank ^ 2'b10;
  assign rbase = bank[1] ? 2'd2 : 2'd0;
  assign buf1  = rbase | {1'b0, select};
  assign buf2  = rbase | {1'b0, ~select};

  for (genvar b = 0; b < 4; b++) begin : g_bank
    always_comb begin
      if (wbuf == 2'(b))      baddr[b] = addr_w;
      else if (buf1 == 2'(b)) baddr[b] = addr1;
      else                    baddr[b] = addr2;
    end
    ram_in #(.N(N), .AW(AW), .DW(2*W)) u_ram (
      .clk(clk_in), .write(wr && (wbuf == 2'(b))), .addr(baddr[b]),
      .din({sys_q, in}), .outa(outa[b]), .outb(outb[b]));
  end

  assign data1f = outa[buf1];
  assign data1b = outb[buf1];
  assign data2f = outa[buf2];
  assign data2b = outb[buf2];
endmodule
