// Last-in-first-out buffer between the two halves of a SISO iteration.
//
// While `read` is low it pushes `din` every clock; while `read` is high it
// pops every clock. `dout` always shows the top of the stack. The buffer
// holds DEPTH entries: pushing more drops the oldest, and popping rotates
// the popped entry to the bottom, exactly like the shift-register stack of
// the source design. Here the stack is a circular memory with one pointer
// instead of a shift register, which behaves the same and maps to a
// register file (the source design suggests this in its closing notes).
// Only the pointer is reset; the stack is always filled before it is read.
module lifo #(
  parameter int unsigned WIDTH = 4,
  parameter int unsigned DEPTH = 512    // N/2 + 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             read,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    ptr;       // location of the top entry

  function automatic logic [PW-1:0] inc(logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction
  function automatic logic [PW-1:0] dec(logic [PW-1:0] p);
    return (p == '0) ? PW'(DEPTH - 1) : p - 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (read) ptr <= dec(ptr);
    else ptr <= inc(ptr);
  end

  always_ff @(posedge clk) begin
    if (!read) mem[inc(ptr)] <= din;
  end

  assign dout = mem[ptr];
endmodule
