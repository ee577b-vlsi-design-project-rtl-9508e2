// Pair counter of the hard-decision readout.
//
// Held at zero while `clear` is high, it counts pair indices 0 .. N/2 one
// per clock while `clear` is low; `last` marks the final pair. In the source
// design this counter produces one position per clock and runs through the
// pairs twice (rising, then falling) within a doubled clock; here both
// positions of a pair are produced in the same clock (see deinterleaver), so
// one pass is enough.
module out_cnt #(
  parameter int unsigned N  = 1022,
  parameter int unsigned AW = $clog2(N + 2)
) (
  input  logic          clk,
  input  logic          clear,
  output logic [AW-2:0] count,
  output logic          last
);
  always_ff @(posedge clk) begin
    if (clear) count <= '0;
    else       count <= count + 1'b1;
  end
  assign last = (count == (AW-1)'(N / 2));
endmodule
