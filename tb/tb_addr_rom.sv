// Test of the address ROMs. At N = 6 the contents must equal the published
// coefficient tables of the 6-bit example: interleaver {110001, 100011,
// 101010, 000111} and deinterleaver {110001, 101011, 010100, 000111}. At
// N = 14 every word of the RAM must be addressed exactly once, and the
// tail steps must come from the tail words 1 (step N+1) and 3 (step N).
module tb_addr_rom;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 1000
  `include "tb_common.svh"

  logic [1:0] c6;
  logic [2:0] fi6, bi6, fd6, bd6;
  addr_rom #(.N(6), .DEINT(0)) ri6 (.c(c6), .loc_f(fi6), .loc_b(bi6));
  addr_rom #(.N(6), .DEINT(1)) rd6 (.c(c6), .loc_f(fd6), .loc_b(bd6));

  logic [2:0] c14;
  logic [3:0] fi14, bi14, fd14, bd14;
  addr_rom #(.N(14), .DEINT(0)) ri14 (.c(c14), .loc_f(fi14), .loc_b(bi14));
  addr_rom #(.N(14), .DEINT(1)) rd14 (.c(c14), .loc_f(fd14), .loc_b(bd14));

  logic [5:0] int6 [4]   = '{6'b110001, 6'b100011, 6'b101010, 6'b000111};
  logic [5:0] deint6 [4] = '{6'b110001, 6'b101011, 6'b010100, 6'b000111};

  initial begin
    int seen_i [16], seen_d [16];
    for (int c = 0; c < 4; c++) begin
      c6 = 2'(c); #1;
      check({fi6, bi6} == int6[c],   $sformatf("int rom[%0d] = %b%b", c, fi6, bi6));
      check({fd6, bd6} == deint6[c], $sformatf("deint rom[%0d] = %b%b", c, fd6, bd6));
    end
    foreach (seen_i[i]) begin seen_i[i] = 0; seen_d[i] = 0; end
    for (int c = 0; c < 8; c++) begin
      c14 = 3'(c); #1;
      seen_i[fi14]++; seen_i[bi14]++; seen_d[fd14]++; seen_d[bd14]++;
      if (c == 0) check(bi14 == 1 && bd14 == 1, "step N+1 from word 1");
      if (c == 1) check(bi14 == 3 && bd14 == 3, "step N from word 3");
    end
    for (int i = 0; i < 16; i++) begin
      check(seen_i[i] == 1, $sformatf("interleaver word %0d used %0d times", i, seen_i[i]));
      check(seen_d[i] == 1, $sformatf("deinterleaver word %0d used %0d times", i, seen_d[i]));
    end
    finish_tb();
  end
endmodule
