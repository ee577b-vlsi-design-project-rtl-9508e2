// Test of one input-buffer bank: random writes, then reads in which port a
// returns word addr and port b word N+1-addr.
module tb_ram_in;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 3000
  `include "tb_common.svh"

  localparam int N = 14, L = N + 2;
  logic write = 0;
  logic [3:0] addr;
  logic [7:0] din, outa, outb;
  ram_in #(.N(N)) dut (.clk, .write, .addr, .din, .outa, .outb);
  logic [7:0] model [L];

  initial begin
    for (int i = 0; i < L; i++) begin
      @(negedge clk); write = 1; addr = 4'(i); din = 8'($urandom); model[i] = din;
    end
    for (int r = 0; r < 300; r++) begin
      @(negedge clk);
      if (r % 3 == 0) begin
        write = 1; addr = 4'($urandom_range(L - 1)); din = 8'($urandom);
        model[addr] = din;
      end else begin
        write = 0; addr = 4'($urandom_range(L - 1)); #1;
        check(outa == model[addr] && outb == model[N + 1 - addr], $sformatf("read %0d", addr));
      end
    end
    finish_tb();
  end
endmodule
