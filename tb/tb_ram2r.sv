// Test of the pair-write, two-port-read RAM: reset clears it, a write of
// pair p stores the low nibble at word 2p and the high nibble at word 2p+1
// (zero for p <= 1, the tail words), and both read ports return any word.
module tb_ram2r;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 3000
  `include "tb_common.svh"

  localparam int N = 14, L = N + 2;
  logic rst = 1, write = 0;
  logic [3:0] addra, addrb;
  logic [7:0] din;
  logic signed [3:0] outa, outb;
  ram2r #(.N(N)) dut (.clk, .rst, .write, .addra, .addrb, .din, .outa, .outb);

  logic [3:0] model [L];

  initial begin
    @(negedge clk); @(negedge clk); rst = 0;
    for (int i = 0; i < L; i++) begin
      addra = 4'(i); addrb = 4'(L - 1 - i); #1;
      check(outa == 0 && outb == 0, "cleared by reset");
    end
    foreach (model[i]) model[i] = 0;
    for (int r = 0; r < 200; r++) begin
      int p;
      p = $urandom_range(L / 2 - 1);
      @(negedge clk);
      write = 1; addra = 4'(p); din = 8'($urandom);
      @(posedge clk);
      model[2*p] = din[3:0];
      model[2*p+1] = (p <= 1) ? 4'd0 : din[7:4];
      @(negedge clk); write = 0;
      for (int k = 0; k < 3; k++) begin
        int a, b;
        a = $urandom_range(L - 1); b = $urandom_range(L - 1);
        addra = 4'(a); addrb = 4'(b); #1;
        check(4'(outa) == model[a] && 4'(outb) == model[b], $sformatf("read words %0d/%0d", a, b));
      end
    end
    finish_tb();
  end
endmodule
