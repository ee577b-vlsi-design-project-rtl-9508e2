// Test of the LIFO against a shift-register stack model: random runs of
// pushes and pops, including overfilling (oldest entry dropped) and
// popping past the bottom (entries rotate), the way the SISO uses it.
module tb_lifo;
  logic clk = 0;
  always #5 clk = ~clk;
  `define WATCHDOG_CYCLES 5000
  `include "tb_common.svh"

  localparam int D = 5;
  logic       rst = 1, read = 0;
  logic [7:0] din, dout;
  lifo #(.WIDTH(8), .DEPTH(D)) dut (.clk, .rst, .read, .din, .dout);

  logic [7:0] model [D];

  initial begin
    @(negedge clk); rst = 0;
    // Fill completely first so that every entry of the model is defined.
    for (int i = 0; i < D; i++) begin
      din = 8'($urandom); read = 0;
      @(posedge clk);
      for (int j = D - 1; j > 0; j--) model[j] = model[j-1];
      model[0] = din;
      @(negedge clk);
    end
    for (int i = 0; i < 600; i++) begin
      logic [7:0] m0;
      read = ((i / 7) % 2) == 1;
      din  = 8'($urandom);
      #1 check(dout == model[0], $sformatf("top %0d vs %0d", dout, model[0]));
      @(posedge clk);
      m0 = model[0];
      if (read) begin
        for (int j = 0; j < D - 1; j++) model[j] = model[j+1];
        model[D-1] = m0;
      end else begin
        for (int j = D - 1; j > 0; j--) model[j] = model[j-1];
        model[0] = din;
      end
      @(negedge clk);
    end
    finish_tb();
  end
endmodule
