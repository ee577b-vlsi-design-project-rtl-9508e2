// Test of the input buffer at N = 6. A stream of random samples (system,
// parity, system, ...) is fed after `start`, five pairs of blocks in a
// row. Each time `ready` rises the pair just completed is read back through
// both ports, for both values of `select`, at every address, forward and
// backward (N+1-addr), while the next pair is being written. Also checks
// the ready pulse width and the bank counter.
module tb_input_buff;
  logic clk_in = 0;
  always #5 clk_in = ~clk_in;
  wire clk = clk_in;
  `define WATCHDOG_CYCLES 5000
  `include "tb_common.svh"

  localparam int N = 6;
  localparam int AW = 3;
  localparam int L = N + 2;
  localparam int NPAIR = 5;
  logic rst = 1, start = 0, select = 0, ready;
  logic [3:0] in = 0;
  logic [AW-1:0] addr1 = 0, addr2 = 0;
  logic [7:0] data1f, data1b, data2f, data2b;
  logic [1:0] bank;

  input_buff #(.N(N)) dut (.*);

  logic [7:0] words [NPAIR][2][L];
  int n_ready = 0;

  task automatic check_pair(int p);
    for (int s = 0; s < 2; s++) begin
      select = s[0];
      for (int a = 0; a < L; a++) begin
        addr1 = AW'(a); addr2 = AW'(L - 1 - a); #1;
        check(data1f == words[p][s][a] && data1b == words[p][s][N + 1 - a],
              $sformatf("pair %0d SISO1 select %0d addr %0d", p, s, a));
        check(data2f == words[p][1-s][L-1-a] && data2b == words[p][1-s][a],
              $sformatf("pair %0d SISO2 select %0d addr %0d", p, s, L - 1 - a));
      end
    end
  endtask

  initial begin
    foreach (words[p, b, k]) words[p][b][k] = 8'($urandom);
    repeat (2) @(negedge clk_in);
    rst = 0;
    @(negedge clk_in); start = 1;
    @(negedge clk_in); start = 0;
    fork
      begin
        for (int p = 0; p < NPAIR; p++)
          for (int b = 0; b < 2; b++)
            for (int k = 0; k < L; k++) begin
              in = words[p][b][k][7:4]; @(negedge clk_in);
              check(bank == 2'(2 * p + b), "bank counter");
              in = words[p][b][k][3:0]; @(negedge clk_in);
            end
        in = 0;
        repeat (4) @(negedge clk_in);
      end
      begin
        for (int p = 0; p < NPAIR; p++) begin
          @(posedge ready); #1;
          n_ready++;
          @(negedge clk_in); check(ready, "ready high");
          @(negedge clk_in); check(ready, "ready lasts two clocks");
          @(negedge clk_in); check(!ready, "ready ends after two clocks");
          check_pair(p);
        end
      end
    join
    check(n_ready == NPAIR, "one ready per pair");
    finish_tb();
  end
endmodule
