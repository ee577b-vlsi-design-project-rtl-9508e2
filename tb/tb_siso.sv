// Testbench of the SISO pipeline, both flavours, at block length 6 and 14.
//
// The channel words and soft inputs are served combinationally from arrays
// for whatever addresses the SISO puts out, like the input buffer and the
// interleaver do. Every soft output written is compared with one pass of
// the reference model; both the ordinary pass and SISO2's last pass
// (soft input not subtracted) and SISO1's first pass (soft input ignored)
// are run. It checks that `done` comes N+6 clocks after the start pulse
// (N+5 after the first address cycle) and that exactly N/2+1 write cycles occur per pass.
module tb_siso;
  import turbo_ref_pkg::*;

  logic clk = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---- one generic harness per (N, flavour) pair, via a nested module-free
  // approach: two fixed instances at N=6 and two at N=14.
  `define SISO_HARNESS(NAME, NN, S2)                                          \
  logic NAME``_rst = 1, NAME``_start = 0, NAME``_first = 0, NAME``_last = 0;   \
  logic [$clog2(NN+2)-1:0] NAME``_addr, NAME``_addr_w;                        \
  logic [7:0] NAME``_df, NAME``_db;                                          \
  logic signed [3:0] NAME``_sif, NAME``_sib, NAME``_sof, NAME``_sob;          \
  logic NAME``_done, NAME``_write;                                           \
  int NAME``_z1 [NN+2], NAME``_z2 [NN+2], NAME``_si [NN+2], NAME``_so [NN+2];  \
  int NAME``_nw = 0, NAME``_tdone = -1, NAME``_cyc = 0;                      \
  assign NAME``_df  = {4'(NAME``_z1[NAME``_addr]), 4'(NAME``_z2[NAME``_addr])}; \
  assign NAME``_db  = {4'(NAME``_z1[NN+1-NAME``_addr]), 4'(NAME``_z2[NN+1-NAME``_addr])}; \
  assign NAME``_sif = 4'(NAME``_si[NAME``_addr]);                              \
  assign NAME``_sib = 4'(NAME``_si[NN+1-NAME``_addr]);                         \
  siso #(.N(NN), .IS_SISO2(S2)) NAME (                                       \
    .clk, .rst(NAME``_rst), .start(NAME``_start), .first_pass(NAME``_first),  \
    .last_iter(NAME``_last), .data_f(NAME``_df), .data_b(NAME``_db),          \
    .si_f(NAME``_sif), .si_b(NAME``_sib), .addr(NAME``_addr),                 \
    .addr_w(NAME``_addr_w), .so_f(NAME``_sof), .so_b(NAME``_sob),             \
    .done(NAME``_done), .write(NAME``_write));                                \
  always @(negedge clk) begin                                                \
    NAME``_cyc++;                                                            \
    if (NAME``_write) begin                                                  \
      NAME``_so[NAME``_addr_w] = int'(NAME``_sof);                           \
      NAME``_so[NN+1-NAME``_addr_w] = int'(NAME``_sob);                      \
      NAME``_nw++;                                                           \
    end                                                                      \
    if (NAME``_done) NAME``_tdone = NAME``_cyc;                               \
  end                                                                        \
  task automatic NAME``_run(bit first, bit last);                            \
    int zz1[], zz2[], ssi[], ref_so[];                                       \
    int t0;                                                                  \
    zz1 = new[NN+2]; zz2 = new[NN+2]; ssi = new[NN+2];                       \
    for (int k = 0; k < NN+2; k++) begin                                     \
      NAME``_z1[k] = int'($urandom_range(15)) - 8;                           \
      NAME``_z2[k] = int'($urandom_range(15)) - 8;                           \
      NAME``_si[k] = (k < NN) ? int'($urandom_range(15)) - 8 : 0;             \
      zz1[k] = NAME``_z1[k]; zz2[k] = NAME``_z2[k];                          \
      ssi[k] = first ? 0 : NAME``_si[k];                                     \
    end                                                                      \
    siso_pass(NN, S2, last, zz1, zz2, ssi, ref_so);                          \
    NAME``_nw = 0;                                                           \
    @(posedge clk); NAME``_first <= first; NAME``_last <= last; NAME``_start <= 1; \
    @(posedge clk); NAME``_start <= 0; NAME``_first <= 0; NAME``_last <= 0;    \
    t0 = NAME``_cyc;                                                         \
    repeat (NN + 10) @(posedge clk);                                         \
    check(NAME``_nw == NN/2 + 1, $sformatf("%s: %0d write cycles", `"NAME`", NAME``_nw)); \
    check(NAME``_tdone - t0 == NN + 6, $sformatf("%s: done after %0d", `"NAME`", NAME``_tdone - t0)); \
    for (int k = 0; k < NN+2; k++)                                           \
      check(NAME``_so[k] == ref_so[k], $sformatf("%s step %0d: dut %0d ref %0d", `"NAME`", k, NAME``_so[k], ref_so[k])); \
  endtask

  `SISO_HARNESS(s1a, 6, 1'b0)
  `SISO_HARNESS(s2a, 6, 1'b1)
  `SISO_HARNESS(s1b, 14, 1'b0)
  `SISO_HARNESS(s2b, 14, 1'b1)

  initial begin
    repeat (3) @(posedge clk);
    s1a_rst <= 0; s2a_rst <= 0; s1b_rst <= 0; s2b_rst <= 0;
    repeat (2) @(posedge clk);
    for (int r = 0; r < 6; r++) begin
      s1a_run(r == 0, 1'b0);
      s2a_run(1'b0, r[0]);
      s1b_run(r == 1, 1'b0);
      s2b_run(1'b0, r[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
