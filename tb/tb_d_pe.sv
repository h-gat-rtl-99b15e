// tb_d_pe: feeds 200 random vector pairs into a Dense-PE, one per cycle
// with random idle cycles, and checks every dot product (Q8.8, saturated)
// with its tag, and that it appears exactly 2 + log2(N) cycles later.
`timescale 1ns/1ps
module tb_d_pe;
  import hgat_pkg::*;
  import hgat_ref_pkg::*;

  localparam int N = 8, LAT = 5, NV = 200;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid; idx_t in_tag; data_t x [N]; data_t w [N];
  logic out_valid; idx_t out_tag; data_t y;

  d_pe dut (.*);

  int checks = 0, failures = 0, got = 0;
  int expv [NV];
  int sent_at [NV];
  // cyc counts clock edges; a result LAT edges after the sampling edge is
  // seen by the checker LAT + 1 counts after the value recorded at drive time
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_tag != idx_t'(got) || int'(y) != expv[got] || cyc - sent_at[got] != LAT + 1) begin
      failures++;
      $display("FAIL: tag %0d y %0d (exp %0d) after %0d cycles", out_tag, y, expv[got], cyc - sent_at[got]);
    end
    got++;
  end

  initial begin
    in_valid = 0; in_tag = 0;
    for (int j = 0; j < N; j++) begin x[j] = 0; w[j] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      longint acc;
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      acc = 0;
      for (int j = 0; j < N; j++) begin
        int a, b;
        a = (v < 20) ? 32767 - $urandom_range(0, 10) : rnd16(-2000, 2000);
        b = (v < 20) ? 32767 : rnd16(-2000, 2000);
        x[j] = data_t'(a); w[j] = data_t'(b);
        acc += longint'(a) * b;
      end
      expv[v] = to_q88(acc);
      in_valid = 1; in_tag = idx_t'(v);
      sent_at[v] = cyc;
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (got != NV) begin failures++; $display("FAIL: %0d results of %0d", got, NV); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
