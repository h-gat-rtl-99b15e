// tb_softmax_unit: sends 120 neighbourhoods of random size (1 to the
// largest allowed, DEPTH - SLACK) with random scores, one edge per cycle
// whenever in_ready allows, and checks every alpha = (2^z << 8) / sum 2^z
// (base-2, shift-and-mantissa power, integer division) with its tag, in
// order. Checks that the credit stall happened and that the unit keeps up
// one edge per cycle: the run may only exceed the edge count by the
// cycles spent stalled, the drain of the last neighbourhood (at most
// DEPTH) and the pipeline latency.
`timescale 1ns/1ps
module tb_softmax_unit;
  import hgat_pkg::*;
  import hgat_ref_pkg::*;

  localparam int DEPTH = 256, SLACK = 8, NG = 120;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready; data_t z; edge_tag_t in_tag;
  logic out_valid; data_t alpha; edge_tag_t out_tag; logic idle, stalled;

  softmax_unit dut (.*);

  int checks = 0, failures = 0, nstall = 0, nedges = 0;
  typedef struct { int m; int n; bit last; int a; } ex_t;
  ex_t expq [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (stalled) nstall++;
    if (out_valid) begin
      ex_t e;
      checks++;
      if (expq.size() == 0) begin failures++; $display("FAIL: extra output"); end
      else begin
        e = expq.pop_front();
        if (int'(alpha) != e.a || int'(out_tag.m) != e.m || int'(out_tag.n) != e.n || out_tag.last != e.last) begin
          failures++;
          $display("FAIL: m %0d n %0d alpha %0d expected %0d", out_tag.m, out_tag.n, alpha, e.a);
        end
      end
    end
  end

  initial begin
    int t0, t1;
    in_valid = 0; z = 0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    t0 = $time / 10;
    for (int g = 0; g < NG; g++) begin
      int sz;
      int zs [$];
      longint sum;
      zs.delete();
      sz = (g % 10 == 0) ? DEPTH - SLACK : $urandom_range(1, 6);
      sum = 0;
      for (int k = 0; k < sz; k++) begin
        zs.push_back((g % 7 == 3) ? rnd16(-32768, 32767) : rnd16(-1500, 1500));
        sum += pow2(zs[k]);
      end
      for (int k = 0; k < sz; k++)
        expq.push_back('{m: g, n: k, last: (k == sz - 1), a: int'((pow2(zs[k]) * 256) / sum)});
      for (int k = 0; k < sz; k++) begin
        while (!in_ready) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; z = data_t'(zs[k]);
        in_tag = '{m: idx_t'(g), n: idx_t'(k), last: (k == sz - 1)};
        nedges++;
        @(negedge clk);
      end
    end
    in_valid = 0;
    wait (expq.size() == 0);
    t1 = $time / 10;
    repeat (3) @(posedge clk);
    checks++;
    if (!idle) begin failures++; $display("FAIL: not idle at the end"); end
    checks++;
    if (nstall == 0) begin failures++; $display("FAIL: credit stall never happened"); end
    checks++;
    if (t1 - t0 > nedges + nstall + DEPTH + 16) begin
      failures++; $display("FAIL: %0d edges took %0d cycles (%0d stalled)", nedges, t1 - t0, nstall);
    end
    $display("  %0d edges, %0d cycles, %0d stalled", nedges, t1 - t0, nstall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
