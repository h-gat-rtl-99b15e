// tb_af_unit: drives (e_m, e_n) pairs for 80 neighbourhoods through the
// activation-function unit and checks each alpha against the reference
// chain leakyrelu -> base-2 power -> sum -> division, in order, with tags.
// Counts the negative leakyrelu branch.
`timescale 1ns/1ps
module tb_af_unit;
  import hgat_pkg::*;
  import hgat_ref_pkg::*;

  localparam int SM_DEPTH = 256, NG = 80;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid, in_ready; data_t e_m, e_n; edge_tag_t in_tag;
  logic out_valid; data_t alpha; edge_tag_t out_tag; logic idle, stalled, neg;

  af_unit dut (.*);

  int checks = 0, failures = 0, nneg = 0;
  typedef struct { int m; int n; bit last; int a; } ex_t;
  ex_t expq [$];

  initial begin
    repeat (50000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (neg) nneg++;
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
    in_valid = 0; e_m = 0; e_n = 0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int g = 0; g < NG; g++) begin
      int sz, cm;
      int cn [$];
      longint p [$];
      longint sum;
      cn.delete();
      p.delete();
      sz = $urandom_range(1, 20);
      cm = rnd16(-1500, 1500);
      sum = 0;
      for (int k = 0; k < sz; k++) begin
        cn.push_back(rnd16(-1500, 1500));
        p.push_back(pow2(lrelu(cm, cn[k])));
        sum += p[k];
      end
      for (int k = 0; k < sz; k++)
        expq.push_back('{m: g, n: k, last: (k == sz - 1), a: int'((p[k] * 256) / sum)});
      for (int k = 0; k < sz; k++) begin
        while (!in_ready) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; e_m = data_t'(cm); e_n = data_t'(cn[k]);
        in_tag = '{m: idx_t'(g), n: idx_t'(k), last: (k == sz - 1)};
        @(negedge clk);
      end
    end
    in_valid = 0;
    wait (expq.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (!idle || nneg == 0) begin failures++; $display("FAIL: idle %0d, negative branch %0d times", idle, nneg); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
