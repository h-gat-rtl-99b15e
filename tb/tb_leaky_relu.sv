// tb_leaky_relu: 500 random (e_m, e_n) pairs, including sums that saturate,
// checked against leakyrelu(sat(e_m + e_n)) with slope 51/256 one cycle
// later, with the tag and the negative-branch flag.
`timescale 1ns/1ps
module tb_leaky_relu;
  import hgat_pkg::*;
  import hgat_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid; data_t e_m, e_n; edge_tag_t in_tag;
  logic out_valid; data_t z; edge_tag_t out_tag; logic neg;

  leaky_relu dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; e_m = 0; e_n = 0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < 500; v++) begin
      int a, b, ez;
      a = (v < 50) ? rnd16(-32768, 32767) : rnd16(-3000, 3000);
      b = (v < 50) ? rnd16(-32768, 32767) : rnd16(-3000, 3000);
      ez = lrelu(a, b);
      @(negedge clk);
      in_valid = 1; e_m = data_t'(a); e_n = data_t'(b);
      in_tag = '{m: idx_t'(v), n: idx_t'(v + 1), last: v[0]};
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!out_valid || int'(z) != ez || out_tag.m != idx_t'(v) || out_tag.n != idx_t'(v + 1) ||
          out_tag.last != v[0] || neg != (sat(longint'(a) + b) < 0)) begin
        failures++;
        $display("FAIL: %0d + %0d -> %0d, expected %0d", a, b, z, ez);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
