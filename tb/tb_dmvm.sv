// tb_dmvm: streams 100 random h° rows (one per cycle) with fixed a1/a2 and
// checks e_m = a1 . row and e_n = a2 . row for every node, in order, with a
// latency of 2 + log2(HID) cycles.
`timescale 1ns/1ps
module tb_dmvm;
  import hgat_pkg::*;
  import hgat_ref_pkg::*;

  localparam int HID = 8, LAT = 5, NV = 100;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic in_valid; idx_t in_node; data_t row [HID]; data_t a1_vec [HID]; data_t a2_vec [HID];
  logic out_valid; idx_t out_node; data_t e_m, e_n;

  dmvm dut (.*);

  int checks = 0, failures = 0, got = 0, cyc = 0;
  int em [NV], en [NV], sent [NV];
  always @(posedge clk) cyc++;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    checks++;
    if (out_node != idx_t'(got + 7) || int'(e_m) != em[got] || int'(e_n) != en[got] || cyc - sent[got] != LAT + 1) begin
      failures++;
      $display("FAIL: node %0d e_m %0d/%0d e_n %0d/%0d", out_node, e_m, em[got], e_n, en[got]);
    end
    got++;
  end

  initial begin
    in_valid = 0; in_node = 0;
    for (int j = 0; j < HID; j++) begin
      row[j] = 0;
      a1_vec[j] = data_t'(rnd16(-300, 300));
      a2_vec[j] = data_t'(rnd16(-300, 300));
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < NV; v++) begin
      longint s1, s2;
      @(negedge clk);
      s1 = 0; s2 = 0;
      for (int j = 0; j < HID; j++) begin
        row[j] = data_t'(rnd16(-3000, 3000));
        s1 += longint'(row[j]) * a1_vec[j];
        s2 += longint'(row[j]) * a2_vec[j];
      end
      em[v] = to_q88(s1); en[v] = to_q88(s2);
      in_valid = 1; in_node = idx_t'(v + 7);
      sent[v] = cyc;
    end
    @(negedge clk); in_valid = 0;
    repeat (LAT + 3) @(posedge clk);
    checks++;
    if (got != NV) begin failures++; $display("FAIL: %0d of %0d", got, NV); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
