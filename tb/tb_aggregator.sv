// tb_aggregator: writes a random h° buffer element by element, checks read
// port B, then streams 40 neighbourhoods of (alpha, neighbour) edges and
// checks every output row relu(sat((sum alpha * h°_n) >> 8)) with its node
// id. Counts rows where relu clipped something.
`timescale 1ns/1ps
module tb_aggregator;
  import hgat_pkg::*;
  import hgat_ref_pkg::*;

  localparam int MAX_NODES = 4096, HID = 8, NG = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wr_en; idx_t wr_row, wr_col; data_t wr_data;
  idx_t rd_row; data_t rd_data [HID];
  logic in_valid; data_t alpha; edge_tag_t in_tag;
  logic out_valid; idx_t out_node; data_t out_row [HID]; logic idle, clipped;

  aggregator dut (.*);

  int checks = 0, failures = 0, nclip = 0;
  int hb [MAX_NODES][HID];
  typedef struct { int m; int r [HID]; } ex_t;
  ex_t expq [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    ex_t e;
    checks++;
    if (clipped) nclip++;
    if (expq.size() == 0) begin failures++; $display("FAIL: extra row"); end
    else begin
      e = expq.pop_front();
      if (int'(out_node) != e.m) begin failures++; $display("FAIL: node %0d expected %0d", out_node, e.m); end
      for (int j = 0; j < HID; j++)
        if (int'(out_row[j]) != e.r[j]) begin
          failures++; $display("FAIL: node %0d [%0d] = %0d expected %0d", e.m, j, out_row[j], e.r[j]);
        end
    end
  end

  initial begin
    wr_en = 0; wr_row = 0; wr_col = 0; wr_data = 0; rd_row = 0;
    in_valid = 0; alpha = 0; in_tag = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < MAX_NODES; n++)
      for (int j = 0; j < HID; j++) begin
        hb[n][j] = rnd16(-8000, 8000);
        @(negedge clk); wr_en = 1; wr_row = idx_t'(n); wr_col = idx_t'(j); wr_data = data_t'(hb[n][j]);
      end
    @(negedge clk); wr_en = 0;
    for (int n = 0; n < MAX_NODES; n++) begin
      rd_row = idx_t'(n);
      @(negedge clk);
      for (int j = 0; j < HID; j++) begin
        checks++;
        if (int'(rd_data[j]) != hb[n][j]) begin failures++; $display("FAIL: port B row %0d", n); end
      end
    end
    for (int g = 0; g < NG; g++) begin
      int sz, m;
      int al [$];
      int nb [$];
      longint acc [HID];
      ex_t e;
      al.delete();
      nb.delete();
      sz = $urandom_range(1, 6);
      m = $urandom_range(0, MAX_NODES - 1);
      for (int j = 0; j < HID; j++) acc[j] = 0;
      for (int k = 0; k < sz; k++) begin
        al.push_back($urandom_range(0, 256));
        nb.push_back($urandom_range(0, MAX_NODES - 1));
        for (int j = 0; j < HID; j++) acc[j] += longint'(al[k]) * hb[nb[k]][j];
      end
      e.m = m;
      for (int j = 0; j < HID; j++) begin
        int v;
        v = to_q88(acc[j]);
        e.r[j] = (v < 0) ? 0 : v;
      end
      expq.push_back(e);
      for (int k = 0; k < sz; k++) begin
        in_valid = 1; alpha = data_t'(al[k]);
        in_tag = '{m: idx_t'(m), n: idx_t'(nb[k]), last: (k == sz - 1)};
        @(negedge clk);
        if ($urandom_range(0, 3) == 0) begin in_valid = 0; @(negedge clk); end
      end
    end
    in_valid = 0;
    wait (expq.size() == 0);
    repeat (3) @(posedge clk);
    checks++;
    if (!idle || nclip == 0) begin failures++; $display("FAIL: idle %0d, clipped rows %0d", idle, nclip); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
