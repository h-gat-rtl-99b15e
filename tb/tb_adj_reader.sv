// tb_adj_reader: loads a random 24-node graph in MCSR form (some nodes
// without neighbours) and random score buffers, walks it twice with
// issue_ok toggling at random, and checks the edge stream: every edge in
// order with e_m of its centre, e_n of its neighbour, the right tag and the
// last flag on each node's final neighbour; done after the last edge.
`timescale 1ns/1ps
module tb_adj_reader;
  import hgat_pkg::*;
  import hgat_ref_pkg::*;

  localparam int MAX_NODES = 4096, MAX_EDGES = 16384, N = 24;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_len_we, ld_col_we; idx_t ld_addr, ld_data;
  logic e_we; idx_t e_node; data_t e_m_in, e_n_in;
  logic start; idx_t n_nodes; logic issue_ok, done;
  logic out_valid; data_t out_em, out_en; edge_tag_t out_tag;

  adj_reader dut (.*);

  int checks = 0, failures = 0;
  int em [N], en [N];
  typedef struct { int m; int n; bit last; } ed_t;
  ed_t edges [$];
  ed_t expq [$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && out_valid) begin
    ed_t e;
    checks++;
    if (expq.size() == 0) begin failures++; $display("FAIL: extra edge"); end
    else begin
      e = expq.pop_front();
      if (int'(out_tag.m) != e.m || int'(out_tag.n) != e.n || out_tag.last != e.last ||
          int'(out_em) != em[e.m] || int'(out_en) != en[e.n]) begin
        failures++;
        $display("FAIL: edge %0d->%0d last %0d em %0d en %0d", out_tag.m, out_tag.n, out_tag.last, out_em, out_en);
      end
    end
  end

  always @(negedge clk) issue_ok = ($urandom_range(0, 2) != 0);

  initial begin
    int ptr;
    ld_len_we = 0; ld_col_we = 0; ld_addr = 0; ld_data = 0;
    e_we = 0; e_node = 0; e_m_in = 0; e_n_in = 0; start = 0; n_nodes = N;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ptr = 0;
    for (int m = 0; m < N; m++) begin
      int d;
      d = (m % 6 == 1) ? 0 : $urandom_range(1, 4);
      @(negedge clk); ld_len_we = 1; ld_addr = idx_t'(m); ld_data = idx_t'(d);
      @(negedge clk); ld_len_we = 0;
      for (int k = 0; k < d; k++) begin
        int n;
        n = $urandom_range(0, N - 1);
        edges.push_back('{m: m, n: n, last: (k == d - 1)});
        @(negedge clk); ld_col_we = 1; ld_addr = idx_t'(ptr); ld_data = idx_t'(n);
        @(negedge clk); ld_col_we = 0;
        ptr++;
      end
      em[m] = rnd16(-5000, 5000); en[m] = rnd16(-5000, 5000);
      @(negedge clk); e_we = 1; e_node = idx_t'(m); e_m_in = data_t'(em[m]); e_n_in = data_t'(en[m]);
      @(negedge clk); e_we = 0;
    end
    for (int pass = 0; pass < 2; pass++) begin
      foreach (edges[i]) expq.push_back(edges[i]);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      wait (done);
      checks++;
      if (expq.size() != 0) begin failures++; $display("FAIL: %0d edges missing at done", expq.size()); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
