// tb_h_lane_feeder: loads 12 rows (some empty) into one feature lane,
// streams them twice (as for two W columns) under random ready, and
// compares every beat (row id, row-length, col, value, first flag) with the
// expected sequence. A third pass with ready always high must deliver one
// beat per cycle without gaps.
`timescale 1ns/1ps
module tb_h_lane_feeder;
  import hgat_pkg::*;

  localparam int LANE_NNZ = 8192, LANE_ROWS = 512, NR = 12;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_nnz_we, ld_desc_we, ld_rows_we; idx_t ld_addr; logic [31:0] ld_data;
  logic start, done, out_valid, out_ready; sp_beat_t out_beat;

  h_lane_feeder dut (.*);

  int checks = 0, failures = 0;
  sp_beat_t expq [$];
  int nbeats = 0, gaps = 0;
  bit rnd_ready = 1, counting = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) out_ready = rnd_ready ? ($urandom_range(0, 3) != 0) : 1'b1;

  always @(posedge clk) if (rst_n) begin
    if (counting && !out_valid && !done) gaps++;
    if (out_valid && out_ready) begin
      sp_beat_t e;
      checks++;
      nbeats++;
      if (expq.size() == 0) begin failures++; $display("FAIL: extra beat"); end
      else begin
        e = expq.pop_front();
        if (out_beat.first != e.first || out_beat.row_id != e.row_id || out_beat.row_len != e.row_len ||
            (e.row_len != 0 && (out_beat.col != e.col || out_beat.val != e.val))) begin
          failures++;
          $display("FAIL: beat row %0d len %0d col %0d val %0d first %0d, expected %0d %0d %0d %0d %0d",
                   out_beat.row_id, out_beat.row_len, out_beat.col, out_beat.val, out_beat.first,
                   e.row_id, e.row_len, e.col, e.val, e.first);
        end
      end
    end
  end

  task automatic ld(int which, int a, int d);
    @(negedge clk);
    ld_nnz_we = (which == 0); ld_desc_we = (which == 1); ld_rows_we = (which == 2);
    ld_addr = idx_t'(a); ld_data = 32'(d);
    @(negedge clk);
    ld_nnz_we = 0; ld_desc_we = 0; ld_rows_we = 0;
  endtask

  sp_beat_t all [$];

  initial begin
    int ptr;
    ld_nnz_we = 0; ld_desc_we = 0; ld_rows_we = 0; ld_addr = 0; ld_data = 0; start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    ptr = 0;
    for (int r = 0; r < NR; r++) begin
      int len, id;
      len = (r % 5 == 2) ? 0 : $urandom_range(1, 6);
      id  = 200 + 3 * r;
      ld(1, r, (id << 16) | len);
      if (len == 0) all.push_back('{row_id: idx_t'(id), row_len: 0, col: 0, val: 0, first: 1});
      for (int k = 0; k < len; k++) begin
        int c, v;
        c = $urandom_range(0, 999);
        v = $urandom_range(0, 65535);
        ld(0, ptr, (c << 16) | v);
        ptr++;
        all.push_back('{row_id: idx_t'(id), row_len: idx_t'(len), col: idx_t'(c), val: data_t'(v), first: (k == 0)});
      end
    end
    ld(2, 0, NR);
    for (int pass = 0; pass < 3; pass++) begin
      int t0, t1;
      rnd_ready = (pass < 2);
      foreach (all[i]) expq.push_back(all[i]);
      nbeats = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      counting = (pass == 2);
      gaps = 0;
      t0 = $time / 10;
      wait (done);
      t1 = $time / 10;
      counting = 0;
      @(negedge clk);
      checks++;
      if (expq.size() != 0 || nbeats != all.size()) begin
        failures++; $display("FAIL: pass %0d delivered %0d of %0d beats", pass, nbeats, all.size());
      end
      if (pass == 2) begin
        checks++;
        if (gaps != 0 || t1 - t0 > all.size()) begin
          failures++; $display("FAIL: %0d beats took %0d cycles, %0d gaps", all.size(), t1 - t0, gaps);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
