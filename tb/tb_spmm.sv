// tb_spmm: the default sixteen Sparse-PEs behind the round-robin collector. Broadcasts a
// weight column, then drives sixteen independent lanes of random rows (short
// rows, so PEs often finish together and must wait for the collector) and
// checks that every row id comes out exactly once with the right value and
// that busy falls after the last result. Counts collector conflicts.
`timescale 1ns/1ps
module tb_spmm;
  import hgat_pkg::*;
  import hgat_ref_pkg::*;

  localparam int NUM_SP = 16, MAX_FIN = 4096, RPL = 25;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wt_we; idx_t wt_addr; data_t wt_data;
  logic in_valid [NUM_SP]; logic in_ready [NUM_SP]; sp_beat_t in_beat [NUM_SP];
  logic res_valid; idx_t res_row; data_t res_data; logic busy;

  spmm dut (.*);

  int checks = 0, failures = 0, conflicts = 0;
  int w [MAX_FIN];
  int expv [int];
  int seen [int];
  sp_beat_t lanes [NUM_SP][$];

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    int nv;
    nv = 0;
    for (int p = 0; p < NUM_SP; p++) nv += dut.pe_valid[p];
    if (nv > 1) conflicts++;
    if (res_valid) begin
      checks++;
      if (!expv.exists(int'(res_row)) || seen.exists(int'(res_row)) || expv[int'(res_row)] != int'(res_data)) begin
        failures++;
        $display("FAIL: row %0d value %0d", res_row, res_data);
      end
      seen[int'(res_row)] = 1;
    end
  end

  // lane drivers
  for (genvar p = 0; p < NUM_SP; p++) begin : g_drv
    initial begin
      in_valid[p] = 0; in_beat[p] = '0;
      wait (lanes[p].size() != 0);
      while (lanes[p].size() != 0) begin
        @(negedge clk);
        in_valid[p] = 1;
        in_beat[p]  = lanes[p][0];
        @(posedge clk);
        while (!in_ready[p]) @(posedge clk);
        void'(lanes[p].pop_front());
      end
      @(negedge clk);
      in_valid[p] = 0;
    end
  end

  initial begin
    wt_we = 0; wt_addr = 0; wt_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < MAX_FIN; i++) begin
      w[i] = rnd16(-500, 500);
      @(negedge clk); wt_we = 1; wt_addr = idx_t'(i); wt_data = data_t'(w[i]);
    end
    @(negedge clk); wt_we = 0;
    for (int p = 0; p < NUM_SP; p++)
      for (int r = 0; r < RPL; r++) begin
        int id, len;
        longint acc;
        id = 1000 + p * 100 + r;
        len = (r % 9 == 4) ? 0 : $urandom_range(1, 3);
        acc = 0;
        if (len == 0) lanes[p].push_back('{row_id: idx_t'(id), row_len: 0, col: 0, val: 0, first: 1});
        for (int k = 0; k < len; k++) begin
          int c, v;
          c = $urandom_range(0, MAX_FIN - 1);
          v = rnd16(-500, 500);
          acc += longint'(v) * w[c];
          lanes[p].push_back('{row_id: idx_t'(id), row_len: idx_t'(len), col: idx_t'(c), val: data_t'(v), first: (k == 0)});
        end
        expv[id] = to_q88(acc);
      end
    wait (seen.size() == NUM_SP * RPL);
    repeat (3) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL: busy stays high"); end
    checks++;
    if (conflicts == 0) begin failures++; $display("FAIL: no collector conflict exercised"); end
    $display("  collector conflicts: %0d", conflicts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
