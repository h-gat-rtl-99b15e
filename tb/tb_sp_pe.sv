// tb_sp_pe: Sparse-PE test. Fills the weight BRAM, streams 60 random MCSR
// rows (lengths 0..9) and compares every row result, in order, with a
// reference dot product. The first 30 rows run with the output always
// accepted and must take one cycle per non-zero (one per empty row) plus
// two cycles to the result register; the rest run with random output back-pressure,
// which must stall the PE without losing or reordering results.
`timescale 1ns/1ps
module tb_sp_pe;
  import hgat_pkg::*;
  import hgat_ref_pkg::*;

  localparam int MAX_FIN = 4096;
  localparam int NROWS   = 60;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic wt_we; idx_t wt_addr; data_t wt_data;
  logic in_valid, in_ready; sp_beat_t in_beat;
  logic out_valid, out_ready; idx_t out_row; data_t out_data; logic busy;

  sp_pe dut (.*);

  int checks = 0, failures = 0;
  int w [MAX_FIN];
  int exp_val [NROWS];
  int len [NROWS];
  int cols [NROWS][10];
  int vals [NROWS][10];
  int got = 0;
  bit random_ready = 0;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // result checker
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (got >= NROWS || out_row != idx_t'(got + 100) || int'(out_data) != exp_val[got]) begin
        failures++;
        $display("FAIL: result %0d row %0d data %0d expected %0d", got, out_row, out_data,
                 (got < NROWS) ? exp_val[got] : 0);
      end
      got++;
    end
  end

  always @(negedge clk) out_ready = random_ready ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic send_row(int r);
    int n;
    n = (len[r] == 0) ? 1 : len[r];
    for (int k = 0; k < n; k++) begin
      in_valid = 1;
      in_beat.row_id  = idx_t'(r + 100);
      in_beat.row_len = idx_t'(len[r]);
      in_beat.col     = idx_t'(cols[r][k]);
      in_beat.val     = data_t'(vals[r][k]);
      in_beat.first   = (k == 0);
      do @(posedge clk); while (!in_ready);
      #1;
    end
    in_valid = 0;
  endtask

  initial begin
    int beats, t0, t1;
    wt_we = 0; wt_addr = 0; wt_data = 0; in_valid = 0; in_beat = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < MAX_FIN; i++) begin
      w[i] = rnd16(-300, 300);
      @(negedge clk); wt_we = 1; wt_addr = idx_t'(i); wt_data = data_t'(w[i]);
    end
    @(negedge clk); wt_we = 0;
    for (int r = 0; r < NROWS; r++) begin
      longint acc;
      len[r] = (r % 7 == 3) ? 0 : $urandom_range(1, 9);
      acc = 0;
      for (int k = 0; k < len[r]; k++) begin
        cols[r][k] = $urandom_range(0, MAX_FIN - 1);
        vals[r][k] = rnd16(-400, 400);
        acc += longint'(vals[r][k]) * w[cols[r][k]];
      end
      exp_val[r] = to_q88(acc);
    end
    // part 1: no back-pressure, rate check
    beats = 0;
    @(negedge clk);
    t0 = $time / 10;
    for (int r = 0; r < 30; r++) begin
      send_row(r);
      beats += (len[r] == 0) ? 1 : len[r];
    end
    wait (got == 30);
    t1 = $time / 10;
    checks++;
    if (t1 - t0 != beats + 2) begin
      failures++;
      $display("FAIL: 30 rows / %0d beats took %0d cycles, expected %0d", beats, t1 - t0, beats + 2);
    end
    // part 2: random back-pressure
    random_ready = 1;
    for (int r = 30; r < NROWS; r++) send_row(r);
    wait (got == NROWS);
    repeat (5) @(posedge clk);
    checks++;
    if (busy) begin failures++; $display("FAIL: busy after last result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
