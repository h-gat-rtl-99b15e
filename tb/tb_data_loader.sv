// tb_data_loader: fills W, a and one feature lane through the host port,
// then checks (1) the broadcast of W column 5 for f_in = 20: addresses
// 0..19 in order, one per cycle, the right words, bcast_done once right
// after the last word; (2) a1/a2 of both heads; (3) the lane stream of
// lane 2 after lanes_start and lanes_done with the other lanes empty.
// All sizes are the module defaults (16 lanes, W of 4096 x 16 words).
`timescale 1ns/1ps
module tb_data_loader;
  import hgat_pkg::*;
  import hgat_ref_pkg::*;

  localparam int NUM_SP = 16, MAX_FIN = 4096, HID = 8, HEADS = 2;
  localparam int LANE_NNZ = 8192, LANE_ROWS = 512, FIN = 20, COL = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ld_valid; ld_sel_e ld_sel; idx_t ld_lane; logic [31:0] ld_addr, ld_data;
  logic lanes_start, lanes_done;
  logic lane_valid [NUM_SP]; logic lane_ready [NUM_SP]; sp_beat_t lane_beat [NUM_SP];
  logic bcast_start; idx_t bcast_col, f_in; logic bcast_done;
  logic wt_we; idx_t wt_addr; data_t wt_data;
  idx_t head; data_t a1_vec [HID]; data_t a2_vec [HID];

  data_loader dut (.*);

  int checks = 0, failures = 0;
  int w [MAX_FIN][HEADS*HID];
  int a [2*HEADS*HID];
  int nwr = 0, ndone = 0, last_wr_cyc = -10, done_cyc = -1, cyc = 0;
  sp_beat_t expq [$];

  always @(posedge clk) cyc++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (wt_we) begin
      checks++;
      if (wt_addr != idx_t'(nwr) || int'(wt_data) != w[nwr][COL] || (nwr > 0 && last_wr_cyc != cyc - 1)) begin
        failures++; $display("FAIL: broadcast word %0d addr %0d data %0d", nwr, wt_addr, wt_data);
      end
      nwr++;
      last_wr_cyc = cyc;
    end
    if (bcast_done) begin ndone++; done_cyc = cyc; end
    for (int p = 0; p < NUM_SP; p++) begin
      if (lane_valid[p] && lane_ready[p]) begin
        sp_beat_t e;
        checks++;
        if (p != 2 || expq.size() == 0) begin failures++; $display("FAIL: beat on lane %0d", p); end
        else begin
          e = expq.pop_front();
          if (lane_beat[p] != e) begin failures++; $display("FAIL: lane beat mismatch"); end
        end
      end
    end
  end

  task automatic ld(ld_sel_e s, int lane, int ad, int d);
    @(negedge clk);
    ld_valid = 1; ld_sel = s; ld_lane = idx_t'(lane); ld_addr = 32'(ad); ld_data = 32'(d);
    @(negedge clk);
    ld_valid = 0;
  endtask

  initial begin
    ld_valid = 0; ld_sel = LD_W; ld_lane = 0; ld_addr = 0; ld_data = 0;
    lanes_start = 0; bcast_start = 0; bcast_col = 0; f_in = 0; head = 0;
    for (int p = 0; p < NUM_SP; p++) lane_ready[p] = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < MAX_FIN; c++)
      for (int k = 0; k < HEADS * HID; k++) begin
        w[c][k] = rnd16(-32768, 32767);
        ld(LD_W, 0, k * MAX_FIN + c, w[c][k] & 16'hffff);
      end
    for (int i = 0; i < 2 * HEADS * HID; i++) begin
      a[i] = rnd16(-1000, 1000);
      ld(LD_A, 0, i, a[i] & 16'hffff);
    end
    // (1) broadcast
    @(negedge clk); bcast_start = 1; bcast_col = COL; f_in = FIN;
    @(negedge clk); bcast_start = 0;
    repeat (FIN + 6) @(posedge clk);
    checks++;
    if (nwr != FIN || ndone != 1 || done_cyc != last_wr_cyc + 1) begin
      failures++; $display("FAIL: %0d words, %0d done pulses, done at %0d, last word at %0d", nwr, ndone, done_cyc, last_wr_cyc);
    end
    // (2) attention vectors
    for (int h = 0; h < HEADS; h++) begin
      @(negedge clk); head = idx_t'(h);
      #1;
      for (int j = 0; j < HID; j++) begin
        checks++;
        if (int'(a1_vec[j]) != a[h*HID + j] || int'(a2_vec[j]) != a[HEADS*HID + h*HID + j]) begin
          failures++; $display("FAIL: a vectors head %0d j %0d", h, j);
        end
      end
    end
    // (3) lane 2: three rows, every other lane empty
    begin
      int ptr;
      ptr = 0;
      for (int r = 0; r < 3; r++) begin
        int len;
        len = r + 1;
        ld(LD_H_DESC, 2, r, ((50 + r) << 16) | len);
        for (int k = 0; k < len; k++) begin
          int c, v;
          c = $urandom_range(0, FIN - 1); v = $urandom_range(0, 65535);
          ld(LD_H_NNZ, 2, ptr, (c << 16) | v);
          ptr++;
          expq.push_back('{row_id: idx_t'(50 + r), row_len: idx_t'(len), col: idx_t'(c), val: data_t'(v), first: (k == 0)});
        end
      end
      ld(LD_H_ROWS, 2, 0, 3);
      for (int p = 0; p < NUM_SP; p++) if (p != 2) ld(LD_H_ROWS, p, 0, 0);
    end
    @(negedge clk); lanes_start = 1;
    @(negedge clk); lanes_start = 0;
    wait (lanes_done);
    repeat (2) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL: %0d lane beats missing", expq.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
