// tb_hgat_top: end-to-end test of one GAT layer on hgat_top at its default
// parameters.
//
// The testbench plays host and DDR. It generates a random graph (self-loops
// on every node, one hub node whose neighbourhood nearly fills the softmax
// FIFO), a random sparse feature matrix with some empty rows, weights and
// attention vectors; it runs the load-balancing preprocessing in software
// (row n to lane n mod NUM_SP, rows of a lane concatenated, lanes then
// padded with zero values to equal length), loads every buffer, starts the layer and
// captures the rows written to DDR. A bit-exact reference model, written
// here from the arithmetic definitions (no RTL functions), gives the
// expected h' for every node and output feature.
//
// Besides the values it checks the layer's cycle count against a bound
// built from one non-zero / node / edge per cycle, and counts how often
// each mechanism happened: back-to-back rows in a lane, empty feature rows,
// zero padding, two PEs finishing in the same cycle, softmax credit stall,
// negative leakyrelu branch, relu clipping, W column broadcasts, second
// head. A mechanism that never happened is a failure.
`timescale 1ns/1ps
module tb_hgat_top;
  import hgat_pkg::*;

  // defaults of hgat_top, repeated for the reference model
  localparam int NUM_SP   = 16;
  localparam int HID      = 8;
  localparam int MAX_FIN  = 4096;
  localparam int SM_DEPTH = 256;

  // layer under test
  localparam int N      = 300;
  localparam int FIN    = 40;
  localparam int FHEAD  = 6;
  localparam int NHEADS = 2;
  localparam int HUBDEG = SM_DEPTH - 8;   // largest neighbourhood allowed
  localparam int NCOLS  = FHEAD * NHEADS;
  localparam int OUT_BASE = 1000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        ld_valid;
  ld_sel_e     ld_sel;
  idx_t        ld_lane;
  logic [31:0] ld_addr, ld_data;
  logic        start, busy, done;
  logic        ddr_we;
  logic [31:0] ddr_addr;
  data_t       ddr_data [HID];
  logic [HID-1:0] ddr_mask;

  hgat_top dut (
    .clk, .rst_n,
    .ld_valid, .ld_sel, .ld_lane, .ld_addr, .ld_data,
    .cfg_n_nodes(idx_t'(N)), .cfg_f_in(idx_t'(FIN)), .cfg_f_head(idx_t'(FHEAD)),
    .cfg_n_heads(idx_t'(NHEADS)), .cfg_out_base(32'(OUT_BASE)),
    .start, .busy, .done,
    .ddr_we, .ddr_addr, .ddr_data, .ddr_mask
  );

  int checks = 0, failures = 0;
  int ev_b2b = 0, ev_empty = 0, ev_collide = 0, ev_stall = 0, ev_neg = 0;
  int ev_clip = 0, ev_bcast = 0, ev_head2 = 0, lane_wait = 0;

  // ---- graph and data -----------------------------------------------------
  int    hcnt [N];            // non-zeros per feature row
  int    hcol [N][FIN];
  int    hval [N][FIN];
  int    wmat [FIN][NCOLS];
  int    a1 [NHEADS][HID];
  int    a2 [NHEADS][HID];
  int    deg [N];
  int    nbr [N][$];
  int    n_edges;

  // lanes after preprocessing
  int    lane_rows [NUM_SP][$];
  int    lane_len  [NUM_SP][$];
  int    lane_col  [NUM_SP][$];
  int    lane_val  [NUM_SP][$];
  int    pad_count = 0;

  // DDR model: word-addressed result memory
  int    ddr_mem [int];

  // reference
  int    hs   [N][NCOLS];     // h° (Q8.8)
  int    expv [N][NCOLS];

  function automatic int sat(longint x);
    if (x > 32767) return 32767;
    if (x < -32768) return -32768;
    return int'(x);
  endfunction

  // 32-bit wrapping accumulator to Q8.8
  function automatic int to_q88(longint acc);
    int a32;
    a32 = int'(acc);                    // wrap to 32 bits
    return sat(longint'(a32) >>> 8);
  endfunction

  function automatic int floordiv256(int x);
    return (x >= 0) ? x / 256 : -((-x + 255) / 256);
  endfunction

  // 2^z approximated as (1 + frac) * 2^int, Q16.16
  function automatic longint ref_pow2(int z);
    int i, f;
    longint mant;
    i = floordiv256(z);
    f = z - i * 256;
    if (i > 14)  begin i = 14; f = 255; end
    if (i < -16) begin i = -16; f = 0; end
    mant = 256 + f;
    if (i + 8 >= 0) return mant * (longint'(1) << (i + 8));
    else            return mant / (longint'(1) << (-(i + 8)));
  endfunction

  function automatic int ref_lrelu(int em, int en);
    int s;
    longint p;
    s = sat(longint'(em) + en);
    if (s >= 0) return s;
    p = longint'(s) * 51;
    return sat(p >= 0 ? p / 256 : -((-p + 255) / 256));
  endfunction

  task automatic build_graph();
    for (int n = 0; n < N; n++) begin
      nbr[n].delete();
      nbr[n].push_back(n);                       // self-loop
    end
    // hub: node 5 sees nodes 0.. until HUBDEG neighbours
    for (int n = 0; n < N && nbr[5].size() < HUBDEG; n++)
      if (n != 5) nbr[5].push_back(n);
    for (int n = 0; n < N; n++) begin
      int extra;
      if (n == 5) continue;
      extra = $urandom_range(0, 4);
      for (int e = 0; e < extra; e++) begin
        int t;
        t = $urandom_range(0, N - 1);
        if (t != n) nbr[n].push_back(t);
      end
    end
    n_edges = 0;
    for (int n = 0; n < N; n++) begin
      deg[n] = nbr[n].size();
      n_edges += deg[n];
    end
    // sparse features, about 20 % dense; every 13th row empty
    for (int n = 0; n < N; n++) begin
      hcnt[n] = 0;
      if (n % 13 == 7) continue;
      for (int c = 0; c < FIN; c++)
        if ($urandom_range(0, 99) < 20) begin
          hcol[n][hcnt[n]] = c;
          hval[n][hcnt[n]] = $urandom_range(0, 511) - 256;     // +-1.0
          hcnt[n]++;
        end
    end
    for (int c = 0; c < FIN; c++)
      for (int k = 0; k < NCOLS; k++) wmat[c][k] = $urandom_range(0, 255) - 128;
    for (int h = 0; h < NHEADS; h++)
      for (int j = 0; j < HID; j++) begin
        a1[h][j] = (j < FHEAD) ? $urandom_range(0, 511) - 256 : 0;
        a2[h][j] = (j < FHEAD) ? $urandom_range(0, 511) - 256 : 0;
      end
  endtask

  // Software preprocessing: row n goes to lane n mod NUM_SP and the rows of a
  // lane are concatenated; lanes are then padded with zero values at the end
  // of their last row to the same non-zero count.
  task automatic schedule();
    int maxl;
    for (int n = 0; n < N; n++) begin
      int lane;
      lane = n % NUM_SP;
      lane_rows[lane].push_back(n);
      lane_len[lane].push_back(hcnt[n]);
      for (int k = 0; k < hcnt[n]; k++) begin
        lane_col[lane].push_back(hcol[n][k]);
        lane_val[lane].push_back(hval[n][k]);
      end
    end
    maxl = 0;
    for (int p = 0; p < NUM_SP; p++) if (lane_col[p].size() > maxl) maxl = lane_col[p].size();
    for (int p = 0; p < NUM_SP; p++) begin
      int last;
      if (lane_rows[p].size() == 0) continue;
      last = lane_len[p].size() - 1;
      while (lane_col[p].size() < maxl) begin
        lane_col[p].push_back(0);
        lane_val[p].push_back(0);
        lane_len[p][last] = lane_len[p][last] + 1;
        pad_count++;
      end
    end
  endtask

  task automatic reference();
    for (int n = 0; n < N; n++)
      for (int k = 0; k < NCOLS; k++) begin
        longint acc;
        acc = 0;
        for (int e = 0; e < hcnt[n]; e++) acc += longint'(hval[n][e]) * wmat[hcol[n][e]][k];
        hs[n][k] = to_q88(acc);
      end
    for (int h = 0; h < NHEADS; h++) begin
      int em [N];
      int en [N];
      for (int n = 0; n < N; n++) begin
        longint s1, s2;
        s1 = 0; s2 = 0;
        for (int j = 0; j < FHEAD; j++) begin
          s1 += longint'(a1[h][j]) * hs[n][h*FHEAD + j];
          s2 += longint'(a2[h][j]) * hs[n][h*FHEAD + j];
        end
        em[n] = to_q88(s1);
        en[n] = to_q88(s2);
      end
      for (int m = 0; m < N; m++) begin
        longint p [$];
        longint sum;
        longint acc [FHEAD];
        sum = 0;
        foreach (nbr[m][k]) begin
          p.push_back(ref_pow2(ref_lrelu(em[m], en[nbr[m][k]])));
          sum += p[k];
        end
        for (int j = 0; j < FHEAD; j++) acc[j] = 0;
        foreach (nbr[m][k]) begin
          longint al;
          al = (p[k] * 256) / sum;
          for (int j = 0; j < FHEAD; j++) acc[j] += al * hs[nbr[m][k]][h*FHEAD + j];
        end
        for (int j = 0; j < FHEAD; j++) begin
          int v;
          v = to_q88(acc[j]);
          expv[m][h*FHEAD + j] = (v < 0) ? 0 : v;
          if (v < 0) ev_clip++;            // this output must come out clipped
        end
      end
    end
  endtask

  task automatic load(ld_sel_e sel, int lane, int addr, int data);
    @(negedge clk);
    ld_valid = 1'b1;
    ld_sel   = sel;
    ld_lane  = idx_t'(lane);
    ld_addr  = 32'(addr);
    ld_data  = 32'(data);
    @(negedge clk);
    ld_valid = 1'b0;
  endtask

  task automatic load_all();
    int ptr;
    for (int p = 0; p < NUM_SP; p++) begin
      foreach (lane_col[p][k])
        load(LD_H_NNZ, p, k, (lane_col[p][k] << 16) | (lane_val[p][k] & 16'hffff));
      foreach (lane_rows[p][r])
        load(LD_H_DESC, p, r, (lane_rows[p][r] << 16) | lane_len[p][r]);
      load(LD_H_ROWS, p, 0, lane_rows[p].size());
    end
    for (int c = 0; c < FIN; c++)
      for (int k = 0; k < NCOLS; k++) load(LD_W, 0, k * MAX_FIN + c, wmat[c][k] & 16'hffff);
    for (int h = 0; h < NHEADS; h++)
      for (int j = 0; j < HID; j++) begin
        load(LD_A, 0, h * HID + j, a1[h][j] & 16'hffff);
        load(LD_A, 0, NHEADS * HID + h * HID + j, a2[h][j] & 16'hffff);
      end
    ptr = 0;
    for (int n = 0; n < N; n++) begin
      load(LD_ADJ_LEN, 0, n, deg[n]);
      foreach (nbr[n][k]) begin
        load(LD_ADJ_COL, 0, ptr, nbr[n][k]);
        ptr++;
      end
    end
  endtask

  // ---- DDR write capture ---------------------------------------------------
  int row_writes = 0;
  always @(posedge clk) begin
    if (rst_n && ddr_we) begin
      row_writes++;
      for (int j = 0; j < HID; j++)
        if (ddr_mask[j]) ddr_mem[int'(ddr_addr) + j] = int'(ddr_data[j]);
    end
  end

  // ---- mechanism counters -------------------------------------------------------
  logic [NUM_SP-1:0] prev_last;
  int tb_len [NUM_SP];
  int tb_cnt [NUM_SP];
  always @(posedge clk) if (rst_n) begin
    int nv;
    nv = 0;
    for (int p = 0; p < NUM_SP; p++) begin
      if (dut.lane_valid[p] && dut.lane_ready[p]) begin
        if (dut.lane_beat[p].first && prev_last[p]) ev_b2b++;
        if (dut.lane_beat[p].first && dut.lane_beat[p].row_len == 0) ev_empty++;
        if (dut.lane_beat[p].first) begin
          tb_len[p] = dut.lane_beat[p].row_len;
          tb_cnt[p] = 1;
        end else begin
          tb_cnt[p] = tb_cnt[p] + 1;
        end
        prev_last[p] <= (tb_len[p] == 0) || (tb_cnt[p] == tb_len[p]);
      end else begin
        prev_last[p] <= 1'b0;
      end
      if (dut.lane_valid[p] && !dut.lane_ready[p]) lane_wait++;
      if (dut.u_spmm.pe_valid[p]) nv++;
    end
    if (nv > 1) ev_collide++;
    if (dut.u_adj.running && dut.af_stalled) ev_stall++;
    if (dut.af_neg) ev_neg++;
    if (dut.bcast_done) ev_bcast++;
    if (dut.busy && dut.head == 1) ev_head2++;
  end

  task automatic need(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL: mechanism '%s' never happened", what);
    end else begin
      $display("  %-28s %0d", what, count);
    end
  endtask

  // ---- watchdog --------------------------------------------------------------------
  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- main --------------------------------------------------------------------------
  initial begin
    longint t0, cycles, bound;
    int maxlane;
    ld_valid = 1'b0; ld_sel = LD_H_NNZ; ld_lane = '0; ld_addr = '0; ld_data = '0;
    start = 1'b0;
    prev_last = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;

    build_graph();
    schedule();
    reference();
    load_all();

    @(negedge clk);
    start = 1'b1;
    t0 = $time / 10;
    @(negedge clk);
    start = 1'b0;
    wait (done);
    cycles = $time / 10 - t0;
    repeat (5) @(posedge clk);

    // values
    for (int m = 0; m < N; m++)
      for (int k = 0; k < NCOLS; k++) begin
        int a, got;
        a = OUT_BASE + m * NCOLS + k;
        checks++;
        got = ddr_mem.exists(a) ? ddr_mem[a] : 32'h7fff_ffff;
        if (got != expv[m][k]) begin
          failures++;
          if (failures < 10) $display("FAIL: h'[%0d][%0d] = %0d, expected %0d", m, k, got, expv[m][k]);
        end
      end
    checks++;
    if (row_writes != N * NHEADS) begin
      failures++;
      $display("FAIL: %0d row writes, expected %0d", row_writes, N * NHEADS);
    end

    // cycle bound from the one-per-cycle rates: per W column the broadcast
    // (f_in) plus the longer of the longest lane and the result collector
    // (one row per cycle, N rows); the D-PEs run inside the last column, so
    // per head only their drain, one edge per cycle, the hub's wait for its
    // softmax sum, and pipeline fill
    maxlane = 0;
    for (int p = 0; p < NUM_SP; p++)
      if (lane_col[p].size() + lane_rows[p].size() > maxlane) maxlane = lane_col[p].size() + lane_rows[p].size();
    bound = NHEADS * (FHEAD * (FIN + ((maxlane > N) ? maxlane : N) + 30) + 20 + n_edges + HUBDEG + 60);
    checks++;
    $display("  layer took %0d cycles (bound %0d), %0d edges, %0d pad entries", cycles, bound, n_edges, pad_count);
    if (cycles > bound) begin
      failures++;
      $display("FAIL: layer took %0d cycles, bound %0d", cycles, bound);
    end

    $display("mechanisms:");
    need("back-to-back rows in a lane", ev_b2b);
    need("empty feature row", ev_empty);
    need("zero padding of lanes", pad_count);
    need("PEs finishing together", ev_collide);
    need("softmax credit stall", ev_stall);
    need("leakyrelu negative branch", ev_neg);
    need("relu clipping", ev_clip);
    need("W column broadcast", ev_bcast);
    need("second head", ev_head2);
    checks++;
    if (ev_bcast != NHEADS * FHEAD) begin
      failures++;
      $display("FAIL: %0d W broadcasts, expected %0d", ev_bcast, NHEADS * FHEAD);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
