// tb_hgat_workloads: two-layer GAT on graphs shaped like the three citation
// benchmarks, hgat_top at its default parameters.
//
// The graphs are synthetic but have the published shapes:
//   Cora      2708 nodes, 1433 features at 1.3 % density, 10556 edges, 7 classes
//   CiteSeer  3327 nodes, 3703 features at 0.8 % density,  9104 edges, 6 classes
//   PubMed    500 features at 10.4 % density, 4.5 edges per node, 3 classes;
//             its 19717 nodes exceed the on-chip buffers, so a 2200-node slice
//             is run instead.
// Every node also gets a self-loop. Layer 1 uses 2 heads of 8 hidden
// features; layer 2 takes layer 1's output (16 features, read back from the
// DDR model, zeros dropped by the MCSR packing) and produces the class
// scores with one head.
// Each layer's output is compared element by element with a bit-exact
// reference model, and the cycle count of each layer is reported and
// checked against the one-per-cycle bound used in tb_hgat_top, with 1/16
// added to the SPMM part for PEs stalled behind the result collector.
`timescale 1ns/1ps
module tb_hgat_workloads;
  import hgat_pkg::*;
  import hgat_ref_pkg::*;

  localparam int NUM_SP  = 16;
  localparam int HID     = 8;
  localparam int MAX_FIN = 4096;

  localparam int NMAX    = 3327;
  localparam int OUT1    = 100000;   // DDR word address of layer-1 output
  localparam int OUT2    = 200000;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic        ld_valid;
  ld_sel_e     ld_sel;
  idx_t        ld_lane;
  logic [31:0] ld_addr, ld_data;
  idx_t        cfg_f_in, cfg_f_head, cfg_n_heads;
  logic [31:0] cfg_out_base;
  logic        start, busy, done;
  logic        ddr_we;
  logic [31:0] ddr_addr;
  data_t       ddr_data [HID];
  logic [HID-1:0] ddr_mask;

  int N;                     // nodes of the current graph

  hgat_top dut (
    .clk, .rst_n,
    .ld_valid, .ld_sel, .ld_lane, .ld_addr, .ld_data,
    .cfg_n_nodes(idx_t'(N)), .cfg_f_in, .cfg_f_head, .cfg_n_heads, .cfg_out_base,
    .start, .busy, .done,
    .ddr_we, .ddr_addr, .ddr_data, .ddr_mask
  );

  int checks = 0, failures = 0;

  // current layer's inputs
  int fin, fhead, nheads, ncols;
  int hcol [NMAX][$];
  int hval [NMAX][$];
  int wmat [][];              // [fin][ncols]
  int a1 [2][HID];
  int a2 [2][HID];
  int nbr [NMAX][$];
  int hs   [NMAX][16];
  int expv [NMAX][16];
  int ddr_mem [int];

  int lane_rows [NUM_SP][$];
  int lane_len  [NUM_SP][$];
  int lane_col  [NUM_SP][$];
  int lane_val  [NUM_SP][$];

  always @(posedge clk) begin
    if (rst_n && ddr_we)
      for (int j = 0; j < HID; j++)
        if (ddr_mask[j]) ddr_mem[int'(ddr_addr) + j] = int'(ddr_data[j]);
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic make_weights();
    wmat = new[fin];
    foreach (wmat[c]) begin
      wmat[c] = new[ncols];
      foreach (wmat[c][k]) wmat[c][k] = rnd16(-40, 40);
    end
    for (int h = 0; h < 2; h++)
      for (int j = 0; j < HID; j++) begin
        a1[h][j] = (j < fhead) ? rnd16(-256, 256) : 0;
        a2[h][j] = (j < fhead) ? rnd16(-256, 256) : 0;
      end
  endtask

  // Row n goes to lane n mod NUM_SP, rows of a lane concatenated, lanes padded
  // with zero values to the same non-zero count.
  task automatic schedule();
    int maxl;
    for (int p = 0; p < NUM_SP; p++) begin
      lane_rows[p].delete(); lane_len[p].delete(); lane_col[p].delete(); lane_val[p].delete();
    end
    for (int n = 0; n < N; n++) begin
      int lane;
      lane = n % NUM_SP;
      lane_rows[lane].push_back(n);
      lane_len[lane].push_back(hcol[n].size());
      foreach (hcol[n][k]) begin
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
      end
    end
  endtask

  task automatic reference();
    for (int n = 0; n < N; n++)
      for (int k = 0; k < ncols; k++) begin
        longint acc;
        acc = 0;
        foreach (hcol[n][e]) acc += longint'(hval[n][e]) * wmat[hcol[n][e]][k];
        hs[n][k] = to_q88(acc);
      end
    for (int h = 0; h < nheads; h++) begin
      int em [NMAX];
      int en [NMAX];
      for (int n = 0; n < N; n++) begin
        longint s1, s2;
        s1 = 0; s2 = 0;
        for (int j = 0; j < fhead; j++) begin
          s1 += longint'(a1[h][j]) * hs[n][h*fhead + j];
          s2 += longint'(a2[h][j]) * hs[n][h*fhead + j];
        end
        em[n] = to_q88(s1);
        en[n] = to_q88(s2);
      end
      for (int m = 0; m < N; m++) begin
        longint p [$];
        longint sum;
        longint acc [HID];
        sum = 0;
        foreach (nbr[m][k]) begin
          p.push_back(pow2(lrelu(em[m], en[nbr[m][k]])));
          sum += p[k];
        end
        for (int j = 0; j < HID; j++) acc[j] = 0;
        foreach (nbr[m][k]) begin
          longint al;
          al = (p[k] * 256) / sum;
          for (int j = 0; j < fhead; j++) acc[j] += al * hs[nbr[m][k]][h*fhead + j];
        end
        for (int j = 0; j < fhead; j++) begin
          int v;
          v = to_q88(acc[j]);
          expv[m][h*fhead + j] = (v < 0) ? 0 : v;
        end
      end
    end
  endtask

  task automatic load(ld_sel_e sel, int lane, int addr, int data);
    @(negedge clk);
    ld_valid = 1'b1; ld_sel = sel; ld_lane = idx_t'(lane);
    ld_addr = 32'(addr); ld_data = 32'(data);
  endtask

  task automatic load_layer(bit with_graph);
    int ptr;
    for (int p = 0; p < NUM_SP; p++) begin
      foreach (lane_col[p][k])
        load(LD_H_NNZ, p, k, (lane_col[p][k] << 16) | (lane_val[p][k] & 16'hffff));
      foreach (lane_rows[p][r])
        load(LD_H_DESC, p, r, (lane_rows[p][r] << 16) | lane_len[p][r]);
      load(LD_H_ROWS, p, 0, lane_rows[p].size());
    end
    for (int c = 0; c < fin; c++)
      for (int k = 0; k < ncols; k++) load(LD_W, 0, k * MAX_FIN + c, wmat[c][k] & 16'hffff);
    for (int h = 0; h < 2; h++)
      for (int j = 0; j < HID; j++) begin
        load(LD_A, 0, h * HID + j, a1[h][j] & 16'hffff);
        load(LD_A, 0, 2 * HID + h * HID + j, a2[h][j] & 16'hffff);
      end
    if (with_graph) begin
      ptr = 0;
      for (int n = 0; n < N; n++) begin
        load(LD_ADJ_LEN, 0, n, nbr[n].size());
        foreach (nbr[n][k]) begin
          load(LD_ADJ_COL, 0, ptr, nbr[n][k]);
          ptr++;
        end
      end
    end
    @(negedge clk);
    ld_valid = 1'b0;
  endtask

  task automatic run_layer(int layer, int base);
    longint t0, cycles, bound, spmm_col;
    int maxlane, nedges, bad;
    cfg_f_in = idx_t'(fin); cfg_f_head = idx_t'(fhead); cfg_n_heads = idx_t'(nheads);
    cfg_out_base = 32'(base);
    @(negedge clk);
    start = 1'b1;
    t0 = $time / 10;
    @(negedge clk);
    start = 1'b0;
    wait (done);
    cycles = $time / 10 - t0;
    repeat (5) @(posedge clk);
    bad = 0;
    for (int m = 0; m < N; m++)
      for (int k = 0; k < ncols; k++) begin
        int a;
        a = base + m * ncols + k;
        checks++;
        if (!ddr_mem.exists(a) || ddr_mem[a] != expv[m][k]) begin
          failures++;
          bad++;
          if (bad < 5) $display("FAIL: layer %0d h'[%0d][%0d] = %0d, expected %0d", layer, m, k,
                                ddr_mem.exists(a) ? ddr_mem[a] : -99999, expv[m][k]);
        end
      end
    maxlane = 0;
    nedges = 0;
    for (int p = 0; p < NUM_SP; p++)
      if (lane_col[p].size() + lane_rows[p].size() > maxlane) maxlane = lane_col[p].size() + lane_rows[p].size();
    for (int n = 0; n < N; n++) nedges += nbr[n].size();
    // per column: broadcast, then the longer of the longest lane and the
    // collector's one result per cycle, plus 1/16 for PEs stalled behind the
    // collector when both are close; then the D-PE drain and the edge walk
    spmm_col = (maxlane > N) ? maxlane : N;
    bound = nheads * (fhead * (fin + spmm_col + spmm_col / 16 + 30) + 20 + nedges + 250 + 60);
    checks++;
    $display("  layer %0d: %0d cycles (%0.3f ms at 200 MHz), bound %0d, longest lane %0d beats",
             layer, cycles, real'(cycles) / 200.0e3, bound, maxlane);
    if (cycles > bound) begin
      failures++;
      $display("FAIL: layer %0d took %0d cycles, bound %0d", layer, cycles, bound);
    end
  endtask

  task automatic run_dataset(string name, int nodes, int fin1, int dens_pm, int edges, int classes);
    int nnz;
    $display("%s:", name);
    N = nodes;
    for (int n = 0; n < NMAX; n++) begin
      nbr[n].delete(); hcol[n].delete(); hval[n].delete();
    end
    ddr_mem.delete();
    // graph: self-loops plus random directed edges
    for (int n = 0; n < N; n++) nbr[n].push_back(n);
    for (int e = 0; e < edges; e++) begin
      int s, t;
      s = $urandom_range(0, N - 1);
      t = $urandom_range(0, N - 1);
      if (t == s) t = (t + 1) % N;
      nbr[s].push_back(t);
    end

    // layer 1: sparse binary features -> 2 heads x 8
    fin = fin1; fhead = 8; nheads = 2; ncols = 16;
    nnz = 0;
    for (int n = 0; n < N; n++)
      for (int c = 0; c < fin1; c++)
        if ($urandom_range(0, 999) < dens_pm) begin
          hcol[n].push_back(c);
          hval[n].push_back(256);
          nnz++;
        end
    $display("  layer 1 input: %0d non-zeros", nnz);
    make_weights();
    schedule();
    reference();
    load_layer(1'b1);
    run_layer(1, OUT1);

    // layer 2: 16 features (layer-1 output) -> 1 head x classes
    for (int n = 0; n < N; n++) begin
      hcol[n].delete(); hval[n].delete();
      for (int c = 0; c < 16; c++) begin
        int v;
        v = ddr_mem.exists(OUT1 + n * 16 + c) ? ddr_mem[OUT1 + n * 16 + c] : 0;
        if (v != 0) begin
          hcol[n].push_back(c);
          hval[n].push_back(v);
        end
      end
    end
    fin = 16; fhead = classes; nheads = 1; ncols = classes;
    make_weights();
    schedule();
    reference();
    load_layer(1'b0);
    run_layer(2, OUT2);
  endtask

  initial begin
    ld_valid = 1'b0; ld_sel = LD_H_NNZ; ld_lane = '0; ld_addr = '0; ld_data = '0;
    start = 1'b0; cfg_f_in = '0; cfg_f_head = '0; cfg_n_heads = '0; cfg_out_base = '0;
    repeat (4) @(posedge clk);
    rst_n = 1'b1;
    run_dataset("Cora-shaped", 2708, 1433, 13, 10556, 7);
    run_dataset("CiteSeer-shaped", 3327, 3703, 8, 9104, 6);
    // PubMed (19717 nodes) does not fit the on-chip buffers; a 2200-node
    // slice with its feature width, density and average degree does.
    run_dataset("PubMed-shaped slice", 2200, 500, 104, 9891, 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
