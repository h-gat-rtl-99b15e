// adj_reader: adjacency buffer and neighbour walker of the self-attention
// module. The graph's adjacency matrix is held in MCSR form: a row-length
// per node and the col-index (neighbour id) of every edge, rows back to
// back. The value array of MCSR is not stored because every adjacency
// entry is 1. The per-node attention halves e_m (central role) and e_n
// (neighbour role) produced by the DMVM stage are written into two score
// buffers here.
//
// After start it walks node m = 0..n_nodes-1 and, for every neighbour n of
// m, emits one edge (e_m of m, e_n of n, tag {m, n, last}) where last marks
// the final neighbour of m. One edge per cycle while issue_ok is high
// (issue_ok is the softmax unit's space credit); nodes with row-length 0
// are skipped (one idle cycle each). Latency from issue to out_valid is two
// cycles (col-index read, then score read); done rises when all edges have
// left. Buffers are synchronous-read memories.
//
// Central/neighbour ids from col-index and row-length follow the design
// description; the walk order, the credit input and skipping empty rows are
// this design's choices.
module adj_reader
  import hgat_pkg::*;
#(
  parameter int MAX_NODES = 4096,
  parameter int MAX_EDGES = 16384
) (
  input  logic      clk,
  input  logic      rst_n,
  // buffer load
  input  logic      ld_len_we,
  input  logic      ld_col_we,
  input  idx_t      ld_addr,
  input  idx_t      ld_data,
  // score write (from DMVM)
  input  logic      e_we,
  input  idx_t      e_node,
  input  data_t     e_m_in,
  input  data_t     e_n_in,
  // control
  input  logic      start,
  input  idx_t      n_nodes,
  input  logic      issue_ok,
  output logic      done,
  // edges
  output logic      out_valid,
  output data_t     out_em,
  output data_t     out_en,
  output edge_tag_t out_tag
);
  localparam int NA = $clog2(MAX_NODES);
  localparam int EA = $clog2(MAX_EDGES);

  idx_t  len_mem [MAX_NODES];
  idx_t  col_mem [MAX_EDGES];
  data_t em_mem  [MAX_NODES];
  data_t en_mem  [MAX_NODES];

  always_ff @(posedge clk) begin
    if (ld_len_we) len_mem[ld_addr[NA-1:0]] <= ld_data;
    if (ld_col_we) col_mem[ld_addr[EA-1:0]] <= ld_data;
    if (e_we) begin
      em_mem[e_node[NA-1:0]] <= e_m_in;
      en_mem[e_node[NA-1:0]] <= e_n_in;
    end
  end

  // ---- S0: walk ------------------------------------------------------------
  logic running, running_n;
  idx_t m, k, ptr, m_n, k_n, ptr_n;
  idx_t len_q;           // row-length of node m
  logic issue, last0;

  assign last0 = (k + idx_t'(1) == len_q);
  assign issue = running && issue_ok && (len_q != '0);

  always_comb begin
    m_n = m; k_n = k; ptr_n = ptr; running_n = running;
    if (start) begin
      m_n = '0; k_n = '0; ptr_n = '0;
      running_n = (n_nodes != '0);
    end else if (running) begin
      if (len_q == '0 || (issue && last0)) begin
        m_n = m + idx_t'(1);
        k_n = '0;
        if (m + idx_t'(1) == n_nodes) running_n = 1'b0;
      end else if (issue) begin
        k_n = k + idx_t'(1);
      end
      if (issue) ptr_n = ptr + idx_t'(1);
    end
  end

  always_ff @(posedge clk) begin
    len_q <= len_mem[m_n[NA-1:0]];
  end

  // ---- S1: col-index and e_m read -------------------------------------------
  logic  v1, last1;
  idx_t  m1, n1;
  data_t em1;

  always_ff @(posedge clk) begin
    n1  <= col_mem[ptr[EA-1:0]];
    em1 <= em_mem[m[NA-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m <= '0; k <= '0; ptr <= '0; running <= 1'b0;
      v1 <= 1'b0; m1 <= '0; last1 <= 1'b0;
    end else begin
      m <= m_n; k <= k_n; ptr <= ptr_n; running <= running_n;
      v1    <= issue;
      m1    <= m;
      last1 <= last0;
    end
  end

  // ---- S2: e_n read ----------------------------------------------------------
  always_ff @(posedge clk) begin
    out_en  <= en_mem[n1[NA-1:0]];
    out_em  <= em1;
    out_tag <= '{m: m1, n: n1, last: last1};
  end

  logic active;   // a walk was started and has not finished
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      active    <= 1'b0;
    end else begin
      out_valid <= v1;
      if (start) begin
        done   <= (n_nodes == '0);
        active <= (n_nodes != '0);
      end else if (active && !running && !v1 && !out_valid) begin
        done   <= 1'b1;
        active <= 1'b0;
      end
    end
  end
endmodule
