// aggregator: feature aggregation h'_m = relu( sum_{n in N(m)} alpha_mn h°_n ).
//
// It owns the h° buffer, which keeps the linearly transformed features of
// the current head (HID words per node) for reuse: the SPMM array writes
// it element by element (wr_*), the DMVM stage reads whole rows through
// port B (rd_*, one-cycle latency), and the aggregation reads the row of
// each neighbour n.
//
// Aggregation pipeline, one edge per cycle, edges of a node contiguous:
//   A1  read h°_n
//   A2  HID products alpha * h°_n[j] (Q16.16)
//   A3  HID accumulators; on the node's last edge the sums are scaled to
//       Q8.8, saturated, passed through relu, and leave as one row with the
//       node id (out_valid for one cycle).
// relu in place of elu follows the design description. The description
// reuses the PEs' multiply units for this step; here the aggregator has its
// own HID multipliers so that it can overlap with the softmax.
module aggregator
  import hgat_pkg::*;
#(
  parameter int MAX_NODES = 4096,
  parameter int HID       = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  // h° buffer write (from SPMM)
  input  logic      wr_en,
  input  idx_t      wr_row,
  input  idx_t      wr_col,
  input  data_t     wr_data,
  // h° buffer read port B (for DMVM)
  input  idx_t      rd_row,
  output data_t     rd_data [HID],
  // attention coefficients
  input  logic      in_valid,
  input  data_t     alpha,
  input  edge_tag_t in_tag,
  // aggregated rows
  output logic      out_valid,
  output idx_t      out_node,
  output data_t     out_row [HID],
  output logic      idle,
  output logic      clipped     // relu set some element to 0 this row
);
  localparam int NA = $clog2(MAX_NODES);
  localparam int CA = (HID > 1) ? $clog2(HID) : 1;

  data_t hbuf [MAX_NODES][HID];

  always_ff @(posedge clk) begin
    if (wr_en) hbuf[wr_row[NA-1:0]][wr_col[CA-1:0]] <= wr_data;
    rd_data <= hbuf[rd_row[NA-1:0]];
  end

  // ---- A1 -------------------------------------------------------------------
  logic  a1_valid, a1_last;
  idx_t  a1_m;
  data_t a1_alpha;
  data_t a1_row [HID];

  always_ff @(posedge clk) begin
    a1_row <= hbuf[in_tag.n[NA-1:0]];
  end

  // ---- A2 -------------------------------------------------------------------
  logic  a2_valid, a2_last;
  idx_t  a2_m;
  acc_t  a2_prod [HID];

  always_ff @(posedge clk) begin
    for (int j = 0; j < HID; j++) a2_prod[j] <= acc_t'(a1_alpha) * acc_t'(a1_row[j]);
  end

  // ---- A3 -------------------------------------------------------------------
  acc_t  acc     [HID];
  acc_t  acc_nxt [HID];
  data_t res     [HID];
  logic  fresh;      // next edge starts a new node
  logic  clip;

  always_comb begin
    clip = 1'b0;
    for (int j = 0; j < HID; j++) begin
      acc_nxt[j] = (fresh ? '0 : acc[j]) + a2_prod[j];
      res[j]     = acc_to_data(acc_nxt[j]);
      if (res[j] < 0) clip = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a1_valid <= 1'b0; a1_last <= 1'b0; a1_m <= '0; a1_alpha <= '0;
      a2_valid <= 1'b0; a2_last <= 1'b0; a2_m <= '0;
      fresh     <= 1'b1;
      out_valid <= 1'b0;
      out_node  <= '0;
      clipped   <= 1'b0;
      for (int j = 0; j < HID; j++) begin
        acc[j]     <= '0;
        out_row[j] <= '0;
      end
    end else begin
      a1_valid <= in_valid;
      a1_last  <= in_tag.last;
      a1_m     <= in_tag.m;
      a1_alpha <= alpha;
      a2_valid <= a1_valid;
      a2_last  <= a1_last;
      a2_m     <= a1_m;
      out_valid <= 1'b0;
      clipped   <= 1'b0;
      if (a2_valid) begin
        for (int j = 0; j < HID; j++) begin
          acc[j]     <= acc_nxt[j];
          out_row[j] <= (res[j] < 0) ? '0 : res[j];
        end
        fresh <= a2_last;
        if (a2_last) begin
          out_valid <= 1'b1;
          out_node  <= a2_m;
          clipped   <= clip;
        end
      end
    end
  end

  assign idle = !in_valid && !a1_valid && !a2_valid;
endmodule
