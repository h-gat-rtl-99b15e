// hgat_top: H-GAT graph-attention layer accelerator.
//
// One call computes one GAT layer, head by head:
//   h°       = h W                         (SPMM: sparse features x dense W)
//   e_m, e_n = a1 . h°_m, a2 . h°_n        (DMVM, attention split in halves)
//   e_mn     = leakyrelu(e_m + e_n)        (AF unit)
//   alpha_mn = 2^e_mn / sum_k 2^e_mk       (AF unit, base-2 softmax)
//   h'_m     = relu(sum_n alpha_mn h°_n)   (aggregator)
// and writes h' to DDR through the memory-write stage, heads side by side.
//
// Before start the host fills the on-chip buffers through the ld_* port:
// the feature matrix h in MCSR form, already split into NUM_SP lanes by the
// load-balancing preprocessing (rows of a lane concatenated, lanes padded
// with zero values to equal non-zero counts), the weights W, the attention
// vectors a1/a2 of each head, and the adjacency matrix in MCSR form
// (self-loops included, at most SM_DEPTH-8 neighbours per node).
// cfg_* give the layer's sizes: nodes, input features, output features per
// head (<= HID) and heads (<= HEADS).
//
// Controller sequence per head:
//   for each of the f_head output columns c:
//     BCAST  copy W column into every SP-PE weight BRAM (f_in cycles)
//     SPMM   all lanes stream their rows; results go to the h° buffer
//   DMVM   overlapped with the SPMM of the last column: the moment a row's
//          last element leaves the collector, the row is complete; it is
//          read back from the h° buffer (the new element bypassed in) and
//          sent straight to the two D-PEs, whose e_m / e_n go into the
//          adjacency reader's score buffers. Only the D-PE latency is
//          waited for after the SPMM.
//   AGG    walk all edges, one per cycle (paused by the softmax credit),
//          through AF and aggregator; rows leave on ddr_*
// done rises (and stays high until the next start) when the last row of
// the last head has been written.
//
// The phase order, the column-by-column SPMM (W is distributed "one column"
// at a time) and the D-PEs taking their rows straight from the SP-PE results
// follow the design description's data flow; the controller, buffer sizes
// and PE counts are this design's choices. Every node must have a row in
// some lane (an empty one if it has no features), since that row's result
// is what triggers its DMVM.
//
// The status outputs of the sub-blocks that the controller does not need
// (softmax stall, leakyrelu branch, relu clip, rows-written count) are
// wired to local signals only, for observation in simulation.
module hgat_top
  import hgat_pkg::*;
#(
  parameter int NUM_SP    = 16,
  parameter int HID       = 8,
  parameter int HEADS     = 2,
  parameter int MAX_FIN   = 4096,
  parameter int MAX_NODES = 4096,
  parameter int MAX_EDGES = 16384,
  parameter int LANE_NNZ  = 8192,
  parameter int LANE_ROWS = 512,
  parameter int SM_DEPTH  = 256
) (
  input  logic        clk,
  input  logic        rst_n,
  // buffer load (from DDR / host)
  input  logic        ld_valid,
  input  ld_sel_e     ld_sel,
  input  idx_t        ld_lane,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data,
  // layer configuration
  input  idx_t        cfg_n_nodes,
  input  idx_t        cfg_f_in,
  input  idx_t        cfg_f_head,
  input  idx_t        cfg_n_heads,
  input  logic [31:0] cfg_out_base,
  // control
  input  logic        start,
  output logic        busy,
  output logic        done,
  // result rows to DDR
  output logic        ddr_we,
  output logic [31:0] ddr_addr,
  output data_t       ddr_data [HID],
  output logic [HID-1:0] ddr_mask
);
  localparam int DM_DRAIN = 6 + $clog2(HID);

  typedef enum logic [3:0] {
    S_IDLE, S_BCAST, S_BCAST_WAIT, S_SPMM_START, S_SPMM,
    S_DMVM_WAIT, S_AGG_START, S_AGG, S_FLUSH, S_DONE
  } state_e;

  state_e state;
  idx_t   head, col;
  logic [7:0] wait_cnt;

  // ---- interconnect -------------------------------------------------------
  logic     lanes_start, lanes_done;
  logic     lane_valid [NUM_SP];
  logic     lane_ready [NUM_SP];
  sp_beat_t lane_beat  [NUM_SP];
  logic     bcast_start, bcast_done;
  logic     wt_we;
  idx_t     wt_addr;
  data_t    wt_data;
  data_t    a1_vec [HID];
  data_t    a2_vec [HID];

  logic     sp_res_valid, sp_busy;
  idx_t     sp_res_row;
  data_t    sp_res_data;

  idx_t     hb_rd_row;
  data_t    hb_rd_data [HID];

  logic     dm_in_valid, dm_out_valid;
  idx_t     dm_in_node, dm_out_node;
  idx_t     dm_col;
  data_t    dm_new;
  data_t    dm_row [HID];
  data_t    dm_em, dm_en;

  logic      adj_start, adj_done, adj_valid;
  data_t     adj_em, adj_en;
  edge_tag_t adj_tag;

  logic      af_ready, af_valid, af_idle, af_stalled, af_neg;
  data_t     af_alpha;
  edge_tag_t af_tag;

  logic      ag_valid, ag_idle, ag_clipped;
  idx_t      ag_node;
  data_t     ag_row [HID];
  logic [31:0] wr_count;

  // ---- blocks -----------------------------------------------------------------
  data_loader #(
    .NUM_SP(NUM_SP), .MAX_FIN(MAX_FIN), .HID(HID), .HEADS(HEADS),
    .LANE_NNZ(LANE_NNZ), .LANE_ROWS(LANE_ROWS)
  ) u_loader (
    .clk, .rst_n,
    .ld_valid, .ld_sel, .ld_lane, .ld_addr, .ld_data,
    .lanes_start, .lanes_done, .lane_valid, .lane_ready, .lane_beat,
    .bcast_start, .bcast_col(head * cfg_f_head + col), .f_in(cfg_f_in), .bcast_done,
    .wt_we, .wt_addr, .wt_data,
    .head, .a1_vec, .a2_vec
  );

  spmm #(.NUM_SP(NUM_SP), .MAX_FIN(MAX_FIN)) u_spmm (
    .clk, .rst_n,
    .wt_we, .wt_addr, .wt_data,
    .in_valid(lane_valid), .in_ready(lane_ready), .in_beat(lane_beat),
    .res_valid(sp_res_valid), .res_row(sp_res_row), .res_data(sp_res_data),
    .busy(sp_busy)
  );

  dmvm #(.HID(HID)) u_dmvm (
    .clk, .rst_n,
    .in_valid(dm_in_valid), .in_node(dm_in_node), .row(dm_row),
    .a1_vec, .a2_vec,
    .out_valid(dm_out_valid), .out_node(dm_out_node), .e_m(dm_em), .e_n(dm_en)
  );

  adj_reader #(.MAX_NODES(MAX_NODES), .MAX_EDGES(MAX_EDGES)) u_adj (
    .clk, .rst_n,
    .ld_len_we(ld_valid && ld_sel == LD_ADJ_LEN),
    .ld_col_we(ld_valid && ld_sel == LD_ADJ_COL),
    .ld_addr  (ld_addr[IDX_W-1:0]),
    .ld_data  (ld_data[IDX_W-1:0]),
    .e_we     (dm_out_valid), .e_node(dm_out_node), .e_m_in(dm_em), .e_n_in(dm_en),
    .start    (adj_start), .n_nodes(cfg_n_nodes), .issue_ok(af_ready), .done(adj_done),
    .out_valid(adj_valid), .out_em(adj_em), .out_en(adj_en), .out_tag(adj_tag)
  );

  af_unit #(.SM_DEPTH(SM_DEPTH)) u_af (
    .clk, .rst_n,
    .in_valid(adj_valid), .in_ready(af_ready), .e_m(adj_em), .e_n(adj_en), .in_tag(adj_tag),
    .out_valid(af_valid), .alpha(af_alpha), .out_tag(af_tag),
    .idle(af_idle), .stalled(af_stalled), .neg(af_neg)
  );

  aggregator #(.MAX_NODES(MAX_NODES), .HID(HID)) u_agg (
    .clk, .rst_n,
    .wr_en(sp_res_valid), .wr_row(sp_res_row), .wr_col(col), .wr_data(sp_res_data),
    .rd_row(hb_rd_row), .rd_data(hb_rd_data),
    .in_valid(af_valid), .alpha(af_alpha), .in_tag(af_tag),
    .out_valid(ag_valid), .out_node(ag_node), .out_row(ag_row),
    .idle(ag_idle), .clipped(ag_clipped)
  );

  memory_write #(.HID(HID)) u_wr (
    .clk, .rst_n,
    .base(cfg_out_base), .row_stride(cfg_n_heads * cfg_f_head), .head, .f_head(cfg_f_head),
    .clr_count(start),
    .in_valid(ag_valid), .in_node(ag_node), .in_row(ag_row),
    .ddr_we, .ddr_addr, .ddr_data, .ddr_mask, .count(wr_count)
  );

  // ---- controller ---------------------------------------------------------------
  // DMVM feed: during the last column every collected result completes its
  // row. The row is read from the h° buffer this cycle (valid next cycle);
  // the element written in the same cycle is taken from the result itself.
  assign hb_rd_row = sp_res_row;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dm_in_valid <= 1'b0;
      dm_in_node  <= '0;
      dm_col      <= '0;
      dm_new      <= '0;
    end else begin
      dm_in_valid <= sp_res_valid && (col + idx_t'(1) == cfg_f_head);
      dm_in_node  <= sp_res_row;
      dm_col      <= col;
      dm_new      <= sp_res_data;
    end
  end

  always_comb
    for (int j = 0; j < HID; j++)
      dm_row[j] = (idx_t'(j) == dm_col) ? dm_new : hb_rd_data[j];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      head        <= '0;
      col         <= '0;
      wait_cnt    <= '0;
      bcast_start <= 1'b0;
      lanes_start <= 1'b0;
      adj_start   <= 1'b0;
      done        <= 1'b0;
    end else begin
      bcast_start <= 1'b0;
      lanes_start <= 1'b0;
      adj_start   <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (start) begin
            done  <= 1'b0;
            head  <= '0;
            col   <= '0;
            state <= (cfg_n_heads == '0 || cfg_f_head == '0) ? S_DONE : S_BCAST;
          end
        end
        S_BCAST: begin
          bcast_start <= 1'b1;
          state       <= S_BCAST_WAIT;
        end
        S_BCAST_WAIT: begin
          if (bcast_done) begin
            lanes_start <= 1'b1;
            state       <= S_SPMM_START;
          end
        end
        S_SPMM_START: state <= S_SPMM;     // lanes clear their done flags
        S_SPMM: begin
          if (!lanes_start && lanes_done && !sp_busy) begin
            if (col + idx_t'(1) == cfg_f_head) begin
              col      <= '0;
              wait_cnt <= 8'(DM_DRAIN);
              state    <= S_DMVM_WAIT;
            end else begin
              col   <= col + idx_t'(1);
              state <= S_BCAST;
            end
          end
        end
        S_DMVM_WAIT: begin
          if (wait_cnt == '0) begin
            adj_start <= 1'b1;
            state     <= S_AGG_START;
          end else begin
            wait_cnt <= wait_cnt - 1'b1;
          end
        end
        S_AGG_START: state <= S_AGG;       // reader clears its done flag
        S_AGG: begin
          if (adj_done && af_idle && ag_idle) begin
            wait_cnt <= 8'd2;
            state    <= S_FLUSH;
          end
        end
        S_FLUSH: begin
          if (wait_cnt == '0) begin
            if (head + idx_t'(1) == cfg_n_heads) begin
              state <= S_DONE;
            end else begin
              head  <= head + idx_t'(1);
              state <= S_BCAST;
            end
          end else begin
            wait_cnt <= wait_cnt - 1'b1;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);
endmodule
