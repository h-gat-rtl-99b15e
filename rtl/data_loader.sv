// data_loader: on-chip cache of the layer's inputs and the distributor that
// feeds the Sparse-PEs.
//
//  * Feature matrix h, in MCSR form, split into NUM_SP lanes (one
//    h_lane_feeder per SP-PE). Each lane holds the concatenated rows that
//    the load-balancing preprocessing gave to that PE and streams them
//    ("distributed h") when lanes_start is pulsed. lanes_done is high when
//    every lane has sent all its rows.
//  * Weight matrix W (MAX_FIN x HEADS*HID words). W is distributed one
//    column at a time: bcast_start copies column bcast_col, entries
//    0..f_in-1, into the weight BRAMs of all SP-PEs over wt_we/wt_addr/
//    wt_data, one word per cycle; bcast_done pulses after the last word.
//  * Attention vectors a1 (central node) and a2 (neighbour), HID words per
//    head, kept in registers; a1_vec/a2_vec show those of head `head`.
//
// All buffers are filled through one host write port (ld_*), which stands
// for the path from DDR; ld_sel picks the buffer (see hgat_pkg::ld_sel_e)
// and ld_lane the feature lane.
//
// What the buffers hold follows the design description; their depths, the
// host port and the register file for a are this design's choices.
module data_loader
  import hgat_pkg::*;
#(
  parameter int NUM_SP    = 16,
  parameter int MAX_FIN   = 4096,
  parameter int HID       = 8,
  parameter int HEADS     = 2,
  parameter int LANE_NNZ  = 8192,
  parameter int LANE_ROWS = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  // host load port
  input  logic        ld_valid,
  input  ld_sel_e     ld_sel,
  input  idx_t        ld_lane,
  input  logic [31:0] ld_addr,
  input  logic [31:0] ld_data,
  // feature lanes
  input  logic        lanes_start,
  output logic        lanes_done,
  output logic        lane_valid [NUM_SP],
  input  logic        lane_ready [NUM_SP],
  output sp_beat_t    lane_beat  [NUM_SP],
  // W column broadcast
  input  logic        bcast_start,
  input  idx_t        bcast_col,
  input  idx_t        f_in,
  output logic        bcast_done,
  output logic        wt_we,
  output idx_t        wt_addr,
  output data_t       wt_data,
  // attention vectors
  input  idx_t        head,
  output data_t       a1_vec [HID],
  output data_t       a2_vec [HID]
);
  localparam int NCOL = HEADS * HID;
  localparam int WW   = $clog2(MAX_FIN * NCOL);
  localparam int AW   = $clog2(2 * NCOL);

  // ---- feature lanes ------------------------------------------------------
  logic lane_done [NUM_SP];

  for (genvar p = 0; p < NUM_SP; p++) begin : g_lane
    wire sel = ld_valid && (ld_lane == idx_t'(p));
    h_lane_feeder #(.LANE_NNZ(LANE_NNZ), .LANE_ROWS(LANE_ROWS)) u_lane (
      .clk, .rst_n,
      .ld_nnz_we (sel && ld_sel == LD_H_NNZ),
      .ld_desc_we(sel && ld_sel == LD_H_DESC),
      .ld_rows_we(sel && ld_sel == LD_H_ROWS),
      .ld_addr   (ld_addr[IDX_W-1:0]),
      .ld_data,
      .start     (lanes_start),
      .done      (lane_done[p]),
      .out_valid (lane_valid[p]),
      .out_ready (lane_ready[p]),
      .out_beat  (lane_beat[p])
    );
  end

  always_comb begin
    lanes_done = 1'b1;
    for (int p = 0; p < NUM_SP; p++) lanes_done &= lane_done[p];
  end

  // ---- W buffer and column broadcast ("count to one column") -------------
  data_t wmem [MAX_FIN * NCOL];
  logic  bc_run, rd_valid;
  idx_t  bc_k, rd_k;
  logic [WW-1:0] bc_base;
  data_t rd_data;

  always_ff @(posedge clk) begin
    if (ld_valid && ld_sel == LD_W) wmem[ld_addr[WW-1:0]] <= data_t'(ld_data[15:0]);
    rd_data <= wmem[bc_base + WW'(bc_k)];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bc_run     <= 1'b0;
      bc_k       <= '0;
      bc_base    <= '0;
      rd_valid   <= 1'b0;
      rd_k       <= '0;
      bcast_done <= 1'b0;
    end else begin
      bcast_done <= 1'b0;
      rd_valid   <= bc_run;
      rd_k       <= bc_k;
      if (bcast_start) begin
        bc_run  <= (f_in != '0);
        bc_k    <= '0;
        bc_base <= WW'(bcast_col) * WW'(MAX_FIN);
        if (f_in == '0) bcast_done <= 1'b1;
      end else if (bc_run) begin
        if (bc_k + idx_t'(1) == f_in) bc_run <= 1'b0;
        bc_k <= bc_k + idx_t'(1);
      end
      if (rd_valid && !bc_run) bcast_done <= 1'b1;
    end
  end

  assign wt_we   = rd_valid;
  assign wt_addr = rd_k;
  assign wt_data = rd_data;

  // ---- attention vectors ---------------------------------------------------
  data_t areg [2 * NCOL];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < 2 * NCOL; i++) areg[i] <= '0;
    end else if (ld_valid && ld_sel == LD_A) begin
      areg[ld_addr[AW-1:0]] <= data_t'(ld_data[15:0]);
    end
  end

  always_comb begin
    for (int j = 0; j < HID; j++) begin
      a1_vec[j] = areg[(int'(head) % HEADS) * HID + j];
      a2_vec[j] = areg[NCOL + (int'(head) % HEADS) * HID + j];
    end
  end
endmodule
