// h_lane_feeder: one lane of the data loader's feature buffer. It holds, in
// MCSR form (col-index + value per non-zero, row-length per row), the rows
// of the sparse feature matrix h that software preprocessing has assigned to
// one Sparse-PE, already concatenated one after the other. Each row is
// described by (row id, row-length); the non-zeros of all the lane's rows
// sit back to back in the nnz buffer. Trailing zero-valued padding entries,
// which the preprocessing appends so that all lanes carry the same number of
// non-zeros, are simply part of the last row.
//
// On start the lane streams its rows to its SP-PE, one beat per non-zero
// (one beat for an empty row), under a valid/ready handshake, so that the PE
// starts the next row the cycle after it took the last non-zero of the
// previous one. It can stream the same rows again for every W column.
//
// Both buffers are synchronous-read memories; the read address is the next
// position so that the registered data always belong to the current beat.
// Loading (ld_*) is only done while the lane is idle.
module h_lane_feeder
  import hgat_pkg::*;
#(
  parameter int LANE_NNZ  = 8192,  // non-zeros this lane can hold
  parameter int LANE_ROWS = 512    // rows this lane can hold
) (
  input  logic     clk,
  input  logic     rst_n,
  // buffer load
  input  logic     ld_nnz_we,
  input  logic     ld_desc_we,
  input  logic     ld_rows_we,
  input  idx_t     ld_addr,
  input  logic [31:0] ld_data,
  // control
  input  logic     start,
  output logic     done,      // all rows sent (level, until next start)
  // beats to the SP-PE
  output logic     out_valid,
  input  logic     out_ready,
  output sp_beat_t out_beat
);
  localparam int NW = $clog2(LANE_NNZ);
  localparam int DW = $clog2(LANE_ROWS);

  typedef struct packed { idx_t col; data_t val; } nnz_t;
  typedef struct packed { idx_t row_id; idx_t len; } desc_t;

  nnz_t  nnz_mem  [LANE_NNZ];
  desc_t desc_mem [LANE_ROWS];
  idx_t  n_rows;

  always_ff @(posedge clk) begin
    if (ld_nnz_we)  nnz_mem[ld_addr[NW-1:0]]  <= nnz_t'(ld_data);
    if (ld_desc_we) desc_mem[ld_addr[DW-1:0]] <= desc_t'(ld_data);
  end

  // ---- walk state --------------------------------------------------------
  logic  running;
  idx_t  di, ptr, k;              // row index, nnz pointer, position in row
  idx_t  di_n, ptr_n, k_n;
  logic  running_n;
  nnz_t  nnz_q;
  desc_t desc_q;
  logic  adv, row_end;

  assign out_valid = running;
  assign adv       = out_valid && out_ready;
  assign row_end   = (desc_q.len == '0) || (k + idx_t'(1) == desc_q.len);

  assign out_beat.row_id  = desc_q.row_id;
  assign out_beat.row_len = desc_q.len;
  assign out_beat.col     = nnz_q.col;
  assign out_beat.val     = nnz_q.val;
  assign out_beat.first   = (k == '0);

  always_comb begin
    di_n = di; ptr_n = ptr; k_n = k; running_n = running;
    if (start) begin
      di_n = '0; ptr_n = '0; k_n = '0;
      running_n = (n_rows != '0);
    end else if (adv) begin
      if (desc_q.len != '0) ptr_n = ptr + idx_t'(1);
      if (row_end) begin
        di_n = di + idx_t'(1);
        k_n  = '0;
        if (di + idx_t'(1) == n_rows) running_n = 1'b0;
      end else begin
        k_n = k + idx_t'(1);
      end
    end
  end

  always_ff @(posedge clk) begin
    nnz_q  <= nnz_mem[ptr_n[NW-1:0]];
    desc_q <= desc_mem[di_n[DW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      di <= '0; ptr <= '0; k <= '0;
      running <= 1'b0;
      done    <= 1'b0;
      n_rows  <= '0;
    end else begin
      di <= di_n; ptr <= ptr_n; k <= k_n;
      running <= running_n;
      if (ld_rows_we) n_rows <= ld_data[IDX_W-1:0];
      if (start)                          done <= (n_rows == '0);
      else if (running && !running_n)     done <= 1'b1;
    end
  end

  // A start with no rows finishes at once.
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n) start |-> !running);
endmodule
