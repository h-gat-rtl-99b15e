// sp_pe: Sparse processing element. Computes, for a stream of MCSR rows of
// the feature matrix h, the dot product of each row with one column of W
// held in the PE's local weight BRAM (h * W[:,c], one element per row).
//
// Structure (after the SP-PE drawing of the design): weight BRAM addressed by
// col-index, one multiplier, one adder, and a mux that either feeds the sum
// back (continue accumulating) or sends it out, decided by a counter that
// runs against the row-length of the current row.
//
// Pipeline, one non-zero per cycle:
//   S0  beat accepted; row counter decides "last"; BRAM read at col
//   S1  weight available; multiply  value * weight (Q16.16)
//   S2  accumulate; on the last non-zero the sum leaves through the mux
//       into the output register as Q8.8 (saturated)
// A row of length 0 produces a 0 result. The output register uses a
// valid/ready handshake (the SP-PE "completion" signal towards the SPMM
// collector); while a result waits there, the whole PE pipeline stalls
// and in_ready is low.
//
// Weight BRAM: written through wt_we/wt_addr/wt_data (broadcast of one W
// column by the data loader) while the PE is idle.
//
// Design choices not fixed by the description: the 3-stage split, the
// stall-on-full output register, and the handling of empty rows.
module sp_pe
  import hgat_pkg::*;
#(
  parameter int MAX_FIN = 4096   // depth of the weight BRAM (input features)
) (
  input  logic     clk,
  input  logic     rst_n,
  // weight BRAM write
  input  logic     wt_we,
  input  idx_t     wt_addr,
  input  data_t    wt_data,
  // row stream
  input  logic     in_valid,
  output logic     in_ready,
  input  sp_beat_t in_beat,
  // result
  output logic     out_valid,
  input  logic     out_ready,
  output idx_t     out_row,
  output data_t    out_data,
  output logic     busy        // beats inside the pipeline or a result waiting
);
  localparam int AW = $clog2(MAX_FIN);

  data_t wbram [MAX_FIN];

  logic en;
  assign en       = !(out_valid && !out_ready);
  assign in_ready = en;

  always_ff @(posedge clk) begin
    if (wt_we) wbram[wt_addr[AW-1:0]] <= wt_data;
  end

  // ---- S0: row-length counter -----------------------------------------
  idx_t cnt;            // non-zeros of the current row already accepted
  idx_t cur_len;        // row-length of the current row
  logic s0_last, s0_empty, s0_first;
  assign s0_first = in_beat.first;
  assign s0_empty = in_beat.first && (in_beat.row_len == '0);
  assign s0_last  = s0_empty ||
                    (in_beat.first ? (in_beat.row_len == idx_t'(1))
                                   : (cnt + idx_t'(1) == cur_len));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      cur_len <= '0;
    end else if (en && in_valid) begin
      if (in_beat.first) begin
        cur_len <= in_beat.row_len;
        cnt     <= idx_t'(1);
      end else begin
        cnt     <= cnt + idx_t'(1);
      end
    end
  end

  // ---- S1: weight read, operands --------------------------------------
  logic  s1_valid, s1_first, s1_last, s1_empty;
  idx_t  s1_row;
  data_t s1_val, s1_w;

  always_ff @(posedge clk) begin
    if (en && in_valid) s1_w <= wbram[in_beat.col[AW-1:0]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_first <= 1'b0;
      s1_last  <= 1'b0;
      s1_empty <= 1'b0;
      s1_row   <= '0;
      s1_val   <= '0;
    end else if (en) begin
      s1_valid <= in_valid;
      s1_first <= s0_first;
      s1_last  <= s0_last;
      s1_empty <= s0_empty;
      s1_row   <= in_beat.row_id;
      s1_val   <= in_beat.val;
    end
  end

  // ---- S2: multiply -----------------------------------------------------
  logic s2_valid, s2_first, s2_last;
  idx_t s2_row;
  acc_t s2_prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s2_valid <= 1'b0;
      s2_first <= 1'b0;
      s2_last  <= 1'b0;
      s2_row   <= '0;
      s2_prod  <= '0;
    end else if (en) begin
      s2_valid <= s1_valid;
      s2_first <= s1_first;
      s2_last  <= s1_last;
      s2_row   <= s1_row;
      s2_prod  <= s1_empty ? '0 : acc_t'(s1_val) * acc_t'(s1_w);
    end
  end

  // ---- S3: accumulate and output mux -----------------------------------
  acc_t acc, acc_nxt;
  assign acc_nxt = (s2_first ? '0 : acc) + s2_prod;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      out_row   <= '0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (en && s2_valid) begin
        acc <= acc_nxt;
        if (s2_last) begin
          out_valid <= 1'b1;
          out_row   <= s2_row;
          out_data  <= acc_to_data(acc_nxt);
        end
      end
    end
  end

  assign busy = s1_valid || s2_valid || out_valid;
endmodule
