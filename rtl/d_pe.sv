// d_pe: Dense processing element. Dot product of an N-element vector x
// with an N-element weight vector w: N multipliers in parallel, then a
// pipelined binary adder tree (the structure of the D-PE drawing: a column
// of multipliers feeding an adder tree).
//
// Timing: fully pipelined, one vector per cycle. Latency LAT = 2 + log2(N)
// cycles from in_valid to out_valid: one cycle for the products, one per
// adder-tree level, one for scaling the Q16.16 sum back to Q8.8 with
// saturation. A tag (for example the node id) travels alongside.
//
// The register after every tree level and the final saturation are this
// design's choices.
module d_pe
  import hgat_pkg::*;
#(
  parameter int N = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  idx_t  in_tag,
  input  data_t x [N],
  input  data_t w [N],
  output logic  out_valid,
  output idx_t  out_tag,
  output data_t y
);
  localparam int L   = (N > 1) ? $clog2(N) : 0;
  localparam int P   = 1 << L;

  acc_t lvl   [L+1][P];
  logic vld   [L+2];
  idx_t tag   [L+2];

  // products
  always_ff @(posedge clk) begin
    for (int i = 0; i < P; i++)
      lvl[0][i] <= (i < N) ? acc_t'(x[i]) * acc_t'(w[i]) : '0;
  end

  // adder tree
  for (genvar l = 1; l <= L; l++) begin : g_lvl
    always_ff @(posedge clk) begin
      for (int i = 0; i < (P >> l); i++)
        lvl[l][i] <= lvl[l-1][2*i] + lvl[l-1][2*i+1];
    end
  end

  always_ff @(posedge clk) begin
    y <= acc_to_data(lvl[L][0]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < L + 2; s++) begin
        vld[s] <= 1'b0;
        tag[s] <= '0;
      end
    end else begin
      vld[0] <= in_valid;
      tag[0] <= in_tag;
      for (int s = 1; s < L + 2; s++) begin
        vld[s] <= vld[s-1];
        tag[s] <= tag[s-1];
      end
    end
  end

  assign out_valid = vld[L+1];
  assign out_tag   = tag[L+1];
endmodule
