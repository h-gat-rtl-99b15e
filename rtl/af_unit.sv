// af_unit: activation-function module. Turns the per-edge attention halves
// into normalised attention coefficients:
//   e_mn     = leakyrelu(e_m + e_n)            (leaky_relu, 1 cycle)
//   alpha_mn = 2^e_mn / sum_k 2^e_mk           (softmax_unit)
// in_ready is the softmax space credit and must gate edge issue upstream.
// Outputs: alpha with the edge tag, one per cycle; idle when nothing is
// held; stalled while the credit is exhausted; neg when an edge took the
// negative leakyrelu branch (for event counting).
module af_unit
  import hgat_pkg::*;
#(
  parameter int SM_DEPTH = 256,
  parameter int SM_SLACK = 8,
  parameter int SLOPE    = 51
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  data_t     e_m,
  input  data_t     e_n,
  input  edge_tag_t in_tag,
  output logic      out_valid,
  output data_t     alpha,
  output edge_tag_t out_tag,
  output logic      idle,
  output logic      stalled,
  output logic      neg
);
  logic      lr_valid;
  data_t     lr_z;
  edge_tag_t lr_tag;
  logic      sm_idle;

  leaky_relu #(.SLOPE(SLOPE)) u_lrelu (
    .clk, .rst_n, .in_valid, .e_m, .e_n, .in_tag,
    .out_valid(lr_valid), .z(lr_z), .out_tag(lr_tag), .neg
  );

  softmax_unit #(.DEPTH(SM_DEPTH), .SLACK(SM_SLACK)) u_softmax (
    .clk, .rst_n,
    .in_valid(lr_valid), .in_ready, .z(lr_z), .in_tag(lr_tag),
    .out_valid, .alpha, .out_tag, .idle(sm_idle), .stalled
  );

  assign idle = sm_idle && !in_valid && !lr_valid;
endmodule
