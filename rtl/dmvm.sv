// dmvm: dense matrix-vector stage of the self-attention module. For every
// transformed node feature row h°_m it computes the two halves of the
// attention score, e_m = a1 . h°_m (node as centre) and e_n = a2 . h°_m
// (node as neighbour), with two D-PEs side by side. The shared attention
// weight a is split into a1 and a2 as in the design description, so that
// e_mn = leakyrelu(e_m + e_n) needs only one addition per edge later.
//
// Timing: one node per cycle, latency 2 + log2(HID) cycles. out_node is the
// node id given with the row.
module dmvm
  import hgat_pkg::*;
#(
  parameter int HID = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  idx_t  in_node,
  input  data_t row    [HID],
  input  data_t a1_vec [HID],
  input  data_t a2_vec [HID],
  output logic  out_valid,
  output idx_t  out_node,
  output data_t e_m,
  output data_t e_n
);
  logic v2;
  idx_t t2;

  d_pe #(.N(HID)) u_pe_m (
    .clk, .rst_n, .in_valid, .in_tag(in_node), .x(row), .w(a1_vec),
    .out_valid, .out_tag(out_node), .y(e_m)
  );

  d_pe #(.N(HID)) u_pe_n (
    .clk, .rst_n, .in_valid, .in_tag(in_node), .x(row), .w(a2_vec),
    .out_valid(v2), .out_tag(t2), .y(e_n)
  );

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) v2 == out_valid && (!v2 || t2 == out_node));
endmodule
