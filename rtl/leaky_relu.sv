// leaky_relu: first stage of the activation-function (AF) unit. Adds the
// two attention halves of an edge and applies leakyrelu:
//   e_mn = leakyrelu(e_m + e_n)
// The sum saturates to 16 bits. Negative sums are multiplied by the slope
// SLOPE/256 (Q0.8); the default 51 (about 0.2) is the usual GAT slope and is
// this design's choice, the design description names leakyrelu without a
// slope. One register stage; the edge tag travels alongside.
module leaky_relu
  import hgat_pkg::*;
#(
  parameter int SLOPE = 51
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  input  data_t     e_m,
  input  data_t     e_n,
  input  edge_tag_t in_tag,
  output logic      out_valid,
  output data_t     z,
  output edge_tag_t out_tag,
  output logic      neg            // the negative branch was taken
);
  data_t s, zn;
  logic signed [47:0] prod;

  always_comb begin
    s    = sat16(48'(e_m) + 48'(e_n));
    prod = 48'(s) * 48'(SLOPE);
    zn   = (s < 0) ? sat16(prod >>> 8) : s;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      z         <= '0;
      out_tag   <= '0;
      neg       <= 1'b0;
    end else begin
      out_valid <= in_valid;
      z         <= zn;
      out_tag   <= in_tag;
      neg       <= in_valid && (s < 0);
    end
  end
endmodule
