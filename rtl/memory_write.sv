// memory_write: writes the aggregated rows h' back to the feature buffer in
// DDR. A row of node m computed for head `head` covers output features
// head*f_head .. head*f_head+f_head-1, so heads are concatenated in memory.
// The stage forms the word address
//   addr = base + m * row_stride + head * f_head
// (row_stride = features per output row, i.e. n_heads * f_head) and a
// per-element enable mask for the f_head valid elements of the HID-wide
// row, and registers them for one cycle. The DDR side is assumed to accept
// one row write per cycle (there is no ready signal); the write count is
// kept for the controller. Address arithmetic and mask are this design's
// choices; the design description only names the stage.
module memory_write
  import hgat_pkg::*;
#(
  parameter int HID = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] base,
  input  idx_t        row_stride,
  input  idx_t        head,
  input  idx_t        f_head,
  input  logic        clr_count,
  input  logic        in_valid,
  input  idx_t        in_node,
  input  data_t       in_row [HID],
  output logic        ddr_we,
  output logic [31:0] ddr_addr,
  output data_t       ddr_data [HID],
  output logic [HID-1:0] ddr_mask,
  output logic [31:0] count
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ddr_we   <= 1'b0;
      ddr_addr <= '0;
      ddr_mask <= '0;
      count    <= '0;
      for (int j = 0; j < HID; j++) ddr_data[j] <= '0;
    end else begin
      ddr_we <= in_valid;
      if (in_valid) begin
        ddr_addr <= base + 32'(in_node) * 32'(row_stride) + 32'(head) * 32'(f_head);
        for (int j = 0; j < HID; j++) begin
          ddr_mask[j] <= (j < int'(f_head));
          ddr_data[j] <= in_row[j];
        end
      end
      if (clr_count)     count <= '0;
      else if (in_valid) count <= count + 1'b1;
    end
  end
endmodule
