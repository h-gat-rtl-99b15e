// tb_memory_write: sends 50 rows for random nodes and heads and checks,
// one cycle later, the DDR word address base + node * row_stride +
// head * f_head, the data, the element mask (f_head of HID elements) and
// the running write count, which clr_count resets.
`timescale 1ns/1ps
module tb_memory_write;
  import hgat_pkg::*;
  import hgat_ref_pkg::*;

  localparam int HID = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [31:0] base; idx_t row_stride, head, f_head; logic clr_count;
  logic in_valid; idx_t in_node; data_t in_row [HID];
  logic ddr_we; logic [31:0] ddr_addr; data_t ddr_data [HID]; logic [HID-1:0] ddr_mask;
  logic [31:0] count;

  memory_write dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++; $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    base = 32'd5000; row_stride = 0; head = 0; f_head = 0; clr_count = 0;
    in_valid = 0; in_node = 0;
    for (int j = 0; j < HID; j++) in_row[j] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int v = 0; v < 50; v++) begin
      int fh, h, nd, ea;
      logic [HID-1:0] em;
      fh = $urandom_range(1, HID); h = $urandom_range(0, 1); nd = $urandom_range(0, 3000);
      @(negedge clk);
      f_head = idx_t'(fh); head = idx_t'(h); row_stride = idx_t'(2 * fh);
      in_valid = 1; in_node = idx_t'(nd);
      for (int j = 0; j < HID; j++) in_row[j] = data_t'(rnd16(-30000, 30000));
      ea = 5000 + nd * 2 * fh + h * fh;
      for (int j = 0; j < HID; j++) em[j] = (j < fh);
      @(negedge clk);
      in_valid = 0;
      checks++;
      if (!ddr_we || ddr_addr != 32'(ea) || ddr_mask != em || count != 32'(v + 1)) begin
        failures++; $display("FAIL: addr %0d expected %0d mask %b/%b count %0d", ddr_addr, ea, ddr_mask, em, count);
      end
      for (int j = 0; j < HID; j++) if (ddr_data[j] != in_row[j]) begin
        failures++; $display("FAIL: data %0d", j);
      end
    end
    @(negedge clk); clr_count = 1;
    @(negedge clk); clr_count = 0;
    checks++;
    if (count != 0 || ddr_we) begin failures++; $display("FAIL: count not cleared"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
