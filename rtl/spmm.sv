// spmm: sparse matrix multiplication array. NUM_SP Sparse-PEs work
// independently, each on its own lane of concatenated MCSR rows, and each
// computes one element h°[row][c] = h[row,:] . W[:,c] per row for the W
// column c currently held in all PEs' weight BRAMs (the same column is
// broadcast to every PE).
//
// A PE that finishes a row raises its completion (valid) together with its
// address; a round-robin collector grants one PE per cycle and forwards
// (row id, value) to the h° buffer. A PE whose result is not yet collected
// stalls, so no result is lost. With one result per row and rows of several
// non-zeros this one-write-per-cycle collector is rarely the bottleneck.
//
// busy is high while any PE holds work; the controller uses it (together
// with the lanes' done) to detect the end of a column.
//
// The number of PEs is not given by the design description; 16 is this
// design's choice. The round-robin collector is also this design's choice.
module spmm
  import hgat_pkg::*;
#(
  parameter int NUM_SP  = 16,
  parameter int MAX_FIN = 4096
) (
  input  logic     clk,
  input  logic     rst_n,
  // weight column broadcast
  input  logic     wt_we,
  input  idx_t     wt_addr,
  input  data_t    wt_data,
  // lane streams
  input  logic     in_valid [NUM_SP],
  output logic     in_ready [NUM_SP],
  input  sp_beat_t in_beat  [NUM_SP],
  // collected results
  output logic     res_valid,
  output idx_t     res_row,
  output data_t    res_data,
  output logic     busy
);
  localparam int PW = (NUM_SP > 1) ? $clog2(NUM_SP) : 1;

  logic  pe_valid [NUM_SP];
  logic  pe_ready [NUM_SP];
  idx_t  pe_row   [NUM_SP];
  data_t pe_data  [NUM_SP];
  logic  pe_busy  [NUM_SP];

  for (genvar p = 0; p < NUM_SP; p++) begin : g_pe
    sp_pe #(.MAX_FIN(MAX_FIN)) u_pe (
      .clk, .rst_n,
      .wt_we, .wt_addr, .wt_data,
      .in_valid (in_valid[p]),
      .in_ready (in_ready[p]),
      .in_beat  (in_beat[p]),
      .out_valid(pe_valid[p]),
      .out_ready(pe_ready[p]),
      .out_row  (pe_row[p]),
      .out_data (pe_data[p]),
      .busy     (pe_busy[p])
    );
  end

  // ---- round-robin collector ("mux" selected by the PE address) ---------
  logic [PW-1:0] rr;       // PE with highest priority this cycle
  logic [PW-1:0] grant;
  logic          any;

  // priority from rr upwards, wrapping: scan the valid vector twice
  logic [2*NUM_SP-1:0] vv;
  always_comb begin
    for (int p = 0; p < NUM_SP; p++) begin
      vv[p]          = pe_valid[p];
      vv[p + NUM_SP] = pe_valid[p];
    end
    any   = 1'b0;
    grant = '0;
    for (int i = 2 * NUM_SP - 1; i >= 0; i--) begin
      if (vv[i] && i >= int'(rr) && i < int'(rr) + NUM_SP) begin
        any   = 1'b1;
        grant = PW'(i % NUM_SP);
      end
    end
    for (int p = 0; p < NUM_SP; p++) pe_ready[p] = any && (grant == PW'(p));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rr        <= '0;
      res_valid <= 1'b0;
      res_row   <= '0;
      res_data  <= '0;
    end else begin
      res_valid <= any;
      if (any) begin
        res_row  <= pe_row[grant];
        res_data <= pe_data[grant];
        rr       <= (int'(grant) == NUM_SP-1) ? '0 : grant + 1'b1;
      end
    end
  end

  always_comb begin
    busy = res_valid;
    for (int p = 0; p < NUM_SP; p++) busy |= pe_busy[p];
  end
endmodule
