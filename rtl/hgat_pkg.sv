// hgat_pkg: types, sizes and arithmetic helpers shared by the H-GAT graph
// attention accelerator.
//
// Numbers: every feature, weight and attention value is a 16-bit signed
// fixed-point word (the 16-bit data width follows the design description);
// the split into 8 integer and 8 fraction bits (Q8.8) is this design's choice.
// Products are Q16.16 and are accumulated in 32 bits; results return to Q8.8
// by an arithmetic right shift of FRAC bits (truncation toward minus
// infinity) followed by saturation.
//
// Index fields (node id, feature column, row length) are carried at a fixed
// 16 bits so that buffer depths can be changed per instance without changing
// the struct layouts.
package hgat_pkg;

  localparam int DATA_W = 16;   // data width of the design
  localparam int FRAC   = 8;    // fraction bits of data_t
  localparam int ACC_W  = 32;   // accumulator width for products
  localparam int IDX_W  = 16;   // node id / column / length fields

  // Power-of-two softmax: 2^z is held as an unsigned Q16.16 value.
  localparam int EXP_W  = 32;
  localparam int SUM_W  = 40;   // sum of up to 256 EXP_W values

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [ACC_W-1:0]  acc_t;
  typedef logic        [IDX_W-1:0]  idx_t;
  typedef logic        [EXP_W-1:0]  exp_t;
  typedef logic        [SUM_W-1:0]  sum_t;

  // One beat of an MCSR row sent to a Sparse-PE. The first beat of a row
  // carries the row id and its row-length; a row of length 0 is sent as a
  // single beat whose value is ignored.
  typedef struct packed {
    idx_t  row_id;
    idx_t  row_len;
    idx_t  col;
    data_t val;
    logic  first;
  } sp_beat_t;

  // Tag travelling with one edge (central node m, neighbour n) through the
  // activation-function unit to the aggregator.
  typedef struct packed {
    idx_t m;
    idx_t n;
    logic last;   // last neighbour of node m
  } edge_tag_t;

  // Host (DDR side) buffer-load port selector.
  typedef enum logic [2:0] {
    LD_H_NNZ  = 3'd0,  // lane nnz entry: data[31:16]=col, [15:0]=value
    LD_H_DESC = 3'd1,  // lane row descriptor: data[31:16]=row id, [15:0]=row length
    LD_H_ROWS = 3'd2,  // lane row count: data[15:0]
    LD_W      = 3'd3,  // W entry at addr = column*MAX_FIN + input feature
    LD_A      = 3'd4,  // a entry: addr = half*HEADS*HID + head*HID + j (half 0 = a1, 1 = a2)
    LD_ADJ_LEN= 3'd5,  // adjacency row-length of node addr
    LD_ADJ_COL= 3'd6   // adjacency col-index entry addr
  } ld_sel_e;

  // Saturate a wide signed value to data_t.
  function automatic data_t sat16(input logic signed [47:0] x);
    if (x > 48'sd32767)       return 16'sh7fff;
    else if (x < -48'sd32768) return 16'sh8000;
    else                      return x[15:0];
  endfunction

  // Q16.16 accumulator back to Q8.8 with saturation.
  function automatic data_t acc_to_data(input acc_t a);
    logic signed [47:0] w;
    w = 48'(a);
    return sat16(w >>> FRAC);
  endfunction

endpackage
