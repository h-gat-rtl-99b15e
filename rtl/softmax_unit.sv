// softmax_unit: fully pipelined base-2 softmax over each central node's
// neighbourhood,
//   alpha_mn = 2^(e_mn) / sum_k 2^(e_mk),
// with the power of two taken instead of e^x as in the design description.
//
// Data flow (following the softmax drawing of the design):
//   1. shift stage: 2^z for z in Q8.8 is formed as (1 + f) << i, where i is
//      the integer and f the fractional part of z; the (1 + f) mantissa is
//      this design's linear approximation of 2^f. The result is an unsigned
//      Q16.16 value (EXP_W bits); i is clamped to [-16, 14].
//   2. the stream splits: the upper path parks every 2^z, with its edge tag,
//      in a FIFO; the lower path accumulates the 2^z of the current node and,
//      on the node's last edge, pushes the finished denominator into a sum
//      queue (as deep as the FIFO, since each entry may close a node).
//   3. as soon as the node at the head of the FIFO has its sum, its entries
//      leave the FIFO one per cycle into a pipelined divider:
//      alpha = (2^z << 8) / sum, a Q8.8 value in [0, 1].
// Because the sums are queued, the next node is summed while the previous
// one is divided, so edges flow at one per cycle.
//
// Flow control: the FIFO must hold a whole neighbourhood before its sum is
// known. in_ready is a space credit: high while fewer than DEPTH - SLACK
// entries are held, SLACK covering the edges already in flight upstream.
// A node may therefore have at most DEPTH - SLACK neighbours (assertion).
// alpha never exceeds 1.0 (256), so its top 7 bits are always zero; they are
// kept so that alpha stays an ordinary Q8.8 word.
// Output has no back-pressure; latency from in_valid of a node's last edge
// to the first alpha of that node is 2 + 9 cycles.
module softmax_unit
  import hgat_pkg::*;
#(
  parameter int DEPTH = 256,
  parameter int SLACK = 8
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      in_valid,
  output logic      in_ready,
  input  data_t     z,
  input  edge_tag_t in_tag,
  output logic      out_valid,
  output data_t     alpha,
  output edge_tag_t out_tag,
  output logic      idle,
  output logic      stalled        // in_ready low (credit exhausted)
);
  localparam int TAG_W = $bits(edge_tag_t);
  localparam int CW    = $clog2(DEPTH + 1);
  localparam int QW    = 9;   // quotient bits: alpha in [0, 256]
  localparam int SUMQ  = DEPTH; // every FIFO entry may close a node

  // ---- 1. shift stage -------------------------------------------------------
  function automatic exp_t pow2(input data_t zz);
    logic signed [DATA_W-FRAC-1:0] i;
    logic [FRAC-1:0] f;
    logic [FRAC:0]   mant;
    int sh;
    i = zz[DATA_W-1:FRAC];
    f = zz[FRAC-1:0];
    if (i > 14) begin
      i = 14;
      f = '1;
    end else if (i < -16) begin
      i = -16;
      f = '0;
    end
    mant = {1'b1, f};
    sh   = int'(i) + 16 - FRAC;
    if (sh >= 0) return exp_t'(mant) << sh;
    else         return exp_t'(mant) >> (-sh);
  endfunction

  logic      s1_valid;
  exp_t      s1_pow;
  edge_tag_t s1_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid <= 1'b0;
      s1_pow   <= '0;
      s1_tag   <= '0;
    end else begin
      s1_valid <= in_valid;
      s1_pow   <= pow2(z);
      s1_tag   <= in_tag;
    end
  end

  // ---- 2. upper path: FIFO; lower path: accumulate --------------------------
  typedef struct packed { exp_t pow; edge_tag_t tag; } ent_t;

  ent_t    fifo_out, s1_ent;
  assign s1_ent = '{pow: s1_pow, tag: s1_tag};
  logic    fifo_empty, fifo_full, fifo_pop;
  logic [CW-1:0] fifo_cnt;
  sum_t    sum_acc, sum_head;
  logic    sq_empty, sq_full, sq_pop;
  logic [$clog2(SUMQ+1)-1:0] sq_cnt;

  sync_fifo #(.WIDTH($bits(ent_t)), .DEPTH(DEPTH)) u_upper (
    .clk, .rst_n,
    .push (s1_valid),
    .wdata(s1_ent),
    .pop  (fifo_pop),
    .rdata(fifo_out),
    .empty(fifo_empty),
    .full (fifo_full),
    .count(fifo_cnt)
  );

  wire sum_done = s1_valid && s1_tag.last;
  wire [SUM_W-1:0] sum_new = sum_acc + SUM_W'(s1_pow);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sum_acc <= '0;
    else if (s1_valid) sum_acc <= s1_tag.last ? '0 : sum_new;
  end

  sync_fifo #(.WIDTH(SUM_W), .DEPTH(SUMQ)) u_sums (
    .clk, .rst_n,
    .push (sum_done),
    .wdata(sum_new),
    .pop  (sq_pop),
    .rdata(sum_head),
    .empty(sq_empty),
    .full (sq_full),
    .count(sq_cnt)
  );

  // ---- 3. divider -----------------------------------------------------------
  assign fifo_pop = !fifo_empty && !sq_empty;
  assign sq_pop   = fifo_pop && fifo_out.tag.last;

  logic [QW-1:0]    q;
  logic [TAG_W-1:0] dtag;

  pipe_divider #(.NUM_W(EXP_W + FRAC), .DEN_W(SUM_W), .Q_W(QW), .TAG_W(TAG_W)) u_div (
    .clk, .rst_n,
    .in_valid (fifo_pop),
    .num      ({fifo_out.pow, FRAC'(0)}),
    .den      (sum_head),
    .in_tag   (fifo_out.tag),
    .out_valid,
    .quo      (q),
    .out_tag  (dtag)
  );

  assign alpha   = data_t'(q);
  assign out_tag = edge_tag_t'(dtag);

  // ---- flow control -----------------------------------------------------------
  logic [QW:0] div_busy;   // entries inside the divider
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) div_busy <= '0;
    else        div_busy <= {div_busy[QW-1:0], fifo_pop};
  end

  wire [CW:0] held = (CW+1)'(fifo_cnt) + (CW+1)'(s1_valid) + (CW+1)'(in_valid);
  assign in_ready = held < (CW+1)'(DEPTH - SLACK);
  assign stalled  = !in_ready;
  assign idle     = !in_valid && !s1_valid && fifo_empty && (div_busy == '0) && (sum_acc == '0);

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(s1_valid && fifo_full));
  a_sumq:        assert property (@(posedge clk) disable iff (!rst_n) !(sum_done && sq_full));
endmodule
