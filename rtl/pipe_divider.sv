// pipe_divider: fully pipelined unsigned restoring divider producing a
// Q_W-bit quotient, one result per cycle, latency Q_W cycles. Stage s
// decides quotient bit Q_W-1-s by comparing the partial remainder with the
// divisor shifted left by that bit position. The caller guarantees
// num < den * 2^Q_W (otherwise the quotient saturates to its width) and
// den != 0 (a zero divisor gives an all-ones quotient). A tag travels along.
module pipe_divider #(
  parameter int NUM_W = 48,
  parameter int DEN_W = 40,
  parameter int Q_W   = 9,
  parameter int TAG_W = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [NUM_W-1:0] num,
  input  logic [DEN_W-1:0] den,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [Q_W-1:0]   quo,
  output logic [TAG_W-1:0] out_tag
);
  localparam int RW = (NUM_W > DEN_W + Q_W) ? NUM_W : DEN_W + Q_W;

  // index s holds the state after stage s (1..Q_W); index 0 is unused
  logic [RW-1:0]    rem [Q_W+1];
  logic [DEN_W-1:0] dv  [Q_W+1];
  logic [Q_W-1:0]   q   [Q_W+1];
  logic [TAG_W-1:0] tg  [Q_W+1];
  logic             vl  [Q_W+1];

  always_ff @(posedge clk) begin
    for (int s = 0; s < Q_W; s++) begin
      logic [RW-1:0]    r_in, sub;
      logic [DEN_W-1:0] d_in;
      logic [Q_W-1:0]   q_in;
      r_in = (s == 0) ? RW'(num) : rem[s];
      d_in = (s == 0) ? den      : dv[s];
      q_in = (s == 0) ? '0       : q[s];
      sub  = RW'(d_in) << (Q_W - 1 - s);
      if (r_in >= sub) begin
        rem[s+1] <= r_in - sub;
        q[s+1]   <= q_in | (Q_W'(1) << (Q_W - 1 - s));
      end else begin
        rem[s+1] <= r_in;
        q[s+1]   <= q_in;
      end
      dv[s+1] <= d_in;
      tg[s+1] <= (s == 0) ? in_tag : tg[s];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s <= Q_W; s++) vl[s] <= 1'b0;
    end else begin
      for (int s = 0; s < Q_W; s++) vl[s+1] <= (s == 0) ? in_valid : vl[s];
    end
  end

  assign out_valid = vl[Q_W];
  assign quo       = q[Q_W];
  assign out_tag   = tg[Q_W];
endmodule
