// pool_unit: phase 4 of a computation engine, plus the engine's output write.
//
// Takes one activated output feature per valid cycle, tagged with its output
// channel d, column u and row v, and writes it to the engine's feature local
// memory (FLM) in channel-major order, address (d*OH + y)*OW + x.
//  * POOL = 0, LAST = 0: the feature is written as it is.
//  * POOL = 1: 2x2 max pooling with stride 2. The engine produces the columns
//    of one row of one channel in order, so the maximum of a horizontal pair
//    is kept in a register; the maxima of an even row wait in a line buffer of
//    D*W/2 words until the odd row below arrives, then the maximum of the four
//    is written at (d*(H/2) + v/2)*(W/2) + u/2.
//  * LAST = 1: the output layer. Features arrive for d = 0..D-1; the largest
//    and its index (the classified label) are tracked and given out on
//    res_valid after d = D-1. The first of equal maxima wins.
// Outputs are registered: a write appears one cycle after its input.
// Max pooling and the label search are the engine's phase 4 in the design
// description; the line buffer and the write ordering are this design's.
module pool_unit #(
  parameter int  D    = 64,     // output channels
  parameter int  W    = 32,     // width = height of the maps entering phase 4
  parameter bit  POOL = 1'b1,
  parameter bit  LAST = 1'b0,
  localparam int OHW  = POOL ? W / 2 : W,
  localparam int OAW  = cnn_pkg::clog2c(D * OHW * OHW),
  localparam int CW   = cnn_pkg::clog2c(D + 1)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [15:0]          in_d,
  input  logic [15:0]          in_u,
  input  logic [15:0]          in_v,
  input  cnn_pkg::word_t       in_x,
  output logic                 we,
  output logic [OAW-1:0]       waddr,
  output cnn_pkg::word_t       wdata,
  output logic                 res_valid,
  output logic [CW-1:0]        res_class,
  output cnn_pkg::word_t       res_score
);
  import cnn_pkg::*;

  localparam int LBD = POOL ? D * (W / 2) : 1;

  word_t hmax_q;                 // first column of the current horizontal pair
  word_t lbuf [LBD];             // pooled maxima of the even row
  word_t best;
  logic [CW-1:0] best_idx;

  // even rows of a pooled layer park their horizontal maxima in the line buffer
  always_ff @(posedge clk)
    if (POOL && in_valid && !LAST && in_u[0] && !in_v[0])
      lbuf[int'(in_d) * (W / 2) + int'(in_u) / 2] <= maxw(hmax_q, in_x);

  function automatic word_t maxw(word_t a, word_t b); return (a > b) ? a : b; endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      we <= 1'b0; waddr <= '0; wdata <= '0; res_valid <= 1'b0; res_class <= '0; res_score <= '0;
      hmax_q <= '0; best <= '0; best_idx <= '0;
    end else begin
      we <= 1'b0; res_valid <= 1'b0;
      if (in_valid) begin
        if (LAST) begin
          if (in_d == 0 || in_x > best) begin best <= in_x; best_idx <= CW'(in_d); end
          if (int'(in_d) == D - 1) begin
            res_valid <= 1'b1;
            if (in_d == 0 || in_x > best) begin res_class <= CW'(in_d); res_score <= in_x; end
            else begin res_class <= best_idx; res_score <= best; end
          end
        end else if (!POOL) begin
          we    <= 1'b1;
          waddr <= OAW'((int'(in_d) * W + int'(in_v)) * W + int'(in_u));
          wdata <= in_x;
        end else if (!in_u[0]) begin
          hmax_q <= in_x;
        end else if (in_v[0]) begin
          we    <= 1'b1;
          waddr <= OAW'((int'(in_d) * OHW + int'(in_v) / 2) * OHW + int'(in_u) / 2);
          wdata <= maxw(lbuf[int'(in_d) * (W / 2) + int'(in_u) / 2], maxw(hmax_q, in_x));
        end
      end
    end
  end
endmodule
