// ce: computation engine of one layer (convolution or fully connected).
//
// One CE computes one layer of the network for one image per start pulse,
// reading input feature maps (IFMs) from the previous engine's FLM (or the
// IN LM) and kernel batches from the layer's KLM, and writing its output
// feature maps to its own FLM (or, in the output layer, the label).
//
// Loop order (per image): for each output row v, for each kernel batch of the
// row, wait until the KLM holds the batch, then for each output channel d of
// the batch, for each column u, for each group of PAR input channels: one
// cycle in which the PAR*K*K multipliers take a K x K x PAR window of the IFMs
// and the matching weights. The batch is released to the KLM after its last
// read. A fully connected layer is the same loop with K = 1 and H = 1, the
// input vector taking the place of the input channels.
//
// Four pipelined phases follow the read cycle (S0 addresses, S1 data):
//   phase 1 (S1->S2) mult_array: PAR*K*K products;
//   phase 2 (S2->S3) adder_tree; (S3) partial sum psum accumulated over the
//            input channel groups, bias added after the last group;
//   phase 3 (S4) rescale to 16 bits with saturation, then ReLU;
//   phase 4 (S4->S5) pool_unit: 2x2 max pooling or label search, FLM write.
// A new window enters every cycle while the batch is present; the engine
// stalls (stall = 1) only while it waits for a kernel batch. busy falls a few
// cycles after the last output has been written. Convolutions use one pixel
// of zero padding (window positions outside the map read as 0).
// The loop nest, the phases and the per-row kernel batches follow the design
// description; the padding, the number format and the pipeline registers are
// this design's choices.
module ce #(
  parameter int C    = 64,    // input channels (fc: inputs)
  parameter int D    = 64,    // output channels (fc: outputs)
  parameter int H    = 32,    // input height = width (fc: 1)
  parameter int KS   = 3,     // kernel size
  parameter int PAR  = 8,     // input channels per cycle
  parameter bit POOL = 1'b1,
  parameter bit LAST = 1'b0,
  parameter int KB   = 4,     // kernel batches per output row
  parameter int KLM_DEPTH = 16384,
  localparam int KK   = KS * KS,
  localparam int NRD  = PAR * KK,
  localparam int G    = C / PAR,
  localparam int DB   = D / KB,
  localparam int OHW  = POOL ? H / 2 : H,
  localparam int IAW  = cnn_pkg::clog2c(C * H * H),
  localparam int OAW  = cnn_pkg::clog2c(D * OHW * OHW),
  localparam int KAW  = cnn_pkg::clog2c(KLM_DEPTH),
  localparam int CW   = cnn_pkg::clog2c(D + 1),
  localparam int ACCW = 48
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  output logic                          busy,
  output logic                          stall,
  // IFM read ports (previous FLM / IN LM), data one cycle after address
  output logic [NRD-1:0][IAW-1:0]       ifm_raddr,
  input  cnn_pkg::word_t [NRD-1:0]      ifm_rdata,
  // KLM: weights on ports 0..NRD-1, bias on port NRD
  input  logic                          klm_rd_ready,
  output logic                          klm_rd_release,
  output logic [NRD:0][KAW-1:0]         klm_raddr,
  input  cnn_pkg::word_t [NRD:0]        klm_rdata,
  // output feature maps (own FLM write port)
  output logic                          ofm_we,
  output logic [OAW-1:0]                ofm_waddr,
  output cnn_pkg::word_t                ofm_wdata,
  // output layer result
  output logic                          res_valid,
  output logic [CW-1:0]                 res_class,
  output cnn_pkg::word_t                res_score
);
  import cnn_pkg::*;

  typedef struct packed {
    logic        first;   // first channel group of an output
    logic        last;    // last channel group of an output
    logic [15:0] d, u, v;
  } tag_t;

  typedef enum logic [1:0] {S_IDLE, S_WAITK, S_RUN, S_DRAIN} state_t;
  state_t state;

  // ---------------- S0: loop counters and addresses ----------------
  logic [15:0] v, u, dd, kbi, g;
  logic [3:0]  drain;
  logic        issue;
  logic [NRD-1:0] mask0;
  tag_t        tag0;

  assign issue = (state == S_RUN);
  assign stall = (state == S_WAITK);
  assign busy  = (state != S_IDLE);

  always_comb begin
    for (int p = 0; p < PAR; p++)
      for (int j = 0; j < KS; j++)
        for (int k = 0; k < KS; k++) begin
          int i, c, y, x;
          i = p * KK + j * KS + k;
          c = int'(g) * PAR + p;
          y = int'(v) + j - KS / 2;
          x = int'(u) + k - KS / 2;
          mask0[i]     = (y >= 0) && (y < H) && (x >= 0) && (x < H);
          ifm_raddr[i] = mask0[i] ? IAW'((c * H + y) * H + x) : '0;
          klm_raddr[i] = KAW'((int'(dd) * C + int'(g) * PAR) * KK + i);
        end
    klm_raddr[NRD] = KAW'(DB * C * KK + int'(dd));
    tag0.first = (g == 0);
    tag0.last  = (int'(g) == G - 1);
    tag0.d     = 16'(int'(kbi) * DB + int'(dd));
    tag0.u     = u;
    tag0.v     = v;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; v <= '0; u <= '0; dd <= '0; kbi <= '0; g <= '0;
      drain <= '0; klm_rd_release <= 1'b0;
    end else begin
      klm_rd_release <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_WAITK; v <= '0; u <= '0; dd <= '0; kbi <= '0; g <= '0;
        end
        S_WAITK: if (klm_rd_ready && !klm_rd_release) state <= S_RUN;
        S_RUN: begin
          if (int'(g) != G - 1) g <= g + 1;
          else begin
            g <= '0;
            if (int'(u) != H - 1) u <= u + 1;
            else begin
              u <= '0;
              if (int'(dd) != DB - 1) dd <= dd + 1;
              else begin
                // last read of this kernel batch: hand the bank back
                dd <= '0;
                klm_rd_release <= 1'b1;
                state <= S_WAITK;
                if (int'(kbi) != KB - 1) kbi <= kbi + 1;
                else begin
                  kbi <= '0;
                  if (int'(v) != H - 1) v <= v + 1;
                  else begin v <= '0; state <= S_DRAIN; drain <= '0; end
                end
              end
            end
          end
        end
        S_DRAIN: begin
          drain <= drain + 1;
          if (drain == 4'd6) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------- S1: operands arrive ----------------
  logic           v1, v2, v3, v4;
  logic [NRD-1:0] mask1;
  tag_t           tag1, tag2, tag3, tag4;
  word_t          bias2, bias3;
  word_t [NRD-1:0] a1, b1;

  always_comb
    for (int i = 0; i < NRD; i++) begin
      a1[i] = mask1[i] ? ifm_rdata[i] : '0;
      b1[i] = klm_rdata[i];
    end

  // ---------------- phase 1 and 2 ----------------
  logic signed [NRD-1:0][31:0] prod2;
  logic signed [ACCW-1:0]      sum3, psum, acc4;

  mult_array #(.N(NRD)) u_mult (.clk, .en(v1), .a(a1), .b(b1), .p(prod2));
  adder_tree #(.N(NRD), .IW(32), .OW(ACCW)) u_tree (.clk, .en(v2), .x(prod2), .sum(sum3));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0; v2 <= 1'b0; v3 <= 1'b0; v4 <= 1'b0;
      mask1 <= '0; tag1 <= '0; tag2 <= '0; tag3 <= '0; tag4 <= '0;
      bias2 <= '0; bias3 <= '0; psum <= '0; acc4 <= '0;
    end else begin
      v1 <= issue; mask1 <= mask0; tag1 <= tag0;
      v2 <= v1;    tag2 <= tag1;   bias2 <= klm_rdata[NRD];
      v3 <= v2;    tag3 <= tag2;   bias3 <= bias2;
      v4 <= 1'b0;
      if (v3) begin
        // phase 2 accumulation into psum; bias joins after the last group
        if (tag3.last) begin
          acc4 <= (tag3.first ? '0 : psum) + sum3 + (ACCW'(bias3) <<< FRAC);
          v4   <= 1'b1;
          tag4 <= tag3;
        end else
          psum <= (tag3.first ? '0 : psum) + sum3;
      end
    end
  end

  // ---------------- phase 3: rescale, saturate, ReLU ----------------
  word_t act4;
  always_comb begin
    logic signed [ACCW-1:0] s;
    s = acc4 >>> FRAC;
    if (s < 0)                 act4 = '0;           // ReLU
    else if (s > 32767)        act4 = 16'sh7fff;    // saturate
    else                       act4 = word_t'(s);
  end

  // ---------------- phase 4 ----------------
  pool_unit #(.D(D), .W(H), .POOL(POOL), .LAST(LAST)) u_pool (
    .clk, .rst_n, .in_valid(v4), .in_d(tag4.d), .in_u(tag4.u), .in_v(tag4.v), .in_x(act4),
    .we(ofm_we), .waddr(ofm_waddr), .wdata(ofm_wdata),
    .res_valid, .res_class, .res_score);
endmodule
