// core: one inference core, the chain of L computation engines of the network.
//
// Engine l computes layer l. Its input feature maps come from the IN LM
// (l = 0) or from the dual feature local memory (FLM) written by engine l-1;
// its outputs go to its own FLM, and the last engine gives the label. Every
// local memory is a ping-pong dual_buffer and all of them are exchanged by
// one swap pulse at the end of a pipeline step, so in one step engine l works
// on image i-l while engine l-1 produces image i-l+1 into the other bank:
// all layers run at the same time on successive images (inter-layer pipeline).
// The kernel local memories are outside the core and shared by all cores:
// the core gives out the read addresses and takes back the read data of each
// layer's KLM (only the addresses of one core are used; the cores run in
// lockstep). Per-layer buses are carried in arrays sized for the widest layer,
// MAXRD read lanes of 24-bit addresses.
// The engine chain and the dual FLMs follow the design description; the
// image-level step of the pipeline is this design's reading of it.
module core #(
  parameter int NL = cnn_pkg::VGG_L,
  parameter cnn_pkg::layer_cfg_t [NL-1:0] CFG = cnn_pkg::VGG16_CIFAR,
  localparam int MAXRD = 73,
  localparam int IN_AW = cnn_pkg::clog2c(cnn_pkg::ifm_words(CFG[0]))
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic [NL-1:0]                      ce_start,
  input  logic                               swap,
  output logic [NL-1:0]                      ce_busy,
  output logic [NL-1:0]                      ce_stall,
  // IN LM write port (one AXI beat of image data per cycle)
  input  logic                               in_we,
  input  logic [IN_AW-1:0]                   in_waddr,
  input  logic [cnn_pkg::AXI_DW-1:0]         in_wdata,
  // shared KLMs
  input  logic [NL-1:0]                      klm_rd_ready,
  output logic [NL-1:0]                      klm_rd_release,
  output logic [NL-1:0][MAXRD-1:0][23:0]     klm_raddr,
  input  cnn_pkg::word_t [NL-1:0][MAXRD-1:0] klm_rdata,
  // label of the image leaving the last engine
  output logic                               res_valid,
  output logic [15:0]                        res_class,
  output cnn_pkg::word_t                     res_score
);
  import cnn_pkg::*;

  // IFM read lanes of every engine
  logic  [NL-1:0][MAXRD-1:0][23:0] ifm_raddr;
  word_t [NL-1:0][MAXRD-1:0]       ifm_rdata;

  for (genvar l = 0; l < NL; l++) begin : g_layer
    localparam layer_cfg_t LC = CFG[l];
    localparam int NRD = nrd(LC);
    localparam int IAW = clog2c(ifm_words(LC));
    localparam int OAW = clog2c(ofm_words(LC));
    localparam int KD  = klm_words(LC);
    localparam int KAW = clog2c(KD);
    localparam int CW  = clog2c(int'(LC.d) + 1);

    logic [NRD-1:0][IAW-1:0] raddr;
    word_t [NRD-1:0]         rdata;
    logic [NRD:0][KAW-1:0]   kaddr;
    word_t [NRD:0]           kdata;
    logic                    ofm_we;
    logic [OAW-1:0]          ofm_waddr;
    word_t                   ofm_wdata;
    logic                    rv;
    logic [CW-1:0]           rc;
    word_t                   rs;

    always_comb begin
      ifm_raddr[l] = '0;
      klm_raddr[l] = '0;
      for (int i = 0; i < NRD; i++) begin
        ifm_raddr[l][i] = 24'(raddr[i]);
        rdata[i]        = ifm_rdata[l][i];
      end
      for (int i = 0; i <= NRD; i++) begin
        klm_raddr[l][i] = 24'(kaddr[i]);
        kdata[i]        = klm_rdata[l][i];
      end
    end

    ce #(.C(int'(LC.c)), .D(int'(LC.d)), .H(int'(LC.h)), .KS(int'(LC.k)), .PAR(int'(LC.par)),
         .POOL(LC.pool), .LAST(LC.last), .KB(int'(LC.kb)), .KLM_DEPTH(KD)) u_ce (
      .clk, .rst_n, .start(ce_start[l]), .busy(ce_busy[l]), .stall(ce_stall[l]),
      .ifm_raddr(raddr), .ifm_rdata(rdata),
      .klm_rd_ready(klm_rd_ready[l]), .klm_rd_release(klm_rd_release[l]),
      .klm_raddr(kaddr), .klm_rdata(kdata),
      .ofm_we, .ofm_waddr, .ofm_wdata,
      .res_valid(rv), .res_class(rc), .res_score(rs));

    if (l == 0) begin : g_inlm
      // IN LM: the image, written by the data arbiter one beat at a time
      logic                    wb_unused;
      logic [NRD-1:0][IAW-1:0] ra;
      always_comb for (int i = 0; i < NRD; i++) ra[i] = IAW'(ifm_raddr[0][i]);
      dual_buffer #(.DEPTH(ifm_words(LC)), .DW(DW), .NWR(1), .WWORDS(WPB), .NRD(NRD)) u_inlm (
        .clk, .rst_n, .swap, .wbank(wb_unused), .we(in_we), .waddr(IAW'(in_waddr)),
        .wdata(in_wdata), .raddr(ra), .rdata(ifm_rdata[0][NRD-1:0]));
      if (NRD < MAXRD) begin : g_pad
        assign ifm_rdata[0][MAXRD-1:NRD] = '0;
      end
    end

    if (l < NL - 1) begin : g_flm
      // FLM of engine l, read by engine l+1
      localparam int NRD_N = nrd(CFG[l+1]);
      logic                      wb_unused;
      logic [NRD_N-1:0][OAW-1:0] ra;
      always_comb for (int i = 0; i < NRD_N; i++) ra[i] = OAW'(ifm_raddr[l+1][i]);
      dual_buffer #(.DEPTH(ofm_words(LC)), .DW(DW), .NWR(1), .WWORDS(1), .NRD(NRD_N)) u_flm (
        .clk, .rst_n, .swap, .wbank(wb_unused), .we(ofm_we), .waddr(ofm_waddr),
        .wdata(ofm_wdata), .raddr(ra), .rdata(ifm_rdata[l+1][NRD_N-1:0]));
      if (NRD_N < MAXRD) begin : g_pad
        assign ifm_rdata[l+1][MAXRD-1:NRD_N] = '0;
      end
    end else begin : g_out
      assign res_valid = rv;
      assign res_class = 16'(rc);
      assign res_score = rs;
    end
  end
endmodule
