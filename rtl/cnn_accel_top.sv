// cnn_accel_top: fully-pipelined multi-core CNN inference accelerator (VGG-16).
//
// NCORE identical cores each run the whole network on their own image. Inside
// a core the NL computation engines form an inter-layer pipeline, one engine
// per layer, linked by ping-pong feature local memories. The kernel
// parameters are not duplicated: each layer has one dual kernel local memory
// (KLM) whose read data is broadcast to that layer's engine in every core, so
// one load from HBM2 serves NCORE images. The data arbiter module (DAM) loads
// kernel batches into the KLMs through its per-layer address generator blocks
// (AGBs), each owning 1 to 3 of the NP AXI4 read ports to HBM2, and loads the
// input images into the cores' IN LMs. The FSM controller steps the pipeline.
// Each image's label (the index of the largest output of the last layer, and
// that output) is written to the OUT LM at group*NCORE + core; when the run
// ends the OUT LM banks are exchanged and the host reads the labels through
// out_raddr/out_rdata (one-cycle read latency).
//
// Interface: host control (start, n_groups, busy, done), the OUT LM read port,
// and NP AXI4 read-address/read-data channels towards the HBM2 controller
// (HBM2 AXI ports 1..NP; port 0 belongs to the host's DMA, which also fills
// HBM2 with images and kernels). Data layout expected in HBM2: images of
// ifm_words(CFG[0]) 16-bit words ([channel][row][column]) from IMG_BASE, each
// padded to whole 32-byte beats; for layer l and its AGB port p, kernel batch
// b (1-based) at Addr_offset + (b-1)*len(Workload), where a batch is
// d/kb kernels [d][c][row][column] followed by their d/kb biases, cut into
// nport equal parts of wl_beats(CFG[l]) beats.
// Defaults: 4 cores x 16 engines for VGG-16 on 3x32x32 images, 250 MHz, one
// clock domain. The architecture follows the design description; the clocking,
// the HBM2 data layout and the OUT LM size are this design's choices.
module cnn_accel_top #(
  parameter int NCORE      = 4,
  parameter int NL         = cnn_pkg::VGG_L,
  parameter cnn_pkg::layer_cfg_t [NL-1:0] CFG = cnn_pkg::VGG16_CIFAR,
  parameter int OUT_GROUPS = 256,
  parameter logic [cnn_pkg::AXI_AW-1:0] IMG_BASE = 33'h01800_0000,
  localparam int NP        = np_total(),
  localparam int OUT_AW    = cnn_pkg::clog2c(OUT_GROUPS * NCORE)
) (
  input  logic                               clk,
  input  logic                               rst_n,
  // host control
  input  logic                               start,
  input  logic [15:0]                        n_groups,
  output logic                               busy,
  output logic                               done,
  // OUT LM read port: {label, score}
  input  logic [OUT_AW-1:0]                  out_raddr,
  output logic [31:0]                        out_rdata,
  // AXI4 read ports to HBM2
  output logic [NP-1:0]                      m_axi_arvalid,
  input  logic [NP-1:0]                      m_axi_arready,
  output cnn_pkg::axi_ar_t [NP-1:0]          m_axi_ar,
  input  logic [NP-1:0]                      m_axi_rvalid,
  output logic [NP-1:0]                      m_axi_rready,
  input  cnn_pkg::axi_r_t [NP-1:0]           m_axi_r
);
  import cnn_pkg::*;

  function automatic int np_total();
    int s = 0;
    for (int i = 0; i < NL; i++) s += int'(CFG[i].nport);
    return s;
  endfunction

  localparam int MAXRD = 73;
  localparam int MAXP  = 3;
  localparam int IN_AW = clog2c(ifm_words(CFG[0]));

  // ---------------- controller ----------------
  logic [15:0]            step_unused, img_group, out_group;
  logic                   img_start, img_busy, swap, out_swap;
  logic [NL-1:0]          layer_start, layer_busy, agb_busy;
  logic [NP-1:0][AXI_AW-1:0] addr_offset;
  logic [NCORE-1:0][NL-1:0] ce_busy, ce_stall;

  always_comb begin
    layer_busy = agb_busy;
    for (int n = 0; n < NCORE; n++) layer_busy |= ce_busy[n];
  end

  fsm_ctrl #(.NL(NL), .NP(NP)) u_ctrl (
    .clk, .rst_n, .start, .n_groups, .busy, .done, .step(step_unused),
    .img_start, .img_group, .img_busy, .layer_start, .layer_busy,
    .swap, .out_swap, .out_group, .addr_offset);

  // ---------------- data arbiter ----------------
  logic [NL-1:0]                          klm_wr_ready, klm_wr_done;
  logic [NL-1:0][MAXP-1:0]                klm_we;
  logic [NL-1:0][MAXP-1:0][23:0]          klm_waddr;
  logic [NL-1:0][MAXP-1:0][AXI_DW-1:0]    klm_wdata;
  logic [NCORE-1:0]                       in_we;
  logic [IN_AW-1:0]                       in_waddr;
  logic [AXI_DW-1:0]                      in_wdata;

  dam #(.NL(NL), .CFG(CFG), .NCORE(NCORE), .IMG_BASE(IMG_BASE)) u_dam (
    .clk, .rst_n, .agb_start(layer_start), .agb_busy, .addr_offset,
    .klm_wr_ready, .klm_wr_done, .klm_we, .klm_waddr, .klm_wdata,
    .img_start, .img_group, .img_busy, .in_we, .in_waddr, .in_wdata,
    .ar_valid(m_axi_arvalid), .ar_ready(m_axi_arready), .ar(m_axi_ar),
    .r_valid(m_axi_rvalid), .r_ready(m_axi_rready), .r(m_axi_r));

  // ---------------- shared dual kernel local memories ----------------
  logic [NL-1:0]                   klm_rd_ready;
  logic [NCORE-1:0][NL-1:0]        klm_rd_release;
  logic [NCORE-1:0][NL-1:0][MAXRD-1:0][23:0] klm_raddr;
  word_t [NL-1:0][MAXRD-1:0]       klm_rdata;

  for (genvar l = 0; l < NL; l++) begin : g_klm
    localparam int NPL = int'(CFG[l].nport);
    localparam int NRD = nrd(CFG[l]) + 1;
    localparam int KD  = klm_words(CFG[l]);
    localparam int KAW = clog2c(KD);
    logic [NPL-1:0][KAW-1:0] wa;
    logic [NRD-1:0][KAW-1:0] ra;
    always_comb begin
      for (int p = 0; p < NPL; p++) wa[p] = KAW'(klm_waddr[l][p]);
      // all cores read the same addresses in lockstep: core 0's are used
      for (int i = 0; i < NRD; i++) ra[i] = KAW'(klm_raddr[0][l][i]);
    end
    klm #(.DEPTH(KD), .NPORT(NPL), .NRD(NRD)) u_klm (
      .clk, .rst_n, .wr_ready(klm_wr_ready[l]), .wr_done(klm_wr_done[l]),
      .we(klm_we[l][NPL-1:0]), .waddr(wa), .wdata(klm_wdata[l][NPL-1:0]),
      .rd_ready(klm_rd_ready[l]), .rd_release(klm_rd_release[0][l]),
      .raddr(ra), .rdata(klm_rdata[l][NRD-1:0]));
    if (NRD < MAXRD) begin : g_pad
      assign klm_rdata[l][MAXRD-1:NRD] = '0;
    end
  end

  // ---------------- cores and OUT LM ----------------
  logic [NCORE-1:0]              res_valid, out_we;
  logic [NCORE-1:0][15:0]        res_class;
  word_t [NCORE-1:0]             res_score;
  logic [NCORE-1:0][OUT_AW-1:0]  out_waddr;
  logic [NCORE-1:0][31:0]        out_wdata;
  logic                          out_wbank_unused;

  for (genvar n = 0; n < NCORE; n++) begin : g_core
    core #(.NL(NL), .CFG(CFG)) u_core (
      .clk, .rst_n, .ce_start(layer_start), .swap,
      .ce_busy(ce_busy[n]), .ce_stall(ce_stall[n]),
      .in_we(in_we[n]), .in_waddr, .in_wdata,
      .klm_rd_ready, .klm_rd_release(klm_rd_release[n]),
      .klm_raddr(klm_raddr[n]), .klm_rdata,
      .res_valid(res_valid[n]), .res_class(res_class[n]), .res_score(res_score[n]));
    assign out_we[n]    = res_valid[n];
    assign out_waddr[n] = OUT_AW'(int'(out_group) * NCORE + n);
    assign out_wdata[n] = {res_class[n], res_score[n]};
  end

  dual_buffer #(.DEPTH(OUT_GROUPS * NCORE), .DW(32), .NWR(NCORE), .WWORDS(1), .NRD(1)) u_outlm (
    .clk, .rst_n, .swap(out_swap), .wbank(out_wbank_unused),
    .we(out_we), .waddr(out_waddr), .wdata(out_wdata), .raddr(out_raddr), .rdata(out_rdata));

  // the cores share kernel reads, so they must stay in lockstep
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n)
    klm_rd_release[0] == klm_rd_release[NCORE-1])
    else $error("cnn_accel_top: cores out of lockstep");
endmodule
