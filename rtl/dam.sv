// dam: data arbiter module, the accelerator's side of the HBM2 ports.
//
// The DAM holds one address generator block (AGB) per layer and an image
// loader, and owns NP AXI4 read ports (31 for VGG-16: ports 1..31 of the
// HBM2, port 0 being left to the host's DMA). Layer l's AGB drives the
// CFG[l].nport ports that follow those of the layers before it, and writes
// what they return into layer l's KLM. The image loader reads the N images
// of one group, one after the other, from IMG_BASE onward (image i at
// IMG_BASE + i * IMG_BYTES) into the IN LM of core 0..N-1. It shares the
// first port with the first layer's AGB: an address request is granted to the
// two in turn when both wait, a grant is held until the request is accepted,
// and returning beats are steered by their AXI ID (0: kernel, 1: image).
// Kernel batches and images going to the right local memory is the DAM's
// function in the design description; sharing the first port for images and
// the arbitration are this design's choices.
module dam #(
  parameter int NL    = cnn_pkg::VGG_L,
  parameter cnn_pkg::layer_cfg_t [NL-1:0] CFG = cnn_pkg::VGG16_CIFAR,
  parameter int NCORE = 4,
  parameter logic [cnn_pkg::AXI_AW-1:0] IMG_BASE = 33'h01800_0000,
  localparam int NP    = np_total(),
  localparam int MAXP  = 3,
  localparam int IMG_WORDS = cnn_pkg::ifm_words(CFG[0]),
  localparam int IMG_BEATS = (IMG_WORDS + cnn_pkg::WPB - 1) / cnn_pkg::WPB,
  localparam int IN_AW = cnn_pkg::clog2c(IMG_WORDS)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  // kernel loading
  input  logic [NL-1:0]                          agb_start,
  output logic [NL-1:0]                          agb_busy,
  input  logic [NP-1:0][cnn_pkg::AXI_AW-1:0]     addr_offset,
  input  logic [NL-1:0]                          klm_wr_ready,
  output logic [NL-1:0]                          klm_wr_done,
  output logic [NL-1:0][MAXP-1:0]                klm_we,
  output logic [NL-1:0][MAXP-1:0][23:0]          klm_waddr,
  output logic [NL-1:0][MAXP-1:0][cnn_pkg::AXI_DW-1:0] klm_wdata,
  // image loading
  input  logic                                   img_start,
  input  logic [15:0]                            img_group,
  output logic                                   img_busy,
  output logic [NCORE-1:0]                       in_we,
  output logic [IN_AW-1:0]                       in_waddr,
  output logic [cnn_pkg::AXI_DW-1:0]             in_wdata,
  // AXI4 read ports to HBM2
  output logic [NP-1:0]                          ar_valid,
  input  logic [NP-1:0]                          ar_ready,
  output cnn_pkg::axi_ar_t [NP-1:0]              ar,
  input  logic [NP-1:0]                          r_valid,
  output logic [NP-1:0]                          r_ready,
  input  cnn_pkg::axi_r_t [NP-1:0]               r
);
  import cnn_pkg::*;

  function automatic int np_before(int n);
    int s = 0;
    for (int i = 0; i < n; i++) s += int'(CFG[i].nport);
    return s;
  endfunction
  function automatic int np_total();
    return np_before(NL);
  endfunction

  localparam longint IMG_BYTES = longint'(IMG_BEATS) * BEAT_B;

  // ports as driven by the AGBs, before port 0 is shared with the image loader
  logic [NP-1:0]       k_ar_valid, k_r_ready;
  axi_ar_t [NP-1:0]    k_ar;

  for (genvar l = 0; l < NL; l++) begin : g_agb
    localparam int PB  = np_before(l);
    localparam int NPL = int'(CFG[l].nport);
    localparam int WLB = wl_beats(CFG[l]);
    localparam int KAW = clog2c(NPL * WLB * WPB);
    logic [NPL-1:0][KAW-1:0] waddr;
    logic [NPL-1:0]          rv;
    logic [15:0]             kbid_unused;

    always_comb
      for (int p = 0; p < NPL; p++)
        rv[p] = r_valid[PB+p] && (p != 0 || l != 0 || r[0].id == '0);

    agb #(.NPORT(NPL), .WL_BEATS(WLB), .KB(int'(CFG[l].kb)), .ROWS(int'(CFG[l].h)), .ID('0)) u_agb (
      .clk, .rst_n, .start(agb_start[l]), .addr_offset(addr_offset[PB +: NPL]),
      .busy(agb_busy[l]), .kbatch_id(kbid_unused),
      .klm_wr_ready(klm_wr_ready[l]), .klm_wr_done(klm_wr_done[l]),
      .klm_we(klm_we[l][NPL-1:0]), .klm_waddr(waddr), .klm_wdata(klm_wdata[l][NPL-1:0]),
      .ar_valid(k_ar_valid[PB +: NPL]), .ar_ready(ar_ready[PB +: NPL] & ~({NPL{l == 0 && img_grant}} & NPL'(1))),
      .ar(k_ar[PB +: NPL]), .r_valid(rv), .r_ready(k_r_ready[PB +: NPL]), .r(r[PB +: NPL]));

    always_comb begin
      klm_waddr[l] = '0;
      for (int p = 0; p < NPL; p++) klm_waddr[l][p] = 24'(waddr[p]);
    end
    if (NPL < MAXP) begin : g_pad
      assign klm_we[l][MAXP-1:NPL]    = '0;
      assign klm_wdata[l][MAXP-1:NPL] = '0;
    end
  end

  // ---------------- image loader ----------------
  logic        img_grant, grant_hold, last_img;
  logic        i_ar_valid, i_r_ready, i_start, i_busy, i_done, i_we;
  axi_ar_t     i_ar;
  logic [31:0] i_beat;
  logic [15:0] core_idx;
  logic        img_run;

  axi_burst_reader #(.ID(AXI_IDW'(1))) u_img (
    .clk, .rst_n, .start(i_start),
    .base(IMG_BASE + AXI_AW'((longint'(img_group) * NCORE + longint'(core_idx)) * IMG_BYTES)),
    .nbeats(32'(IMG_BEATS)), .busy(i_busy), .done(i_done),
    .ar_valid(i_ar_valid), .ar_ready(ar_ready[0] && img_grant), .ar(i_ar),
    .r_valid(r_valid[0] && r[0].id == AXI_IDW'(1)), .r_ready(i_r_ready), .r(r[0]),
    .we(i_we), .wbeat(i_beat), .wdata(in_wdata));

  assign i_start  = img_run && !i_busy && !i_done;
  assign img_busy = img_run;
  assign in_waddr = IN_AW'(int'(i_beat) * WPB);
  always_comb
    for (int n = 0; n < NCORE; n++) in_we[n] = i_we && (int'(core_idx) == n);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      img_run <= 1'b0; core_idx <= '0;
    end else if (!img_run) begin
      if (img_start) begin img_run <= 1'b1; core_idx <= '0; end
    end else if (i_done) begin
      if (int'(core_idx) == NCORE - 1) img_run <= 1'b0;
      else core_idx <= core_idx + 1;
    end
  end

  // ---------------- port 0 arbitration ----------------
  // grant goes to the image loader when only it waits, or when both wait and
  // the kernel loader had the previous grant; it is held until accepted
  always_comb begin
    if (grant_hold)                    img_grant = last_img;
    else if (i_ar_valid && !k_ar_valid[0]) img_grant = 1'b1;
    else if (i_ar_valid && k_ar_valid[0])  img_grant = !last_img;
    else                               img_grant = 1'b0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      grant_hold <= 1'b0; last_img <= 1'b0;
    end else begin
      if (ar_valid[0] && !ar_ready[0]) begin grant_hold <= 1'b1; last_img <= img_grant; end
      else begin
        grant_hold <= 1'b0;
        if (ar_valid[0]) last_img <= img_grant;
      end
    end
  end

  always_comb begin
    ar_valid = k_ar_valid;
    ar       = k_ar;
    r_ready  = k_r_ready;
    ar_valid[0] = img_grant ? i_ar_valid : k_ar_valid[0];
    ar[0]       = img_grant ? i_ar       : k_ar[0];
    r_ready[0]  = (r[0].id == AXI_IDW'(1)) ? i_r_ready : k_r_ready[0];
  end
endmodule
