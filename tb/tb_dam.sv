// tb_dam: data arbiter with all AGBs and the image loader, on the HBM2 model.
// Network tb_pkg::TINY (3 layers, 4 ports), 2 cores. Image group 1 and the
// kernels of every layer are loaded at the same time, so the image loader and
// the first AGB compete for the shared first port. Checks every IN LM write
// (core, address, data of image 2 and 3) and every KLM write (layer, port,
// batch, data) against the HBM2 content, the number of batches per layer,
// that both requesters were served on the shared port and that the
// arbitration was exercised.
module tb_dam;
  import cnn_pkg::*;
  import tb_pkg::*;
  localparam int NL = TL, NCORE = 2, NP = 4, MAXP = 3;
  localparam logic [AXI_AW-1:0] IMG_BASE = 33'h01800_0000;
  localparam int IMG_WORDS = ifm_words(TINY[0]);
  localparam int IMG_BEATS = (IMG_WORDS + WPB - 1) / WPB;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NL-1:0] agb_start = '0, agb_busy, klm_wr_ready, klm_wr_done;
  logic [NP-1:0][AXI_AW-1:0] addr_offset;
  logic [NL-1:0][MAXP-1:0] klm_we;
  logic [NL-1:0][MAXP-1:0][23:0] klm_waddr;
  logic [NL-1:0][MAXP-1:0][AXI_DW-1:0] klm_wdata;
  logic img_start = 0, img_busy;
  logic [15:0] img_group = 16'd1;
  logic [NCORE-1:0] in_we;
  logic [5:0] in_waddr;
  logic [AXI_DW-1:0] in_wdata;
  logic [NP-1:0] ar_valid, ar_ready, r_valid, r_ready;
  axi_ar_t [NP-1:0] ar;
  axi_r_t [NP-1:0] r;
  int bursts, beats, bad_len;

  dam #(.NL(NL), .CFG(TINY), .NCORE(NCORE), .IMG_BASE(IMG_BASE)) dut (.clk, .rst_n, .agb_start, .agb_busy,
    .addr_offset, .klm_wr_ready, .klm_wr_done, .klm_we, .klm_waddr, .klm_wdata, .img_start, .img_group,
    .img_busy, .in_we, .in_waddr, .in_wdata, .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r);
  hbm_model #(.NP(NP)) u_hbm (.clk, .rst_n, .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r,
    .bursts, .beats, .bad_len);

  int checks = 0, failures = 0, img_beats[NCORE], ndone[NL], conflicts = 0;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always_comb for (int p = 0; p < NP; p++) addr_offset[p] = AXI_AW'(longint'(p + 1) * PART_BYTES);
  assign klm_wr_ready = '1;   // banks freed at once

  always @(posedge clk) if (rst_n) begin
    int pb, beat, wlb, img;
    if (dut.i_ar_valid && dut.k_ar_valid[0]) conflicts++;
    for (int n = 0; n < NCORE; n++) if (in_we[n]) begin
      beat = int'(in_waddr) / WPB;
      img  = 1 * NCORE + n;
      for (int i = 0; i < WPB; i++)
        if (beat * WPB + i < IMG_WORDS)
          chk(in_wdata[i*DW +: DW] == hbm_word(longint'(IMG_BASE) / 2 + img * IMG_BEATS * WPB + beat * WPB + i),
              $sformatf("image word core %0d beat %0d", n, beat));
      img_beats[n]++;
    end
    pb = 0;
    for (int l = 0; l < NL; l++) begin
      wlb = wl_beats(TINY[l]);
      for (int p = 0; p < int'(TINY[l].nport); p++) if (klm_we[l][p]) begin
        beat = int'(klm_waddr[l][p]) / WPB - p * wlb;
        for (int i = 0; i < WPB; i++)
          chk(klm_wdata[l][p][i*DW +: DW] == hbm_word(kernel_waddr(TINY[l], pb, ndone[l] % int'(TINY[l].kb), p * wlb * WPB + beat * WPB + i)),
              $sformatf("kernel layer %0d port %0d beat %0d", l, p, beat));
      end
      if (klm_wr_done[l]) ndone[l]++;
      pb += int'(TINY[l].nport);
    end
  end

  initial begin
    #22 rst_n = 1;
    @(posedge clk);
    img_start <= 1; agb_start <= '1;
    @(posedge clk);
    img_start <= 0; agb_start <= '0;
    @(posedge clk);
    while (img_busy || agb_busy != '0) @(posedge clk);
    @(posedge clk);
    for (int n = 0; n < NCORE; n++) chk(img_beats[n] == IMG_BEATS, $sformatf("image beats core %0d: %0d", n, img_beats[n]));
    for (int l = 0; l < NL; l++)
      chk(ndone[l] == int'(TINY[l].kb) * int'(TINY[l].h), $sformatf("batches layer %0d: %0d", l, ndone[l]));
    chk(conflicts > 0, "shared port never contested");
    chk(bad_len == 0, "burst lengths");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
