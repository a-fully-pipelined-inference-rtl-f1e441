// tb_cnn_accel_top: end-to-end test of the accelerator.
//
// Runs the whole accelerator (controller, data arbiter with its AGBs and
// image loader, shared KLMs, cores of computation engines, OUT LM) against
// the HBM2 model on the three-layer network tb_pkg::TINY with 2 cores and
// 3 image groups, then reads every label and score from the OUT LM and
// compares them with the reference network run on the same HBM2 content.
// It counts the mechanisms of the design and fails if one never happened:
// engines stalled for a kernel batch, AGBs held back by a full KLM, HBM2
// address back-pressure, image and kernel requests meeting on the shared
// port, several layers busy at once (inter-layer pipeline), a kernel batch
// read by all cores at once, buffer swaps and bursts shorter than 256 beats.
module tb_cnn_accel_top;
  import cnn_pkg::*;
  import tb_pkg::*;

  localparam int NCORE = 2;
  localparam int NL    = TL;
  localparam int NG    = 3;
  localparam int NP    = 4;
  localparam logic [AXI_AW-1:0] IMG_BASE = 33'h01800_0000;

  logic clk = 0, rst_n = 0;
  always #2 clk = ~clk;

  logic start = 0, busy, done;
  logic [15:0] n_groups = NG;
  logic [4:0]  out_raddr = '0;
  logic [31:0] out_rdata;
  logic [NP-1:0] arvalid, arready, rvalid, rready;
  axi_ar_t [NP-1:0] ar;
  axi_r_t  [NP-1:0] r;
  int bursts, beats, bad_len;

  cnn_accel_top #(.NCORE(NCORE), .NL(NL), .CFG(TINY), .OUT_GROUPS(8), .IMG_BASE(IMG_BASE)) dut (
    .clk, .rst_n, .start, .n_groups, .busy, .done, .out_raddr, .out_rdata,
    .m_axi_arvalid(arvalid), .m_axi_arready(arready), .m_axi_ar(ar),
    .m_axi_rvalid(rvalid), .m_axi_rready(rready), .m_axi_r(r));

  hbm_model #(.NP(NP)) u_hbm (.clk, .rst_n, .ar_valid(arvalid), .ar_ready(arready), .ar,
    .r_valid(rvalid), .r_ready(rready), .r, .bursts, .beats, .bad_len);

  int checks = 0, failures = 0;
  int n_ce_stall = 0, n_agb_wait = 0, n_backpressure = 0, n_port_conflict = 0;
  int n_overlap = 0, n_shared_release = 0, n_swap = 0, n_short_burst = 0, cycles = 0;

  always @(posedge clk) if (rst_n) begin
    int nb;
    cycles++;
    if (dut.g_core[0].u_core.ce_stall != '0) n_ce_stall++;
    if (dut.klm_wr_ready != '1 && dut.agb_busy != '0) n_agb_wait++;
    if ((arvalid & ~arready) != '0) n_backpressure++;
    if (dut.u_dam.i_ar_valid && dut.u_dam.k_ar_valid[0]) n_port_conflict++;
    nb = 0;
    for (int l = 0; l < NL; l++) nb += int'(dut.layer_busy[l]);
    if (nb > 1) n_overlap++;
    if (dut.klm_rd_release[0] != '0 && dut.klm_rd_release[0] == dut.klm_rd_release[1]) n_shared_release++;
    if (dut.swap) n_swap++;
    for (int p = 0; p < NP; p++) if (arvalid[p] && arready[p] && ar[p].len != 8'd255) n_short_burst++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int pb[NL];
    pb[0] = 0;
    for (int l = 1; l < NL; l++) pb[l] = pb[l-1] + int'(TINY[l-1].nport);
    repeat (4) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    wait (done);
    @(posedge clk);
    $display("run finished after %0d cycles, %0d bursts, %0d beats", cycles, bursts, beats);
    for (int i = 0; i < NG * NCORE; i++) begin
      word_t x[], y[];
      int iw = ifm_words(TINY[0]);
      int ib = (iw + WPB - 1) / WPB * WPB;
      x = new[iw];
      for (int w = 0; w < iw; w++) x[w] = hbm_word(longint'(IMG_BASE) / 2 + i * ib + w);
      for (int l = 0; l < NL; l++) begin ref_layer(TINY[l], pb[l], x, y); x = y; end
      $display("image %0d: reference label %0d score %0d", i, y[0], y[1]);
      out_raddr <= 5'(i);
      @(posedge clk); @(posedge clk); #1;
      check(out_rdata[31:16] == 16'(y[0]), $sformatf("image %0d label %0d expected %0d", i, out_rdata[31:16], y[0]));
      check(out_rdata[15:0] == 16'(y[1]), $sformatf("image %0d score %0d expected %0d", i, $signed(out_rdata[15:0]), y[1]));
    end
    check(bad_len == 0, "burst length not a power of two");
    $display("mechanisms: ce_stall=%0d agb_wait=%0d backpressure=%0d port_conflict=%0d overlap=%0d shared_release=%0d swap=%0d short_burst=%0d",
             n_ce_stall, n_agb_wait, n_backpressure, n_port_conflict, n_overlap, n_shared_release, n_swap, n_short_burst);
    check(n_ce_stall > 0, "engine never waited for a kernel batch");
    check(n_agb_wait > 0, "AGB never waited for a free KLM bank");
    check(n_backpressure > 0, "no HBM2 back-pressure");
    check(n_port_conflict > 0, "image and kernel loads never met on the shared port");
    check(n_overlap > 0, "layers never busy at the same time");
    check(n_shared_release > 0, "no kernel batch shared by the cores");
    check(n_swap == NG + NL, "number of pipeline steps");
    check(n_short_burst > 0, "no short burst");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
