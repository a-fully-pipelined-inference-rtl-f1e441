// tb_core: one core (engine chain with FLMs and IN LM) on network TINY.
// The bench plays the controller (steps, swap), the image loader (writes
// each image into the IN LM beat by beat) and the shared KLMs (a batch is
// ready a random number of cycles after the previous release, with the words
// of tb_pkg's layout). Four images pass through the three-layer pipeline;
// each label and score is compared with the reference network, and the test
// checks that layers worked on different images in the same step.
module tb_core;
  import cnn_pkg::*;
  import tb_pkg::*;
  localparam int NL = TL, MAXRD = 73, NIMG = 4;
  localparam int IW = ifm_words(TINY[0]);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [NL-1:0] ce_start = '0, ce_busy, ce_stall, klm_rd_ready = '0, klm_rd_release;
  logic swap = 0, in_we = 0, res_valid;
  logic [5:0] in_waddr;
  logic [AXI_DW-1:0] in_wdata;
  logic [NL-1:0][MAXRD-1:0][23:0] klm_raddr;
  word_t [NL-1:0][MAXRD-1:0] klm_rdata;
  logic [15:0] res_class;
  word_t res_score;

  core #(.NL(NL), .CFG(TINY)) dut (.clk, .rst_n, .ce_start, .swap, .ce_busy, .ce_stall, .in_we, .in_waddr,
    .in_wdata, .klm_rd_ready, .klm_rd_release, .klm_raddr, .klm_rdata, .res_valid, .res_class, .res_score);

  int checks = 0, failures = 0, batch[NL], nres = 0, overlap = 0;
  word_t kimg [NL][];
  word_t img [NIMG][];
  word_t exp_lbl[NIMG], exp_sc[NIMG];
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // KLM models
  always @(posedge clk) begin
    int a, kd;
    for (int l = 0; l < NL; l++) begin
      kd = klm_words(TINY[l]);
      for (int i = 0; i < MAXRD; i++) begin
        a = klm_raddr[l][i];
        klm_rdata[l][i] <= (a < kd) ? kimg[l][batch[l] * kd + a] : '0;
      end
    end
    if ($countones(ce_busy) > 1) overlap++;
    if (res_valid) begin
      chk(nres < NIMG, "extra label");
      if (nres < NIMG) begin
        chk(res_class == 16'(exp_lbl[nres]), $sformatf("image %0d label %0d exp %0d", nres, res_class, exp_lbl[nres]));
        chk(res_score == exp_sc[nres], $sformatf("image %0d score %0d exp %0d", nres, res_score, exp_sc[nres]));
      end
      nres++;
    end
  end
  for (genvar l = 0; l < NL; l++) begin : g_k
    initial forever begin
      @(posedge clk);
      if (klm_rd_release[l]) begin
        klm_rd_ready[l] <= 0;
        batch[l] = (batch[l] + 1) % int'(TINY[l].kb);
        repeat ($urandom_range(1, 6)) @(posedge clk);
        klm_rd_ready[l] <= 1;
      end
    end
  end

  initial begin
    int pb;
    word_t x[], y[];
    pb = 0;
    for (int l = 0; l < NL; l++) begin
      batch[l] = 0;
      kimg[l] = new[int'(TINY[l].kb) * klm_words(TINY[l])];
      for (int b = 0; b < int'(TINY[l].kb); b++)
        for (int w = 0; w < klm_words(TINY[l]); w++)
          kimg[l][b * klm_words(TINY[l]) + w] = hbm_word(kernel_waddr(TINY[l], pb, b, w));
      pb += int'(TINY[l].nport);
    end
    for (int i = 0; i < NIMG; i++) begin
      img[i] = new[IW];
      for (int w = 0; w < IW; w++) img[i][w] = word_t'($urandom_range(0, 255));
      x = img[i];
      pb = 0;
      for (int l = 0; l < NL; l++) begin ref_layer(TINY[l], pb, x, y); x = y; pb += int'(TINY[l].nport); end
      exp_lbl[i] = y[0]; exp_sc[i] = y[1];
    end
    #22 rst_n = 1;
    klm_rd_ready <= '1;
    for (int s = 0; s < NIMG + NL; s++) begin
      // image s into the IN LM write bank while the engines work
      @(posedge clk);
      for (int l = 0; l < NL; l++) ce_start[l] <= (s - l - 1 >= 0 && s - l - 1 < NIMG);
      @(posedge clk);
      ce_start <= '0;
      if (s < NIMG)
        for (int b = 0; b < (IW + WPB - 1) / WPB; b++) begin
          in_we <= 1; in_waddr <= 6'(b * WPB);
          for (int i = 0; i < WPB; i++) in_wdata[i*DW +: DW] <= (b * WPB + i < IW) ? img[s][b * WPB + i] : '0;
          @(posedge clk);
        end
      in_we <= 0;
      @(posedge clk);
      while (ce_busy != '0) @(posedge clk);
      swap <= 1; @(posedge clk); swap <= 0;
    end
    repeat (3) @(posedge clk);
    chk(nres == NIMG, $sformatf("labels %0d", nres));
    chk(overlap > 0, "layers never overlapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
