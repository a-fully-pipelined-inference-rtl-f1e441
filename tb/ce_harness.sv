// ce_harness: drives one computation engine through one image.
//
// Holds a random input feature map in a one-cycle-latency memory model and
// plays the KLM: a kernel batch becomes ready a random number of cycles after
// the previous one is released, with the words tb_pkg places in that batch.
// Collects the engine's FLM writes (or its label) and compares them with
// tb_pkg::ref_layer. Also checks the issue rate: one window per cycle while a
// batch is present, H*H*D*C/PAR issue cycles per image, and that it stalled.
module ce_harness #(
  parameter cnn_pkg::layer_cfg_t L = cnn_pkg::lc(16, 8, 6, 3, 8, 1'b1, 1'b0, 2, 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic go,
  output logic fin,
  output int   checks,
  output int   failures
);
  import cnn_pkg::*;
  import tb_pkg::*;
  localparam int NRD = nrd(L);
  localparam int IAW = clog2c(ifm_words(L));
  localparam int OAW = clog2c(ofm_words(L));
  localparam int KD  = klm_words(L);
  localparam int KAW = clog2c(KD);
  localparam int CW  = clog2c(int'(L.d) + 1);

  logic start = 0, busy, stall, klm_rd_ready = 0, klm_rd_release, ofm_we, res_valid;
  logic [NRD-1:0][IAW-1:0] ifm_raddr;
  word_t [NRD-1:0] ifm_rdata;
  logic [NRD:0][KAW-1:0] klm_raddr;
  word_t [NRD:0] klm_rdata;
  logic [OAW-1:0] ofm_waddr;
  word_t ofm_wdata, res_score;
  logic [CW-1:0] res_class;

  ce #(.C(int'(L.c)), .D(int'(L.d)), .H(int'(L.h)), .KS(int'(L.k)), .PAR(int'(L.par)), .POOL(L.pool),
       .LAST(L.last), .KB(int'(L.kb)), .KLM_DEPTH(KD)) dut (
    .clk, .rst_n, .start, .busy, .stall, .ifm_raddr, .ifm_rdata, .klm_rd_ready, .klm_rd_release,
    .klm_raddr, .klm_rdata, .ofm_we, .ofm_waddr, .ofm_wdata, .res_valid, .res_class, .res_score);

  word_t ifm [];
  word_t kimg [];   // all kernel batches of the layer, as the AGB would load them
  word_t got [];
  int batch = 0, issues = 0, stalls = 0, nres = 0;

  always @(posedge clk) begin
    int a;
    for (int i = 0; i < NRD; i++) begin a = ifm_raddr[i]; ifm_rdata[i] <= ifm[a]; end
    for (int i = 0; i <= NRD; i++) begin
      a = klm_raddr[i];
      klm_rdata[i] <= (a < KD) ? kimg[batch * KD + a] : '0;
    end
    if (busy && dut.issue) issues++;
    if (stall) stalls++;
    a = ofm_waddr;
    if (rst_n && ofm_we) got[a] = ofm_wdata;
    if (rst_n && res_valid) begin got[0] = word_t'(res_class); got[1] = res_score; nres++; end
  end

  // KLM model
  initial begin
    forever begin
      @(posedge clk);
      if (rst_n && klm_rd_release) begin
        klm_rd_ready <= 0;
        batch = (batch + 1) % int'(L.kb);
        repeat ($urandom_range(1, 8)) @(posedge clk);
        klm_rd_ready <= 1;
      end
    end
  end

  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask

  initial begin
    word_t y[];
    checks = 0; failures = 0; fin = 0;
    ifm = new[ifm_words(L)];
    got = new[L.last ? 2 : ofm_words(L)];
    for (int i = 0; i < ifm_words(L); i++) ifm[i] = word_t'($urandom_range(0, 400));
    kimg = new[int'(L.kb) * KD];
    for (int b = 0; b < int'(L.kb); b++)
      for (int w = 0; w < KD; w++) kimg[b * KD + w] = hbm_word(kernel_waddr(L, 0, b, w));
    wait (go);
    repeat (5) @(posedge clk);
    klm_rd_ready <= 1;
    start <= 1; @(posedge clk); start <= 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    ref_layer(L, 0, ifm, y);
    for (int i = 0; i < y.size(); i++) chk(got[i] == y[i], $sformatf("output %0d got %0d exp %0d", i, got[i], y[i]));
    chk(issues == int'(L.h) * int'(L.h) * int'(L.d) * int'(L.c) / int'(L.par),
        $sformatf("issue cycles %0d", issues));
    chk(stalls > 0, "engine never waited for a batch");
    if (L.last) chk(nres == 1, "one label per image");
    fin = 1;
  end
endmodule
