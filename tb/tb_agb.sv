// tb_agb: address generator block against the HBM2 model.
// Two ports, len(Workload) = 300 beats (bursts of 256, 32, 8 and 4), three
// kernel batches per row, two rows. The bench plays a KLM whose banks are
// freed after a random delay. Every KLM write is checked: its port's region,
// Addr_base = (KBatch_id-1)*len(Workload) + Addr_offset, the beat's data
// and KLM address; also the number of beats and bursts per batch (Eq. 9),
// the batch order and that the AGB waits while the KLM is full.
module tb_agb;
  import cnn_pkg::*;
  import tb_pkg::*;
  localparam int NPORT = 2, WLB = 300, KB = 3, ROWS = 2;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, klm_wr_ready, klm_wr_done;
  logic [NPORT-1:0][AXI_AW-1:0] addr_offset;
  logic [15:0] kbatch_id;
  logic [NPORT-1:0] klm_we, ar_valid, ar_ready, r_valid, r_ready;
  logic [NPORT-1:0][13:0] klm_waddr;
  logic [NPORT-1:0][AXI_DW-1:0] klm_wdata;
  axi_ar_t [NPORT-1:0] ar;
  axi_r_t [NPORT-1:0] r;
  int bursts, beats, bad_len;

  agb #(.NPORT(NPORT), .WL_BEATS(WLB), .KB(KB), .ROWS(ROWS)) dut (.clk, .rst_n, .start, .addr_offset, .busy,
    .kbatch_id, .klm_wr_ready, .klm_wr_done, .klm_we, .klm_waddr, .klm_wdata,
    .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r);
  hbm_model #(.NP(NPORT)) u_hbm (.clk, .rst_n, .ar_valid, .ar_ready, .ar, .r_valid, .r_ready, .r,
    .bursts, .beats, .bad_len);

  int checks = 0, failures = 0, ndone = 0, nwr = 0, waits = 0;
  logic [1:0] full = 0;    // banks holding a batch
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin #2000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  assign klm_wr_ready = (full != 2'b11);
  assign addr_offset[0] = AXI_AW'(3 * PART_BYTES);
  assign addr_offset[1] = AXI_AW'(7 * PART_BYTES);

  always @(posedge clk) if (rst_n) begin
    int beat;
    longint base;
    for (int p = 0; p < NPORT; p++) if (klm_we[p]) begin
      beat = int'(klm_waddr[p]) / WPB - p * WLB;
      base = (longint'(addr_offset[p]) + longint'(ndone % KB) * WLB * BEAT_B) / 2;
      chk(int'(klm_waddr[p]) % WPB == 0 && beat >= 0 && beat < WLB, "KLM address inside the port's part");
      for (int i = 0; i < WPB; i++)
        chk(klm_wdata[p][i*DW +: DW] == hbm_word(base + beat * WPB + i), $sformatf("batch %0d port %0d beat %0d word %0d", ndone, p, beat, i));
      nwr++;
    end
    if (busy && !klm_wr_ready) waits++;
    if (klm_wr_done) begin
      chk(nwr == NPORT * WLB, $sformatf("beats in batch %0d: %0d", ndone, nwr));
      nwr = 0;
      ndone++;
      full <= full | (full[0] ? 2'b10 : 2'b01);
    end
  end
  // consumer frees a bank now and then
  initial forever begin
    @(posedge clk);
    if (full != 0 && $urandom_range(0, 1500) == 0) full <= full[1] ? 2'b01 : 2'b00;
  end

  initial begin
    #22 rst_n = 1;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    @(posedge clk);
    chk(ndone == KB * ROWS, $sformatf("batches %0d", ndone));
    chk(bursts == 4 * NPORT * KB * ROWS, $sformatf("bursts %0d", bursts));
    chk(beats == WLB * NPORT * KB * ROWS, "beats");
    chk(bad_len == 0, "burst lengths");
    chk(waits > 0, "never waited for a free KLM bank");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
