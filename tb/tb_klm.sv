// tb_klm: kernel local memory handshake and contents.
// A loader writes batches (two ports, one 16-word beat each per cycle) while
// a reader consumes them after a random delay; checks the ready flags after
// every event (a full bank blocks the loader, an empty one the reader), that
// each batch is read back intact from the read bank while the next is being
// written, and that batches come out in the order they were loaded.
module tb_klm;
  import cnn_pkg::*;
  localparam int DEPTH = 64, NPORT = 2, NRD = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic wr_ready, wr_done = 0, rd_ready, rd_release = 0;
  logic [NPORT-1:0] we = '0;
  logic [NPORT-1:0][5:0] waddr;
  logic [NPORT-1:0][AXI_DW-1:0] wdata;
  logic [NRD-1:0][5:0] raddr;
  word_t [NRD-1:0] rdata;
  klm #(.DEPTH(DEPTH), .NPORT(NPORT), .NRD(NRD)) dut (.clk, .rst_n, .wr_ready, .wr_done, .we, .waddr,
    .wdata, .rd_ready, .rd_release, .raddr, .rdata);
  int checks = 0, failures = 0;
  int loaded = 0, consumed = 0, blocked_w = 0, blocked_r = 0;
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  function automatic word_t val(int batch, int a); return word_t'(batch * 97 + a * 3 + 1); endfunction
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // loader
  initial begin
    wait (rst_n);
    for (int b = 0; b < 8; b++) begin
      @(posedge clk); #1;
      while (!wr_ready) begin blocked_w++; @(posedge clk); #1; end
      for (int beat = 0; beat < 2; beat++) begin
        for (int p = 0; p < NPORT; p++) begin
          waddr[p] = 6'(p * 32 + beat * 16);
          for (int i = 0; i < 16; i++) wdata[p][i*16 +: 16] = val(b, p * 32 + beat * 16 + i);
        end
        we = '1; @(posedge clk); #1; we = '0;
      end
      chk(wr_ready, "write bank still free before done");
      wr_done = 1; @(posedge clk); #1; wr_done = 0;
      loaded++;
      repeat ($urandom_range(0, 6)) @(posedge clk);
    end
  end
  // reader
  initial begin
    wait (rst_n);
    for (int b = 0; b < 8; b++) begin
      @(posedge clk); #1;
      while (!rd_ready) begin blocked_r++; @(posedge clk); #1; end
      chk(loaded > consumed, "read bank ready without a loaded batch");
      for (int a = 0; a < DEPTH; a += NRD) begin
        for (int r = 0; r < NRD; r++) raddr[r] = 6'(a + r);
        @(posedge clk); #1;
        for (int r = 0; r < NRD; r++) chk(rdata[r] == val(b, a + r), $sformatf("batch %0d word %0d got %0d", b, a + r, rdata[r]));
      end
      rd_release = 1; @(posedge clk); #1; rd_release = 0;
      consumed++;
      repeat ($urandom_range(0, 40)) @(posedge clk);
    end
    chk(blocked_w > 0, "loader never blocked by two full banks");
    chk(blocked_r > 0, "reader never waited");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin raddr = '0; #12 rst_n = 1; end
endmodule
