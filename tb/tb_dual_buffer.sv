// tb_dual_buffer: ping-pong local memory.
// Fills the write bank with multi-word writes from two ports, checks that
// the read ports see the other bank until swap, then see the new data with
// one cycle of latency, that the two banks keep separate contents, and that
// words beyond DEPTH are dropped and read as 0.
module tb_dual_buffer;
  localparam int DEPTH = 40, DW = 16, NWR = 2, WW = 4, NRD = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic swap = 0, wbank;
  logic [NWR-1:0] we = '0;
  logic [NWR-1:0][5:0] waddr;
  logic [NWR-1:0][WW*DW-1:0] wdata;
  logic [NRD-1:0][5:0] raddr;
  logic [NRD-1:0][DW-1:0] rdata;
  dual_buffer #(.DEPTH(DEPTH), .DW(DW), .NWR(NWR), .WWORDS(WW), .NRD(NRD)) dut (
    .clk, .rst_n, .swap, .wbank, .we, .waddr, .wdata, .raddr, .rdata);
  int checks = 0, failures = 0;
  logic [DW-1:0] model [2][DEPTH];
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  task automatic fill(int bank, int seed);
    for (int a = 0; a < DEPTH; a += 2 * WW) begin
      for (int p = 0; p < NWR; p++) begin
        waddr[p] = 6'(a + p * WW);
        for (int i = 0; i < WW; i++) begin
          wdata[p][i*DW +: DW] = DW'(seed * 1000 + a + p * WW + i);
          if (a + p * WW + i < DEPTH) model[bank][a + p * WW + i] = DW'(seed * 1000 + a + p * WW + i);
        end
      end
      we = '1;
      @(posedge clk); #1;
    end
    we = '0;
  endtask
  task automatic readall(int bank);
    for (int a = 0; a < DEPTH + 3; a += NRD) begin
      for (int r = 0; r < NRD; r++) raddr[r] = 6'(a + r);
      @(posedge clk); #1;
      for (int r = 0; r < NRD; r++)
        chk(rdata[r] == ((a + r < DEPTH) ? model[bank][a + r] : '0), $sformatf("bank %0d addr %0d got %0d", bank, a + r, rdata[r]));
    end
  endtask
  initial begin
    raddr = '0;
    #12 rst_n = 1;
    @(posedge clk); #1;
    chk(wbank == 1'b0, "write bank after reset");
    fill(0, 1);
    swap = 1; @(posedge clk); #1; swap = 0;
    chk(wbank == 1'b1, "write bank after swap");
    readall(0);
    fill(1, 2);          // writing bank 1 must not disturb reads of bank 0
    readall(0);
    swap = 1; @(posedge clk); #1; swap = 0;
    readall(1);
    swap = 1; @(posedge clk); #1; swap = 0;
    readall(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
