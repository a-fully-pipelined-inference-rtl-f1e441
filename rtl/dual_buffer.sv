// dual_buffer: two-bank ping-pong local memory (IN LM, FLM, OUT LM, KLM storage).
//
// Both banks are DEPTH words of DW bits. At any time one bank is the write
// bank and the other the read bank; a one-cycle pulse on swap exchanges them,
// so a producer fills one bank while a consumer reads what was produced before.
// This is the dual-buffer scheme of the accelerator's local memories; the port
// counts are this design's choice and follow what the units around it need:
// NWR write ports, each writing WWORDS consecutive words at once (16 for an
// AXI beat, 1 for a computation engine), and NRD independent read ports.
// Reads are synchronous: rdata is valid the cycle after raddr, from the bank
// that was the read bank when raddr was presented. Words written beyond DEPTH
// are dropped. Bank 0 is the write bank after reset.
module dual_buffer #(
  parameter int DEPTH  = 1024,
  parameter int DW     = 16,
  parameter int NWR    = 1,
  parameter int WWORDS = 1,
  parameter int NRD    = 1,
  localparam int AW    = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         swap,
  output logic                         wbank,              // current write bank
  input  logic [NWR-1:0]               we,
  input  logic [NWR-1:0][AW-1:0]       waddr,
  input  logic [NWR-1:0][WWORDS*DW-1:0] wdata,             // word i at waddr+i
  input  logic [NRD-1:0][AW-1:0]       raddr,
  output logic [NRD-1:0][DW-1:0]       rdata
);
  logic [DW-1:0] mem0 [DEPTH];
  logic [DW-1:0] mem1 [DEPTH];

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)    wbank <= 1'b0;
    else if (swap) wbank <= ~wbank;

  always_ff @(posedge clk) begin
    for (int p = 0; p < NWR; p++)
      if (we[p])
        for (int i = 0; i < WWORDS; i++)
          if (int'(waddr[p]) + i < DEPTH) begin
            if (wbank) mem1[int'(waddr[p]) + i] <= wdata[p][i*DW +: DW];
            else       mem0[int'(waddr[p]) + i] <= wdata[p][i*DW +: DW];
          end
    for (int r = 0; r < NRD; r++)
      if (int'(raddr[r]) < DEPTH)
        rdata[r] <= wbank ? mem0[raddr[r]] : mem1[raddr[r]];
      else
        rdata[r] <= '0;
  end
endmodule
