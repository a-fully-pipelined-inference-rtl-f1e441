// klm: shared dual kernel local memory of one layer.
//
// One KLM per layer holds kernel batches in a ping-pong dual_buffer: the
// layer's address generator block (AGB) fills one bank from HBM2 while the
// computation engines of all cores read the batch in the other bank. Every
// core reads the same words at the same time, so one set of read ports is
// broadcast to all of them (the kernel sharing between cores of the design).
// Each bank has a full flag. wr_ready tells the AGB that the write bank is
// free; wr_done marks it full. rd_ready tells the engines that the read bank
// holds a batch; rd_release empties it. The banks are exchanged as soon as the
// write bank is full and the read bank empty, so a freshly loaded batch is
// handed over in the cycle after both conditions hold. The flag protocol is
// this design's choice; the double buffering follows the design description.
module klm #(
  parameter int DEPTH = 1024,
  parameter int NPORT = 1,                 // AGB write ports (one per HBM2 port)
  parameter int NRD   = 73,                // weights + bias read per cycle
  localparam int DW   = cnn_pkg::DW,
  localparam int WB   = cnn_pkg::AXI_DW,
  localparam int AW   = (DEPTH <= 2) ? 1 : $clog2(DEPTH)
) (
  input  logic                    clk,
  input  logic                    rst_n,
  output logic                    wr_ready,
  input  logic                    wr_done,
  input  logic [NPORT-1:0]        we,
  input  logic [NPORT-1:0][AW-1:0] waddr,
  input  logic [NPORT-1:0][WB-1:0] wdata,
  output logic                    rd_ready,
  input  logic                    rd_release,
  input  logic [NRD-1:0][AW-1:0]  raddr,
  output logic [NRD-1:0][DW-1:0]  rdata
);
  logic       wbank, swap;
  logic [1:0] full, full_n;

  always_comb begin
    full_n = full;
    if (wr_done)    full_n[wbank]  = 1'b1;
    if (rd_release) full_n[~wbank] = 1'b0;
    swap = full_n[wbank] & ~full_n[~wbank];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) full <= 2'b00;
    else        full <= full_n;

  assign wr_ready = ~full[wbank];
  assign rd_ready = full[~wbank];

  dual_buffer #(.DEPTH(DEPTH), .DW(DW), .NWR(NPORT), .WWORDS(cnn_pkg::WPB), .NRD(NRD)) u_mem (
    .clk, .rst_n, .swap, .wbank, .we, .waddr, .wdata, .raddr, .rdata);

  a_no_overfill: assert property (@(posedge clk) disable iff (!rst_n) wr_done |-> wr_ready)
    else $error("klm: batch written into a full bank");
  a_no_empty_release: assert property (@(posedge clk) disable iff (!rst_n) rd_release |-> rd_ready)
    else $error("klm: release of an empty bank");
endmodule
