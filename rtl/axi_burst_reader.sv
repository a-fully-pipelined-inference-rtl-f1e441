// axi_burst_reader: one AXI4 read master port of an address generator block.
//
// On start it reads nbeats consecutive 256-bit beats beginning at byte address
// base. It splits the region into INCR bursts whose length is the largest of
// 1, 2, 4, ..., 256 beats that fits in what is left, so #Transfer bursts of
// Burst_len beats cover len(Workload). Address requests are issued back to
// back without waiting for data; every beat received is handed on at once
// (we, beat index counted from 0, data), so rready is always high. done pulses
// for one cycle when the last beat has arrived. The burst-length rule follows
// the design description; the address-ahead issue is this design's choice.
// Bursts are not split at 4 KB boundaries: HBM2 pseudo-channel ports accept
// them and the description uses bursts of up to 256 x 32 bytes.
module axi_burst_reader #(
  parameter logic [cnn_pkg::AXI_IDW-1:0] ID = '0
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         start,
  input  logic [cnn_pkg::AXI_AW-1:0]   base,
  input  logic [31:0]                  nbeats,
  output logic                         busy,
  output logic                         done,
  output logic                         ar_valid,
  input  logic                         ar_ready,
  output cnn_pkg::axi_ar_t             ar,
  input  logic                         r_valid,
  output logic                         r_ready,
  input  cnn_pkg::axi_r_t              r,
  output logic                         we,
  output logic [31:0]                  wbeat,
  output logic [cnn_pkg::AXI_DW-1:0]   wdata
);
  import cnn_pkg::*;

  logic [31:0]       issued, received, total;
  logic [AXI_AW-1:0] next_addr;
  logic [8:0]        blen;

  // largest power of two not above min(remaining, 256)
  always_comb begin
    logic [31:0] rem;
    rem  = total - issued;
    blen = 9'd1;
    for (int i = 1; i <= 8; i++)
      if (rem >= (32'd1 << i)) blen = 9'(1 << i);
  end

  assign ar_valid = busy && (issued != total);
  assign ar.id    = ID;
  assign ar.addr  = next_addr;
  assign ar.len   = 8'(blen - 9'd1);
  assign ar.size  = 3'b101;
  assign ar.burst = 2'b01;
  assign r_ready  = 1'b1;

  assign we    = busy && r_valid;
  assign wbeat = received;
  assign wdata = r.data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0; done <= 1'b0; issued <= '0; received <= '0; total <= '0; next_addr <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= (nbeats != 0); done <= (nbeats == 0);
          issued <= '0; received <= '0; total <= nbeats; next_addr <= base;
        end
      end else begin
        if (ar_valid && ar_ready) begin
          issued    <= issued + 32'(blen);
          next_addr <= next_addr + AXI_AW'(blen) * AXI_AW'(BEAT_B);
        end
        if (r_valid) begin
          received <= received + 1;
          if (received + 1 == total) begin busy <= 1'b0; done <= 1'b1; end
        end
      end
    end
  end

  a_ar_stable: assert property (@(posedge clk) disable iff (!rst_n)
    ar_valid && !ar_ready |=> ar_valid && $stable(ar))
    else $error("axi_burst_reader: AR changed while waiting for ready");
endmodule
