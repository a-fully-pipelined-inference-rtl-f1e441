// agb: address generator block of one layer (one per computation engine).
//
// An AGB loads the layer's kernel parameters from HBM2 into the layer's KLM,
// one kernel batch at a time, over NPORT AXI4 ports in parallel. A batch of
// len(KBatch) words is split evenly over the ports, len(Workload) = WL_BEATS
// beats each; port p of batch KBatch_id reads from
//   Addr_base = (KBatch_id - 1) * len(Workload) + Addr_offset[p]
// and writes its beats to KLM words p*len(Workload) onward. After start the
// AGB loads the KB batches of one output row ROWS times over (the engine
// needs the whole kernel set again for every row), waiting before each
// batch until the KLM has a free bank, and pulses klm_wr_done when all ports
// have delivered the batch. This follows the design description (Eq. 5-9);
// the per-row reload order and the start/busy control are read from its
// workflow, and the interface to the KLM is this design's choice.
module agb #(
  parameter int NPORT    = 1,
  parameter int WL_BEATS = 4,     // beats per port per batch
  parameter int KB       = 2,     // batches per row of output maps
  parameter int ROWS     = 2,     // rows of output maps per image
  parameter logic [cnn_pkg::AXI_IDW-1:0] ID = '0,
  localparam int KAW     = cnn_pkg::clog2c(NPORT * WL_BEATS * cnn_pkg::WPB)
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   start,
  input  logic [NPORT-1:0][cnn_pkg::AXI_AW-1:0]  addr_offset,
  output logic                                   busy,
  output logic [15:0]                            kbatch_id,    // 1..KB
  // KLM write side
  input  logic                                   klm_wr_ready,
  output logic                                   klm_wr_done,
  output logic [NPORT-1:0]                       klm_we,
  output logic [NPORT-1:0][KAW-1:0]              klm_waddr,
  output logic [NPORT-1:0][cnn_pkg::AXI_DW-1:0]  klm_wdata,
  // AXI4 read ports
  output logic [NPORT-1:0]                       ar_valid,
  input  logic [NPORT-1:0]                       ar_ready,
  output cnn_pkg::axi_ar_t [NPORT-1:0]           ar,
  input  logic [NPORT-1:0]                       r_valid,
  output logic [NPORT-1:0]                       r_ready,
  input  cnn_pkg::axi_r_t [NPORT-1:0]            r
);
  import cnn_pkg::*;

  localparam longint WL_BYTES = longint'(WL_BEATS) * BEAT_B;

  typedef enum logic [1:0] {S_IDLE, S_WAIT, S_LOAD} state_t;
  state_t state;

  logic [31:0]      row;
  logic             port_start;
  logic [NPORT-1:0] port_busy, port_done, got;

  for (genvar p = 0; p < NPORT; p++) begin : g_port
    logic [31:0] wbeat;
    axi_burst_reader #(.ID(ID)) u_rd (
      .clk, .rst_n, .start(port_start),
      .base(addr_offset[p] + AXI_AW'(longint'(kbatch_id - 1) * WL_BYTES)),
      .nbeats(32'(WL_BEATS)), .busy(port_busy[p]), .done(port_done[p]),
      .ar_valid(ar_valid[p]), .ar_ready(ar_ready[p]), .ar(ar[p]),
      .r_valid(r_valid[p]), .r_ready(r_ready[p]), .r(r[p]),
      .we(klm_we[p]), .wbeat(wbeat), .wdata(klm_wdata[p]));
    assign klm_waddr[p] = KAW'((p * WL_BEATS + int'(wbeat)) * WPB);
  end

  assign port_start = (state == S_WAIT) && klm_wr_ready && !klm_wr_done;
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; row <= '0; kbatch_id <= 16'd1; got <= '0; klm_wr_done <= 1'b0;
    end else begin
      klm_wr_done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin state <= S_WAIT; row <= '0; kbatch_id <= 16'd1; end
        S_WAIT: if (klm_wr_ready && !klm_wr_done) begin state <= S_LOAD; got <= '0; end
        S_LOAD: begin
          if ((got | port_done) == '1) begin
            klm_wr_done <= 1'b1;
            if (int'(kbatch_id) == KB) begin
              kbatch_id <= 16'd1;
              if (int'(row) == ROWS - 1) state <= S_IDLE;
              else begin row <= row + 1; state <= S_WAIT; end
            end else begin
              kbatch_id <= kbatch_id + 1; state <= S_WAIT;
            end
          end else got <= got | port_done;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
