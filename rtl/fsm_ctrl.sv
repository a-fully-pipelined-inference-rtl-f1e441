// fsm_ctrl: FSM controller of the accelerator.
//
// The host starts an inference run with start and the number of image groups
// n_groups (a group is one image per core). The controller then runs the
// inter-layer pipeline in steps. In step s the image loader brings group s
// into the IN LMs, and the AGB and engine of layer l (0-based) work on group
// s-l-1, so NL+1 groups are in flight. A unit takes part in a step only if its
// group exists. When every unit that started has gone idle, swap exchanges
// all IN LM and FLM banks and the next step begins. After n_groups+NL steps
// the run ends: out_swap hands the OUT LM bank holding the labels to the host
// and done pulses. out_group tells the last layer which group it finishes.
// The controller also supplies each AGB port's Addr_offset: port p (of the
// accelerator's NP ports, HBM2 AXI port p+1) starts at the beginning of that
// port's own 256 MB HBM2 region, (p+1) * 256 MB.
// Starting the run and synchronising all engines is the controller's role in
// the design description; the step protocol is this design's.
module fsm_ctrl #(
  parameter int NL = cnn_pkg::VGG_L,
  parameter int NP = 31
) (
  input  logic                               clk,
  input  logic                               rst_n,
  input  logic                               start,
  input  logic [15:0]                        n_groups,
  output logic                               busy,
  output logic                               done,
  output logic [15:0]                        step,
  output logic                               img_start,
  output logic [15:0]                        img_group,
  input  logic                               img_busy,
  output logic [NL-1:0]                      layer_start,   // AGB and engine of layer l
  input  logic [NL-1:0]                      layer_busy,
  output logic                               swap,
  output logic                               out_swap,
  output logic [15:0]                        out_group,
  output logic [NP-1:0][cnn_pkg::AXI_AW-1:0] addr_offset
);
  import cnn_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_GO, S_WAIT} state_t;
  state_t      state;
  logic [15:0] ngrp;

  always_comb
    for (int p = 0; p < NP; p++) addr_offset[p] = AXI_AW'(longint'(p + 1) * PART_BYTES);

  assign busy      = (state != S_IDLE);
  assign img_group = step;
  assign img_start = (state == S_GO) && (step < ngrp);
  always_comb
    for (int l = 0; l < NL; l++)
      layer_start[l] = (state == S_GO) && (int'(step) >= l + 1) && (int'(step) - l - 1 < int'(ngrp));
  assign out_group = 16'(int'(step) - NL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; step <= '0; ngrp <= '0; swap <= 1'b0; out_swap <= 1'b0; done <= 1'b0;
    end else begin
      swap <= 1'b0; out_swap <= 1'b0; done <= 1'b0;
      case (state)
        S_IDLE: if (start && n_groups != 0) begin
          state <= S_GO; step <= '0; ngrp <= n_groups;
        end
        S_GO:   state <= S_WAIT;
        S_WAIT: if (!img_busy && layer_busy == '0 && !swap) begin
          swap <= 1'b1;
          if (int'(step) == int'(ngrp) + NL - 1) begin
            state <= S_IDLE; out_swap <= 1'b1; done <= 1'b1;
          end else begin
            step <= step + 1; state <= S_GO;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
