// hbm_model: behavioural model of the HBM2 stacks behind NP AXI4 read ports.
//
// Not synthesizable; used by testbenches only. Every port accepts read
// bursts (INCR, 32-byte beats) into a 4-deep queue, drops arready on every
// READY_GAP-th cycle to exercise the masters' waiting, and returns the beats
// of the oldest burst one per cycle after LAT cycles, with RID copied from
// ARID and RLAST on the final beat. Beat content comes from tb_pkg::hbm_word,
// so memory needs no storage. It counts the bursts and beats it served and
// flags a burst longer than 256 beats or of a length that is not a power of
// two (the accelerator only issues 1, 2, 4, ..., 256).
module hbm_model #(
  parameter int NP        = 1,
  parameter int LAT       = 3,
  parameter int READY_GAP = 5
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [NP-1:0]                ar_valid,
  output logic [NP-1:0]                ar_ready,
  input  cnn_pkg::axi_ar_t [NP-1:0]    ar,
  output logic [NP-1:0]                r_valid,
  input  logic [NP-1:0]                r_ready,
  output cnn_pkg::axi_r_t [NP-1:0]     r,
  output int                           bursts,
  output int                           beats,
  output int                           bad_len
);
  import cnn_pkg::*;

  int cyc;

  for (genvar p = 0; p < NP; p++) begin : g_p
    axi_ar_t q[$];
    int      beat, wait_c;
    assign ar_ready[p] = (q.size() < 4) && ((cyc + p) % READY_GAP != 0);
    assign r_valid[p]  = (q.size() > 0) && (wait_c >= LAT);
    always_comb begin
      r[p] = '0;
      if (q.size() > 0) begin
        r[p].id   = q[0].id;
        r[p].last = (beat == int'(q[0].len));
        for (int i = 0; i < WPB; i++)
          r[p].data[i*DW +: DW] = tb_pkg::hbm_word(longint'(q[0].addr) / 2 + beat * WPB + i);
      end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        q.delete(); beat <= 0; wait_c <= 0;
      end else begin
        if (q.size() > 0 && wait_c < LAT) wait_c <= wait_c + 1;
        if (r_valid[p] && r_ready[p]) begin
          if (beat == int'(q[0].len)) begin void'(q.pop_front()); beat <= 0; wait_c <= 0; end
          else beat <= beat + 1;
        end
        if (ar_valid[p] && ar_ready[p]) q.push_back(ar[p]);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin bursts <= 0; beats <= 0; bad_len <= 0; cyc <= 0; end
    else begin
      int nb, nt, nl;
      nb = 0; nt = 0; nl = 0;
      for (int p = 0; p < NP; p++) begin
        if (ar_valid[p] && ar_ready[p]) begin
          nb++;
          if (((int'(ar[p].len) + 1) & int'(ar[p].len)) != 0) nl++;
        end
        if (r_valid[p] && r_ready[p]) nt++;
      end
      cyc <= cyc + 1; bursts <= bursts + nb; beats <= beats + nt; bad_len <= bad_len + nl;
    end
  end
endmodule
