// tb_fsm_ctrl: pipeline step controller with model units.
// Each unit (image loader, NL layers) stays busy a random time after its
// start. Checks which units start in which step (loader for steps 0..G-1 with
// group = step, layer l for steps l+1..G+l), that a swap never comes while a
// unit is busy, the number of steps, done and out_swap at the end, out_group,
// the AGB address offsets, and that start with zero groups does nothing.
module tb_fsm_ctrl;
  import cnn_pkg::*;
  localparam int NL = 4, NP = 5, G = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic start = 0, busy, done, img_start, img_busy = 0, swap, out_swap;
  logic [15:0] n_groups, step, img_group, out_group;
  logic [NL-1:0] layer_start, layer_busy = '0;
  logic [NP-1:0][AXI_AW-1:0] addr_offset;
  fsm_ctrl #(.NL(NL), .NP(NP)) dut (.clk, .rst_n, .start, .n_groups, .busy, .done, .step, .img_start,
    .img_group, .img_busy, .layer_start, .layer_busy, .swap, .out_swap, .out_group, .addr_offset);

  int checks = 0, failures = 0, nswap = 0, ndone = 0, nimg = 0, nlay[NL];
  task automatic chk(bit ok, string s); checks++; if (!ok) begin failures++; $display("FAIL %s", s); end endtask
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n) begin
    if (swap) begin
      chk(!img_busy && layer_busy == '0, "swap while a unit is busy");
      nswap++;
    end
    if (done) ndone++;
    if (img_start) begin
      chk(step < G && img_group == step, "image loader start");
      nimg++;
    end
    for (int l = 0; l < NL; l++) if (layer_start[l]) begin
      chk(int'(step) >= l + 1 && int'(step) <= G + l, $sformatf("layer %0d started in step %0d", l, step));
      nlay[l]++;
    end
    if (layer_start[NL-1]) chk(int'(out_group) == int'(step) - NL, "out_group");
  end
  // model units
  initial forever begin
    @(posedge clk);
    if (img_start) fork begin img_busy <= 1; repeat ($urandom_range(1, 20)) @(posedge clk); img_busy <= 0; end join_none
  end
  for (genvar l = 0; l < NL; l++) begin : g_u
    initial forever begin
      @(posedge clk);
      if (layer_start[l]) fork begin layer_busy[l] <= 1; repeat ($urandom_range(1, 30)) @(posedge clk); layer_busy[l] <= 0; end join_none
    end
  end

  initial begin
    #22 rst_n = 1;
    for (int p = 0; p < NP; p++) chk(addr_offset[p] == AXI_AW'(longint'(p + 1) * PART_BYTES), "Addr_offset");
    n_groups = 0;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    repeat (3) @(posedge clk);
    chk(!busy, "zero groups ignored");
    n_groups = G;
    @(posedge clk); start <= 1; @(posedge clk); start <= 0;
    wait (done);
    chk(out_swap, "OUT LM handed over with done");
    repeat (3) @(posedge clk);
    chk(nswap == G + NL, $sformatf("steps %0d", nswap));
    chk(ndone == 1 && !busy, "done once");
    chk(nimg == G, "image loads");
    for (int l = 0; l < NL; l++) chk(nlay[l] == G, $sformatf("layer %0d runs %0d", l, nlay[l]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
